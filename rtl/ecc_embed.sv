// ecc_embed: embedded error detection for x16 LPDDR2 channels.
//
// With x16 parts a 72-bit ECC interface does not divide evenly, so the check
// bits are stored in ordinary memory next to the data and the controller
// reads them with a second access. Each 128-bit word (eight 16-bit symbols,
// one per x16 device of two ranks) is protected by 2b = 32 check bits: two
// 16-bit symbols P0 = sum(d_i) and P1 = sum(alpha^i * d_i) over GF(2^16).
// This is a Reed-Solomon style code of distance 3, so any error confined to
// one or two device symbols is detected (the first tier; correction bits are
// not stored). A 512-bit line has four words and 128 check bits, so one ECC
// line holds the checks of four data lines: data line L keeps its checks in
// slot L mod 4 of line ECC_BASE + L/4.
// The tiered scheme, 2b check bits per symbol group and the embedding in the
// data space follow the source design; the actual code (field polynomial
// x^16+x^12+x^3+x+1), the layout and ECC_BASE are this design's own.
// Purely combinational: encoder, checker and address map.
module ecc_embed #(
  parameter int unsigned LADDR_W  = emem_pkg::LADDR_W,
  parameter int unsigned LINE_W   = emem_pkg::LINE_W,
  parameter logic [LADDR_W-1:0] ECC_BASE = LADDR_W'((64'd1 << LADDR_W) / 5 * 4)
) (
  input  logic [LADDR_W-1:0]  data_addr,
  output logic [LADDR_W-1:0]  ecc_addr,
  output logic [1:0]          ecc_slot,
  output logic                addr_in_ecc_space,
  input  logic [LINE_W-1:0]   enc_data,
  output logic [LINE_W/4-1:0] enc_check,
  input  logic [LINE_W-1:0]   chk_data,
  input  logic [LINE_W/4-1:0] chk_check,
  output logic [LINE_W/128-1:0] chk_err
);
  localparam int unsigned WORDS = LINE_W / 128;

  function automatic logic [15:0] gf_mul_alpha(input logic [15:0] x);
    return x[15] ? ({x[14:0], 1'b0} ^ 16'h100B) : {x[14:0], 1'b0};
  endfunction

  function automatic logic [31:0] encode128(input logic [127:0] w);
    logic [15:0] p0, p1;
    p0 = '0; p1 = '0;
    // Horner: p1 = sum alpha^i d_i, evaluated from the highest symbol down
    for (int i = 7; i >= 0; i--) begin
      p0 = p0 ^ w[i*16 +: 16];
      p1 = gf_mul_alpha(p1) ^ w[i*16 +: 16];
    end
    return {p1, p0};
  endfunction

  assign ecc_addr          = ECC_BASE + (data_addr >> 2);
  assign ecc_slot          = data_addr[1:0];
  assign addr_in_ecc_space = (data_addr >= ECC_BASE);

  always_comb begin
    for (int k = 0; k < WORDS; k++) begin
      enc_check[k*32 +: 32] = encode128(enc_data[k*128 +: 128]);
      chk_err[k] = (encode128(chk_data[k*128 +: 128]) != chk_check[k*32 +: 32]);
    end
  end
endmodule
