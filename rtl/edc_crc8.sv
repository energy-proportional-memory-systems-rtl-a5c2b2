// edc_crc8: the 8-bit error detection code a fast-wake DRAM computes for every
// read and write burst and returns on its EDC pin.
//
// Purely combinational. The data word is shifted in most significant bit
// first through a CRC-8 with polynomial x^8 + x^2 + x + 1 and a zero initial
// value. The source only states that an 8-bit EDC is sent per burst; the
// choice of a CRC and of this polynomial is this design's own.
// Interface: data (DATA_W bits) in, crc (8 bits) out, no clock.
module edc_crc8 #(
  parameter int unsigned DATA_W = emem_pkg::LINE_W
) (
  input  logic [DATA_W-1:0] data,
  output logic [7:0]        crc
);
  localparam logic [7:0] POLY = 8'h07;

  always_comb begin
    logic [7:0] c;
    c = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      if (c[7] ^ data[i]) c = {c[6:0], 1'b0} ^ POLY;
      else                c = {c[6:0], 1'b0};
    end
    crc = c;
  end
endmodule
