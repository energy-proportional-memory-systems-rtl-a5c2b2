// tb_ecc_embed: checks the embedded ECC against a reference written with an
// explicit GF(2^16) multiply: encoded check symbols, no error for a clean
// word, detection of every single-symbol and of random double-symbol
// errors, and the data-to-ECC address map.
module tb_ecc_embed;
  int checks = 0, failures = 0;
  logic [27:0]  data_addr, ecc_addr;
  logic [1:0]   ecc_slot;
  logic         addr_in_ecc_space;
  logic [511:0] enc_data, chk_data;
  logic [127:0] enc_check, chk_check;
  logic [3:0]   chk_err;

  ecc_embed dut (.*);

  function automatic logic [15:0] gmul(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] p = '0;
    for (int i = 0; i < 16; i++) if (b[i]) p ^= 32'(a) << i;
    for (int i = 31; i >= 16; i--) if (p[i]) p ^= 32'h1100B << (i - 16);
    return p[15:0];
  endfunction
  function automatic logic [31:0] ref_enc(input logic [127:0] w);
    logic [15:0] p0 = 0, p1 = 0, ap = 16'h1;
    for (int i = 0; i < 8; i++) begin
      p0 ^= w[i*16 +: 16];
      p1 ^= gmul(ap, w[i*16 +: 16]);
      ap = gmul(ap, 16'h2);
    end
    return {p1, p0};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int w = 0; w < 16; w++) enc_data[w*32 +: 32] = $urandom;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (enc_check[k*32 +: 32] !== ref_enc(enc_data[k*128 +: 128])) begin
          failures++; $display("encode word %0d", k);
        end
      end
      chk_data = enc_data; chk_check = enc_check;
      #1;
      checks++; if (chk_err !== 4'b0) begin failures++; $display("false error"); end
      // single symbol errors, every position of word t%4
      for (int s = 0; s < 8; s++) begin
        chk_data = enc_data;
        chk_data[(t % 4) * 128 + s * 16 +: 16] ^= 16'($urandom_range(1, 65535));
        #1;
        checks++;
        if (chk_err !== 4'(1 << (t % 4))) begin failures++; $display("single miss s=%0d", s); end
      end
      // double symbol error
      begin
        int s1 = $urandom_range(0, 7), s2 = (s1 + $urandom_range(1, 7)) % 8;
        chk_data = enc_data;
        chk_data[s1 * 16 +: 16] ^= 16'($urandom_range(1, 65535));
        chk_data[s2 * 16 +: 16] ^= 16'($urandom_range(1, 65535));
        #1;
        checks++; if (!chk_err[0]) begin failures++; $display("double miss %0d %0d", s1, s2); end
      end
    end
    // address map: ECC of line L at ECC_BASE + L/4, slot L%4
    for (int t = 0; t < 20; t++) begin
      data_addr = 28'($urandom_range(0, 28'd214748364));
      #1;
      checks += 3;
      if (ecc_addr !== 28'(28'd214748364 + (data_addr >> 2))) failures++;
      if (ecc_slot !== data_addr[1:0]) failures++;
      if (addr_in_ecc_space) failures++;
    end
    data_addr = 28'd214748364; #1;
    checks++; if (!addr_in_ecc_space) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
