// tb_edc_crc8: checks the EDC CRC-8 against the published check value of
// CRC-8 (poly 0x07, init 0) for "123456789" (0xF4) and against a byte-wise
// table-free reference on random 512-bit lines.
module tb_edc_crc8;
  int checks = 0, failures = 0;
  logic [71:0]  d72;
  logic [7:0]   c72;
  logic [511:0] d512;
  logic [7:0]   c512;

  edc_crc8 #(.DATA_W(72)) dut72 (.data(d72), .crc(c72));
  edc_crc8                dut512 (.data(d512), .crc(c512));

  // reference: process whole bytes, MSB first, eight polynomial steps each
  function automatic logic [7:0] ref_crc(input logic [511:0] d, input int nbytes);
    logic [7:0] c = 8'h00;
    for (int b = nbytes - 1; b >= 0; b--) begin
      c = c ^ d[b*8 +: 8];
      repeat (8) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    end
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d72 = "123456789";
    #1;
    checks++;
    if (c72 !== 8'hF4) begin failures++; $display("check value: got %h", c72); end
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < 16; w++) d512[w*32 +: 32] = $urandom;
      d72 = {$urandom, $urandom, 8'($urandom)};
      #1;
      checks += 2;
      if (c512 !== ref_crc(d512, 64)) begin failures++; $display("512 mismatch"); end
      if (c72 !== ref_crc({440'd0, d72}, 9)) begin failures++; $display("72 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
