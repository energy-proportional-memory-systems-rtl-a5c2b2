// tb_edc_trs_tx: checks the 32-bit EDC burst of a read (8 code bits then
// 1010... timing reference) and of a ping (toggling throughout), its length
// and that the pin idles low.
module tb_edc_trs_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, is_ping = 0;
  logic [7:0] crc = 0;
  logic edc, busy;
  always #5 clk = ~clk;

  edc_trs_tx dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(input logic ping, input logic [7:0] code);
    logic exp;
    @(negedge clk); start = 1; is_ping = ping; crc = code;
    @(negedge clk); start = 0; crc = ~code;
    for (int i = 0; i < 32; i++) begin
      if (!ping && i < 8) exp = code[7-i];
      else                exp = (i % 2 == 0);
      checks++;
      if (edc !== exp || busy !== 1'b1) begin
        failures++; $display("bit %0d ping=%0d got %b exp %b", i, ping, edc, exp);
      end
      @(negedge clk);
    end
    checks++;
    if (busy || edc) begin failures++; $display("burst did not end after 32"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++; if (edc !== 0) failures++;
    burst(0, 8'hA5);
    burst(0, 8'h3C);
    burst(1, 8'hFF);
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
