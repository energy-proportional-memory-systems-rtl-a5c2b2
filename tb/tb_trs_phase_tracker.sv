// tb_trs_phase_tracker: models a channel whose bit edges arrive `off` of
// eight sample slots into the controller's bit time and checks that the
// recovered sample phase converges to off + 4 (middle of the bit), that the
// recovered bits then equal the sent bits, that the loop follows a drift of
// the offset, and that it holds its phase while disabled.
module tb_trs_phase_tracker;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] os;
  logic [2:0] phase;
  logic bit_out, update, locked;
  logic cur = 0, prev = 0;
  int   off = 1;
  int   nupd = 0;
  always #5 clk = ~clk;

  trs_phase_tracker dut (.*);

  // samples before the edge still show the previous bit
  always_comb for (int k = 0; k < 8; k++) os[k] = (k < off) ? prev : cur;

  always @(posedge clk) if (update) nupd++;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int n, input bit toggle, input bit check_bits);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      prev = cur;
      cur  = toggle ? ~cur : 1'($urandom);
      #1;
      if (check_bits) begin
        checks++;
        if (bit_out !== cur) begin failures++; $display("bit mismatch off=%0d ph=%0d", off, phase); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    en = 1;
    for (int j = 0; j < 4; j++) begin
      off = j;
      send(12, 1, 0);
      checks += 2;
      if (phase != 3'(off + 4)) begin failures++; $display("off %0d phase %0d", off, phase); end
      if (!locked) begin failures++; $display("not locked off %0d", off); end
      send(40, 0, 1);
    end
    // drift back by one slot per 8 bits
    for (off = 3; off >= 0; off--) send(8, 1, 0);
    off = 0;
    send(4, 1, 0);
    checks++; if (phase != 3'd4) begin failures++; $display("drift phase %0d", phase); end
    // disabled: phase holds, no update pulses
    en = 0;
    @(negedge clk);
    nupd = 0;
    off = 3;
    send(20, 1, 0);
    checks += 2;
    if (phase != 3'd4) begin failures++; $display("held phase %0d", phase); end
    if (nupd != 0) begin failures++; $display("updates while disabled %0d", nupd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
