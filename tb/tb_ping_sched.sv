// tb_ping_sched: checks that a rank is stale after reset, that an update
// clears it, and that the ping request and the stale flag rise exactly
// PING_AFTER and STALE_AFTER cycles after the last update.
module tb_ping_sched;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, update = 0, ping_req, stale;
  always #5 clk = ~clk;

  ping_sched #(.PING_AFTER(20), .STALE_AFTER(30)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks += 2;
    if (!stale) failures++;
    if (!ping_req) failures++;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); update = 1;
      @(negedge clk); update = 0;
      t = 0;
      // age is 0 now
      while (!ping_req && t < 100) begin @(negedge clk); t++; end
      checks++; if (t != 20) begin failures++; $display("ping after %0d", t); end
      checks++; if (stale) failures++;
      while (!stale && t < 100) begin @(negedge clk); t++; end
      checks++; if (t != 30) begin failures++; $display("stale after %0d", t); end
      if (rep == 1) begin
        // an update in the middle restarts the count
        @(negedge clk); update = 1;
        @(negedge clk); update = 0;
        repeat (15) @(negedge clk);
        checks++; if (ping_req) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
