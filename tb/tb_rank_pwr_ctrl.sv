// tb_rank_pwr_ctrl: checks the idle-threshold powerdown (CKE low after
// exactly 15 idle cycles), command-block wake-up (cmd_rdy T_XP = 4 cycles
// after CKE rises, one wake pulse), the separate data block (DCKE follows
// data_req, data_rdy T_XPD = 7 cycles after DCKE rises, DCKE drops at once
// when not needed) and, without split, DCKE mirroring CKE.
module tb_rank_pwr_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, split = 1, wake_req = 0, data_req = 0;
  logic cke, dcke, cmd_rdy, data_rdy, wake, powered_down;
  int nwake = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && wake) nwake++;

  rank_pwr_ctrl dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_after(input string what, ref logic sig, input int n);
    int t = 0;
    while (!sig && t < 100) begin @(negedge clk); t++; end
    checks++;
    if (t != n) begin failures++; $display("%s after %0d, expected %0d", what, t, n); end
  endtask

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks += 3;
    if (cke || dcke || !powered_down) failures++;
    // wake the command block
    wake_req = 1;
    @(negedge clk);
    checks++; if (!cke) failures++;
    expect_after("cmd_rdy", cmd_rdy, 4);
    checks++; if (dcke) begin failures++; $display("DCKE without data_req"); end
    // data block
    data_req = 1;
    @(negedge clk);
    checks++; if (!dcke) failures++;
    expect_after("data_rdy", data_rdy, 7);
    data_req = 0;
    @(negedge clk);
    checks++; if (dcke || data_rdy) begin failures++; $display("DCKE held"); end
    // idle threshold
    wake_req = 0;
    t = 0;
    while (cke && t < 100) begin @(negedge clk); t++; end
    checks++; if (t != 15) begin failures++; $display("powerdown after %0d", t); end
    // a request in the middle of the idle count restarts it
    wake_req = 1; @(negedge clk); wake_req = 0;
    repeat (10) @(negedge clk);
    wake_req = 1; @(negedge clk); wake_req = 0;
    repeat (14) @(negedge clk);
    checks++; if (!cke) begin failures++; $display("early powerdown"); end
    @(negedge clk);
    checks++; if (cke) begin failures++; $display("late powerdown"); end
    checks++; if (nwake != 2) begin failures++; $display("wakes %0d", nwake); end
    // without split: one enable
    split = 0;
    wake_req = 1;
    @(negedge clk);
    checks++; if (dcke !== cke) failures++;
    expect_after("cmd_rdy/ns", cmd_rdy, 4);
    checks++; if (data_rdy !== cmd_rdy || dcke !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
