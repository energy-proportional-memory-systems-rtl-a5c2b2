// tb_memcorrect_det: builds the MemCorrect window check from two delay lines
// (dcdl models) that place sampling points before and after the expected
// external clock edge, and checks the Correct pin: no error while the edge is
// inside the window, an error when the window has moved off the edge on
// either side (equivalent to the clock drifting), one report per burst.
`timescale 1ns / 1ps
module tb_memcorrect_det;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, check = 0;
  logic ck_int, ck_ext;
  logic ck_e_d, ck_l_d;
  logic ck_early = 0, ck_late = 0;
  logic correct_valid, correct_err;
  logic [5:0] code_e = 10, code_l = 30;
  int   nvalid = 0;

  // controller-visible clock (1.5 ns period): the DRAM core clock
  always #0.75 clk = ~clk;
  // internal clock 0.55 ns after clk; the delay lines add code * 10 ps, so the
  // external edge (0.75 ns after clk) is at code 20
  assign #0.55 ck_int = clk;
  dcdl u_early (.din(ck_int), .code(code_e), .dout(ck_e_d));
  dcdl u_late  (.din(ck_int), .code(code_l), .dout(ck_l_d));
  assign #0.75 ck_ext = clk;
  always @(posedge ck_e_d) ck_early <= ck_ext;
  always @(posedge ck_l_d) ck_late  <= ck_ext;

  memcorrect_det dut (.*);

  always @(posedge clk) if (correct_valid) nvalid++;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(input int ce, input int cl, input logic exp_err);
    int n0;
    code_e = 6'(ce); code_l = 6'(cl);
    repeat (4) @(negedge clk);
    n0 = nvalid;
    check = 1;
    repeat (6) @(negedge clk);
    check = 0;
    @(posedge clk); #0.1;
    checks += 3;
    if (!correct_valid) begin failures++; $display("no report %0d %0d", ce, cl); end
    if (correct_err !== exp_err) begin failures++; $display("window %0d..%0d err %b", ce, cl, correct_err); end
    repeat (3) @(negedge clk);
    if (nvalid != n0 + 1) begin failures++; $display("reports %0d", nvalid - n0); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    burst(10, 30, 0);  // edge centred in a +-100 ps window
    burst(16, 24, 0);  // +-40 ps window, still around the edge
    burst(22, 40, 1);  // window starts after the edge (clock early)
    burst(0, 18, 1);   // window ends before the edge (clock late)
    burst(10, 30, 0);  // error does not stick to the next burst
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
