// tb_drowsy_tx: sends random lines at Z = 1, 2, 4 and 8 and checks every
// clock of the burst: two unit intervals per clock, unit interval u carrying
// beat u / Z, the burst lasting 4 * Z clocks, then the bus released.
module tb_drowsy_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [511:0] line = 0;
  logic [1:0]   zlog = 0;
  logic [127:0] dq;
  logic dq_oe, busy, last;
  always #5 clk = ~clk;

  drowsy_tx dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int zl);
    logic [511:0] l;
    int z = 1 << zl;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = $urandom;
    @(negedge clk); start = 1; line = l; zlog = 2'(zl);
    @(negedge clk); start = 0; line = '0;
    for (int c = 0; c < 4 * z; c++) begin
      for (int s = 0; s < 2; s++) begin
        int u = 2 * c + s;
        checks++;
        if (dq[s*64 +: 64] !== l[(u / z) * 64 +: 64] || !dq_oe) begin
          failures++; $display("Z=%0d clk %0d slot %0d wrong", z, c, s);
        end
      end
      checks++;
      if (last !== (c == 4 * z - 1)) begin failures++; $display("last wrong at %0d", c); end
      @(negedge clk);
    end
    checks++;
    if (dq_oe || busy) begin failures++; $display("Z=%0d burst too long", z); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int zl = 0; zl < 4; zl++) run(zl);
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
