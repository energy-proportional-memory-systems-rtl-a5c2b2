// tb_drowsy_rx: checks the per-rank drowsy timers (drowsy for exactly Y
// cycles after a CKE rising edge, restarted by each new wake-up) and the
// capture of bursts sent at f/Z for Z = 1, 2, 4, 8, including the done
// timing of 4 * Z clocks after start.
module tb_drowsy_rx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] cke = 0, drowsy;
  logic [1:0] zlog = 0;
  logic [127:0] dq = 0;
  logic [511:0] line;
  logic done;
  always #5 clk = ~clk;

  drowsy_rx #(.NR(2), .Y(20)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rx(input int zl);
    logic [511:0] l;
    int z = 1 << zl;
    int t = 0;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = $urandom;
    for (int c = 0; c < 4 * z; c++) begin
      @(negedge clk);
      start = (c == 0); zlog = 2'(zl);
      for (int s = 0; s < 2; s++) dq[s*64 +: 64] = l[((2*c + s) / z) * 64 +: 64];
    end
    @(negedge clk); start = 0; dq = '1;
    checks += 2;
    if (!done) begin failures++; $display("Z=%0d no done", z); end
    if (line !== l) begin failures++; $display("Z=%0d line wrong", z); end
    @(negedge clk);
    checks++; if (done) failures++;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (drowsy != 0) failures++;
    // wake rank 1
    cke[1] = 1;
    n = 0;
    @(negedge clk);
    while (drowsy[1] && n < 100) begin
      checks++; if (drowsy[0]) failures++;
      @(negedge clk); n++;
    end
    checks++; if (n != 20) begin failures++; $display("drowsy for %0d", n); end
    // sleep and wake again: timer restarts
    cke[1] = 0; @(negedge clk); cke[1] = 1; cke[0] = 1;
    @(negedge clk);
    checks += 2;
    if (!drowsy[1] || !drowsy[0]) failures++;
    for (int zl = 0; zl < 4; zl++) rx(zl);
    rx(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
