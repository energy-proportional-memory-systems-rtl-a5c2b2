// tb_edc_rx_check: feeds EDC bursts bit by bit and checks the verdict: a
// matching code, a wrong code, a code known only after the burst, a ping and
// a damaged timing reference.
module tb_edc_rx_check;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, is_ping = 0, edc_bit = 0, exp_valid = 0;
  logic [7:0] exp_crc = 0;
  logic active, done, err, trs_err;
  always #5 clk = ~clk;

  edc_rx_check dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sent: code on the pin; expc: controller's own code; late: expc given after
  task automatic run(input logic ping, input logic [7:0] sent, input logic [7:0] expc,
                     input bit late, input int bad_trs_bit,
                     input logic exp_err, input logic exp_trs);
    bit seen = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      start     = (i == 0);
      is_ping   = ping;
      edc_bit   = (!ping && i < 8) ? sent[7-i] : (i % 2 == 0);
      if (i == bad_trs_bit) edc_bit = ~edc_bit;
      exp_valid = !late && (i == 3);
      exp_crc   = expc;
    end
    @(negedge clk); start = 0; exp_valid = 0; edc_bit = 0;
    if (late) begin
      repeat (3) begin
        @(posedge clk); #1;
        checks++; if (done) begin failures++; $display("done before code known"); end
      end
      @(negedge clk); exp_valid = 1;
      @(posedge clk); #1;
      seen = done;
      checks += 2;
      if (err !== exp_err) begin failures++; $display("late err %b exp %b", err, exp_err); end
      if (trs_err !== exp_trs) failures++;
      @(negedge clk); exp_valid = 0;
    end
    for (int k = 0; k < 4 && !seen; k++) begin
      @(posedge clk); #1;
      if (done) begin
        seen = 1;
        checks += 2;
        if (err !== exp_err) begin failures++; $display("err %b exp %b", err, exp_err); end
        if (trs_err !== exp_trs) begin failures++; $display("trs %b exp %b", trs_err, exp_trs); end
      end
    end
    checks++; if (!seen) begin failures++; $display("no done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 8'h5A, 8'h5A, 0, -1, 0, 0);
    run(0, 8'h5A, 8'h5B, 0, -1, 1, 0);
    run(0, 8'hC3, 8'hC3, 1, -1, 0, 0);
    run(0, 8'hC3, 8'h43, 1, -1, 1, 0);
    run(1, 8'h00, 8'hFF, 0, -1, 0, 0);
    run(0, 8'h11, 8'h11, 0, 20, 0, 1);
    run(1, 8'h00, 8'h00, 0, 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
