// tb_dcdl: measures the delay of the delay-line model for several codes and
// checks it is code * 10 ps for both edges.
`timescale 1ns / 1ps
module tb_dcdl;
  int checks = 0, failures = 0;
  logic din = 0, dout;
  logic [5:0] code = 0;
  realtime t0, t1;

  dcdl dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[4] = '{0, 5, 17, 63};
    #1;
    foreach (codes[i]) begin
      code = 6'(codes[i]);
      for (int e = 0; e < 2; e++) begin
        #2;
        t0 = $realtime;
        din = ~din;
        @(dout);
        t1 = $realtime;
        checks++;
        if ((t1 - t0) < codes[i] * 0.010 - 0.0005 || (t1 - t0) > codes[i] * 0.010 + 0.0005) begin
          failures++; $display("code %0d delay %f", codes[i], t1 - t0);
        end
        checks++;
        if (dout !== din) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
