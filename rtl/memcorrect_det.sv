// memcorrect_det: DRAM-side timing error detector of a MemCorrect interface.
//
// After a wake-up the DRAM is allowed to send read data before its DLL has
// relocked. To know whether that speculation worked, the interface checks on
// every transfer clock that the external clock edge lies within +-delta of its
// nominal place: two digitally controlled delay lines give early (-delta) and
// late (+delta) versions of the internal clock, which sample the external
// clock into ck_early and ck_late. A rising edge inside the window gives
// ck_early = 0 and ck_late = 1; anything else is a timing error. Errors are
// collected over a transfer (check high) and reported on the Correct pin at
// the end of it: correct_valid pulses for one cycle in the cycle after check
// falls, with correct_err = 1 if any sampled cycle was outside the window.
// The window test and the Correct pin follow the source design; collecting
// over a whole burst and the pulse protocol are this design's own.
module memcorrect_det (
  input  logic clk,
  input  logic rst_n,
  input  logic check,
  input  logic ck_early,
  input  logic ck_late,
  output logic correct_valid,
  output logic correct_err
);
  logic check_q, bad;
  logic miss;

  assign miss = ck_early | ~ck_late;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      check_q <= 1'b0; bad <= 1'b0;
      correct_valid <= 1'b0; correct_err <= 1'b0;
    end else begin
      check_q       <= check;
      correct_valid <= 1'b0;
      if (check) begin
        bad <= (check_q ? bad : 1'b0) | miss;
      end else if (check_q) begin
        correct_valid <= 1'b1;
        correct_err   <= bad;
        bad           <= 1'b0;
      end
    end
  end
endmodule
