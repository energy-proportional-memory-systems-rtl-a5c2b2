// ping_sched: keeps track of how old one rank's timing information is.
//
// A fast-wake DRAM's read timing is only known while the rank is active: each
// received EDC burst refreshes the controller's phase for that rank. The DRAM
// specifies a maximum time between such updates. This module counts cycles
// since the last phase update. Past PING_AFTER cycles it asks for a data-less
// ping (a toggling EDC burst without row or column access), which the
// scheduler grants when the channel is otherwise idle. Past STALE_AFTER cycles
// the rank is stale: its timing must be recalibrated before the next data
// transfer. Both mechanisms follow the source design; the two limits are this
// design's own numbers since the source gives none.
// Timing: update (one cycle) clears the count in the next cycle; ping_req and
// stale are registered levels.
module ping_sched #(
  parameter int unsigned PING_AFTER  = emem_pkg::PING_INT,
  parameter int unsigned STALE_AFTER = emem_pkg::STALE_MAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic update,
  output logic ping_req,
  output logic stale
);
  localparam int unsigned CNT_W = $clog2(STALE_AFTER + 1);
  logic [CNT_W-1:0] age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // no timing is known after reset: start stale
      age <= CNT_W'(STALE_AFTER);
    end else if (update) begin
      age <= '0;
    end else if (age != CNT_W'(STALE_AFTER)) begin
      age <= age + 1'b1;
    end
  end

  assign ping_req = (age >= CNT_W'(PING_AFTER));
  assign stale    = (age == CNT_W'(STALE_AFTER));
endmodule
