// trs_phase_tracker: digital loop of the controller's clock-and-data recovery
// for one rank.
//
// A fast-wake DRAM has no DLL, so the controller learns each DRAM's read
// timing from the edges of the EDC burst (code bits and the toggling timing
// reference). The analog front end delivers OS samples of the EDC pin per
// clock, spread evenly over one bit time (os[0] earliest). In every cycle with
// an edge the loop finds where the edge lies and moves the sampling phase one
// step (bang-bang) toward the middle of the bit, half a bit after the edge.
// Phase updates happen only while en is high (a burst is being received), so
// a rank that is idle keeps its last phase; update pulses tell the ping
// scheduler that the rank's timing is fresh. bit_out is os[phase], registered.
// The use of TRS edges to update a per-rank sample point follows the source
// design; the oversampling, the bang-bang step and the step size are this
// design's own. The channel offset must drift slower than one step per edge
// and stay inside one bit time (no bit-slip handling).
module trs_phase_tracker #(
  parameter int unsigned OSN     = emem_pkg::OS,
  parameter int unsigned PH_INIT = emem_pkg::OS / 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [OSN-1:0]         os,
  output logic [$clog2(OSN)-1:0] phase,
  output logic                   bit_out,
  output logic                   update,
  output logic                   locked
);
  localparam int unsigned PH_W = $clog2(OSN);

  logic            prev_last;
  logic            edge_seen;
  logic [PH_W-1:0] edge_pos, target;

  // position of the first transition in this bit time (0 = at its start)
  always_comb begin
    edge_seen = 1'b0;
    edge_pos  = '0;
    if (os[0] != prev_last) begin
      edge_seen = 1'b1;
    end else begin
      for (int k = OSN - 1; k >= 1; k--)
        if (os[k] != os[k-1]) begin
          edge_seen = 1'b1;
          edge_pos  = PH_W'(k);
        end
    end
    target = edge_pos + PH_W'(OSN / 2);   // wraps modulo OSN
  end

  always_comb bit_out = os[phase];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_W'(PH_INIT);
      prev_last <= 1'b0;
      update    <= 1'b0;
      locked    <= 1'b0;
    end else begin
      prev_last <= os[OSN-1];
      update    <= 1'b0;
      if (en && edge_seen) begin
        update <= 1'b1;
        locked <= (phase == target);
        if (phase != target) begin
          // step the short way round the circle
          if (PH_W'(target - phase) < PH_W'(OSN / 2)) phase <= phase + 1'b1;
          else                                         phase <= phase - 1'b1;
        end
      end
    end
  end
endmodule
