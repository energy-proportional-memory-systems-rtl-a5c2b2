// edc_trs_tx: DRAM-side driver of the EDC pin of a fast-wake DRAM.
//
// A DRAM without a DLL sends no read strobe. Instead, for every read and
// write, it sends a 32-bit burst on its EDC pin: the 8-bit error detection
// code first (MSB first), then a 1010... toggling pattern, the timing
// reference signal (TRS), from which the controller recovers this DRAM's
// timing. A data-less ping sends the toggling pattern for the whole burst.
// The 32-bit burst, the 8-bit code and the ping follow the source design; the
// order of fields and one EDC bit per clock are this design's choices.
// Timing: start is a one-cycle pulse; the first bit is on edc in the next
// cycle and the burst lasts BURST cycles, with busy high throughout. The pin
// idles low.
module edc_trs_tx #(
  parameter int unsigned BURST = emem_pkg::EDC_BURST,
  parameter int unsigned CRC_W = emem_pkg::EDC_CRC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_ping,
  input  logic [CRC_W-1:0] crc,
  output logic             edc,
  output logic             busy
);
  localparam int unsigned CNT_W = $clog2(BURST + 1);

  logic [CNT_W-1:0] idx;
  logic [CRC_W-1:0] code_q;
  logic             ping_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      idx    <= '0;
      code_q <= '0;
      ping_q <= 1'b0;
    end else if (start) begin
      busy   <= 1'b1;
      idx    <= '0;
      code_q <= crc;
      ping_q <= is_ping;
    end else if (busy) begin
      if (idx == CNT_W'(BURST - 1)) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end

  always_comb begin
    edc = 1'b0;
    if (busy) begin
      if (!ping_q && idx < CNT_W'(CRC_W)) edc = code_q[CRC_W - 1 - int'(idx)];
      else                                 edc = ~idx[0];
    end
  end
endmodule
