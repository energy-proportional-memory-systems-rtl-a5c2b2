// edc_rx_check: controller-side receiver of one rank's EDC burst.
//
// The controller knows when a burst is due (it issued the command), so start
// marks the cycle the first EDC bit arrives. The module shifts in BURST bits
// of the recovered EDC bit stream, and compares the first CRC_W bits with the
// code the controller computes itself over the data it sent or received
// (exp_crc, which may arrive at any time during or after the burst, qualified
// by exp_valid). For a ping no comparison is made. The remaining bits are the
// toggling timing reference; a wrong toggle bit is reported as trs_err.
// Outputs: active while the burst is received (the data block of the rank must
// stay powered), then a one-cycle done with err (code mismatch).
// The compare rule follows the source design's use of the EDC; the exact
// handshake is this design's own.
module edc_rx_check #(
  parameter int unsigned BURST = emem_pkg::EDC_BURST,
  parameter int unsigned CRC_W = emem_pkg::EDC_CRC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_ping,
  input  logic             edc_bit,
  input  logic             exp_valid,
  input  logic [CRC_W-1:0] exp_crc,
  output logic             active,
  output logic             done,
  output logic             err,
  output logic             trs_err
);
  localparam int unsigned CNT_W = $clog2(BURST + 1);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_WAIT} state_e;
  state_e           st;
  logic [CNT_W-1:0] idx;
  logic [CRC_W-1:0] got;
  logic [CRC_W-1:0] expq;
  logic             exp_have, ping_q, trs_bad;

  assign active = (st == S_RECV) || start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; got <= '0; expq <= '0;
      exp_have <= 1'b0; ping_q <= 1'b0; trs_bad <= 1'b0;
      done <= 1'b0; err <= 1'b0; trs_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (exp_valid && st != S_IDLE) begin
        expq <= exp_crc; exp_have <= 1'b1;
      end
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_RECV; ping_q <= is_ping; trs_bad <= 1'b0;
          exp_have <= exp_valid; expq <= exp_crc;
          got <= {got[CRC_W-2:0], edc_bit};
          idx <= CNT_W'(1);
          if (is_ping && edc_bit != 1'b1) trs_bad <= 1'b1;
        end
        S_RECV: begin
          if (!ping_q && idx < CNT_W'(CRC_W)) got <= {got[CRC_W-2:0], edc_bit};
          else if (edc_bit != ~idx[0]) trs_bad <= 1'b1;
          idx <= idx + 1'b1;
          if (idx == CNT_W'(BURST - 1)) st <= S_WAIT;
        end
        S_WAIT: if (ping_q || exp_have || exp_valid) begin
          st      <= S_IDLE;
          done    <= 1'b1;
          trs_err <= trs_bad;
          err     <= !ping_q && (got != (exp_have ? expq : exp_crc));
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
