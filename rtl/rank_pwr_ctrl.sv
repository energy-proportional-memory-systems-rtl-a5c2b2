// rank_pwr_ctrl: power manager of one DRAM rank, with separate enables for
// the command block (CKE) and the data block (DCKE) of a fast-wake DRAM.
//
// Command block: like a conventional controller, an idle-threshold timer
// powers the rank down (CKE low) after THRESH consecutive idle cycles. A
// wake request raises CKE; commands may be sent T_XP cycles later (cmd_rdy).
// Data block (split mode, split = 1): DCKE is raised only while the
// scheduler needs the data path (data_req) and dropped as soon as it does
// not, so the data block is powered precisely when needed; data may move
// T_XPD cycles after DCKE rises (data_rdy). The scheduler raises data_req
// together with the activate, so the data wake-up is hidden under the row and
// column access. Without split (DRAMs with one clock enable) DCKE mirrors CKE.
// wake is a one-cycle pulse on every CKE rising edge.
// All of this follows the source design; exact cycle counts are derived from
// its nanosecond figures, and the rule that data_req keeps CKE up is this
// design's own.
module rank_pwr_ctrl #(
  parameter int unsigned THRESH = emem_pkg::PD_THRESH,
  parameter int unsigned T_XP   = emem_pkg::T_XP,
  parameter int unsigned T_XPD  = emem_pkg::T_XPD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic split,      // separate data-block enable (DCKE)
  input  logic wake_req,   // scheduler wants to send a command to this rank
  input  logic data_req,   // scheduler / EDC receiver needs the data block
  output logic cke,
  output logic dcke,
  output logic cmd_rdy,
  output logic data_rdy,
  output logic wake,
  output logic powered_down
);
  localparam int unsigned TW = $clog2(THRESH + 1);
  localparam int unsigned XW = $clog2((T_XP > T_XPD ? T_XP : T_XPD) + 1);

  logic [TW-1:0] idle_cnt;
  logic [XW-1:0] xp_cnt, xpd_cnt;
  logic          dcke_s;
  logic          busy;

  assign busy = wake_req | data_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cke <= 1'b0; dcke_s <= 1'b0; idle_cnt <= '0;
      xp_cnt <= '0; xpd_cnt <= '0; wake <= 1'b0;
    end else begin
      wake <= 1'b0;
      // command block
      if (busy) begin
        idle_cnt <= '0;
        if (!cke) begin
          cke    <= 1'b1;
          wake   <= 1'b1;
          xp_cnt <= '0;
        end
      end else if (cke) begin
        if (idle_cnt == TW'(THRESH - 1)) begin
          cke      <= 1'b0;
          idle_cnt <= '0;
        end else begin
          idle_cnt <= idle_cnt + 1'b1;
        end
      end
      if (cke && xp_cnt != XW'(T_XP)) xp_cnt <= xp_cnt + 1'b1;
      if (!cke) xp_cnt <= '0;
      // data block
      dcke_s <= data_req;
      if (!dcke_s) xpd_cnt <= '0;
      else if (xpd_cnt != XW'(T_XPD)) xpd_cnt <= xpd_cnt + 1'b1;
    end
  end

  assign dcke         = split ? dcke_s : cke;
  assign cmd_rdy      = cke && (xp_cnt == XW'(T_XP));
  assign data_rdy     = split ? (dcke_s && xpd_cnt == XW'(T_XPD)) : cmd_rdy;
  assign powered_down = !cke;
endmodule
