// dram_if_slice: digital part of one rank's fast-wake DRAM interface.
//
// Sits between the channel and a DRAM core (the core itself is outside: core_*
// ports). It has a command block, enabled by CKE, and a data block, enabled by
// DCKE (on DRAMs with one clock enable both are tied together). It decodes
// commands for its own rank (input my_rank) and:
//  * ACT: passes bank/row to the core.
//  * RDA: reads the core (data one cycle after core_rd), then T_CAS cycles
//    after the command sends the line on dq, at full rate or, if the command
//    asked for it, at the drowsy rate (every beat Z times, drowsy_tx).
//    During a full-rate read the MemCorrect detector checks the clock window
//    and reports on the Correct pin when the burst ends.
//  * WRA: captures BL/2 clocks of dq_in starting T_CWL cycles after the
//    command and writes the line to the core.
//  * with blaze set, every read and write is followed by a 32-bit EDC burst
//    (8-bit code + timing reference), and PING sends a toggling burst only.
// The slice flags protocol violations: a command while the command block is
// not yet awake (err_cmd_off) and data on the pins while the data block is
// not awake (err_data_off). Exit times: T_XP after CKE rises for commands,
// T_XPD after DCKE rises for data (T_XP if not split).
// The split power domains, the EDC/TRS burst, pings, drowsy reads and the
// Correct pin follow the source design; latencies in cycles, the core
// handshake and the violation flags are this design's own.
module dram_if_slice
  import emem_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RANK_W-1:0]   my_rank,
  input  logic                blaze,       // DLL-less DRAM: EDC/TRS and DCKE
  input  logic [1:0]          drowsy_zlog, // log2 Z, set like a mode register
  input  logic                correct_en,  // MemCorrect detector fitted
  input  logic                cke,
  input  logic                dcke,
  input  cmd_t                cmd,
  input  logic [2*DQ_W-1:0]   dq_in,
  output logic [2*DQ_W-1:0]   dq_out,
  output logic                dq_oe,
  output logic                edc,
  input  logic                ck_early,
  input  logic                ck_late,
  output logic                correct_valid,
  output logic                correct_err,
  // DRAM core
  output logic                core_act,
  output logic                core_rd,
  output logic                core_wr,
  output logic [BANK_W-1:0]   core_bank,
  output logic [ROW_W-1:0]    core_row,
  output logic [COL_W-1:0]    core_col,
  output logic [LINE_W-1:0]   core_wdata,
  input  logic [LINE_W-1:0]   core_rdata,
  // protocol checks
  output logic                err_cmd_off,
  output logic                err_data_off
);
  // ---- power state of the two blocks ----
  logic [3:0] cke_cnt, dcke_cnt;
  logic       cmd_on, data_on;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cke_cnt <= '0; dcke_cnt <= '0;
    end else begin
      if (!cke) cke_cnt <= '0;
      else if (cke_cnt != 4'hf) cke_cnt <= cke_cnt + 1'b1;
      if (!dcke) dcke_cnt <= '0;
      else if (dcke_cnt != 4'hf) dcke_cnt <= dcke_cnt + 1'b1;
    end
  end
  assign cmd_on  = cke && (cke_cnt >= 4'(T_XP));
  assign data_on = dcke && (dcke_cnt >= (blaze ? 4'(T_XPD) : 4'(T_XP)));

  logic hit;
  assign hit = (cmd.op != CMD_NOP) && (cmd.rank == my_rank);

  // ---- pending operation ----
  typedef enum logic [1:0] {P_NONE, P_RD, P_WR, P_PING} pend_e;
  pend_e             p_op;
  logic [7:0]        p_cnt;
  logic              p_dz;
  logic [1:0]        w_idx;
  logic              core_rd_q;
  logic [LINE_W-1:0] rd_line, wr_line, wr_line_n;
  logic              tx_start, edc_go, edc_ping, wr_cap, wr_last;
  logic [7:0]        crc;

  assign tx_start = (p_op == P_RD)   && (p_cnt == '0);
  assign wr_cap   = (p_op == P_WR)   && (p_cnt == '0);
  assign wr_last  = wr_cap && (w_idx == 2'(BL / 2 - 1));
  assign edc_ping = (p_op == P_PING);
  assign edc_go   = blaze && (tx_start || wr_last || (edc_ping && p_cnt == '0));

  always_comb begin
    wr_line_n = wr_line;
    if (wr_cap) wr_line_n[w_idx*2*DQ_W +: 2*DQ_W] = dq_in;
  end

  assign core_act  = hit && (cmd.op == CMD_ACT);
  assign core_rd   = hit && (cmd.op == CMD_RDA);
  // a write reaches the core after its data burst: bank/column held from WRA
  logic [BANK_W-1:0] wr_bank;
  logic [COL_W-1:0]  wr_col;
  assign core_bank = core_wr ? wr_bank : cmd.bank;
  assign core_row  = cmd.row;
  assign core_col  = core_wr ? wr_col : cmd.col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_op <= P_NONE; p_cnt <= '0; p_dz <= 1'b0; w_idx <= '0;
      core_rd_q <= 1'b0; rd_line <= '0; wr_line <= '0;
      core_wr <= 1'b0; core_wdata <= '0; wr_bank <= '0; wr_col <= '0;
    end else begin
      core_rd_q <= core_rd;
      core_wr   <= 1'b0;
      if (core_rd_q) rd_line <= core_rdata;
      if (hit && cmd.op == CMD_RDA) begin
        p_op <= P_RD; p_cnt <= 8'(T_CAS - 2); p_dz <= cmd.drowsy;
      end else if (hit && cmd.op == CMD_WRA) begin
        p_op <= P_WR; p_cnt <= 8'(T_CWL - 1); w_idx <= '0;
        wr_bank <= cmd.bank; wr_col <= cmd.col;
      end else if (hit && cmd.op == CMD_PING) begin
        p_op <= P_PING; p_cnt <= 8'(T_CAS - 2);
      end else if (p_op != P_NONE) begin
        if (p_cnt != '0) p_cnt <= p_cnt - 1'b1;
        else if (p_op == P_WR) begin
          wr_line <= wr_line_n;
          w_idx   <= w_idx + 1'b1;
          if (wr_last) begin
            core_wr    <= 1'b1;
            core_wdata <= wr_line_n;
            p_op       <= P_NONE;
          end
        end else begin
          p_op <= P_NONE;
        end
      end
    end
  end

  // ---- datapath ----
  logic tx_busy, tx_last, edc_busy, tx_dz;
  edc_crc8 #(.DATA_W(LINE_W)) u_crc (
    .data (tx_start ? rd_line : wr_line_n),
    .crc  (crc)
  );

  drowsy_tx #(.DQ_W(DQ_W), .BL(BL)) u_tx (
    .clk, .rst_n,
    .start (tx_start),
    .line  (rd_line),
    .zlog  (p_dz ? drowsy_zlog : 2'd0),
    .dq    (dq_out),
    .dq_oe (dq_oe),
    .busy  (tx_busy),
    .last  (tx_last)
  );

  edc_trs_tx u_edc (
    .clk, .rst_n,
    .start   (edc_go),
    .is_ping (edc_ping),
    .crc     (crc),
    .edc     (edc),
    .busy    (edc_busy)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        tx_dz <= 1'b0;
    else if (tx_start) tx_dz <= p_dz;

  // timing window only checked for full-rate reads on MemCorrect DRAMs
  logic chk_on;
  assign chk_on = correct_en && !tx_dz;
  memcorrect_det u_corr (
    .clk, .rst_n,
    .check         (dq_oe),
    .ck_early      (ck_early & chk_on),
    .ck_late       (ck_late | ~chk_on),
    .correct_valid (correct_valid),
    .correct_err   (correct_err)
  );

  // ---- protocol checks ----
  assign err_cmd_off  = hit && !cmd_on;
  assign err_data_off = (dq_oe || wr_cap || edc_busy) && !data_on;
endmodule
