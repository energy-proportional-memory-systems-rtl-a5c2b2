// emem_ctrl: energy-proportional memory controller for one channel.
//
// Combines the FCFS closed-page scheduler (mem_sched) with the per-rank
// mechanisms that let ranks sleep aggressively and wake quickly:
//  * rank_pwr_ctrl per rank: idle-threshold powerdown on CKE, and in
//    MemBlaze mode a separate data-block enable DCKE raised only around data
//    transfers (and kept up while an EDC burst is still arriving);
//  * trs_phase_tracker per rank: digital CDR loop that keeps each rank's read
//    sample phase from the EDC/TRS edges; edc_rx_check per rank verifies the
//    8-bit code of every read and write;
//  * ping_sched per rank: requests pings / recalibration when a rank's timing
//    information gets old;
//  * drowsy_rx: wake timers (Y cycles after CKE rises) and the divided-rate
//    read capture of MemDrowsy.
// The mode input selects which of the source's wake-up schemes the channel
// runs (see mem_sched), which also issues the per-rank refreshes. Event
// counters count wake-ups, retries, drowsy reads, pings, recalibrations,
// refreshes and EDC/TRS mismatches.
// Interface timing is that of mem_sched: command on cmd in cycle t, read data
// on dq_in from t+T_CAS, EDC samples on edc_os in the same cycles as data.
module emem_ctrl
  import emem_pkg::*;
#(
  parameter int unsigned NR = emem_pkg::NRANKS,
  parameter int unsigned QD = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  wake_mode_e               mode,
  input  logic [1:0]               drowsy_zlog,  // log2 Z of drowsy reads
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_write,
  input  logic [LADDR_W-1:0]       req_addr,
  input  logic [LINE_W-1:0]        req_wdata,
  output logic                     resp_valid,
  output logic                     resp_write,
  output logic [LADDR_W-1:0]       resp_addr,
  output logic [LINE_W-1:0]        resp_rdata,
  output cmd_t                     cmd,
  output logic [NR-1:0]            cke,
  output logic [NR-1:0]            dcke,
  output logic [2*DQ_W-1:0]        dq_out,
  output logic                     dq_oe,
  input  logic [2*DQ_W-1:0]        dq_in,
  input  logic [NR-1:0][OS-1:0]    edc_os,
  input  logic [NR-1:0]            correct_valid,
  input  logic [NR-1:0]            correct_err,
  output logic [NR-1:0][$clog2(OS)-1:0] phase,
  output logic [NR-1:0]            rank_pd,
  output logic [15:0]              n_wake,
  output logic [15:0]              n_retry,
  output logic [15:0]              n_drowsy,
  output logic [15:0]              n_ping,
  output logic [15:0]              n_recal,
  output logic [15:0]              n_relock_wait,
  output logic [15:0]              n_refresh,
  output logic [15:0]              n_edc_err,
  output logic [15:0]              n_trs_err
);
  logic [NR-1:0] wake_req, s_data_req, data_req, cmd_rdy, data_rdy, wake;
  logic [NR-1:0] drowsy, stale, ping_req, upd, edc_active, edc_done, edc_err, trs_err;
  logic [NR-1:0] edc_bit, lock;
  logic          rx_start, rx_done, edc_start, edc_is_ping, exp_valid;
  logic [1:0]    rx_zlog;
  logic [LINE_W-1:0] rx_line, exp_line;
  logic [RANK_W-1:0] edc_rank;
  logic [7:0]    exp_crc;
  logic          blaze;

  assign blaze = (mode == MODE_BLAZE);

  mem_sched #(.NR(NR), .QD(QD)) u_sched (
    .clk, .rst_n, .mode, .drowsy_zlog,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .resp_valid, .resp_write, .resp_addr, .resp_rdata,
    .cmd,
    .wake_req, .data_req(s_data_req), .cmd_rdy, .data_rdy, .drowsy,
    .stale, .ping_req,
    .rx_start, .rx_zlog, .rx_done, .rx_line,
    .dq_out, .dq_oe,
    .edc_start, .edc_is_ping, .edc_rank, .exp_valid, .exp_line,
    .correct_valid, .correct_err,
    .n_retry, .n_drowsy, .n_ping, .n_recal, .n_relock_wait, .n_refresh
  );

  edc_crc8 #(.DATA_W(LINE_W)) u_exp_crc (.data(exp_line), .crc(exp_crc));

  drowsy_rx #(.NR(NR)) u_rx (
    .clk, .rst_n, .cke, .drowsy,
    .start (rx_start), .zlog (rx_zlog), .dq (dq_in),
    .line  (rx_line),  .done (rx_done)
  );

  for (genvar g = 0; g < NR; g++) begin : g_rank
    assign data_req[g] = s_data_req[g] | (blaze & edc_active[g]);

    rank_pwr_ctrl u_pwr (
      .clk, .rst_n,
      .split        (blaze),
      .wake_req     (wake_req[g] | data_req[g]),
      .data_req     (data_req[g]),
      .cke          (cke[g]),
      .dcke         (dcke[g]),
      .cmd_rdy      (cmd_rdy[g]),
      .data_rdy     (data_rdy[g]),
      .wake         (wake[g]),
      .powered_down (rank_pd[g])
    );

    trs_phase_tracker u_cdr (
      .clk, .rst_n,
      .en      (edc_active[g]),
      .os      (edc_os[g]),
      .phase   (phase[g]),
      .bit_out (edc_bit[g]),
      .update  (upd[g]),
      .locked  (lock[g])
    );

    edc_rx_check u_edc (
      .clk, .rst_n,
      .start     (edc_start && edc_rank == RANK_W'(g)),
      .is_ping   (edc_is_ping),
      .edc_bit   (edc_bit[g]),
      .exp_valid (exp_valid && edc_rank == RANK_W'(g)),
      .exp_crc   (exp_crc),
      .active    (edc_active[g]),
      .done      (edc_done[g]),
      .err       (edc_err[g]),
      .trs_err   (trs_err[g])
    );

    ping_sched u_ping (
      .clk, .rst_n,
      .update   (upd[g]),
      .ping_req (ping_req[g]),
      .stale    (stale[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_wake <= '0; n_edc_err <= '0; n_trs_err <= '0;
    end else begin
      n_wake    <= n_wake    + 16'($countones(wake));
      n_edc_err <= n_edc_err + 16'($countones(edc_done & edc_err));
      n_trs_err <= n_trs_err + 16'($countones(edc_done & trs_err));
    end
  end
endmodule
