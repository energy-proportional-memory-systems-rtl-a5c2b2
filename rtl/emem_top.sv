// emem_top: one energy-proportional memory channel.
//
// Left: the memory controller (emem_ctrl) with its host request port.
// Middle: one dram_if_slice per rank, the digital interface logic of a
// fast-wake DRAM rank, joined to the controller by the command bus, the
// per-rank CKE/DCKE enables, the shared DQ bus and the per-rank Correct pins.
// The DRAM cores and the analog parts are outside: each slice's core_* port
// goes to a DRAM array, its ck_early/ck_late inputs come from the MemCorrect
// delay-line samplers, and the EDC pins leave as dram_edc and return, after
// the channel and the controller's analog sampler, as ctl_edc_os (OS samples
// per bit time).
// Right, with their own ports: the LPDDR2 load-reduced module buffer (lrbuf)
// and the embedded ECC unit (ecc_embed) of the mobile-DRAM server memory.
// mode selects the wake-up scheme: MemBlaze, MemCorrect, MemDrowsy or
// MemCorrect+MemDrowsy. In MemBlaze mode the slices run without DLL (EDC/TRS
// timing, separate DCKE); in the others they model DRAMs with a DLL.
// drowsy_zlog (log2 Z, 1..3) sets the drowsy rate in the controller and in
// every slice at once, like a DRAM mode register; change it only while the
// channel is idle. Z = 2 is the main setting; 4 and 8 are the wider margins.
// The controller refreshes each rank every T_REFI cycles (n_refresh counts).
module emem_top
  import emem_pkg::*;
#(
  parameter int unsigned NR = emem_pkg::NRANKS,
  parameter int unsigned QD = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  wake_mode_e               mode,
  input  logic [1:0]               drowsy_zlog,  // log2 Z (DRAM mode setting)
  // host
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_write,
  input  logic [LADDR_W-1:0]       req_addr,
  input  logic [LINE_W-1:0]        req_wdata,
  output logic                     resp_valid,
  output logic                     resp_write,
  output logic [LADDR_W-1:0]       resp_addr,
  output logic [LINE_W-1:0]        resp_rdata,
  // channel observation
  output cmd_t                     cmd,
  output logic [NR-1:0]            cke,
  output logic [NR-1:0]            dcke,
  output logic [NR-1:0]            rank_pd,
  output logic [NR-1:0][$clog2(OS)-1:0] phase,
  // EDC pins out of the DRAMs and back into the controller's sampler
  output logic [NR-1:0]            dram_edc,
  input  logic [NR-1:0][OS-1:0]    ctl_edc_os,
  // MemCorrect delay-line samples per rank
  input  logic [NR-1:0]            ck_early,
  input  logic [NR-1:0]            ck_late,
  // DRAM cores
  output logic [NR-1:0]            core_act,
  output logic [NR-1:0]            core_rd,
  output logic [NR-1:0]            core_wr,
  output logic [NR-1:0][BANK_W-1:0] core_bank,
  output logic [NR-1:0][ROW_W-1:0] core_row,
  output logic [NR-1:0][COL_W-1:0] core_col,
  output logic [LINE_W-1:0]        core_wdata [NR],
  input  logic [LINE_W-1:0]        core_rdata [NR],
  // event counters and protocol checks
  output logic [15:0]              n_wake,
  output logic [15:0]              n_retry,
  output logic [15:0]              n_drowsy,
  output logic [15:0]              n_ping,
  output logic [15:0]              n_recal,
  output logic [15:0]              n_relock_wait,
  output logic [15:0]              n_refresh,
  output logic [15:0]              n_edc_err,
  output logic [15:0]              n_trs_err,
  output logic                     err_cmd_off,
  output logic                     err_data_off,
  // LPDDR2 load-reduced buffer
  input  cmd_op_e                  lr_h_op,
  input  logic [$clog2(LR_LRANKS)-1:0] lr_h_rank,
  input  logic [LR_BANK_W-1:0]     lr_h_bank,
  input  logic [LR_ROW_W:0]        lr_h_row,
  input  logic [LR_COL_W-1:0]      lr_h_col,
  input  logic [DQ_W-1:0]          lr_h_dq_wr,
  input  logic                     lr_h_dq_wr_en,
  output logic [DQ_W-1:0]          lr_h_dq_rd,
  output lr_ca_t                   lr_d_ca    [LR_CA_LINES],
  output logic [DQ_W-1:0]          lr_d_dq_wr [LR_DQ_LINES],
  output logic [LR_DQ_LINES-1:0]   lr_d_dq_wr_en,
  input  logic [DQ_W-1:0]          lr_d_dq_rd [LR_DQ_LINES],
  // embedded ECC
  input  logic [LADDR_W-1:0]       ecc_data_addr,
  output logic [LADDR_W-1:0]       ecc_addr,
  output logic [1:0]               ecc_slot,
  output logic                     ecc_addr_in_ecc_space,
  input  logic [LINE_W-1:0]        ecc_enc_data,
  output logic [LINE_W/4-1:0]      ecc_enc_check,
  input  logic [LINE_W-1:0]        ecc_chk_data,
  input  logic [LINE_W/4-1:0]      ecc_chk_check,
  output logic [LINE_W/128-1:0]    ecc_chk_err
);
  logic [2*DQ_W-1:0] ctl_dq_out, dq_bus;
  logic              ctl_dq_oe;
  logic [2*DQ_W-1:0] s_dq [NR];
  logic [NR-1:0]     s_oe, corr_v, corr_e, e_cmd, e_data;
  logic              blaze, correct_en;

  assign blaze      = (mode == MODE_BLAZE);
  assign correct_en = (mode == MODE_CORRECT) || (mode == MODE_CORRECT_DROWSY);

  emem_ctrl #(.NR(NR), .QD(QD)) u_ctrl (
    .clk, .rst_n, .mode, .drowsy_zlog,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .resp_valid, .resp_write, .resp_addr, .resp_rdata,
    .cmd, .cke, .dcke,
    .dq_out (ctl_dq_out), .dq_oe (ctl_dq_oe), .dq_in (dq_bus),
    .edc_os (ctl_edc_os),
    .correct_valid (corr_v), .correct_err (corr_e),
    .phase, .rank_pd,
    .n_wake, .n_retry, .n_drowsy, .n_ping, .n_recal, .n_relock_wait, .n_refresh,
    .n_edc_err, .n_trs_err
  );

  // shared read DQ bus: the driving rank wins
  always_comb begin
    dq_bus = '0;
    for (int i = 0; i < NR; i++) if (s_oe[i]) dq_bus = dq_bus | s_dq[i];
  end

  for (genvar g = 0; g < NR; g++) begin : g_rank
    dram_if_slice u_slice (
      .clk, .rst_n,
      .my_rank      (RANK_W'(g)),
      .blaze, .correct_en, .drowsy_zlog,
      .cke          (cke[g]),
      .dcke         (dcke[g]),
      .cmd,
      .dq_in        (ctl_dq_oe ? ctl_dq_out : '0),
      .dq_out       (s_dq[g]),
      .dq_oe        (s_oe[g]),
      .edc          (dram_edc[g]),
      .ck_early     (ck_early[g]),
      .ck_late      (ck_late[g]),
      .correct_valid(corr_v[g]),
      .correct_err  (corr_e[g]),
      .core_act     (core_act[g]),
      .core_rd      (core_rd[g]),
      .core_wr      (core_wr[g]),
      .core_bank    (core_bank[g]),
      .core_row     (core_row[g]),
      .core_col     (core_col[g]),
      .core_wdata   (core_wdata[g]),
      .core_rdata   (core_rdata[g]),
      .err_cmd_off  (e_cmd[g]),
      .err_data_off (e_data[g])
    );
  end

  assign err_cmd_off  = |e_cmd;
  assign err_data_off = |e_data;

  // only one rank drives the DQ bus at a time
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_oe));

  lrbuf u_lrbuf (
    .clk, .rst_n,
    .h_op (lr_h_op), .h_rank (lr_h_rank), .h_bank (lr_h_bank),
    .h_row (lr_h_row), .h_col (lr_h_col),
    .h_dq_wr (lr_h_dq_wr), .h_dq_wr_en (lr_h_dq_wr_en), .h_dq_rd (lr_h_dq_rd),
    .d_ca (lr_d_ca), .d_dq_wr (lr_d_dq_wr), .d_dq_wr_en (lr_d_dq_wr_en),
    .d_dq_rd (lr_d_dq_rd)
  );

  ecc_embed u_ecc (
    .data_addr (ecc_data_addr), .ecc_addr, .ecc_slot,
    .addr_in_ecc_space (ecc_addr_in_ecc_space),
    .enc_data (ecc_enc_data), .enc_check (ecc_enc_check),
    .chk_data (ecc_chk_data), .chk_check (ecc_chk_check),
    .chk_err (ecc_chk_err)
  );
endmodule
