// mem_sched: first-come-first-served, closed-page command scheduler of the
// energy-proportional memory controller.
//
// Requests (one 64-byte line each) wait in a FIFO of QD entries and are served
// strictly in order, one at a time: wake the rank's command block, ACT, then
// a read or write with auto-precharge (closed page). What happens around a
// wake-up depends on mode:
//  * MODE_BLAZE: DLL-less DRAMs whose read timing the controller recovers from
//    the EDC/TRS burst. The data block (DCKE) is requested together with the
//    ACT, so its wake-up is hidden under tRCD + tCAS. A rank whose timing is
//    stale is first sent a ping and given a recalibration burst; idle ranks
//    that ask for a ping get one when no request is waiting.
//  * MODE_CORRECT: DRAMs with a DLL send data right after wake-up
//    (speculation); if the Correct pin reports a timing error, the read is
//    repeated once the DLL has relocked (drowsy[r] low).
//  * MODE_DROWSY: reads while the rank's DLL relocks are sent at f/Z.
//  * MODE_CORRECT_DROWSY: first try at full rate; on a timing error the read
//    is repeated at once at f/Z instead of waiting for the relock.
// Timing (cycles, command visible on cmd in cycle t): ACT -> column command
// after T_RCD; read data from t+T_CAS (rx_start and edc_start pulse then);
// write data driven on dq_out in cycles t+T_CWL .. t+T_CWL+BL/2-1 and the
// write's EDC burst expected in the cycle after. ACTs to one rank are T_RC
// apart. Each rank gets a REF every T_REFI cycles (taken between requests,
// before anything else); only its command block is woken for it, and the
// rank rests T_RFC cycles after it. The FCFS closed-page policy, the wake-up behaviour of each scheme
// and the DCKE timing follow the source design; serving one request at a
// time, the FIFO depth, the ping priority and the refresh timing (DDR3
// values) are this design's own.
module mem_sched
  import emem_pkg::*;
#(
  parameter int unsigned NR = emem_pkg::NRANKS,
  parameter int unsigned QD = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  wake_mode_e             mode,
  input  logic [1:0]             drowsy_zlog,  // log2 Z of drowsy reads
  // host side
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_write,
  input  logic [LADDR_W-1:0]     req_addr,
  input  logic [LINE_W-1:0]      req_wdata,
  output logic                   resp_valid,
  output logic                   resp_write,
  output logic [LADDR_W-1:0]     resp_addr,
  output logic [LINE_W-1:0]      resp_rdata,
  // command bus
  output cmd_t                   cmd,
  // rank power managers
  output logic [NR-1:0]          wake_req,
  output logic [NR-1:0]          data_req,
  input  logic [NR-1:0]          cmd_rdy,
  input  logic [NR-1:0]          data_rdy,
  input  logic [NR-1:0]          drowsy,
  // timing freshness (MemBlaze)
  input  logic [NR-1:0]          stale,
  input  logic [NR-1:0]          ping_req,
  // read capture
  output logic                   rx_start,
  output logic [1:0]             rx_zlog,
  input  logic                   rx_done,
  input  logic [LINE_W-1:0]      rx_line,
  // write data
  output logic [2*DQ_W-1:0]      dq_out,
  output logic                   dq_oe,
  // EDC expectation
  output logic                   edc_start,
  output logic                   edc_is_ping,
  output logic [RANK_W-1:0]      edc_rank,
  output logic                   exp_valid,
  output logic [LINE_W-1:0]      exp_line,
  // Correct pins
  input  logic [NR-1:0]          correct_valid,
  input  logic [NR-1:0]          correct_err,
  // event counters
  output logic [15:0]            n_retry,
  output logic [15:0]            n_drowsy,
  output logic [15:0]            n_ping,
  output logic [15:0]            n_recal,
  output logic [15:0]            n_relock_wait,
  output logic [15:0]            n_refresh
);
  localparam int unsigned QW = $clog2(QD);

  // ---------------- request FIFO ----------------
  logic               q_write [QD];
  logic [LADDR_W-1:0] q_addr  [QD];
  logic [LINE_W-1:0]  q_data  [QD];
  logic [QW-1:0]      wp, rp;
  logic [QW:0]        cnt_q;
  logic               pop;

  assign req_ready = (cnt_q != (QW+1)'(QD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt_q <= '0;
    end else begin
      if (req_valid && req_ready) wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
      cnt_q <= cnt_q + (QW+1)'(req_valid && req_ready) - (QW+1)'(pop);
    end
  end
  always_ff @(posedge clk)
    if (req_valid && req_ready) begin
      q_write[wp] <= req_write;
      q_addr[wp]  <= req_addr;
      q_data[wp]  <= req_wdata;
    end

  logic               h_write;
  logic [LADDR_W-1:0] h_addr;
  logic [LINE_W-1:0]  h_data;
  logic               h_valid;
  assign h_valid = (cnt_q != '0);
  assign h_write = q_write[rp];
  assign h_addr  = q_addr[rp];
  assign h_data  = q_data[rp];

  // ---------------- controller state ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_PING, S_PINGLAT, S_PINGBURST, S_WAKE, S_TRCD,
    S_RDLAT, S_RDCAP, S_RDCHK, S_RELOCK, S_WRLAT, S_WRDATA, S_REF, S_RFC
  } state_e;

  state_e            st;
  logic [RANK_W-1:0] r;
  logic [7:0]        cnt;
  logic [7:0]        trc [NR];
  logic              recal, retry_dz, dz;
  logic              corr_seen, corr_bad;
  logic [1:0]        wbeat;

  logic blaze, use_correct;
  assign blaze       = (mode == MODE_BLAZE);
  assign use_correct = (mode == MODE_CORRECT) || (mode == MODE_CORRECT_DROWSY);

  // drowsy decision for the column command about to be issued
  always_comb begin
    dz = 1'b0;
    if (mode == MODE_DROWSY)         dz = drowsy[r];
    if (mode == MODE_CORRECT_DROWSY) dz = retry_dz && drowsy[r];
  end

  // refresh: every rank is due T_REFI cycles after its last REF
  logic [$clog2(T_REFI+1)-1:0] refi [NR];
  logic              any_ref;
  logic [RANK_W-1:0] ref_r;
  always_comb begin
    any_ref = 1'b0;
    ref_r   = '0;
    for (int i = NR - 1; i >= 0; i--)
      if (refi[i] == '0) begin
        any_ref = 1'b1;
        ref_r   = RANK_W'(i);
      end
  end

  // lowest rank asking for a ping
  logic              any_ping;
  logic [RANK_W-1:0] ping_r;
  always_comb begin
    any_ping = 1'b0;
    ping_r   = '0;
    for (int i = NR - 1; i >= 0; i--)
      if (ping_req[i]) begin
        any_ping = 1'b1;
        ping_r   = RANK_W'(i);
      end
  end

  always_comb begin
    wake_req = '0;
    data_req = '0;
    unique case (st)
      S_PING, S_PINGLAT, S_PINGBURST: begin
        wake_req[r] = 1'b1; data_req[r] = 1'b1;
      end
      S_WAKE: wake_req[r] = 1'b1;
      S_TRCD, S_RDLAT, S_RDCAP, S_WRLAT, S_WRDATA: begin
        wake_req[r] = 1'b1; data_req[r] = 1'b1;
      end
      S_RDCHK, S_RELOCK, S_REF, S_RFC: wake_req[r] = 1'b1;
      default: ;
    endcase
  end

  assign dq_oe  = (st == S_WRDATA);
  assign dq_out = dq_oe ? h_data[wbeat*2*DQ_W +: 2*DQ_W] : '0;
  assign pop    = resp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; r <= '0; cnt <= '0; recal <= 1'b0; retry_dz <= 1'b0;
      corr_seen <= 1'b0; corr_bad <= 1'b0; wbeat <= '0;
      for (int i = 0; i < NR; i++) trc[i] <= '0;
      cmd <= '0;
      rx_start <= 1'b0; rx_zlog <= '0;
      edc_start <= 1'b0; edc_is_ping <= 1'b0; edc_rank <= '0;
      exp_valid <= 1'b0; exp_line <= '0;
      resp_valid <= 1'b0; resp_write <= 1'b0; resp_addr <= '0; resp_rdata <= '0;
      n_retry <= '0; n_drowsy <= '0; n_ping <= '0; n_recal <= '0;
      n_relock_wait <= '0; n_refresh <= '0;
      for (int i = 0; i < NR; i++) refi[i] <= ($clog2(T_REFI+1))'(T_REFI);
    end else begin
      cmd        <= '0;
      rx_start   <= 1'b0;
      edc_start  <= 1'b0;
      exp_valid  <= 1'b0;
      resp_valid <= 1'b0;
      for (int i = 0; i < NR; i++) if (trc[i] != '0) trc[i] <= trc[i] - 1'b1;
      for (int i = 0; i < NR; i++) if (refi[i] != '0) refi[i] <= refi[i] - 1'b1;
      if (correct_valid[r]) begin
        corr_seen <= 1'b1;
        corr_bad  <= correct_err[r];
      end

      unique case (st)
        S_IDLE: if (!resp_valid) begin
          if (any_ref) begin
            r <= ref_r; st <= S_REF;
          end else if (h_valid) begin
            r <= addr_rank(h_addr);
            if (blaze && stale[addr_rank(h_addr)]) begin
              recal <= 1'b1; st <= S_PING;
            end else begin
              st <= S_WAKE;
            end
          end else if (blaze && any_ping) begin
            r <= ping_r; recal <= 1'b0; st <= S_PING;
          end
        end

        // ---- data-less ping / recalibration burst ----
        S_PING: if (cmd_rdy[r] && data_rdy[r]) begin
          cmd.op   <= CMD_PING;
          cmd.rank <= r;
          cnt      <= 8'(T_CAS - 1);
          st       <= S_PINGLAT;
        end
        S_PINGLAT: begin
          if (cnt == '0) begin
            edc_start <= 1'b1; edc_is_ping <= 1'b1; edc_rank <= r;
            cnt <= 8'(EDC_BURST + 1);
            st  <= S_PINGBURST;
          end else cnt <= cnt - 1'b1;
        end
        S_PINGBURST: begin
          if (cnt == '0) begin
            if (recal) n_recal <= n_recal + 1'b1;
            else       n_ping  <= n_ping + 1'b1;
            st <= recal ? S_WAKE : S_IDLE;
          end else cnt <= cnt - 1'b1;
        end

        // ---- refresh: command block only, data block stays asleep ----
        S_REF: if (cmd_rdy[r] && trc[r] == '0) begin
          cmd.op    <= CMD_REF;
          cmd.rank  <= r;
          refi[r]   <= ($clog2(T_REFI+1))'(T_REFI);
          n_refresh <= n_refresh + 1'b1;
          cnt       <= 8'(T_RFC - 1);
          st        <= S_RFC;
        end
        S_RFC: begin
          if (cnt == '0) st <= S_IDLE;
          else cnt <= cnt - 1'b1;
        end

        // ---- row activation ----
        S_WAKE: if (cmd_rdy[r] && trc[r] == '0) begin
          cmd.op   <= CMD_ACT;
          cmd.rank <= r;
          cmd.bank <= addr_bank(h_addr);
          cmd.row  <= addr_row(h_addr);
          trc[r]   <= 8'(T_RC - 1);
          cnt      <= 8'(T_RCD - 1);
          st       <= S_TRCD;
        end
        S_TRCD: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (data_rdy[r]) begin
            cmd.op     <= h_write ? CMD_WRA : CMD_RDA;
            cmd.rank   <= r;
            cmd.bank   <= addr_bank(h_addr);
            cmd.col    <= addr_col(h_addr);
            cmd.drowsy <= !h_write && dz;
            rx_zlog    <= (!h_write && dz) ? drowsy_zlog : 2'd0;
            if (!h_write && dz) n_drowsy <= n_drowsy + 1'b1;
            corr_seen  <= 1'b0;
            cnt        <= h_write ? 8'(T_CWL - 1) : 8'(T_CAS - 1);
            st         <= h_write ? S_WRLAT : S_RDLAT;
          end
        end

        // ---- read ----
        S_RDLAT: begin
          if (cnt == '0) begin
            rx_start <= 1'b1;
            if (blaze) begin
              edc_start <= 1'b1; edc_is_ping <= 1'b0; edc_rank <= r;
            end
            st <= S_RDCAP;
          end else cnt <= cnt - 1'b1;
        end
        S_RDCAP: if (rx_done) begin
          resp_rdata <= rx_line;
          exp_valid  <= blaze;
          exp_line   <= rx_line;
          st         <= S_RDCHK;
        end
        S_RDCHK: if (corr_seen || correct_valid[r]) begin
          if (use_correct && (correct_valid[r] ? correct_err[r] : corr_bad)) begin
            n_retry <= n_retry + 1'b1;
            if (mode == MODE_CORRECT) begin
              n_relock_wait <= n_relock_wait + 1'b1;
              st <= S_RELOCK;
            end else begin
              retry_dz <= 1'b1;
              st <= S_WAKE;
            end
          end else begin
            resp_valid <= 1'b1;
            resp_write <= 1'b0;
            resp_addr  <= h_addr;
            retry_dz   <= 1'b0;
            st         <= S_IDLE;
          end
        end
        S_RELOCK: if (!drowsy[r]) st <= S_WAKE;

        // ---- write ----
        S_WRLAT: begin
          if (cnt == '0) begin
            wbeat <= '0;
            st    <= S_WRDATA;
          end else cnt <= cnt - 1'b1;
        end
        S_WRDATA: begin
          wbeat <= wbeat + 1'b1;
          if (wbeat == 2'(BL / 2 - 1)) begin
            if (blaze) begin
              edc_start <= 1'b1; edc_is_ping <= 1'b0; edc_rank <= r;
              exp_valid <= 1'b1; exp_line <= h_data;
            end
            resp_valid <= 1'b1;
            resp_write <= 1'b1;
            resp_addr  <= h_addr;
            st         <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // one request in service at a time
  assert property (@(posedge clk) disable iff (!rst_n) !(resp_valid && !h_valid));
endmodule
