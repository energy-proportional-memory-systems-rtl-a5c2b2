// tb_mem_sched: unit test of the FCFS command scheduler.
//
// The ranks' power managers, the read capture path and the Correct pins are
// modelled by the bench: a rank's command block is ready 3 cycles after its
// wake request rises, its data block 2 cycles after the data request; a
// captured line arrives 4<<zlog cycles after rx_start; the Correct pin of
// the rank reports after the burst with an error the bench injects on demand.
// A monitor checks on every cycle that
//  * every rank is refreshed at least every T_REFI cycles (plus the time
//    to finish the request in service), with its data block left asleep;
//  * commands go only to ranks whose command block is ready, ACT->column
//    command is T_RCD when the data block is ready, ACTs to a rank are at
//    least T_RC apart, rx_start/edc_start come T_CAS after a read, and write
//    data is driven T_CWL .. T_CWL+BL/2-1 after WRA with the request's beats;
// and directed sequences check MemBlaze recalibration of stale ranks and
// idle pings, MemCorrect relock waits, MemDrowsy rate selection and the
// combined mode's immediate drowsy retry, with responses in order and with
// the right data.
`timescale 1ns / 1ps
module tb_mem_sched;
  import emem_pkg::*;
  localparam int NR = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #0.75 clk = ~clk;

  wake_mode_e mode = MODE_BLAZE;
  logic [1:0] drowsy_zlog = 2'(DROWSY_ZLOG);
  logic req_valid = 0, req_ready, req_write = 0;
  logic [LADDR_W-1:0] req_addr = 0;
  logic [LINE_W-1:0]  req_wdata = 0;
  logic resp_valid, resp_write;
  logic [LADDR_W-1:0] resp_addr;
  logic [LINE_W-1:0]  resp_rdata;
  cmd_t cmd;
  logic [NR-1:0] wake_req, data_req, cmd_rdy, data_rdy;
  logic [NR-1:0] drowsy = 0, stale = 0, ping_req = 0;
  logic rx_start, rx_done;
  logic [1:0] rx_zlog;
  logic [LINE_W-1:0] rx_line;
  logic [2*DQ_W-1:0] dq_out;
  logic dq_oe, edc_start, edc_is_ping, exp_valid;
  logic [RANK_W-1:0] edc_rank;
  logic [LINE_W-1:0] exp_line;
  logic [NR-1:0] correct_valid, correct_err;
  logic [15:0] n_retry, n_drowsy, n_ping, n_recal, n_relock_wait, n_refresh;

  mem_sched #(.NR(NR), .QD(4)) dut (.*);

  function automatic logic [LINE_W-1:0] line_of(input logic [LADDR_W-1:0] a, input int salt);
    logic [LINE_W-1:0] v;
    for (int w = 0; w < 16; w++) v[w*32 +: 32] = 32'(a) * 32'h01000193 + 32'(w + salt);
    return v;
  endfunction

  // ---- rank power model ----
  int wk [NR], dk [NR];
  always @(posedge clk)
    for (int r = 0; r < NR; r++) begin
      wk[r] <= wake_req[r] ? wk[r] + 1 : 0;
      dk[r] <= data_req[r] ? dk[r] + 1 : 0;
    end
  always_comb
    for (int r = 0; r < NR; r++) begin
      cmd_rdy[r]  = wake_req[r] && wk[r] >= 3;
      data_rdy[r] = data_req[r] && dk[r] >= 2;
    end

  // ---- capture + Correct pin model ----
  logic [LADDR_W-1:0] cur_addr;      // address being read (set by the bench)
  int   rx_cnt = -1, corr_cnt = -1;
  bit   inject = 0;
  logic [RANK_W-1:0] rx_rank;
  always @(posedge clk) begin
    rx_done <= 0; correct_valid <= 0; correct_err <= 0;
    if (rx_start) begin
      rx_cnt   <= (4 << rx_zlog) - 1;
      corr_cnt <= (4 << rx_zlog);
      rx_rank  <= addr_rank(cur_addr);
    end else begin
      if (rx_cnt > 0) rx_cnt <= rx_cnt - 1;
      if (rx_cnt == 0) begin
        rx_done <= 1; rx_line <= line_of(cur_addr, 0); rx_cnt <= -1;
      end
      if (corr_cnt > 0) corr_cnt <= corr_cnt - 1;
      if (corr_cnt == 0) begin
        correct_valid[rx_rank] <= 1;
        correct_err[rx_rank]   <= inject && rx_zlog == 0;
        if (rx_zlog == 0) inject = 0;
        corr_cnt <= -1;
      end
    end
  end

  // ---- protocol monitor ----
  longint cyc = 0, t_act [NR], t_col = -1000;
  bit col_wr = 0;
  logic [LINE_W-1:0] wr_exp;
  int n_act = 0, n_rda = 0, n_wra = 0, n_pingc = 0, n_dz = 0, n_refc = 0;
  longint t_ref [NR];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cmd.op != CMD_NOP) begin
      checks++;
      if (!cmd_rdy[cmd.rank] && !$past(cmd_rdy[cmd.rank])) begin
        failures++; $display("command to a rank that is not awake");
      end
    end
    if (cmd.op == CMD_ACT) begin
      n_act++;
      checks++;
      if (cyc - t_act[cmd.rank] < T_RC) begin failures++; $display("tRC violated"); end
      t_act[cmd.rank] = cyc;
    end
    if (cmd.op == CMD_RDA || cmd.op == CMD_WRA) begin
      checks++;
      if (cyc - t_act[cmd.rank] != T_RCD) begin
        failures++; $display("ACT->col %0d", cyc - t_act[cmd.rank]);
      end
      t_col = cyc; col_wr = (cmd.op == CMD_WRA);
      if (cmd.op == CMD_RDA) n_rda++; else n_wra++;
      if (cmd.drowsy) n_dz++;
      checks++;
      if (cmd.op == CMD_RDA && rx_zlog != (cmd.drowsy ? drowsy_zlog : 2'd0)) begin
        failures++; $display("rx_zlog does not match drowsy flag");
      end
    end
    if (cmd.op == CMD_PING) n_pingc++;
    if (cmd.op == CMD_REF) begin
      n_refc++;
      checks++;
      if (data_req[cmd.rank]) begin failures++; $display("data block woken for refresh"); end
      checks++;
      if (cyc - t_ref[cmd.rank] > T_REFI + 700) begin failures++; $display("refresh late: %0d", cyc - t_ref[cmd.rank]); end
      checks++;
      if (cyc - t_act[cmd.rank] < T_RC) begin failures++; $display("REF too soon after ACT"); end
      t_ref[cmd.rank] = cyc;
      t_act[cmd.rank] = cyc + T_RFC - T_RC;   // next ACT no earlier than T_RFC
    end
    if (rx_start) begin
      checks++;
      if (col_wr || cyc - t_col != T_CAS) begin failures++; $display("rx_start at %0d", cyc - t_col); end
      checks++;
      if (edc_start !== (mode == MODE_BLAZE)) begin failures++; $display("edc_start with read"); end
    end
    if (dq_oe) begin
      longint k;
      k = cyc - t_col - T_CWL;
      checks++;
      if (!col_wr || k < 0 || k >= BL / 2) begin failures++; $display("write data at %0d", k); end
      else if (dq_out !== wr_exp[k*2*DQ_W +: 2*DQ_W]) begin failures++; $display("write beat %0d", k); end
    end
  end

  // ---- requests ----
  logic [LADDR_W-1:0] eq_a [$];
  logic eq_w [$];
  int nresp = 0;
  always @(posedge clk) if (rst_n && resp_valid) begin
    logic [LADDR_W-1:0] a;
    logic w;
    nresp++;
    a = eq_a.pop_front(); w = eq_w.pop_front();
    checks++;
    if (resp_addr !== a || resp_write !== w) begin failures++; $display("response order"); end
    else if (!w && resp_rdata !== line_of(a, 0)) begin failures++; $display("response data"); end
    if (eq_a.size() != 0) cur_addr = eq_a[0];
  end

  task automatic request(input logic w, input logic [LADDR_W-1:0] a);
    @(negedge clk);
    if (eq_a.size() == 0) cur_addr = a;
    req_valid = 1; req_write = w; req_addr = a; req_wdata = line_of(a, 77);
    if (w) wr_exp = req_wdata;
    eq_a.push_back(a); eq_w.push_back(w);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic wait_done();
    int t = 0;
    while (eq_a.size() != 0 && t < 5000) begin @(posedge clk); t++; end
    checks++;
    if (eq_a.size() != 0) begin failures++; $display("request not finished"); end
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c0;
  initial begin
    for (int r = 0; r < NR; r++) begin t_act[r] = -1000; t_ref[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // MemBlaze: plain reads and writes to both ranks
    mode = MODE_BLAZE;
    for (int i = 0; i < 8; i++) begin
      request(i % 3 == 2, LADDR_W'(i * 37 + 1) ^ LADDR_W'(i & 1));
      wait_done();
    end
    // back-to-back requests to one rank: tRC must hold
    request(0, 28'h10); request(0, 28'h20); request(0, 28'h30);
    wait_done();

    // stale rank: recalibration ping before the access
    stale[1] = 1;
    c0 = n_pingc;
    request(0, 28'h101);
    wait_done();
    stale[1] = 0;
    checks++; if (n_recal != 1 || n_pingc != c0 + 1) begin failures++; $display("recalibration"); end
    // idle rank asking for a ping
    @(negedge clk); ping_req[0] = 1;
    repeat (60) @(posedge clk);
    @(negedge clk); ping_req[0] = 0;
    repeat (60) @(posedge clk);
    checks++; if (n_ping == 0) begin failures++; $display("no idle ping"); end
    // pings only in MemBlaze
    mode = MODE_DROWSY;
    c0 = n_pingc;
    @(negedge clk); ping_req[0] = 1; stale[0] = 1;
    request(0, 28'h200);
    wait_done();
    ping_req[0] = 0; stale[0] = 0;
    checks++; if (n_pingc != c0) begin failures++; $display("ping outside MemBlaze"); end

    // MemDrowsy: drowsy flag follows the rank's relock state
    c0 = n_dz;
    drowsy[0] = 1;
    request(0, 28'h300);
    wait_done();
    drowsy[0] = 0;
    request(0, 28'h302);
    wait_done();
    checks++; if (n_dz != c0 + 1) begin failures++; $display("drowsy selection %0d", n_dz - c0); end

    // MemCorrect: error -> wait for relock -> full-rate retry
    mode = MODE_CORRECT;
    drowsy[1] = 1; inject = 1;
    c0 = n_act;
    request(0, 28'h401);
    repeat (200) @(posedge clk);
    checks++; if (n_relock_wait != 1 || nresp != 0 && eq_a.size() == 0) begin failures++; $display("no relock wait"); end
    checks++; if (n_act != c0 + 1) begin failures++; $display("retried before relock"); end
    drowsy[1] = 0;
    wait_done();
    checks++; if (n_retry != 1 || n_act != c0 + 2) begin failures++; $display("MemCorrect retry"); end

    // MemCorrect + MemDrowsy: error -> immediate drowsy retry (Z = 4)
    mode = MODE_CORRECT_DROWSY;
    drowsy_zlog = 2;
    drowsy[0] = 1; inject = 1;
    c0 = n_dz;
    request(0, 28'h500);
    wait_done();
    drowsy[0] = 0;
    checks++; if (n_retry != 2 || n_dz != c0 + 1 || n_relock_wait != 1) begin
      failures++; $display("combined retry: retry=%0d dz=%0d", n_retry, n_dz - c0);
    end
    // no error: full rate, no retry
    drowsy[1] = 1;
    request(0, 28'h503);
    wait_done();
    drowsy[1] = 0;
    checks++; if (n_retry != 2) begin failures++; $display("spurious retry"); end

    // refresh keeps coming while the channel is idle
    repeat (2 * T_REFI + 100) @(posedge clk);
    checks++;
    if (n_refc < 2 * NR || n_refresh != 16'(n_refc)) begin failures++; $display("refreshes %0d", n_refc); end
    $display("ACT %0d RDA %0d WRA %0d PING %0d responses %0d", n_act, n_rda, n_wra, n_pingc, nresp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
