// tb_emem_top: end-to-end test of the memory channel at its default sizes.
//
// Around emem_top it models what lies outside the digital design: a DRAM core
// per rank (a sparse array), the channel and analog sampler of every EDC pin
// (a per-rank, slowly drifting sub-bit delay turned into 8 samples per bit),
// and the MemCorrect delay-line samplers (a rank woken from powerdown has,
// with 50 % probability, bad timing until its DLL has relocked after T_DLLK
// cycles). It then runs random reads and writes, with idle gaps short and
// long, in each wake-up mode in turn (MemBlaze, MemCorrect, MemDrowsy,
// MemCorrect+MemDrowsy), and checks:
//  * every read returns the last data written (scoreboard), in FCFS order;
//  * no command reaches a sleeping command block, no data moves through a
//    sleeping data block, and no EDC code or timing reference mismatches;
//  * MemBlaze: a read to a powered-down rank takes exactly T_XP + 1 cycles
//    longer than to an awake one (data-block wake-up hidden under the access);
//  * every mechanism happened: powerdown, wake-up, DCKE off while CKE on,
//    refresh with the data block asleep,
//    pings, recalibrations, CDR phase moves, MemCorrect retries, waits for
//    relock, drowsy reads at Z = 2, 4 and 8, mode switches,
//    rank multiplication in the LPDDR2
//    buffer and ECC detection.
`timescale 1ns / 1ps
module tb_emem_top;
  import emem_pkg::*;
  localparam int NR = NRANKS;

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
  logic [NR-1:0] cke, dcke, rank_pd, dram_edc, ck_early, ck_late;
  logic [NR-1:0][2:0] phase;
  logic [NR-1:0][7:0] ctl_edc_os;
  logic [NR-1:0] core_act, core_rd, core_wr;
  logic [NR-1:0][BANK_W-1:0] core_bank;
  logic [NR-1:0][ROW_W-1:0]  core_row;
  logic [NR-1:0][COL_W-1:0]  core_col;
  logic [LINE_W-1:0] core_wdata [NR];
  logic [LINE_W-1:0] core_rdata [NR];
  logic [15:0] n_wake, n_retry, n_drowsy, n_ping, n_recal, n_relock_wait, n_refresh, n_edc_err, n_trs_err;
  logic err_cmd_off, err_data_off;
  cmd_op_e lr_h_op = CMD_NOP;
  logic [1:0] lr_h_rank = 0;
  logic [2:0] lr_h_bank = 0;
  logic [14:0] lr_h_row = 0;
  logic [9:0] lr_h_col = 0;
  logic [63:0] lr_h_dq_wr = 0, lr_h_dq_rd;
  logic lr_h_dq_wr_en = 0;
  lr_ca_t lr_d_ca [4];
  logic [63:0] lr_d_dq_wr [2];
  logic [1:0] lr_d_dq_wr_en;
  logic [63:0] lr_d_dq_rd [2];
  logic [27:0] ecc_data_addr = 0, ecc_addr;
  logic [1:0] ecc_slot;
  logic ecc_addr_in_ecc_space;
  logic [511:0] ecc_enc_data = 0, ecc_chk_data = 0;
  logic [127:0] ecc_enc_check, ecc_chk_check = 0;
  logic [3:0] ecc_chk_err;

  emem_top dut (.*);

  // ---------------- DRAM cores ----------------
  logic [LINE_W-1:0] core [NR][logic [BANK_W+ROW_W+COL_W-1:0]];
  function automatic logic [LINE_W-1:0] init_val(input int r, input logic [BANK_W+ROW_W+COL_W-1:0] k);
    logic [LINE_W-1:0] v;
    for (int w = 0; w < 16; w++) v[w*32 +: 32] = 32'(k) * 32'h9E3779B1 + 32'(w * 7919 + r * 131);
    return v;
  endfunction
  logic [BANK_W-1:0] act_bank [NR];
  logic [ROW_W-1:0]  act_row  [NR];
  always @(posedge clk) begin
    for (int r = 0; r < NR; r++) begin
      if (core_act[r]) begin act_bank[r] <= core_bank[r]; act_row[r] <= core_row[r]; end
      if (core_rd[r]) begin
        logic [BANK_W+ROW_W+COL_W-1:0] k;
        k = {core_bank[r], act_row[r], core_col[r]};
        core_rdata[r] <= core[r].exists(k) ? core[r][k] : init_val(r, k);
      end
      if (core_wr[r]) core[r][{core_bank[r], act_row[r], core_col[r]}] = core_wdata[r];
    end
  end

  // ---------------- EDC channel + analog sampler ----------------
  int   off [NR];
  logic edc_prev [NR];
  always @(posedge clk) for (int r = 0; r < NR; r++) edc_prev[r] <= dram_edc[r];
  always_comb
    for (int r = 0; r < NR; r++)
      for (int k = 0; k < 8; k++) ctl_edc_os[r][k] = (k < off[r]) ? edc_prev[r] : dram_edc[r];

  // ---------------- MemCorrect samplers ----------------
  logic [NR-1:0] cke_q = 0;
  int   since_wake [NR];
  bit   bad_wake [NR];
  always @(posedge clk) begin
    cke_q <= cke;
    for (int r = 0; r < NR; r++) begin
      if (cke[r] && !cke_q[r]) begin
        since_wake[r] <= 0;
        bad_wake[r]   <= ($urandom_range(0, 99) < 50);
      end else if (since_wake[r] < 100000) since_wake[r] <= since_wake[r] + 1;
    end
  end
  always_comb
    for (int r = 0; r < NR; r++) begin
      ck_early[r] = 1'b0;
      ck_late[r]  = !(bad_wake[r] && since_wake[r] < T_DLLK && cke[r]);
    end

  // ---------------- scoreboard ----------------
  logic [LINE_W-1:0] shadow [logic [LADDR_W-1:0]];
  logic [LADDR_W-1:0] exp_q [$];
  logic               exp_w [$];
  logic [LINE_W-1:0]  exp_d [$];
  int nresp = 0;

  function automatic logic [LINE_W-1:0] expect_read(input logic [LADDR_W-1:0] a);
    logic [BANK_W+ROW_W+COL_W-1:0] k;
    if (shadow.exists(a)) return shadow[a];
    k = {addr_bank(a), addr_row(a), addr_col(a)};
    return init_val(int'(addr_rank(a)), k);
  endfunction

  always @(posedge clk) if (rst_n && resp_valid) begin
    nresp++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected response");
    end else begin
      logic [LADDR_W-1:0] a;
      logic w;
      logic [LINE_W-1:0] d;
      a = exp_q.pop_front();
      w = exp_w.pop_front();
      d = exp_d.pop_front();
      if (resp_addr !== a || resp_write !== w) begin
        failures++; $display("order: got %h exp %h", resp_addr, a);
      end else if (!w && resp_rdata !== d) begin
        failures++; $display("read data mismatch addr %h mode %0d", a, mode);
      end
    end
  end

  // protocol checks and mechanism counters
  int n_ref_asleep = 0;
  int n_dz_z [4] = '{0, 0, 0, 0};
  int n_pd = 0, n_dcke_off = 0, n_phase_move = 0, n_mode_sw = 0, n_proto = 0;
  logic [NR-1:0][2:0] phase_q;
  always @(posedge clk) if (rst_n) begin
    phase_q <= phase;
    for (int r = 0; r < NR; r++) begin
      if (cke_q[r] && !cke[r]) n_pd++;
      if (mode == MODE_BLAZE && cke[r] && !dcke[r]) n_dcke_off++;
      if (phase[r] != phase_q[r]) n_phase_move++;
    end
    if (cmd.op == CMD_REF && mode == MODE_BLAZE && !dcke[cmd.rank]) n_ref_asleep++;
    if (cmd.op == CMD_RDA && cmd.drowsy) n_dz_z[drowsy_zlog]++;
    if (err_cmd_off || err_data_off) begin
      n_proto++;
      if (n_proto < 5) $display("protocol violation cmd=%b data=%b t=%t", err_cmd_off, err_data_off, $realtime);
    end
  end

  // ---------------- stimulus ----------------
  logic [LADDR_W-1:0] pool [32];

  task automatic push(input logic w, input logic [LADDR_W-1:0] a);
    logic [LINE_W-1:0] d;
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = $urandom;
    @(negedge clk);
    req_valid = 1; req_write = w; req_addr = a; req_wdata = d;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    exp_q.push_back(a); exp_w.push_back(w);
    exp_d.push_back(w ? '0 : expect_read(a));
    if (w) shadow[a] = d;
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic drain();
    int t = 0;
    while (exp_q.size() != 0 && t < 100000) begin @(posedge clk); t++; end
  endtask

  // latency of one read from request to response
  task automatic timed_read(input logic [LADDR_W-1:0] a, output int lat);
    int t0;
    push(0, a);
    t0 = 1;
    while (exp_q.size() != 0) begin @(posedge clk); t0++; end
    lat = t0;
  endtask

  task automatic traffic(input int n, input int long_every);
    for (int i = 0; i < n; i++) begin
      push($urandom_range(0, 99) < 35, pool[$urandom_range(0, 31)]);
      if (long_every != 0 && i % long_every == long_every - 1) begin
        drain();
        repeat (long_every > 20 ? 5000 : 3500) @(posedge clk);
      end else if ($urandom_range(0, 3) == 0) begin
        drain();
        repeat ($urandom_range(0, 600)) @(posedge clk);
      end
    end
    drain();
  endtask

  task automatic set_mode(input wake_mode_e m);
    drain();
    repeat (50) @(negedge clk);
    if (m != mode) n_mode_sw++;
    mode = m;
  endtask

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat_sleep, lat_awake;
  int n_rankmult = 0, n_ecc_det = 0;
  int retry_c, drowsy_c, relock_c;

  initial begin
    for (int i = 0; i < 32; i++) pool[i] = LADDR_W'({$urandom} % (1 << LADDR_W));
    for (int r = 0; r < NR; r++) off[r] = r + 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // ---- MemBlaze ----
    mode = MODE_BLAZE;
    traffic(200, 0);
    // hidden data wake-up: sleeping vs awake rank
    // (measured again if a refresh fell into the measurement)
    for (int k = 0; k < 4; k++) begin
      int nref;
      repeat (300) @(posedge clk);
      nref = n_refresh;
      timed_read(pool[0], lat_sleep);
      // a few idle cycles (below the powerdown threshold) so that tRC is met
      repeat (6) @(posedge clk);
      timed_read(pool[0], lat_awake);
      if (n_refresh == nref) break;
    end
    checks++;
    if (lat_sleep - lat_awake != int'(T_XP) + 1) begin
      failures++; $display("wake latency: sleep %0d awake %0d", lat_sleep, lat_awake);
    end
    $display("MemBlaze read latency: awake %0d, from powerdown %0d cycles", lat_awake, lat_sleep);
    // drift the channel delay of rank 0 by one slot
    off[0] = 2;
    traffic(150, 0);
    // long idle periods: pings and recalibration
    traffic(12, 3);
    traffic(12, 30);
    checks++; if (n_ping == 0) begin failures++; $display("no ping"); end
    checks++; if (n_recal == 0) begin failures++; $display("no recalibration"); end

    // ---- MemCorrect ----
    set_mode(MODE_CORRECT);
    traffic(200, 0);
    checks++; if (n_relock_wait == 0) begin failures++; $display("no relock wait"); end
    retry_c = n_retry;

    // ---- MemDrowsy, Z = 2, 4 and 8 ----
    set_mode(MODE_DROWSY);
    traffic(100, 0);
    set_mode(MODE_DROWSY);
    drowsy_zlog = 2;
    traffic(60, 0);
    set_mode(MODE_DROWSY);
    drowsy_zlog = 3;
    traffic(60, 0);
    checks++; if (n_drowsy == 0) begin failures++; $display("no drowsy read"); end
    drowsy_c = n_drowsy;

    // ---- MemCorrect + MemDrowsy, Z = 4 ----
    set_mode(MODE_CORRECT_DROWSY);
    drowsy_zlog = 2;
    relock_c = n_relock_wait;
    traffic(250, 0);
    checks++; if (n_retry == retry_c) begin failures++; $display("no retry in combined mode"); end
    checks++; if (n_drowsy == drowsy_c) begin failures++; $display("no drowsy retry"); end
    checks++; if (n_relock_wait != relock_c) begin failures++; $display("combined mode waited for relock"); end

    set_mode(MODE_BLAZE);
    drowsy_zlog = 2'(DROWSY_ZLOG);
    traffic(20, 0);

    // ---- LPDDR2 load-reduced buffer: rank multiplication ----
    for (int i = 0; i < 8; i++) begin
      int sub = i % 2, lr = (i / 2) % 4, p;
      p = sub * 4 + lr;
      @(negedge clk); lr_h_op = CMD_ACT; lr_h_rank = 2'(lr); lr_h_bank = 3'(i); lr_h_row = 15'((sub << 14) | i);
      @(negedge clk); lr_h_op = CMD_RDA; lr_h_row = 0;
      @(negedge clk); lr_h_op = CMD_NOP;
      // the read command now on the device side selects the physical rank
      checks++;
      begin
        bit ok = 0;
        for (int k = 0; k < 4; k++) if (lr_d_ca[k].op == CMD_RDA && lr_d_ca[k].cs == 8'(1 << p)) ok = 1;
        if (ok) n_rankmult++; else begin failures++; $display("rank multiplication p=%0d", p); end
      end
    end

    // ---- embedded ECC ----
    for (int i = 0; i < 16; i++) begin
      for (int w = 0; w < 16; w++) ecc_enc_data[w*32 +: 32] = $urandom;
      #0.1;
      ecc_chk_data = ecc_enc_data;
      ecc_chk_check = ecc_enc_check;
      ecc_chk_data[(i % 8) * 16 +: 16] ^= 16'h0101;
      ecc_chk_data[((i + 3) % 8) * 16 +: 16] ^= 16'h8000;
      #0.1;
      checks++;
      if (ecc_chk_err[0]) n_ecc_det++; else begin failures++; $display("ECC miss"); end
    end

    // ---- final accounting ----
    checks++; if (n_proto != 0) begin failures++; $display("%0d protocol violations", n_proto); end
    checks++; if (n_edc_err != 0) begin failures++; $display("%0d EDC errors", n_edc_err); end
    checks++; if (n_trs_err != 0) begin failures++; $display("%0d TRS errors", n_trs_err); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("requests left"); end
    begin
      int ev [string];
      ev["powerdown"] = n_pd; ev["wake-up"] = n_wake; ev["DCKE off while CKE on"] = n_dcke_off;
      ev["ping"] = n_ping; ev["recalibration"] = n_recal; ev["CDR phase move"] = n_phase_move;
      ev["MemCorrect retry"] = n_retry; ev["relock wait"] = n_relock_wait;
      ev["drowsy read"] = n_drowsy;
      ev["drowsy read, Z=2"] = n_dz_z[1]; ev["drowsy read, Z=4"] = n_dz_z[2]; ev["drowsy read, Z=8"] = n_dz_z[3]; ev["mode switch"] = n_mode_sw;
      ev["rank multiplication"] = n_rankmult; ev["ECC detection"] = n_ecc_det;
      ev["response"] = nresp;
      ev["refresh"] = n_refresh; ev["refresh, data block asleep"] = n_ref_asleep;
      foreach (ev[k]) begin
        $display("  %-24s %0d", k, ev[k]);
        checks++;
        if (ev[k] == 0) begin failures++; $display("mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
