// tb_dram_if_slice: unit test of one rank's DRAM interface slice.
//
// The bench drives the command bus, CKE/DCKE and the MemCorrect sampler
// inputs by hand and plays the DRAM core (read data one cycle after core_rd).
// It checks, cycle by cycle:
//  * ACT/RDA/WRA reach the core only for the slice's own rank;
//  * a full-rate read puts the line on dq in cycles t+T_CAS .. t+T_CAS+3,
//    a drowsy read repeats every unit interval 2^drowsy_zlog times (Z = 2, 4, 8);
//  * a write captures dq_in in t+T_CWL .. t+T_CWL+3 and writes it, with the
//    command's bank and column, to the core;
//  * with blaze set, each read/write is followed by the EDC burst (CRC-8 of
//    the line, MSB first, then 1010...) starting with the data, a ping gives
//    a toggling burst T_CAS after the command; without blaze there is none;
//  * the Correct pin reports a bad window only for full-rate reads with
//    correct_en set;
//  * err_cmd_off / err_data_off flag commands and data while the command or
//    data block is still waking up.
`timescale 1ns / 1ps
module tb_dram_if_slice;
  import emem_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #0.75 clk = ~clk;

  logic [RANK_W-1:0] my_rank = 1;
  logic blaze = 1, correct_en = 0, cke = 0, dcke = 0;
  logic [1:0] drowsy_zlog = 1;
  cmd_t cmd = '0;
  logic [2*DQ_W-1:0] dq_in = 0, dq_out;
  logic dq_oe, edc, ck_early = 0, ck_late = 1, correct_valid, correct_err;
  logic core_act, core_rd, core_wr;
  logic [BANK_W-1:0] core_bank;
  logic [ROW_W-1:0] core_row;
  logic [COL_W-1:0] core_col;
  logic [LINE_W-1:0] core_wdata, core_rdata = 0;
  logic err_cmd_off, err_data_off;

  dram_if_slice dut (.*);

  function automatic logic [LINE_W-1:0] rnd_line();
    logic [LINE_W-1:0] v;
    for (int w = 0; w < 16; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction
  function automatic logic [7:0] crc8(input logic [LINE_W-1:0] d);
    logic [7:0] c = 0;
    for (int i = LINE_W - 1; i >= 0; i--) begin
      logic fb = c[7] ^ d[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  logic [LINE_W-1:0] rd_data;
  int n_cmd_err = 0, n_data_err = 0, n_corr = 0, n_corr_err = 0;
  always @(posedge clk) begin
    if (core_rd) core_rdata <= rd_data;
    if (rst_n && err_cmd_off) n_cmd_err++;
    if (rst_n && err_data_off) n_data_err++;
    if (rst_n && correct_valid) begin n_corr++; if (correct_err) n_corr_err++; end
  end

  task automatic issue(input cmd_op_e op, input int rank, input bit dz, input int bank, input int col);
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.rank = RANK_W'(rank); cmd.drowsy = dz;
    cmd.bank = BANK_W'(bank); cmd.row = ROW_W'(bank * 3 + 1); cmd.col = COL_W'(col);
    @(negedge clk);
    cmd = '0;
  endtask

  // cycle counter after the last issued command (at negedges)
  task automatic expect_edc(input bit ping, input logic [7:0] c, input string what);
    bit ok = 1;
    for (int i = 0; i < EDC_BURST; i++) begin
      logic e;
      e = (!ping && i < 8) ? c[7 - i] : ~i[0];
      if (edc !== e) ok = 0;
      @(negedge clk);
    end
    checks++;
    if (!ok) begin failures++; $display("EDC burst wrong: %s", what); end
    checks++;
    if (edc !== 1'b0) begin failures++; $display("EDC burst too long: %s", what); end
  endtask

  task automatic do_read(input bit dz, input bit expect_edc_burst, input string what);
    int z = dz ? (1 << drowsy_zlog) : 1;
    bit ok = 1;
    rd_data = rnd_line();
    issue(CMD_ACT, 1, 0, 2, 0);
    repeat (T_RCD - 1) @(negedge clk);
    @(negedge clk);
    cmd = '0; cmd.op = CMD_RDA; cmd.rank = 1; cmd.drowsy = dz; cmd.bank = 2; cmd.col = 5;
    #0.1;
    checks++;
    if (!core_rd || core_col != 5 || core_bank != 2) begin failures++; $display("core_rd: %s", what); end
    @(negedge clk);
    cmd = '0;
    repeat (T_CAS - 1) @(negedge clk);
    // now in cycle t + T_CAS
    for (int u = 0; u < 4 * z; u++) begin
      // each unit interval (half clock) is repeated z times
      for (int h = 0; h < 2; h++)
        if (!dq_oe || dq_out[h * DQ_W +: DQ_W] !== rd_data[((2 * u + h) / z) * DQ_W +: DQ_W]) ok = 0;
      if (u == 0 && expect_edc_burst && edc !== crc8(rd_data)[7]) ok = 0;
      @(negedge clk);
    end
    checks++;
    if (!ok) begin failures++; $display("read data wrong: %s", what); end
    checks++;
    if (dq_oe) begin failures++; $display("read burst too long: %s", what); end
    repeat (40) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LINE_W-1:0] wline;
  int c0, c1;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // command while asleep and while waking up
    issue(CMD_ACT, 1, 0, 0, 0);
    checks++; if (n_cmd_err != 1) begin failures++; $display("no err_cmd_off while asleep"); end
    @(negedge clk); cke = 1; dcke = 1;
    issue(CMD_ACT, 1, 0, 0, 0);
    checks++; if (n_cmd_err != 2) begin failures++; $display("no err_cmd_off during exit"); end
    repeat (20) @(negedge clk);
    // other rank's commands are ignored
    c0 = 0;
    fork
      begin issue(CMD_ACT, 0, 0, 1, 0); issue(CMD_RDA, 0, 0, 1, 0); end
      repeat (4) begin @(posedge clk); if (core_act || core_rd) c0++; end
    join
    checks++; if (c0 != 0) begin failures++; $display("reacted to other rank"); end
    repeat (40) @(negedge clk);

    // MemBlaze reads (EDC on), full rate
    for (int i = 0; i < 4; i++) begin
      fork
        do_read(0, 1, "blaze read");
        begin
          // EDC burst starts with the data
          repeat (2 + T_RCD + T_CAS) @(negedge clk);
          expect_edc(0, crc8(rd_data), "read");
        end
      join
    end
    // write
    wline = rnd_line();
    issue(CMD_ACT, 1, 0, 3, 0);
    repeat (T_RCD - 1) @(negedge clk);
    @(negedge clk);
    cmd = '0; cmd.op = CMD_WRA; cmd.rank = 1; cmd.bank = 3; cmd.col = 9;
    @(negedge clk); cmd = '0;
    repeat (T_CWL - 1) @(negedge clk);
    c1 = 0;
    fork
      for (int b = 0; b < 4; b++) begin
        dq_in = wline[b * 2 * DQ_W +: 2 * DQ_W];
        @(negedge clk);
      end
      begin
        repeat (20) begin
          @(posedge clk);
          if (core_wr) begin
            c1++;
            checks++;
            if (core_wdata !== wline || core_col != 9 || core_bank != 3) begin
              failures++; $display("core write wrong");
            end
          end
        end
      end
      begin
        // write EDC burst follows the data
        repeat (4) @(negedge clk);
        expect_edc(0, crc8(wline), "write");
      end
    join
    dq_in = 0;
    checks++; if (c1 != 1) begin failures++; $display("core_wr count %0d", c1); end
    // ping
    issue(CMD_PING, 1, 0, 0, 0);
    repeat (T_CAS - 1) @(negedge clk);
    expect_edc(1, 8'h0, "ping");
    checks++; if (n_data_err != 0 || n_cmd_err != 2) begin failures++; $display("unexpected protocol flags"); end

    // data block asleep while the data goes out
    @(negedge clk); dcke = 0;
    do_read(0, 1, "read with DCKE low");
    checks++; if (n_data_err == 0) begin failures++; $display("no err_data_off"); end
    @(negedge clk); dcke = 1;
    repeat (20) @(negedge clk);

    // DLL DRAMs: no EDC, drowsy reads, Correct pin
    blaze = 0; correct_en = 1; ck_late = 0;   // window missed
    c0 = n_corr_err; c1 = n_corr;
    fork
      do_read(0, 0, "correct read");
      begin
        repeat (2 + T_RCD + T_CAS) @(negedge clk);
        repeat (40) begin checks++; if (edc !== 0) begin failures++; $display("EDC without blaze"); end @(negedge clk); end
      end
    join
    checks++; if (n_corr_err != c0 + 1) begin failures++; $display("Correct pin missed the error"); end
    for (int zl = 1; zl <= 3; zl++) begin
      drowsy_zlog = 2'(zl);
      do_read(1, 0, "drowsy read");
    end
    drowsy_zlog = 1;
    checks++; if (n_corr_err != c0 + 1) begin failures++; $display("drowsy read flagged"); end
    correct_en = 0;
    do_read(0, 0, "no detector");
    checks++; if (n_corr_err != c0 + 1) begin failures++; $display("error without detector"); end
    correct_en = 1; ck_late = 1;
    do_read(0, 0, "good window");
    checks++; if (n_corr_err != c0 + 1 || n_corr < c1 + 4) begin failures++; $display("Correct pin on good window"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
