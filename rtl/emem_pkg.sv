// emem_pkg: types and constants shared by the energy-proportional memory
// channel (fast-wake controller, DRAM interface slices, LPDDR2 buffer).
//
// Timing constants are in memory-clock cycles of a DDR3-1333 channel
// (667 MHz, 1.5 ns). Values taken from the source design: CAS 15 ns, RC 50 ns,
// RAS 38 ns, powerdown threshold 15 cycles, DLL relock tDLLK = 512 cycles,
// drowsy duration Y = 512 cycles, drowsy factor Z = 2 (4 and 8 as margin
// variants, chosen at run time), datapath wake ~10 ns,
// command wake 6 ns, EDC burst 32 bits carrying an 8-bit code.
// Own choices: tRCD equal to tCAS, write latency 7 cycles, the address map,
// the command encoding, the CRC-8 polynomial and the ping intervals.
package emem_pkg;

  localparam int unsigned NRANKS      = 2;     // single-rank DIMMs per channel
  localparam int unsigned RANK_W      = $clog2(NRANKS);
  localparam int unsigned DQ_W        = 64;    // channel data width
  localparam int unsigned BEATS_CLK   = 2;     // double data rate
  localparam int unsigned BL          = 8;     // burst length (beats)
  localparam int unsigned LINE_W      = DQ_W * BL;          // 512-bit line
  localparam int unsigned DQ_CLK_W    = DQ_W * BEATS_CLK;   // bits per clock
  localparam int unsigned LADDR_W     = 28;    // line address (16 GiB / 64 B)
  localparam int unsigned BANK_W      = 3;
  localparam int unsigned COL_W       = 7;
  localparam int unsigned ROW_W       = LADDR_W - COL_W - BANK_W - RANK_W;

  // timing in memory clock cycles (1.5 ns)
  localparam int unsigned T_RCD       = 10;
  localparam int unsigned T_CAS       = 10;
  localparam int unsigned T_RC        = 34;
  localparam int unsigned T_CWL       = 7;
  localparam int unsigned T_XP        = 4;     // command block exit (6 ns)
  localparam int unsigned T_XPD       = 7;     // data block exit (10 ns)
  localparam int unsigned T_DLLK      = 512;
  localparam int unsigned PD_THRESH   = 15;
  localparam int unsigned DROWSY_Y    = 512;
  localparam int unsigned DROWSY_ZLOG = 1;     // default Z = 2 (drowsy_zlog input)
  localparam int unsigned EDC_BURST   = 32;
  localparam int unsigned EDC_CRC_W   = 8;
  localparam int unsigned OS          = 8;     // CDR samples per EDC bit
  localparam int unsigned PING_INT    = 3072;
  localparam int unsigned STALE_MAX   = 4096;
  localparam int unsigned T_REFI      = 5200;  // 7.8 us refresh interval
  localparam int unsigned T_RFC       = 107;   // 160 ns, 2 Gb device

  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,
    CMD_RDA  = 3'd2,   // read with auto-precharge (closed page)
    CMD_WRA  = 3'd3,   // write with auto-precharge
    CMD_PING = 3'd4,   // data-less ping: toggling EDC only
    CMD_REF  = 3'd5    // refresh (command block only)
  } cmd_op_e;

  typedef enum logic [1:0] {
    MODE_BLAZE          = 2'd0,  // DLL-less DRAM, TRS timing, DCKE
    MODE_CORRECT        = 2'd1,  // speculate, on error wait for relock
    MODE_DROWSY         = 2'd2,  // Z-times slower reads until relock
    MODE_CORRECT_DROWSY = 2'd3   // speculate, on error retry drowsy
  } wake_mode_e;

  typedef struct packed {
    cmd_op_e                 op;
    logic [RANK_W-1:0]       rank;
    logic [BANK_W-1:0]       bank;
    logic [ROW_W-1:0]        row;
    logic [COL_W-1:0]        col;
    logic                    drowsy;   // column command asks for Z-rate read
  } cmd_t;

  // line address -> rank | col | bank | row (rank in the lowest bits)
  function automatic logic [RANK_W-1:0] addr_rank(input logic [LADDR_W-1:0] a);
    return a[RANK_W-1:0];
  endfunction
  function automatic logic [COL_W-1:0] addr_col(input logic [LADDR_W-1:0] a);
    return a[RANK_W +: COL_W];
  endfunction
  function automatic logic [BANK_W-1:0] addr_bank(input logic [LADDR_W-1:0] a);
    return a[RANK_W+COL_W +: BANK_W];
  endfunction
  function automatic logic [ROW_W-1:0] addr_row(input logic [LADDR_W-1:0] a);
    return a[RANK_W+COL_W+BANK_W +: ROW_W];
  endfunction

  // ---- LPDDR2 load-reduced buffer (8 GB channel of dual-line packages) ----
  localparam int unsigned LR_LRANKS   = 4;   // logical ranks seen by the host
  localparam int unsigned LR_MULT     = 2;   // rank multiplication factor
  localparam int unsigned LR_PRANKS   = LR_LRANKS * LR_MULT;
  localparam int unsigned LR_CA_LINES = 4;   // CA bus replicated 4x
  localparam int unsigned LR_DQ_LINES = 2;   // DQ bus replicated 2x
  localparam int unsigned LR_ROW_W    = 14;  // 2Gb x16 LPDDR2: 16K rows
  localparam int unsigned LR_COL_W    = 10;  // 1K columns
  localparam int unsigned LR_BANK_W   = 3;   // 8 banks

  typedef struct packed {
    cmd_op_e                  op;
    logic [LR_PRANKS-1:0]     cs;      // one chip select per physical rank
    logic [LR_BANK_W-1:0]     bank;
    logic [LR_ROW_W-1:0]      row;
    logic [LR_COL_W-1:0]      col;
  } lr_ca_t;

endpackage
