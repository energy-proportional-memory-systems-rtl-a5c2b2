// lrbuf: on-module buffer of a load-reduced LPDDR2 module built from
// dual-line packages (DLPs).
//
// LPDDR2 dies have no on-die termination, so a channel cannot carry many
// loads. The buffer isolates them: the host sees one load, and the buffer
// re-drives commands on four copies of the CA bus (each loaded by two
// packages) and data on two copies of the DQ bus (each reaching four
// packages), time-multiplexing them onto the host bus. With 8 packages of four
// 2Gb x16 dies the module holds 8 physical ranks of four dies; the host
// addresses 4 logical ranks, and rank multiplication turns the extra row
// address bit of an ACT into a sub-rank select that the buffer stores per
// logical rank and bank, so reads and writes need no extra bits.
// Placement (own choice, following the package grouping of the source):
// DQ line 0 reaches packages 1,2,5,6 and carries physical ranks 0-3, DQ line 1
// packages 3,4,7,8 and ranks 4-7; each package pair holds two ranks, so CA
// line k drives packages 2k+1 and 2k+2 and physical rank p uses CA line
// {p[2], p[1]} in the order (0,1)->0, (2,3)->2, (4,5)->1, (6,7)->3.
// A refresh (REF) carries no row address, so it is sent to all sub-ranks of
// its logical rank at once.
// Timing: every path is retimed by one register (one cycle of added latency).
// Write data is steered to the DQ line of the rank of the last write command,
// read data is taken from the DQ line of the rank of the last read command.
module lrbuf
  import emem_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // host side (one load on the channel)
  input  cmd_op_e                       h_op,
  input  logic [$clog2(LR_LRANKS)-1:0]  h_rank,
  input  logic [LR_BANK_W-1:0]          h_bank,
  input  logic [LR_ROW_W:0]             h_row,     // MSB = sub-rank select
  input  logic [LR_COL_W-1:0]           h_col,
  input  logic [DQ_W-1:0]               h_dq_wr,
  input  logic                          h_dq_wr_en,
  output logic [DQ_W-1:0]               h_dq_rd,
  // device side: replicated point-to-point buses
  output lr_ca_t                        d_ca    [LR_CA_LINES],
  output logic [DQ_W-1:0]               d_dq_wr [LR_DQ_LINES],
  output logic [LR_DQ_LINES-1:0]        d_dq_wr_en,
  input  logic [DQ_W-1:0]               d_dq_rd [LR_DQ_LINES]
);
  localparam int unsigned LRW = $clog2(LR_LRANKS);
  localparam int unsigned PW  = $clog2(LR_PRANKS);
  localparam int unsigned SW  = $clog2(LR_MULT) > 0 ? $clog2(LR_MULT) : 1;

  function automatic int unsigned ca_line_of(input logic [PW-1:0] p);
    return {p[1], p[2]};
  endfunction
  function automatic int unsigned dq_line_of(input logic [PW-1:0] p);
    return int'(p[PW-1]);
  endfunction

  // sub-rank captured at ACT, per logical rank and bank
  logic [SW-1:0] sub_tbl [LR_LRANKS][1 << LR_BANK_W];
  logic [SW-1:0] sub;
  logic [PW-1:0] prank;
  logic          wr_line, rd_line;

  always_comb begin
    if (h_op == CMD_ACT) sub = SW'(h_row[LR_ROW_W]);
    else                 sub = sub_tbl[h_rank][h_bank];
    prank = {sub, h_rank};
  end

  // a refresh goes to every sub-rank of the logical rank, on whichever CA
  // lines they sit
  logic [LR_PRANKS-1:0] ref_cs [LR_CA_LINES];
  logic [PW-1:0]        ref_p;
  always_comb begin
    ref_p = '0;
    for (int k = 0; k < LR_CA_LINES; k++) ref_cs[k] = '0;
    for (int s = 0; s < LR_MULT; s++) begin
      ref_p = {SW'(s), h_rank};
      if (h_op == CMD_REF) ref_cs[ca_line_of(ref_p)][ref_p] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LR_LRANKS; i++)
        for (int b = 0; b < (1 << LR_BANK_W); b++) sub_tbl[i][b] <= '0;
      for (int k = 0; k < LR_CA_LINES; k++) d_ca[k] <= '0;
      for (int k = 0; k < LR_DQ_LINES; k++) d_dq_wr[k] <= '0;
      d_dq_wr_en <= '0;
      h_dq_rd    <= '0;
      wr_line    <= 1'b0;
      rd_line    <= 1'b0;
    end else begin
      // command path
      for (int k = 0; k < LR_CA_LINES; k++) d_ca[k] <= '0;
      if (h_op == CMD_REF) begin
        for (int k = 0; k < LR_CA_LINES; k++)
          if (ref_cs[k] != '0) begin
            d_ca[k].op <= CMD_REF;
            d_ca[k].cs <= ref_cs[k];
          end
      end else if (h_op != CMD_NOP) begin
        if (h_op == CMD_ACT) sub_tbl[h_rank][h_bank] <= sub;
        d_ca[ca_line_of(prank)].op   <= h_op;
        d_ca[ca_line_of(prank)].cs   <= LR_PRANKS'(1) << prank;
        d_ca[ca_line_of(prank)].bank <= h_bank;
        d_ca[ca_line_of(prank)].row  <= h_row[LR_ROW_W-1:0];
        d_ca[ca_line_of(prank)].col  <= h_col;
        if (h_op == CMD_WRA) wr_line <= 1'(dq_line_of(prank));
        if (h_op == CMD_RDA) rd_line <= 1'(dq_line_of(prank));
      end
      // data paths
      d_dq_wr_en <= '0;
      for (int k = 0; k < LR_DQ_LINES; k++) d_dq_wr[k] <= '0;
      if (h_dq_wr_en) begin
        d_dq_wr[wr_line]    <= h_dq_wr;
        d_dq_wr_en[wr_line] <= 1'b1;
      end
      h_dq_rd <= d_dq_rd[rd_line];
    end
  end
endmodule
