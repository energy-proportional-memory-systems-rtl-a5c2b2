// drowsy_tx: DRAM-side read data serializer with a drowsy (reduced) rate.
//
// A 512-bit line is sent as BL beats of DQ_W bits, two beats per clock (double
// data rate). In drowsy mode, used right after a wake-up while the DLL is
// still relocking, the clock keeps its full rate but every beat is sent
// 2^zlog times in a row, which widens the valid window of each bit by that
// factor. The burst then takes (BL/2) << zlog clocks.
// Interface: start (one cycle) with line and zlog; from the next cycle dq and
// dq_oe carry the burst; busy covers the burst; last marks its final cycle.
// Bit repetition at f/Z follows the source design; beat order (beat 0 in the
// low bits of line) and the two-beats-per-clock packing are this design's own.
module drowsy_tx #(
  parameter int unsigned DQ_W   = emem_pkg::DQ_W,
  parameter int unsigned BL     = emem_pkg::BL,
  parameter int unsigned ZLOG_W = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [DQ_W*BL-1:0]   line,
  input  logic [ZLOG_W-1:0]    zlog,
  output logic [2*DQ_W-1:0]    dq,
  output logic                 dq_oe,
  output logic                 busy,
  output logic                 last
);
  localparam int unsigned UI_W = $clog2(BL) + (1 << ZLOG_W);

  logic [DQ_W*BL-1:0] line_q;
  logic [ZLOG_W-1:0]  zq;
  logic [UI_W-1:0]    ui;      // index of the first unit interval this clock
  logic [UI_W-1:0]    ui_last;

  always_comb ui_last = UI_W'((BL << zq) - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ui <= '0; zq <= '0; line_q <= '0;
    end else if (start) begin
      busy <= 1'b1; ui <= '0; zq <= zlog; line_q <= line;
    end else if (busy) begin
      if (ui == ui_last) busy <= 1'b0;
      ui <= ui + UI_W'(2);
    end
  end

  always_comb begin
    dq = '0;
    for (int s = 0; s < 2; s++) begin
      logic [UI_W-1:0] u;
      u = ui + UI_W'(s);
      dq[s*DQ_W +: DQ_W] = line_q[int'(u >> zq) * DQ_W +: DQ_W];
    end
    dq_oe = busy;
    last  = busy && (ui == ui_last);
  end
endmodule
