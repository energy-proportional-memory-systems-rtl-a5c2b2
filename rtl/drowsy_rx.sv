// drowsy_rx: controller-side read capture of the MemDrowsy scheme.
//
// For every rank a timer starts when the rank's clock enable rises (wake-up);
// for Y cycles afterwards the rank's DLL is still relocking and the rank is
// "drowsy" (drowsy[r] high). A drowsy read arrives with each beat repeated Z =
// 2^zlog times. The controller clock is unchanged; a divide-by-Z counter and
// a multiplexer simply pick every Z-th unit interval, so only the sample
// point moves. The capture engine is started (start, with the transfer's
// zlog) in the cycle the first beats arrive, and after (BL/2)<<zlog clocks
// presents the line with a one-cycle done.
// The Y timer, the f/Z sampling and the mux follow the source design; sampling
// the first UI of each Z-group and the DDR packing are this design's own.
module drowsy_rx #(
  parameter int unsigned NR     = emem_pkg::NRANKS,
  parameter int unsigned DQ_W   = emem_pkg::DQ_W,
  parameter int unsigned BL     = emem_pkg::BL,
  parameter int unsigned Y      = emem_pkg::DROWSY_Y,
  parameter int unsigned ZLOG_W = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NR-1:0]      cke,
  output logic [NR-1:0]      drowsy,
  input  logic               start,
  input  logic [ZLOG_W-1:0]  zlog,
  input  logic [2*DQ_W-1:0]  dq,
  output logic [DQ_W*BL-1:0] line,
  output logic               done
);
  localparam int unsigned YW   = $clog2(Y + 1);
  localparam int unsigned UI_W = $clog2(BL) + (1 << ZLOG_W);

  // ---- per-rank wake timers ----
  logic [NR-1:0] cke_q;
  logic [YW-1:0] ytmr [NR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cke_q <= '0;
      for (int r = 0; r < NR; r++) ytmr[r] <= '0;
    end else begin
      cke_q <= cke;
      for (int r = 0; r < NR; r++) begin
        if (cke[r] && !cke_q[r])   ytmr[r] <= YW'(Y);
        else if (ytmr[r] != '0)    ytmr[r] <= ytmr[r] - 1'b1;
      end
    end
  end

  always_comb
    for (int r = 0; r < NR; r++) drowsy[r] = (ytmr[r] != '0);

  // ---- capture engine ----
  logic              busy;
  logic [ZLOG_W-1:0] zq;
  logic [UI_W-1:0]   ui;
  logic [DQ_W*BL-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; zq <= '0; ui <= '0; acc <= '0; line <= '0; done <= 1'b0;
    end else begin
      logic               act;
      logic [ZLOG_W-1:0]  z;
      logic [UI_W-1:0]    u0;
      logic [DQ_W*BL-1:0] a;
      done <= 1'b0;
      act = start || busy;
      z   = start ? zlog : zq;
      u0  = start ? '0 : ui;
      a   = acc;
      if (act) begin
        for (int s = 0; s < 2; s++) begin
          logic [UI_W-1:0] u;
          u = u0 + UI_W'(s);
          // divided-rate sample enable: keep one UI in every Z
          if ((u & UI_W'((1 << z) - 1)) == '0)
            a[int'(u >> z) * DQ_W +: DQ_W] = dq[s*DQ_W +: DQ_W];
        end
        acc <= a;
        zq  <= z;
        ui  <= u0 + UI_W'(2);
        if (u0 == UI_W'((BL << z) - 2)) begin
          busy <= 1'b0;
          line <= a;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
        end
      end
    end
  end
endmodule
