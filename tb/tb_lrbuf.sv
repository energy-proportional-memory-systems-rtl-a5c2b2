// tb_lrbuf: checks the load-reduced LPDDR2 buffer: an ACT with the row MSB
// set selects the upper sub-rank, the later read/write to that logical rank
// and bank goes to the same physical rank without any extra bits, commands
// appear one cycle later on exactly one of the four CA copies with one chip
// select, write data is steered to the right DQ copy and read data is
// returned from it, all retimed by one cycle. A refresh to a logical rank
// reaches both of its physical ranks.
module tb_lrbuf;
  import emem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cmd_op_e h_op = CMD_NOP;
  logic [1:0]  h_rank = 0;
  logic [2:0]  h_bank = 0;
  logic [14:0] h_row = 0;
  logic [9:0]  h_col = 0;
  logic [63:0] h_dq_wr = 0, h_dq_rd;
  logic        h_dq_wr_en = 0;
  lr_ca_t      d_ca [4];
  logic [63:0] d_dq_wr [2];
  logic [1:0]  d_dq_wr_en;
  logic [63:0] d_dq_rd [2];
  always #5 clk = ~clk;

  lrbuf dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent model of the placement
  function automatic int exp_ca(input int p);
    case (p) 0, 1: return 0; 2, 3: return 2; 4, 5: return 1; default: return 3; endcase
  endfunction

  task automatic cmd_chk(input cmd_op_e op, input int lr, input int b, input int row,
                         input int col, input int p);
    @(negedge clk);
    h_op = op; h_rank = 2'(lr); h_bank = 3'(b); h_row = 15'(row); h_col = 10'(col);
    @(negedge clk);
    h_op = CMD_NOP;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (k == exp_ca(p)) begin
        if (d_ca[k].op !== op || d_ca[k].cs !== 8'(1 << p) || d_ca[k].bank !== 3'(b) ||
            (op == CMD_ACT && d_ca[k].row !== 14'(row)) || (op != CMD_ACT && d_ca[k].col !== 10'(col))) begin
          failures++; $display("op %0d p %0d line %0d wrong", op, p, k);
        end
      end else if (d_ca[k].op !== CMD_NOP) begin
        failures++; $display("line %0d should be idle", k);
      end
    end
  endtask

  initial begin
    int sub, lr, b, p;
    logic [63:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      sub = $urandom_range(0, 1); lr = $urandom_range(0, 3); b = $urandom_range(0, 7);
      p = sub * 4 + lr;
      cmd_chk(CMD_ACT, lr, b, (sub << 14) | $urandom_range(0, 16383), 0, p);
      // an ACT elsewhere must not disturb the stored sub-rank
      cmd_chk(CMD_ACT, lr, (b + 1) % 8, ((1 - sub) << 14), 0, (1 - sub) * 4 + lr);
      if (it % 2 == 0) begin
        cmd_chk(CMD_WRA, lr, b, 0, $urandom_range(0, 1023), p);
        v = {$urandom, $urandom};
        @(negedge clk); h_dq_wr = v; h_dq_wr_en = 1;
        @(negedge clk); h_dq_wr_en = 0;
        checks += 2;
        if (d_dq_wr_en !== 2'(1 << (p / 4))) begin failures++; $display("wr line en %b p %0d", d_dq_wr_en, p); end
        if (d_dq_wr[p / 4] !== v) begin failures++; $display("wr data"); end
      end else begin
        cmd_chk(CMD_RDA, lr, b, 0, $urandom_range(0, 1023), p);
        v = {$urandom, $urandom};
        @(negedge clk); d_dq_rd[p / 4] = v; d_dq_rd[1 - p / 4] = ~v;
        @(negedge clk);
        checks++;
        if (h_dq_rd !== v) begin failures++; $display("rd data p %0d", p); end
      end
    end
    // refresh: both sub-ranks of the logical rank, on their own CA lines
    for (int l = 0; l < 4; l++) begin
      logic [7:0] cs_seen;
      @(negedge clk); h_op = CMD_REF; h_rank = 2'(l);
      @(negedge clk); h_op = CMD_NOP;
      cs_seen = 0;
      for (int k = 0; k < 4; k++) begin
        if (d_ca[k].op == CMD_REF) begin
          cs_seen |= d_ca[k].cs;
          checks++;
          if ((d_ca[k].cs & ~((8'(1) << l) | (8'(1) << (l + 4)))) != 0 ||
              !(d_ca[k].cs[l] && exp_ca(l) == k || d_ca[k].cs[l + 4] && exp_ca(l + 4) == k)) begin
            failures++; $display("REF on wrong line %0d", k);
          end
        end else if (d_ca[k].op != CMD_NOP) begin
          checks++; failures++; $display("line %0d not idle at REF", k);
        end
      end
      checks++;
      if (cs_seen !== ((8'(1) << l) | (8'(1) << (l + 4)))) begin failures++; $display("REF to rank %0d reached %b", l, cs_seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
