// crc_pe_width_check: drives one crc_pe of data width D through a fixed
// program and checks every result against values computed here from the
// inputs. Used by tb_crc_pe_widths to run the same program at several widths.
//
// The configuration line does not depend on D, so the program is built with
// the layouts of crc_tb_pkg. Program (one context per state, results shown on
// port S, device operands x on W, y on E, shift amount k on N):
//   0: r0 <- x        1: r1 <- y
//   2: *l r0,r1       3: *h r0,r1
//   4: +co r0,r1, branch on carry to 5 (carry) or 6
//   5, 6: shift r0 by signed N    7: r0 < r1 (status), stays in 7
// Each run starts from state 0 by pulsing run low. `done` rises when the
// requested number of runs is over; `checks`/`failures` count results.
module crc_pe_width_check
  import crc_pkg::*;
  import crc_tb_pkg::tctx_t, crc_tb_pkg::tfsm_t, crc_tb_pkg::line, crc_tb_pkg::ctx_zero,
         crc_tb_pkg::src_reg, crc_tb_pkg::CL, crc_tb_pkg::NCTX, crc_tb_pkg::STW;
#(
  parameter int unsigned D    = 8,
  parameter int unsigned RUNS = 200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   carries,
  output int   no_carries
);

  logic rst = 1'b1, run = 1'b0, cfg_shift = 1'b0, cfg_din = 1'b0, cfg_write = 1'b0, cfg_dout;
  logic [3:0][D-1:0] din = '0, dout;
  logic [3:0] sin = '0, sout;
  logic [STW-1:0] state;

  crc_pe #(.D(D)) dut (.*);

  tctx_t ctx [NCTX];
  tfsm_t fsm [NCTX];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL D=%0d %s at %0t", D, what, $time);
    end
  endtask

  initial begin
    logic [63:0] x, y, prod, sum, mask, shv;
    int k;
    logic [CL-1:0] l;
    done = 0; checks = 0; failures = 0; carries = 0; no_carries = 0;
    mask = (64'd1 << D) - 1;
    for (int i = 0; i < NCTX; i++) begin ctx[i] = ctx_zero(); fsm[i] = '0; end
    ctx[0].op = OP_IN1D; ctx[0].sel_a = 4'(crc_tb_pkg::SRC_W); ctx[0].dwe = 1; ctx[0].dwa = 0;
    ctx[1].op = OP_IN1D; ctx[1].sel_a = 4'(crc_tb_pkg::SRC_E); ctx[1].dwe = 1; ctx[1].dwa = 1;
    ctx[2].op = OP_MULL;
    ctx[3].op = OP_MULH;
    ctx[4].op = OP_ADDCO;
    ctx[5].op = OP_SHIFT;
    ctx[6].op = OP_SHIFT;
    ctx[7].op = OP_LT;
    for (int s = 2; s <= 7; s++) begin ctx[s].sel_a = src_reg(0); ctx[s].sel_b = src_reg(1); end
    for (int s = 5; s <= 6; s++) ctx[s].sel_b = 4'(crc_tb_pkg::SRC_N);
    for (int s = 0; s <= 6; s++) fsm[s].nt = STW'(s + 1);
    fsm[4].cond = 5'(crc_tb_pkg::C_FU); fsm[4].nt = 5; fsm[4].nf = 6;
    fsm[5].nt = 7; fsm[7].nt = 7;
    @(posedge clk); #1;
    rst = 0;
    for (int s = 0; s < 8; s++) begin
      l = line(s, ctx[s], fsm[s]);
      for (int b = CL - 1; b >= 0; b--) begin
        cfg_shift = 1; cfg_din = l[b];
        @(posedge clk); #1;
      end
      cfg_shift = 0; cfg_write = 1;
      @(posedge clk); #1;
      cfg_write = 0;
    end
    for (int n = 0; n < RUNS; n++) begin
      x = {$urandom, $urandom} & mask;
      y = (n % 4 == 0) ? (mask - x + 64'(n % 3)) & mask : {$urandom, $urandom} & mask;
      k = $urandom_range(0, 2 * D + 4) - (D + 2);
      run = 0;
      din[PW] = D'(x); din[PE] = D'(y); din[PN] = D'(k);
      @(posedge clk); #1;
      run = 1;
      repeat (2) @(posedge clk);
      #1;
      prod = x * y;
      check("state 2", state == 2);
      check("*l", dout[PS] == D'(prod & mask));
      @(posedge clk); #1;
      check("*h", dout[PS] == D'(prod >> D));
      @(posedge clk); #1;
      sum = x + y;
      check("+co sum", dout[PS] == D'(sum & mask));
      check("+co carry", sout[PS] == sum[D]);
      if (sum[D]) carries++; else no_carries++;
      @(posedge clk); #1;
      check("branch on carry", state == (sum[D] ? STW'(5) : STW'(6)));
      if (k >= 0) shv = (k >= int'(D)) ? 64'd0 : (x << k) & mask;
      else        shv = (-k >= int'(D)) ? 64'd0 : x >> (-k);
      check("shift", dout[PS] == D'(shv));
      @(posedge clk); #1;
      if (!sum[D]) begin
        // from state 6 the program falls through to state 7
        check("state 7 after 6", state == 7);
      end
      check("compare", state == 7 && sout[PS] == (x < y));
    end
    done = 1;
  end

endmodule
