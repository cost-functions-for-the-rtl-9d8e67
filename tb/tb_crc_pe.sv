// tb_crc_pe: test of one processing element at the default size (D = 32,
// 12 registers, 16 states/contexts), configured only through its serial
// boot-time chain.
//
// Phase 1 (directed): a three-state program adds two registers with carry
// output and branches on the carry (the "sum of two registers, carry decides
// the next state" case). It is run once with operands that carry and once
// with operands that do not; the sum register and the branch target are
// checked against hand-computed values.
// Phase 2 (random): twelve rounds of 16 random contexts and FSM entries,
// each followed by 300 cycles of random port inputs. Every cycle all port
// outputs and the state are compared with the reference PE of crc_tb_pkg,
// which also tracks the registers.
// Each cycle is one context: the test also counts context switches and
// registers written.
module tb_crc_pe;
  import crc_pkg::*;
  import crc_tb_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst, run, cfg_shift, cfg_din, cfg_write, cfg_dout;
  logic [3:0][D-1:0] din, dout;
  logic [3:0] sin, sout;
  logic [STW-1:0] state;

  crc_pe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tctx_t ctx [NCTX];
  tfsm_t fsm [NCTX];
  logic [NREGS-1:0][D-1:0] rd;
  logic [NREGS-1:0] rs;

  task automatic load(int addr);
    logic [CL-1:0] l;
    l = line(addr, ctx[addr], fsm[addr]);
    for (int i = CL - 1; i >= 0; i--) begin
      cfg_shift = 1; cfg_din = l[i];
      @(posedge clk); #1;
    end
    cfg_shift = 0; cfg_write = 1;
    @(posedge clk); #1;
    cfg_write = 0;
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Directed: r0 <- W, r1 <- E, then r2 <- r0 +co r1 with the carry choosing
  // state 3 (carry) or 4 (no carry); states 3 and 4 drive r2 on port S.
  task automatic example_carry(logic [D-1:0] x, logic [D-1:0] y);
    logic [D-1:0] sum;
    logic carry;
    {carry, sum} = {1'b0, x} + {1'b0, y};
    run = 0;
    for (int i = 0; i < NCTX; i++) begin ctx[i] = ctx_zero(); fsm[i] = '0; end
    ctx[0].op = OP_IN1D; ctx[0].sel_a = SRC_W; ctx[0].dwe = 1; ctx[0].dwa = 0;
    fsm[0].nt = 1;
    ctx[1].op = OP_IN1D; ctx[1].sel_a = SRC_E; ctx[1].dwe = 1; ctx[1].dwa = 1;
    fsm[1].nt = 2;
    ctx[2].op = OP_ADDCO; ctx[2].sel_a = src_reg(0); ctx[2].sel_b = src_reg(1);
    ctx[2].dwe = 1; ctx[2].dwa = 2; ctx[2].swe = 1; ctx[2].swa = 5;
    fsm[2].cond = C_FU; fsm[2].nt = 3; fsm[2].nf = 4;
    for (int s = 3; s <= 4; s++) begin
      ctx[s].pdsel[PS] = psel_reg(2); ctx[s].pssel[PS] = psel_reg(5);
      fsm[s].nt = STW'(s);
    end
    for (int i = 0; i < 5; i++) load(i);
    din = '0; din[PW] = x; din[PE] = y; sin = '0;
    run = 1;
    repeat (3) @(posedge clk);
    #1;
    check("carry branch target", state == (carry ? 4'd3 : 4'd4));
    check("sum in register", dout[PS] == sum);
    check("carry in status register", sout[PS] == carry);
  endtask

  int ctx_switches = 0, dwrites = 0, swrites = 0;

  initial begin
    logic [3:0][D-1:0] edout;
    logic [3:0] esout;
    logic [D-1:0] y;
    logic sy;
    logic [STW-1:0] ns;
    logic [STW-1:0] last;

    rst = 1; run = 0; cfg_shift = 0; cfg_din = 0; cfg_write = 0; din = '0; sin = '0;
    @(posedge clk); #1;
    rst = 0;
    check("reset state", state == 0);

    example_carry(32'hFFFF_0000, 32'h0001_0000);   // carries
    example_carry(32'h1234_5678, 32'h1111_1111);   // does not carry

    // Random programmes: a random walk through a random FSM soon settles in
    // a short cycle, so a fresh programme is loaded every 300 cycles.
    for (int round = 0; round < 12; round++) begin
      run = 0;
      rst = 1; @(posedge clk); #1; rst = 0;
      for (int i = 0; i < NCTX; i++) begin
        ctx[i] = ctx_rand();
        fsm[i] = fsm_rand();
        load(i);
      end
      rd = '0; rs = '0;
      run = 1;
      last = state;
      for (int n = 0; n < 300; n++) begin
        for (int p = 0; p < 4; p++) din[p] = ($urandom_range(0, 3) == 0) ? D'($urandom_range(0, 40)) : $urandom;
        sin = 4'($urandom);
        #1;
        pe_eval(ctx[state], fsm[state], din, sin, rd, rs, edout, esout, y, sy, ns);
        check("data outputs", dout == edout);
        check("status outputs", sout == esout);
        if (ctx[state].dwe) begin rd[ctx[state].dwa] = y; dwrites++; end
        if (ctx[state].swe) begin rs[ctx[state].swa] = sy; swrites++; end
        @(posedge clk); #1;
        check("next state", state == ns);
        if (state != last) ctx_switches++;
        last = state;
      end
    end
    $display("context switches %0d, data register writes %0d, status register writes %0d",
             ctx_switches, dwrites, swrites);
    check("context switches happened", ctx_switches > 0);
    check("registers written", dwrites > 0 && swrites > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
