// tb_crc_array: end-to-end test of the PE array at its default size
// (2 x 3 PEs, D = 32, 12 registers, 16 contexts), with no parameter
// overrides.
//
// The whole array is configured through the single serial chain, then runs a
// program built from two cooperating parts:
//  * Status-driven control across PEs: PE (0,0) inverts the device status
//    input on its north side (NOT_s) and passes the result south; PE (1,0)
//    loads two operands from device ports, then adds/subtracts registers and
//    picks its next state from that neighbour status, while PE (0,0) picks
//    its own next state from the same result.
//  * An operator chain through four PEs in one cycle: PE (0,2) adds two
//    device inputs, PE (0,1) multiplies that by a third (low half), PE (1,1)
//    only routes it from its N input to its E output (while its own FU stores
//    PE (1,0)'s result), and PE (1,2) subtracts (state 0, borrow output) or
//    adds (state 1, carry output) a fourth device input, drives the result on
//    the east device port and branches on its own status result.
// Every cycle all device outputs and all PE states are compared with a
// cycle-level reference model of the array (crc_tb_pkg::pe_eval for each PE,
// iterated until the chain settles); the chain result is also compared with
// the formula computed directly from the device inputs. The test counts how
// often each mechanism happened (configuration lines written, chained
// results, pass-through routing, context switches, branches on a neighbour's
// status each way, branches on the FU's own status each way, register
// writes) and counts a failure for any that never happened.
module tb_crc_array;
  import crc_pkg::*;
  import crc_tb_pkg::*;

  localparam int ROWS = 2, COLS = 3, NPE = ROWS * COLS;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, run = 0, cfg_shift = 0, cfg_din = 0, cfg_write = 0, cfg_dout;
  logic [COLS-1:0][D-1:0] n_din, n_dout, s_din, s_dout;
  logic [COLS-1:0] n_sin, n_sout, s_sin, s_sout;
  logic [ROWS-1:0][D-1:0] e_din, e_dout, w_din, w_dout;
  logic [ROWS-1:0] e_sin, e_sout, w_sin, w_sout;
  logic [NPE-1:0][STW-1:0] pe_state;

  crc_array dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state
  tctx_t ctx [NPE][NCTX];
  tfsm_t fsm [NPE][NCTX];
  logic [NREGS-1:0][D-1:0] rd [NPE];
  logic [NREGS-1:0] rs [NPE];
  logic [STW-1:0] st [NPE];

  function automatic int idx(int r, int c);
    return r * COLS + c;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model: port outputs of all PEs, then state/register update.
  logic [3:0][D-1:0] mdo [NPE];
  logic [3:0] mso [NPE];
  logic [D-1:0] my [NPE];
  logic msy [NPE];
  logic [STW-1:0] mns [NPE];

  task automatic model_eval();
    logic [3:0][D-1:0] di;
    logic [3:0] si;
    for (int i = 0; i < NPE; i++) begin mdo[i] = '0; mso[i] = '0; end
    for (int it = 0; it < 4 * NPE + 2; it++) begin
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          di[PN] = (r == 0)        ? n_din[c] : mdo[idx(r-1, c)][PS];
          si[PN] = (r == 0)        ? n_sin[c] : mso[idx(r-1, c)][PS];
          di[PS] = (r == ROWS - 1) ? s_din[c] : mdo[idx(r+1, c)][PN];
          si[PS] = (r == ROWS - 1) ? s_sin[c] : mso[idx(r+1, c)][PN];
          di[PW] = (c == 0)        ? w_din[r] : mdo[idx(r, c-1)][PE];
          si[PW] = (c == 0)        ? w_sin[r] : mso[idx(r, c-1)][PE];
          di[PE] = (c == COLS - 1) ? e_din[r] : mdo[idx(r, c+1)][PW];
          si[PE] = (c == COLS - 1) ? e_sin[r] : mso[idx(r, c+1)][PW];
          pe_eval(ctx[idx(r,c)][st[idx(r,c)]], fsm[idx(r,c)][st[idx(r,c)]], di, si,
                  rd[idx(r,c)], rs[idx(r,c)], mdo[idx(r,c)], mso[idx(r,c)],
                  my[idx(r,c)], msy[idx(r,c)], mns[idx(r,c)]);
        end
      end
    end
  endtask

  task automatic model_step();
    for (int i = 0; i < NPE; i++) begin
      tctx_t c;
      c = ctx[i][st[i]];
      if (c.dwe) rd[i][c.dwa] = my[i];
      if (c.swe) rs[i][c.swa] = msy[i];
      st[i] = mns[i];
    end
  endtask

  // Serial configuration of state s in every PE; checks that the chain
  // output replays the previous round's stream.
  logic [NPE*CL-1:0] prev_stream = '0;
  int n_cfg_lines = 0;

  task automatic configure_state(int s);
    logic [NPE*CL-1:0] stream;
    for (int i = 0; i < NPE; i++)
      stream[i*CL +: CL] = line(s, ctx[i][s], fsm[i][s]);
    // MSB first: the line of PE NPE-1 leaves first and travels furthest.
    for (int b = NPE * CL - 1; b >= 0; b--) begin
      cfg_shift = 1; cfg_din = stream[b];
      #1;
      if (b % 97 == 0) check("configuration chain output", cfg_dout == prev_stream[b]);
      @(posedge clk); #1;
    end
    cfg_shift = 0; cfg_write = 1;
    @(posedge clk); #1;
    cfg_write = 0;
    prev_stream = stream;
    n_cfg_lines += NPE;
  endtask

  localparam int P2 = 0;          // PE (0,0)
  localparam int P1 = 3;          // PE (1,0), south of P2
  localparam int PA = 2;          // PE (0,2) chain head
  localparam int PM = 1;          // PE (0,1) multiply
  localparam int PR = 4;          // PE (1,1) route
  localparam int PT = 5;          // PE (1,2) chain tail

  task automatic build_program();
    for (int i = 0; i < NPE; i++)
      for (int s = 0; s < NCTX; s++) begin ctx[i][s] = ctx_zero(); fsm[i][s] = '0; end
    // PE (0,0): NOT_s of the north device status, sent south; own branch.
    for (int s = 0; s < 2; s++) begin
      ctx[P2][s].op = OP_NOTS; ctx[P2][s].sel_sa = SRC_N;
      fsm[P2][s].cond = C_FU; fsm[P2][s].nt = 1; fsm[P2][s].nf = 0;
    end
    // PE (1,0): load operands, then branch on the neighbour status.
    ctx[P1][0].op = OP_IN1D; ctx[P1][0].sel_a = SRC_W; ctx[P1][0].dwe = 1; ctx[P1][0].dwa = 0;
    fsm[P1][0].nt = 1;
    ctx[P1][1].op = OP_IN1D; ctx[P1][1].sel_a = SRC_S; ctx[P1][1].dwe = 1; ctx[P1][1].dwa = 1;
    fsm[P1][1].nt = 2;
    ctx[P1][2].op = OP_ADD; ctx[P1][2].sel_a = src_reg(0); ctx[P1][2].sel_b = src_reg(1);
    ctx[P1][2].dwe = 1; ctx[P1][2].dwa = 2;
    ctx[P1][3].op = OP_ADD; ctx[P1][3].sel_a = src_reg(2); ctx[P1][3].sel_b = src_reg(1);
    ctx[P1][3].dwe = 1; ctx[P1][3].dwa = 2;
    ctx[P1][4].op = OP_SUB; ctx[P1][4].sel_a = src_reg(2); ctx[P1][4].sel_b = src_reg(0);
    ctx[P1][4].dwe = 1; ctx[P1][4].dwa = 2;
    for (int s = 2; s <= 4; s++) begin
      fsm[P1][s].cond = c_port(PN); fsm[P1][s].nt = 3; fsm[P1][s].nf = 4;
    end
    // Chain head (0,2): n_din[2] + e_din[0] to its W port.
    ctx[PA][0].op = OP_ADD; ctx[PA][0].sel_a = SRC_N; ctx[PA][0].sel_b = SRC_E;
    // Multiply (0,1): E input * n_din[1], to its S port (FU is the default).
    ctx[PM][0].op = OP_MULL; ctx[PM][0].sel_a = SRC_E; ctx[PM][0].sel_b = SRC_N;
    // Route (1,1): N input to E port; FU stores the W input (PE (1,0)'s FU).
    ctx[PR][0].op = OP_IN1D; ctx[PR][0].sel_a = SRC_W; ctx[PR][0].dwe = 1; ctx[PR][0].dwa = 3;
    ctx[PR][0].pdsel[PE] = psel_in(PE, PN);
    ctx[PR][0].pssel[PE] = psel_in(PE, PN);
    // Chain tail (1,2): W -co S (state 0) or W +co S (state 1), E port.
    ctx[PT][0].op = OP_SUBCO; ctx[PT][1].op = OP_ADDCO;
    for (int s = 0; s < 2; s++) begin
      ctx[PT][s].sel_a = SRC_W; ctx[PT][s].sel_b = SRC_S;
      ctx[PT][s].dwe = 1; ctx[PT][s].dwa = 7; ctx[PT][s].swe = 1; ctx[PT][s].swa = 0;
      ctx[PT][s].pdsel[PN] = psel_reg(7);
      fsm[PT][s].cond = C_FU; fsm[PT][s].nt = 1; fsm[PT][s].nf = 0;
    end
  endtask

  int n_chain = 0, n_route = 0, n_switch = 0, n_nb_t = 0, n_nb_f = 0;
  int n_own_t = 0, n_own_f = 0, n_wr = 0;

  initial begin
    logic [D-1:0] chain_exp;
    logic [D:0] wide;
    rst = 1; run = 0; cfg_shift = 0; cfg_din = 0; cfg_write = 0;
    n_din = '0; n_sin = '0; s_din = '0; s_sin = '0; e_din = '0; e_sin = '0; w_din = '0; w_sin = '0;
    @(posedge clk); #1;
    rst = 0;
    build_program();
    for (int s = 0; s < 5; s++) configure_state(s);
    for (int i = 0; i < NPE; i++) begin rd[i] = '0; rs[i] = '0; st[i] = '0; end
    run = 1;
    for (int n = 0; n < 400; n++) begin
      for (int c = 0; c < COLS; c++) begin n_din[c] = $urandom; s_din[c] = $urandom; end
      for (int r = 0; r < ROWS; r++) begin e_din[r] = $urandom; w_din[r] = $urandom; end
      if (n % 5 == 0) s_din[2] = e_dout[1];  // make equal/near operands occur
      n_sin = COLS'($urandom); s_sin = COLS'($urandom);
      e_sin = ROWS'($urandom); w_sin = ROWS'($urandom);
      #1;
      model_eval();
      for (int i = 0; i < NPE; i++) check("PE state", pe_state[i] == st[i]);
      for (int c = 0; c < COLS; c++) begin
        check("north outputs", n_dout[c] == mdo[idx(0, c)][PN] && n_sout[c] == mso[idx(0, c)][PN]);
        check("south outputs", s_dout[c] == mdo[idx(ROWS-1, c)][PS] && s_sout[c] == mso[idx(ROWS-1, c)][PS]);
      end
      for (int r = 0; r < ROWS; r++) begin
        check("east outputs", e_dout[r] == mdo[idx(r, COLS-1)][PE] && e_sout[r] == mso[idx(r, COLS-1)][PE]);
        check("west outputs", w_dout[r] == mdo[idx(r, 0)][PW] && w_sout[r] == mso[idx(r, 0)][PW]);
      end
      // Chain computed directly from the device inputs.
      chain_exp = (n_din[2] + e_din[0]) * n_din[1];
      wide = (st[PT] == 0) ? ({1'b0, chain_exp} - {1'b0, s_din[2]})
                           : ({1'b0, chain_exp} + {1'b0, s_din[2]});
      check("four-PE operator chain", e_dout[1] == wide[D-1:0]);
      check("chain status output", e_sout[1] == wide[D]);
      n_chain++;
      n_route++;
      if (st[P1] >= 2) begin
        if (!n_sin[0]) n_nb_t++; else n_nb_f++;   // PE (0,0) sends ~n_sin[0]
      end
      if (wide[D]) n_own_t++; else n_own_f++;
      for (int i = 0; i < NPE; i++) if (ctx[i][st[i]].dwe) n_wr++;
      begin
        logic [STW-1:0] st_prev [NPE];
        for (int i = 0; i < NPE; i++) st_prev[i] = st[i];
        model_step();
        @(posedge clk); #1;
        for (int i = 0; i < NPE; i++) if (st[i] != st_prev[i]) n_switch++;
      end
    end
    // PE (1,1) must have captured PE (1,0)'s last result in register 3; it
    // is not visible on a port, so compare the model's copy with PE (1,0).
    check("router stored neighbour result", rd[PR][3] == my[P1]);
    $display("config lines %0d, chained results %0d, routed %0d, context switches %0d",
             n_cfg_lines, n_chain, n_route, n_switch);
    $display("neighbour-status branches taken %0d / not %0d, own-status %0d / %0d, reg writes %0d",
             n_nb_t, n_nb_f, n_own_t, n_own_f, n_wr);
    check("configuration happened", n_cfg_lines > 0);
    check("chaining happened", n_chain > 0);
    check("routing happened", n_route > 0);
    check("context switch happened", n_switch > 0);
    check("neighbour branch taken", n_nb_t > 0);
    check("neighbour branch not taken", n_nb_f > 0);
    check("own-status branch taken", n_own_t > 0);
    check("own-status branch not taken", n_own_f > 0);
    check("register writes happened", n_wr > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
