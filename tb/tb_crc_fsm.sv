// tb_crc_fsm: test of the configurable Medvedev FSM (12 status registers,
// 16 states). A random transition table is written, then status inputs are
// driven randomly and every state change is compared with the table. Also
// checks that run = 0 holds state 0 and that every condition source (always,
// FU status, the four port status inputs, each status register) was used.
module tb_crc_fsm;
  import crc_tb_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst, run, cfg_we;
  logic [STW-1:0] cfg_addr, state;
  logic [FW-1:0] cfg_entry;
  logic fu_s;
  logic [3:0] port_s;
  logic [NREGS-1:0] sreg;
  tfsm_t tab [NCTX];
  int used [6 + NREGS];

  crc_fsm #(.NREGS(NREGS), .NCTX(NCTX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cond;
    logic [STW-1:0] exp;
    rst = 1; run = 0; cfg_we = 0; cfg_addr = 0; cfg_entry = 0; fu_s = 0; port_s = 0; sreg = 0;
    for (int i = 0; i < 6 + NREGS; i++) used[i] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < NCTX; i++) begin
      tab[i] = fsm_rand();
      tab[i].cond = CSW'(i % (6 + NREGS));
      cfg_we = 1; cfg_addr = STW'(i); cfg_entry = tab[i];
      @(posedge clk); #1;
    end
    cfg_we = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (state !== '0) begin failures++; $display("FAIL state not held at 0 while run=0"); end
    run = 1;
    for (int n = 0; n < 4000; n++) begin
      fu_s = 1'($urandom); port_s = 4'($urandom); sreg = NREGS'($urandom);
      #1;
      case (int'(tab[state].cond))
        0: cond = 1'b1;
        1: cond = fu_s;
        2, 3, 4, 5: cond = port_s[int'(tab[state].cond) - 2];
        default: cond = sreg[int'(tab[state].cond) - 6];
      endcase
      used[int'(tab[state].cond)]++;
      exp = cond ? tab[state].nt : tab[state].nf;
      @(posedge clk); #1;
      checks++;
      if (state !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL transition: state %0d expected %0d", state, exp);
      end
      // Every 8th transition rewrites one table entry (with run low, which
      // must send the FSM back to state 0) so the walk covers all sources.
      if (n % 8 == 7) begin
        int k;
        k = $urandom_range(0, NCTX - 1);
        tab[k].nt = STW'($urandom); tab[k].nf = STW'($urandom);
        tab[k].cond = CSW'($urandom_range(0, 6 + NREGS - 1));
        cfg_we = 1; cfg_addr = STW'(k); cfg_entry = tab[k];
        run = 0;
        @(posedge clk); #1;
        cfg_we = 0; run = 1;
        checks++;
        if (state !== '0) begin failures++; $display("FAIL run=0 did not return to state 0"); end
      end
    end
    for (int i = 0; i < 6 + NREGS; i++) begin
      checks++;
      if (used[i] == 0) begin failures++; $display("FAIL condition %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
