// crc_tb_pkg: testbench helpers for the PE array at its default size
// (D = 32, NREGS = 12, NCTX = 16).
//
// Holds a reference model written independently of the RTL: the context word
// and FSM entry layouts as the documentation of crc_pe / crc_fsm states them,
// a reference functional unit, helpers that assemble configuration lines, and
// a serial-configuration task body expressed as a bit stream.
package crc_tb_pkg;
  import crc_pkg::*;

  localparam int D     = 32;
  localparam int NREGS = 12;
  localparam int NCTX  = 16;
  localparam int SW    = 4;   // clog2(4+12)
  localparam int RW    = 4;   // clog2(12)
  localparam int STW   = 4;   // clog2(16)
  localparam int CSW   = 5;   // clog2(6+12)
  localparam int FW    = CSW + 2 * STW;
  localparam int CW    = 5 + 4 * SW + 2 + 2 * RW + 8 * SW;
  localparam int LW    = CW + FW;
  localparam int CL    = STW + LW;   // bits per configuration line

  typedef struct packed {
    logic [4:0]          op;
    logic [SW-1:0]       sel_a;
    logic [SW-1:0]       sel_b;
    logic [SW-1:0]       sel_sa;
    logic [SW-1:0]       sel_sb;
    logic                dwe;
    logic [RW-1:0]       dwa;
    logic                swe;
    logic [RW-1:0]       swa;
    logic [3:0][SW-1:0]  pdsel;
    logic [3:0][SW-1:0]  pssel;
  } tctx_t;

  typedef struct packed {
    logic [CSW-1:0] cond;
    logic [STW-1:0] nt;
    logic [STW-1:0] nf;
  } tfsm_t;

  // Operand sources
  localparam int SRC_N = 0, SRC_E = 1, SRC_S = 2, SRC_W = 3;
  function automatic logic [SW-1:0] src_reg(int i); return SW'(4 + i); endfunction
  // Port sources
  localparam int PSEL_FU = 0;
  function automatic logic [SW-1:0] psel_reg(int i); return SW'(4 + i); endfunction
  // Select value that makes output port `self` forward input port `from`.
  function automatic logic [SW-1:0] psel_in(int self, int from);
    return SW'((from < self) ? from + 1 : from);
  endfunction
  // FSM conditions
  localparam int C_ONE = 0, C_FU = 1;
  function automatic logic [CSW-1:0] c_port(int p); return CSW'(2 + p); endfunction
  function automatic logic [CSW-1:0] c_sreg(int i); return CSW'(6 + i); endfunction

  function automatic tctx_t ctx_zero();
    return '0;
  endfunction

  function automatic logic [CL-1:0] line(int addr, tctx_t c, tfsm_t f);
    return {STW'(addr), c, f};
  endfunction

  // Reference FU, written from the operation list.
  function automatic void fu_ref(input int op, input logic [D-1:0] a, input logic [D-1:0] b,
                                 input logic sa, input logic sb,
                                 output logic [D-1:0] y, output logic sy);
    longint unsigned la, lb, p;
    int amt;
    la = 64'(a);
    lb = 64'(b);
    y = '0;
    sy = 1'b0;
    case (op)
      0: begin p = la * lb; y = p[31:0]; end
      1: begin p = la * lb; y = p[63:32]; end
      2: begin p = la + lb; y = p[31:0]; sy = p[32]; end
      3: begin y = D'(la - lb); sy = (la < lb); end
      4: y = D'(la + lb);
      5: y = D'(la - lb);
      6: begin
           amt = $signed(b);
           if (amt >= 0) y = (amt >= D) ? '0 : D'(la << amt);
           else          y = (-amt >= D) ? '0 : D'(la >> (-amt));
         end
      7:  sy = (la == lb);
      8:  sy = (la != lb);
      9:  sy = (la > lb);
      10: sy = (la >= lb);
      11: sy = (la < lb);
      12: sy = (la <= lb);
      13: y = a & b;
      14: y = a | b;
      15: y = a ^ b;
      16: y = ~a;
      17: sy = sa & sb;
      18: sy = sa | sb;
      19: sy = sa ^ sb;
      20: sy = !sa;
      21: y = sa ? a : b;
      22: y = a;
      23: sy = sa;
      default: ;
    endcase
  endfunction

  // Random context with all selects in range.
  function automatic tctx_t ctx_rand();
    tctx_t c;
    c.op     = 5'($urandom_range(0, 23));
    c.sel_a  = SW'($urandom_range(0, 15));
    c.sel_b  = SW'($urandom_range(0, 15));
    c.sel_sa = SW'($urandom_range(0, 15));
    c.sel_sb = SW'($urandom_range(0, 15));
    c.dwe    = 1'($urandom);
    c.dwa    = RW'($urandom_range(0, NREGS - 1));
    c.swe    = 1'($urandom);
    c.swa    = RW'($urandom_range(0, NREGS - 1));
    for (int p = 0; p < 4; p++) begin
      c.pdsel[p] = SW'($urandom_range(0, 15));
      c.pssel[p] = SW'($urandom_range(0, 15));
    end
    return c;
  endfunction

  function automatic tfsm_t fsm_rand();
    tfsm_t f;
    f.cond = CSW'($urandom_range(0, 6 + NREGS - 1));
    f.nt   = STW'($urandom_range(0, NCTX - 1));
    f.nf   = STW'($urandom_range(0, NCTX - 1));
    return f;
  endfunction

  // Reference evaluation of one PE for one cycle (combinational part).
  function automatic void pe_eval(input tctx_t c, input tfsm_t f,
                                  input logic [3:0][D-1:0] din, input logic [3:0] sin,
                                  input logic [NREGS-1:0][D-1:0] dreg,
                                  input logic [NREGS-1:0] sreg,
                                  output logic [3:0][D-1:0] dout, output logic [3:0] sout,
                                  output logic [D-1:0] y, output logic sy,
                                  output logic [STW-1:0] nstate);
    logic [D-1:0] a, b;
    logic sa, sb, cond;
    int k;
    a  = (c.sel_a  < 4) ? din[c.sel_a]  : dreg[c.sel_a - 4];
    b  = (c.sel_b  < 4) ? din[c.sel_b]  : dreg[c.sel_b - 4];
    sa = (c.sel_sa < 4) ? sin[c.sel_sa] : sreg[c.sel_sa - 4];
    sb = (c.sel_sb < 4) ? sin[c.sel_sb] : sreg[c.sel_sb - 4];
    fu_ref(int'(c.op), a, b, sa, sb, y, sy);
    for (int p = 0; p < 4; p++) begin
      k = int'(c.pdsel[p]);
      if (k == 0) dout[p] = y;
      else if (k < 4) dout[p] = din[(k - 1 < p) ? k - 1 : k];
      else dout[p] = dreg[k - 4];
      k = int'(c.pssel[p]);
      if (k == 0) sout[p] = sy;
      else if (k < 4) sout[p] = sin[(k - 1 < p) ? k - 1 : k];
      else sout[p] = sreg[k - 4];
    end
    case (int'(f.cond))
      0: cond = 1'b1;
      1: cond = sy;
      2, 3, 4, 5: cond = sin[int'(f.cond) - 2];
      default: cond = (int'(f.cond) < 6 + NREGS) ? sreg[int'(f.cond) - 6] : 1'b0;
    endcase
    nstate = cond ? f.nt : f.nf;
  endfunction

endpackage
