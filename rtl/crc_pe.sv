// crc_pe: processing element of the reconfigurable array.
//
// A PE holds a functional unit (FU), NREGS data registers of D bits, NREGS
// status registers of 1 bit, a context memory of NCTX words, an FSM, four
// ports (N, E, S, W) and the boot-time configuration shift register. Every
// clock cycle the FSM state addresses the context memory; the context word
// then decides, for that cycle only,
//   - the FU operation and its two data and two status operands, each taken
//     from an input port or a register (FU input multiplexers);
//   - whether and where the FU's data and status results are written (only
//     the FU can write a register);
//   - what each output port drives, independently for data and status: the
//     FU result (operator chaining: a neighbour uses it in the same cycle), a
//     register, or the input of one of the other three ports (nearest
//     neighbour routing, which works at the same time as the FU operation).
// The FSM chooses the next state from the FU status, the port status inputs
// and the status registers. The structure follows the architecture's PE
// diagram; the field layout of the context word below is this design's.
//
// Context word, most significant field first:
//   op[5] | sel_a, sel_b, sel_sa, sel_sb [SW each] | dwe, dwa[RW] | swe, swa[RW]
//   | pdsel[N,E,S,W as index 3..0][SW] | pssel[3..0][SW]
// Boot line = {address[STW], context word[CW], FSM entry[FW]} (see
// crc_boot_config and crc_fsm). With D=32, NREGS=12, NCTX=16: SW=4, RW=4,
// STW=4, CW=63, FW=13, a configuration line is 80 bits.
//
// Interface: din/sin are the port inputs and dout/sout the port outputs,
// index 0..3 = N, E, S, W. run=0 holds the FSM in state 0, blocks register
// writes and replaces the context by the all-zero word (boot); cfg_* is the
// serial configuration chain.
//
// Timing: one context per cycle. Register writes and the state change happen
// on the rising edge; all paths from a register, port input or state to an
// output port are combinational, so chains through several PEs form one
// combinational path. In an array the port multiplexers form structural
// combinational loops between neighbours; a configuration must not close one
// in any cycle, exactly as an operator chain must not feed back on itself.
module crc_pe
  import crc_pkg::*;
#(
  parameter int unsigned D     = 32,
  parameter int unsigned NREGS = 12,
  parameter int unsigned NCTX  = 16,
  localparam int unsigned SW   = $clog2(4 + NREGS),
  localparam int unsigned RW   = (NREGS > 1) ? $clog2(NREGS) : 1,
  localparam int unsigned STW  = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned CSW  = $clog2(6 + NREGS),
  localparam int unsigned FW   = CSW + 2 * STW
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            run,
  input  logic            cfg_shift,
  input  logic            cfg_din,
  input  logic            cfg_write,
  output logic            cfg_dout,
  input  logic [3:0][D-1:0] din,
  input  logic [3:0]      sin,
  output logic [3:0][D-1:0] dout,
  output logic [3:0]      sout,
  output logic [STW-1:0]  state
);

  typedef struct packed {
    logic [OP_W-1:0]     op;
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
  } ctx_t;

  localparam int unsigned CW = $bits(ctx_t);
  localparam int unsigned LW = CW + FW;

  // Boot-time configuration
  logic            cfg_we;
  logic [STW-1:0]  cfg_addr;
  logic [LW-1:0]   cfg_line;

  crc_boot_config #(.NCTX(NCTX), .LW(LW)) u_cfg (
    .clk, .rst,
    .shift (cfg_shift),
    .din   (cfg_din),
    .write (cfg_write),
    .dout  (cfg_dout),
    .we    (cfg_we),
    .addr  (cfg_addr),
    .line  (cfg_line)
  );

  // Context memory, addressed by the state
  logic [CW-1:0] ctx_raw;
  ctx_t          ctx;

  crc_context_mem #(.NCTX(NCTX), .CW(CW)) u_ctx (
    .clk, .rst,
    .we    (cfg_we),
    .waddr (cfg_addr),
    .wdata (cfg_line[LW-1:FW]),
    .raddr (state),
    .rdata (ctx_raw)
  );

  // While booting (run low) the PE executes the all-zero context: every port
  // drives the FU output and the FU reads only the N input, so no partly
  // loaded or uninitialised context can close a combinational loop.
  assign ctx = run ? ctx_t'(ctx_raw) : '0;

  // Registers
  logic [NREGS-1:0][D-1:0] dreg;
  logic [NREGS-1:0]        sreg;
  logic [D-1:0]            fu_y;
  logic                    fu_s;

  crc_regfile #(.W(D), .NREGS(NREGS)) u_dreg (
    .clk, .rst,
    .we    (run && ctx.dwe),
    .waddr (ctx.dwa),
    .wdata (fu_y),
    .q     (dreg)
  );

  crc_regfile #(.W(1), .NREGS(NREGS)) u_sreg (
    .clk, .rst,
    .we    (run && ctx.swe),
    .waddr (ctx.swa),
    .wdata (fu_s),
    .q     (sreg)
  );

  // FU and its input multiplexers
  logic [D-1:0] a, b;
  logic         sa, sb;

  crc_operand_mux #(.D(D), .NREGS(NREGS)) u_opmux (
    .sel_a  (ctx.sel_a),
    .sel_b  (ctx.sel_b),
    .sel_sa (ctx.sel_sa),
    .sel_sb (ctx.sel_sb),
    .din, .sin, .dreg, .sreg,
    .a, .b, .sa, .sb
  );

  crc_fu #(.D(D)) u_fu (
    .op (fu_op_e'(ctx.op)),
    .a, .b, .sa, .sb,
    .y  (fu_y),
    .sy (fu_s)
  );

  // Output ports N, E, S, W
  for (genvar p = 0; p < 4; p++) begin : g_port
    crc_port #(.D(D), .NREGS(NREGS), .SELF(p)) u_port (
      .dsel (ctx.pdsel[p]),
      .ssel (ctx.pssel[p]),
      .din, .sin,
      .fu_y, .fu_s,
      .dreg, .sreg,
      .dout (dout[p]),
      .sout (sout[p])
    );
  end

  // FSM: next state from FU status, port status inputs and status registers
  crc_fsm #(.NREGS(NREGS), .NCTX(NCTX)) u_fsm (
    .clk, .rst, .run,
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_entry (cfg_line[FW-1:0]),
    .fu_s      (fu_s),
    .port_s    (sin),
    .sreg      (sreg),
    .state     (state)
  );

endmodule
