// crc_fsm: configurable finite state machine of a PE.
//
// The FSM is a Medvedev machine: the state register is the context-memory
// address, so the number of states equals the number of contexts and the
// state directly chooses the context of the next cycle. The next state is
// computed from status signals, as in the architecture: the FU's status
// output, the status inputs of the four ports and the status registers.
//
// How a state picks its successor is this design's choice: a transition table
// of NCTX entries, written at boot time, holds per state
//   cond   [FW-1 -: CSW]  condition select: 0 = always, 1 = FU status,
//                         2..5 = status in N,E,S,W, 6.. = status register i
//   next_t [2*STW-1:STW]  next state when the condition is 1
//   next_f [STW-1:0]      next state when the condition is 0
// While run is low (boot) the state is held at 0; synchronous reset also
// returns to state 0.
//
// Timing: state changes on the rising clock edge; the condition is read
// combinationally in the cycle before (the ext-state / state-state paths).
module crc_fsm #(
  parameter int unsigned NREGS = 12,
  parameter int unsigned NCTX  = 16,
  localparam int unsigned STW  = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned CSW  = $clog2(6 + NREGS),
  localparam int unsigned FW   = CSW + 2 * STW
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             run,
  input  logic             cfg_we,
  input  logic [STW-1:0]   cfg_addr,
  input  logic [FW-1:0]    cfg_entry,
  input  logic             fu_s,
  input  logic [3:0]       port_s,
  input  logic [NREGS-1:0] sreg,
  output logic [STW-1:0]   state
);

  logic [FW-1:0]        table_q [NCTX];
  logic [FW-1:0]        entry;
  logic [CSW-1:0]       cond_sel;
  logic [6+NREGS-1:0]   cond_src;
  logic                 cond;
  logic [STW-1:0]       next_state;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCTX; i++) table_q[i] <= '0;
    end else if (cfg_we && 32'(cfg_addr) < NCTX) begin
      table_q[cfg_addr] <= cfg_entry;
    end
  end

  assign entry    = (32'(state) < NCTX) ? table_q[state] : '0;
  assign cond_sel = entry[FW-1 -: CSW];
  assign cond_src = {sreg, port_s, fu_s, 1'b1};
  assign cond     = (32'(cond_sel) < 6 + NREGS) ? cond_src[cond_sel] : 1'b0;

  always_comb begin
    next_state = cond ? entry[2*STW-1:STW] : entry[STW-1:0];
    if (32'(next_state) >= NCTX) next_state = '0;
  end

  always_ff @(posedge clk) begin
    if (rst || !run) begin
      state <= '0;
    end else begin
      state <= next_state;
    end
  end

endmodule
