// crc_context_mem: context memory of a PE.
//
// NCTX context words of CW bits. The word addressed by the current FSM state
// is read combinationally, so a new context takes effect in the same cycle
// the state changes (a context switch every clock cycle). Words are written
// one at a time by the boot-time configuration. Synchronous reset clears all
// words; the all-zero context drives every output port from the FU and every
// FU operand from the N input, which closes no combinational loop in an array
// (a choice of this design).
//
// Timing: write on the rising clock edge when we is high; rdata follows raddr
// combinationally.
module crc_context_mem #(
  parameter int unsigned NCTX = 16,
  parameter int unsigned CW   = 63,
  localparam int unsigned AW  = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [CW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [CW-1:0] rdata
);

  logic [CW-1:0] mem [NCTX];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCTX; i++) mem[i] <= '0;
    end else if (we && 32'(waddr) < NCTX) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < NCTX) ? mem[raddr] : '0;

endmodule
