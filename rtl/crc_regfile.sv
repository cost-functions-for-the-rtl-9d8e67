// crc_regfile: register set of a PE (used for data and for status registers).
//
// NREGS registers of W bits. The single write port is fed only by the FU
// output, as in the architecture; the destination and write enable come from
// the context. All register outputs are brought out in parallel because every
// register is wired to the FU input multiplexers and to every output port.
// The PE instantiates it twice: W = D for the data registers, W = 1 for the
// status registers. Synchronous active-high reset clears all registers (a
// choice of this design).
//
// Timing: write on the rising clock edge when we is high; q changes after the
// edge.
module crc_regfile #(
  parameter int unsigned W     = 32,
  parameter int unsigned NREGS = 12,
  localparam int unsigned AW   = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [W-1:0]            wdata,
  output logic [NREGS-1:0][W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else if (we && 32'(waddr) < NREGS) begin
      q[waddr] <= wdata;
    end
  end

endmodule
