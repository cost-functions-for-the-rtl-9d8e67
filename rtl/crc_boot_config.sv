// crc_boot_config: configuration of a PE at boot time.
//
// A serial shift register that holds the address and the content of one line,
// as the architecture describes. Here a line is the context word of one state
// together with that state's FSM transition entry (a choice of this design:
// with a Medvedev FSM a state and its context share one address). Layout of
// the shift register, most significant bit first:
//   [AW+LW-1 -: AW]  address (state number)
//   [LW-1:0]         line content
// Bits enter at din, LSB end, while shift is high; the bit leaving the MSB end
// appears at dout, so the shift registers of several PEs form one chain.
// A one-cycle write pulse copies the held line to the context memory and the
// FSM (we, addr, line outputs). Its size does not depend on the data width.
//
// Timing: shift on the rising clock edge when shift is high; we/addr/line are
// combinational from write and the register, so the memories store the line
// at the same edge that ends the write pulse.
module crc_boot_config #(
  parameter int unsigned NCTX = 16,
  parameter int unsigned LW   = 76,
  localparam int unsigned AW  = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          shift,
  input  logic          din,
  input  logic          write,
  output logic          dout,
  output logic          we,
  output logic [AW-1:0] addr,
  output logic [LW-1:0] line
);

  logic [AW+LW-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr <= '0;
    end else if (shift) begin
      sr <= {sr[AW+LW-2:0], din};
    end
  end

  assign dout = sr[AW+LW-1];
  assign we   = write;
  assign addr = sr[AW+LW-1 -: AW];
  assign line = sr[LW-1:0];

endmodule
