// crc_port: the output side of one PE port (N, E, S or W).
//
// Every PE has four of these. The input side of a port is wired straight into
// the PE; this module drives the port's outputs. Data and status are chosen
// independently by two multiplexers, each steered by the current context:
//   select 0            FU output (operator chaining into the neighbour)
//   select 1..3         input of one of the other three ports, in N,E,S,W
//                       order with this port (SELF) left out (nearest
//                       neighbour routing through the PE)
//   select 4..4+NREGS-1 register i
// The sources follow the architecture's port module; the encoding is this
// design's. Out-of-range selects drive 0. A port never routes its own input
// back out, so one PE cannot close a loop on a single side.
//
// In an array, these multiplexers and the FU of neighbouring PEs form
// structural combinational loops (lint tools report circular logic here).
// They stand on purpose: forwarding any input, or the FU result, to any other
// side is what makes operator chains through several PEs possible. Whether a
// loop is actually closed depends only on the configuration, which must
// avoid closing one in any cycle.
//
// Timing: combinational.
module crc_port #(
  parameter int unsigned D     = 32,
  parameter int unsigned NREGS = 12,
  parameter int unsigned SELF  = 0,
  localparam int unsigned SW   = $clog2(4 + NREGS)
) (
  input  logic [SW-1:0]           dsel,
  input  logic [SW-1:0]           ssel,
  input  logic [3:0][D-1:0]       din,
  input  logic [3:0]              sin,
  input  logic [D-1:0]            fu_y,
  input  logic                    fu_s,
  input  logic [NREGS-1:0][D-1:0] dreg,
  input  logic [NREGS-1:0]        sreg,
  output logic [D-1:0]            dout,
  output logic                    sout
);

  // Input port index for select value 1..3.
  function automatic int other(input int k);
    return (k <= int'(SELF)) ? k - 1 : k;
  endfunction

  always_comb begin
    dout = '0;
    if (dsel == '0) begin
      dout = fu_y;
    end else if (32'(dsel) < 4) begin
      dout = din[other(int'(dsel))];
    end else if (32'(dsel) < 4 + NREGS) begin
      dout = dreg[32'(dsel) - 4];
    end
  end

  always_comb begin
    sout = 1'b0;
    if (ssel == '0) begin
      sout = fu_s;
    end else if (32'(ssel) < 4) begin
      sout = sin[other(int'(ssel))];
    end else if (32'(ssel) < 4 + NREGS) begin
      sout = sreg[32'(ssel) - 4];
    end
  end

endmodule
