// crc_operand_mux: the multiplexers in front of the functional unit.
//
// Selects the FU's two data operands (a, b) and two status operands (sa, sb)
// independently. Each select picks one of the four input ports N, E, S, W
// (select 0..3) or one of the NREGS registers (select 4..4+NREGS-1); data
// selects read the data inputs and data registers, status selects the status
// inputs and status registers. The set of sources is the architecture's; the
// select encoding is this design's. Out-of-range selects return 0.
//
// Timing: combinational. The selects come from the current context word.
module crc_operand_mux #(
  parameter int unsigned D     = 32,
  parameter int unsigned NREGS = 12,
  localparam int unsigned SW   = $clog2(4 + NREGS)
) (
  input  logic [SW-1:0]          sel_a,
  input  logic [SW-1:0]          sel_b,
  input  logic [SW-1:0]          sel_sa,
  input  logic [SW-1:0]          sel_sb,
  input  logic [3:0][D-1:0]      din,
  input  logic [3:0]             sin,
  input  logic [NREGS-1:0][D-1:0] dreg,
  input  logic [NREGS-1:0]       sreg,
  output logic [D-1:0]           a,
  output logic [D-1:0]           b,
  output logic                   sa,
  output logic                   sb
);

  // All sources of one kind side by side: ports first, then registers.
  logic [4+NREGS-1:0][D-1:0] dsrc;
  logic [4+NREGS-1:0]        ssrc;

  assign dsrc = {dreg, din};
  assign ssrc = {sreg, sin};

  function automatic logic [D-1:0] pick_d(input logic [SW-1:0] s,
                                          input logic [4+NREGS-1:0][D-1:0] v);
    return (32'(s) < 4 + NREGS) ? v[s] : '0;
  endfunction

  function automatic logic pick_s(input logic [SW-1:0] s, input logic [4+NREGS-1:0] v);
    return (32'(s) < 4 + NREGS) ? v[s] : 1'b0;
  endfunction

  assign a  = pick_d(sel_a, dsrc);
  assign b  = pick_d(sel_b, dsrc);
  assign sa = pick_s(sel_sa, ssrc);
  assign sb = pick_s(sel_sb, ssrc);

endmodule
