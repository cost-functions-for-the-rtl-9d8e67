// crc_pkg: shared types and encodings of the processing-element array.
//
// The operation set of the functional unit follows the list of operations the
// architecture supports (multiply low/high, add/subtract with and without carry
// output, signed-amount shift, the six relational operators, AND/OR/XOR/NOT on
// data and on status signals, select, and pass-through of the first input).
// The numeric encodings of operations, operand selects, port selects and FSM
// conditions are this design's own choice.
//
// Operand selects (FU input multiplexers):  0..3 = input port N,E,S,W,
//                                            4..4+NREGS-1 = register i.
// Port selects (output port multiplexers):   0 = FU output,
//                                            1..3 = the other three input
//                                            ports in N,E,S,W order,
//                                            4..4+NREGS-1 = register i.
// FSM condition selects:                     0 = constant 1, 1 = FU status,
//                                            2..5 = status in N,E,S,W,
//                                            6..6+NREGS-1 = status register i.
package crc_pkg;

  typedef enum logic [4:0] {
    OP_MULL  = 5'd0,   // low half of a*b
    OP_MULH  = 5'd1,   // high half of a*b
    OP_ADDCO = 5'd2,   // a+b, status = carry out
    OP_SUBCO = 5'd3,   // a-b, status = borrow out
    OP_ADD   = 5'd4,   // a+b
    OP_SUB   = 5'd5,   // a-b
    OP_SHIFT = 5'd6,   // b>=0: a<<b, b<0: a>>-b (b read as signed)
    OP_EQ    = 5'd7,   // status = a==b
    OP_NE    = 5'd8,
    OP_GT    = 5'd9,
    OP_GE    = 5'd10,
    OP_LT    = 5'd11,
    OP_LE    = 5'd12,
    OP_ANDD  = 5'd13,  // bitwise on data
    OP_ORD   = 5'd14,
    OP_XORD  = 5'd15,
    OP_NOTD  = 5'd16,
    OP_ANDS  = 5'd17,  // on status
    OP_ORS   = 5'd18,
    OP_XORS  = 5'd19,
    OP_NOTS  = 5'd20,
    OP_SEL   = 5'd21,  // sa ? a : b
    OP_IN1D  = 5'd22,  // pass a
    OP_IN1S  = 5'd23   // pass sa
  } fu_op_e;

  localparam int unsigned OP_W = 5;

  // Port directions, also the index of a port in the din/sin/dout/sout arrays.
  localparam int unsigned PN = 0;
  localparam int unsigned PE = 1;
  localparam int unsigned PS = 2;
  localparam int unsigned PW = 3;

  // Number of port/operand sources for a register set of nregs registers.
  function automatic int unsigned src_count(int unsigned nregs);
    return 4 + nregs;
  endfunction

  // Number of FSM condition sources.
  function automatic int unsigned cond_count(int unsigned nregs);
    return 6 + nregs;
  endfunction

endpackage
