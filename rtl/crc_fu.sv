// crc_fu: functional unit of a processing element.
//
// A purely combinational arithmetic/logic unit on unsigned D-bit data operands
// a, b and 1-bit status operands sa, sb. It produces a D-bit data result y and
// a 1-bit status result sy. The operation list (full-width multiply split into
// low and high halves, add/subtract with and without carry output, a single
// shift whose amount is read as a signed number, the relational operators
// producing a status bit, bitwise operators on data and on status, a select
// steered by the status input, and pass-through of the first input) is the
// architecture's; division and remainder are not supported.
//
// Design choices where the architecture leaves it open: the status result of
// a subtraction is the borrow (1 when a < b); the shift moves a left by b
// when b >= 0 and right (logical) by -b when b < 0, amounts of D or more
// giving 0; select returns sa ? a : b; outputs an operation does not define
// are 0. There is no carry input.
//
// Timing: combinational, no clock. The result is valid one FU delay after the
// operands and op settle, so the FU can sit inside an operator chain.
module crc_fu
  import crc_pkg::*;
#(
  parameter int unsigned D = 32
) (
  input  fu_op_e         op,
  input  logic [D-1:0]   a,
  input  logic [D-1:0]   b,
  input  logic           sa,
  input  logic           sb,
  output logic [D-1:0]   y,
  output logic           sy
);

  logic [2*D-1:0] prod;
  logic [D:0]     sum;
  logic [D:0]     diff;
  logic [D-1:0]   shl;
  logic [D-1:0]   shr;
  logic [D-1:0]   amt;      // |b| as an unsigned magnitude
  logic           amt_big;  // |b| >= D

  assign prod = {{D{1'b0}}, a} * {{D{1'b0}}, b};
  assign sum  = {1'b0, a} + {1'b0, b};
  assign diff = {1'b0, a} - {1'b0, b};

  always_comb begin
    amt     = b[D-1] ? (~b + 1'b1) : b;
    amt_big = (amt >= D[D-1:0]);
    shl     = amt_big ? '0 : (a << amt);
    shr     = amt_big ? '0 : (a >> amt);
  end

  always_comb begin
    y  = '0;
    sy = 1'b0;
    unique case (op)
      OP_MULL:  y = prod[D-1:0];
      OP_MULH:  y = prod[2*D-1:D];
      OP_ADDCO: begin y = sum[D-1:0];  sy = sum[D];  end
      OP_SUBCO: begin y = diff[D-1:0]; sy = diff[D]; end
      OP_ADD:   y = sum[D-1:0];
      OP_SUB:   y = diff[D-1:0];
      OP_SHIFT: y = b[D-1] ? shr : shl;
      OP_EQ:    sy = (a == b);
      OP_NE:    sy = (a != b);
      OP_GT:    sy = (a >  b);
      OP_GE:    sy = (a >= b);
      OP_LT:    sy = (a <  b);
      OP_LE:    sy = (a <= b);
      OP_ANDD:  y = a & b;
      OP_ORD:   y = a | b;
      OP_XORD:  y = a ^ b;
      OP_NOTD:  y = ~a;
      OP_ANDS:  sy = sa & sb;
      OP_ORS:   sy = sa | sb;
      OP_XORS:  sy = sa ^ sb;
      OP_NOTS:  sy = ~sa;
      OP_SEL:   y = sa ? a : b;
      OP_IN1D:  y = a;
      OP_IN1S:  sy = sa;
      default: ;
    endcase
  end

endmodule
