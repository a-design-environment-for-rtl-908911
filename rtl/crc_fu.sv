// crc_fu -- functional unit of a CRC processing element.
//
// Purely combinational. It performs the operation selected by the current
// context on two data operands (a, b) and one status operand (s_in) and
// delivers a data result (y) and a status result (s_out). Data and status are
// separate signals: comparisons produce status, SEL consumes it.
//
//   MUL  y = signed(a[H-1:0]) * signed(b[H-1:0]), H = WIDTH/2, so the product
//        always fits the datapath width
//   ADD  y = a + b
//   EQ   s_out = (a == b)            LT  s_out = signed(a) < signed(b)
//   AND  y = a & b                   OR  y = a | b          NOT  y = ~a
//   SEL  y = s_in ? b : a
//
// The operator set and the half-width multiplier follow the published
// instances. Signed operands, the status produced by the data operations
// (s_in combined with "a is non-zero" for AND/OR, ~s_in for NOT, s_in passed
// on otherwise) and y = 0 for EQ/LT are this design's own choices.
module crc_fu
  import crc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  fu_op_e           op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s_in,
  output logic [WIDTH-1:0] y,
  output logic             s_out
);

  localparam int unsigned HALF = WIDTH / 2;

  logic signed [HALF-1:0]  a_half, b_half;
  logic signed [WIDTH-1:0] product;

  assign a_half  = a[HALF-1:0];
  assign b_half  = b[HALF-1:0];
  assign product = WIDTH'(a_half * b_half);

  always_comb begin
    y     = '0;
    s_out = s_in;
    unique case (op)
      OP_MUL: y = product;
      OP_ADD: y = a + b;
      OP_EQ:  s_out = (a == b);
      OP_LT:  s_out = ($signed(a) < $signed(b));
      OP_AND: begin y = a & b; s_out = s_in & (|a); end
      OP_OR:  begin y = a | b; s_out = s_in | (|a); end
      OP_NOT: begin y = ~a;    s_out = ~s_in;       end
      OP_SEL: y = s_in ? b : a;
      default: ;
    endcase
  end

endmodule
