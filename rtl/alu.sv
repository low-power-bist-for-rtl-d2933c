// alu: the circuit under test, an ALU with the sixteen operations below.
//
// Purely combinational. sel is the select word s(0)s(1)s(2)s(3) with s(0) as the MSB:
//   0 a        1 a+1      2 a-1      3 b
//   4 b+1      5 b-1      6 a+b      7 a+b+cin
//   8 not a    9 not b    A a and b  B a or b
//   C a nand b D a nor b  E a xor b  F not(a xor b)
// Arithmetic wraps modulo 2**W; there is no carry out and there are no flags. The
// operation table and the 8-bit width follow the design description; the result
// width, the absence of a carry out and the single case statement are this design's
// own choices.
module alu
  import bist_pkg::*;
#(
  parameter int unsigned W = ALU_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  alu_op_e      sel,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      OP_PASS_A: y = a;
      OP_INC_A:  y = a + W'(1);
      OP_DEC_A:  y = a - W'(1);
      OP_PASS_B: y = b;
      OP_INC_B:  y = b + W'(1);
      OP_DEC_B:  y = b - W'(1);
      OP_ADD:    y = a + b;
      OP_ADDC:   y = a + b + W'(cin);
      OP_NOT_A:  y = ~a;
      OP_NOT_B:  y = ~b;
      OP_AND:    y = a & b;
      OP_OR:     y = a | b;
      OP_NAND:   y = ~(a & b);
      OP_NOR:    y = ~(a | b);
      OP_XOR:    y = a ^ b;
      OP_XNOR:   y = ~(a ^ b);
      default:   y = '0;
    endcase
  end

endmodule
