// bist_pkg: types and constants shared by the low-power BIST around the 8-bit ALU.
//
// ALU_W is the ALU datapath width (8 bits). alu_op_e encodes the 16 operations of the
// ALU; the code is the select word s(0)s(1)s(2)s(3) with s(0) as the most significant
// bit. alu_in_t bundles everything the ALU reads (operands, carry in, select); the
// input multiplexer switches this bundle between the normal inputs and the test
// pattern. The packed layout {sel, cin, b, a} is also the bit order in which the test
// pattern generator's stages are assigned to ALU inputs (a = bits 7:0, b = 15:8,
// cin = 16, sel = 20:17). That assignment is a choice of this design.
package bist_pkg;

  localparam int unsigned ALU_W = 8;
  localparam int unsigned SEL_W = 4;

  typedef enum logic [SEL_W-1:0] {
    OP_PASS_A = 4'h0,  // a
    OP_INC_A  = 4'h1,  // a + 1
    OP_DEC_A  = 4'h2,  // a - 1
    OP_PASS_B = 4'h3,  // b
    OP_INC_B  = 4'h4,  // b + 1
    OP_DEC_B  = 4'h5,  // b - 1
    OP_ADD    = 4'h6,  // a + b
    OP_ADDC   = 4'h7,  // a + b + cin
    OP_NOT_A  = 4'h8,  // not a
    OP_NOT_B  = 4'h9,  // not b
    OP_AND    = 4'hA,  // a and b
    OP_OR     = 4'hB,  // a or b
    OP_NAND   = 4'hC,  // a nand b
    OP_NOR    = 4'hD,  // a nor b
    OP_XOR    = 4'hE,  // a xor b
    OP_XNOR   = 4'hF   // not (a xor b)
  } alu_op_e;

  typedef struct packed {
    alu_op_e          sel;
    logic             cin;
    logic [ALU_W-1:0] b;
    logic [ALU_W-1:0] a;
  } alu_in_t;

  localparam int unsigned PATTERN_W = $bits(alu_in_t);  // 21

endpackage
