// input_mux: selects what the ALU reads, the normal inputs or the BIST test pattern.
//
// Combinational 2:1 multiplexer over the whole ALU input bundle (operands a and b,
// carry in, operation select). test_mode is mux_sel from the BIST controller:
// 1 selects the pattern, 0 the normal inputs. Multiplexing the select word together
// with the operands is this design's choice; the polarity follows the controller's
// state actions (mux_sel is 1 in the test states).
module input_mux
  import bist_pkg::*;
(
  input  logic    test_mode,
  input  alu_in_t normal,
  input  alu_in_t pattern,
  output alu_in_t alu_in
);

  always_comb alu_in = test_mode ? pattern : normal;

endmodule
