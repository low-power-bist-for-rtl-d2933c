// demux: routes the ALU result either to the normal output or to the BIST latch.
//
// Combinational 1:2 demultiplexer. test_mode is demux_sel from the BIST controller:
// 1 sends d to y_test (towards the latch and comparator), 0 sends it to y_normal.
// The output not selected is driven to 0; in a tristate implementation it would
// float instead. Driving 0 is this design's choice.
module demux #(
  parameter int unsigned W = 8
) (
  input  logic         test_mode,
  input  logic [W-1:0] d,
  output logic [W-1:0] y_normal,
  output logic [W-1:0] y_test
);

  always_comb begin
    y_normal = test_mode ? '0 : d;
    y_test   = test_mode ? d  : '0;
  end

endmodule
