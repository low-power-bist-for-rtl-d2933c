// hold_latch: holds one ALU response (Qout) steady for the comparator.
//
// A W-bit register loaded when load (latch_clk from the BIST controller) is 1 on a
// rising clock edge, and holding otherwise; q is valid from the cycle after the
// load. Synchronous active-high reset clears it to 0. The design description calls
// this block a latch; an edge-triggered register with a load enable is used here so
// that the whole design runs on one clock.
module hold_latch #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
