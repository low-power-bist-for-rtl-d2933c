// comparator: checks the latched ALU response against the expected ROM word.
//
// Combinational W-bit equality: eq is 1 when qout (the latch) equals dout (the ROM).
// eq goes to the BIST controller, which samples it once per test pattern.
module comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] qout,
  input  logic [W-1:0] dout,
  output logic         eq
);

  always_comb eq = (qout == dout);

endmodule
