// conv_lfsr: reference model of a conventional N-stage Fibonacci LFSR, used by the
// LP-LFSR testbench.
//
// Every step shifts all stages by one (stage i+1 <= stage i) and stage 1 receives
// XNOR(stage N, stage TAP), the XOR-with-inverted-input feedback of a conventional
// 4-stage LFSR (stages 3 and 4 feeding the gate, one of them through an inverter).
// s[i-1] holds stage i; sout is stage N, the serial output. Synchronous active-high
// reset to all zeros.
module conv_lfsr #(
  parameter int unsigned N   = 7,
  parameter int unsigned TAP = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step,
  output logic [N-1:0] s,
  output logic         sout
);

  always_ff @(posedge clk) begin
    if (rst)       s <= '0;
    else if (step) s <= {s[N-2:0], ~(s[N-1] ^ s[TAP-1])};
  end

  always_comb sout = s[N-1];

endmodule
