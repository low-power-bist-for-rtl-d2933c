// lp_lfsr: low-power linear feedback shift register (LP-LFSR), the BIST test pattern
// generator.
//
// A conventional N-stage Fibonacci LFSR moves every bit on every shift, so all of
// its flip-flops and all of the circuit inputs they drive may toggle each clock. This
// register produces the same sequence without moving any bit. Its stages are used as
// a circular buffer: a one-hot enable ring (en) marks the single stage that a
// conventional LFSR would shift out next, and on a step only that stage is written,
// with the new feedback bit, while the ring moves one stage down (en[j] -> en[j-1],
// en[0] -> en[N-1]). Every other stage holds its value, so at most one flip-flop of q
// changes per step; in silicon the disabled stages are clock gated.
//
// Each stage j has its own feedback gate, XNOR(q[j], q[(j+TAP) mod N]): when stage j
// is enabled it holds the conventional register's last stage N, and stage
// (j+TAP) mod N holds its stage TAP, so the polynomial is x^N + x^TAP + 1. The serial
// output u1 is taken through the output multiplexer from the enabled stage and equals
// the last stage of the conventional register, bit for bit. The conventional
// register's full state in stage order 1..N is q[(p+i-1) mod N] for i = 1..N, where p
// is the position just above the enabled stage.
//
// Following the design description: one enabled flip-flop per shift, a feedback gate
// per stage, an output multiplexer, the same output sequence as the conventional
// LFSR, and XNOR feedback (an XOR with an inverted input) with all-zero reset as in
// the conventional 4-stage LFSR it is compared with. The default polynomial
// x^7 + x^6 + 1 for the 7-stage register and the reset position of the enable ring
// are this design's choices.
//
// Interface: rst (global) and lrst (from the BIST controller) are synchronous and
// active high; both clear q and put the enable on stage N-1. step advances one shift
// on the rising clock edge. q is the parallel output (the physical stages, which is
// what drives the circuit under test), en the current enable, u1 the serial output
// for the current state.
module lp_lfsr #(
  parameter int unsigned N   = 7,
  parameter int unsigned TAP = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         lrst,
  input  logic         step,
  output logic [N-1:0] q,
  output logic [N-1:0] en,
  output logic         u1
);

  logic [N-1:0] fb;

  // Per-stage feedback gates.
  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      fb[j] = ~(q[j] ^ q[(j + TAP) % N]);
    end
  end

  // Only the enabled stage loads; the others keep their value.
  always_ff @(posedge clk) begin
    if (rst || lrst) begin
      q <= '0;
    end else if (step) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (en[j]) q[j] <= fb[j];
      end
    end
  end

  // One-hot enable ring.
  always_ff @(posedge clk) begin
    if (rst || lrst) begin
      en <= {1'b1, {(N-1){1'b0}}};
    end else if (step) begin
      en <= {en[0], en[N-1:1]};
    end
  end

  // Output multiplexer.
  always_comb u1 = |(q & en);

  initial begin
    assert (N >= 2 && TAP >= 1 && TAP < N)
      else $fatal(1, "lp_lfsr: need 1 <= TAP < N");
  end

  property p_en_onehot;
    @(posedge clk) disable iff (rst || lrst) $onehot(en);
  endproperty
  a_en_onehot: assert property (p_en_onehot);

endmodule
