// bist_controller: the BIST test controller, a Moore state machine of ten states.
//
// After reset (S1) it switches the input multiplexer and the output demultiplexer to
// test mode, resets the LP-LFSR and raises TEST (S2). Then, once per test pattern:
//   S3  wait            S4  lclk: LP-LFSR takes one step
//   S5  latch_clk: latch captures the ALU response
//   S6  compare: the comparator result cmp_in is checked and the count advances
//   S7  loop to S3 while fewer than NUM_PATTERNS patterns have been checked
// A pattern therefore takes 5 clocks, and a passing test ends 2 + 5*NUM_PATTERNS
// clocks after reset. On success (S9) the ALU is handed back to the normal inputs and
// TEST stays 0. On the first mismatch the machine alternates S8/S10 forever and TEST
// toggles 0,1,0,1... every clock; the ALU stays in test mode. address is the pattern
// count and addresses the expected-response ROM.
//
// The states, their outputs and their transitions follow the design's state diagram;
// holding TEST and test mode in states whose outputs it leaves open (S7, S8, S10) is
// this design's choice. lclk and latch_clk are one-cycle enables on the system clock,
// not separate clocks. Reset is synchronous and active high; all outputs are decoded
// from the state register.
module bist_controller #(
  parameter int unsigned NUM_PATTERNS = 25,
  parameter int unsigned CNT_W        = $clog2(NUM_PATTERNS + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cmp_in,
  output logic             lclk,
  output logic             lrst,
  output logic             mux_sel,
  output logic             demux_sel,
  output logic             latch_clk,
  output logic [CNT_W-1:0] address,
  output logic             test
);

  typedef enum logic [3:0] {
    S1, S2, S3, S4, S5, S6, S7, S8, S9, S10
  } state_e;

  state_e           state, state_nxt;
  logic [CNT_W-1:0] cnt;

  always_comb begin
    state_nxt = state;
    unique case (state)
      S1:  state_nxt = S2;
      S2:  state_nxt = S3;
      S3:  state_nxt = S4;
      S4:  state_nxt = S5;
      S5:  state_nxt = S6;
      S6:  state_nxt = cmp_in ? S7 : S8;
      S7:  state_nxt = (cnt < CNT_W'(NUM_PATTERNS)) ? S3 : S9;
      S8:  state_nxt = S10;
      S10: state_nxt = S8;
      S9:  state_nxt = S9;
      default: state_nxt = S1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S1;
      cnt   <= '0;
    end else begin
      state <= state_nxt;
      if (state == S1 || state == S9) cnt <= '0;
      else if (state == S6)          cnt <= cnt + CNT_W'(1);
    end
  end

  always_comb begin
    lclk      = 1'b0;
    lrst      = 1'b0;
    latch_clk = 1'b0;
    mux_sel   = 1'b1;
    demux_sel = 1'b1;
    test      = 1'b1;
    unique case (state)
      S1, S9: begin
        mux_sel   = 1'b0;
        demux_sel = 1'b0;
        test      = 1'b0;
      end
      S2:  lrst      = 1'b1;
      S4:  lclk      = 1'b1;
      S5:  latch_clk = 1'b1;
      S8:  test      = 1'b0;
      default: ;
    endcase
  end

  always_comb address = cnt;

  // The LP-LFSR step and the latch capture never coincide.
  a_lclk_latch: assert property (@(posedge clk) disable iff (rst) !(lclk && latch_clk));
  // A mismatch always leads to the fail loop.
  a_fail: assert property (@(posedge clk) disable iff (rst)
                           (state == S6 && !cmp_in) |=> (state == S8));

endmodule
