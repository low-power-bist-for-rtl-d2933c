// tb_test_power: switching activity of the self-test with the LP-LFSR against a
// conventional LFSR, as a stand-in for the test-power comparison of the design.
//
// Two 21-stage generators with the same polynomial (x^21 + x^19 + 1, XNOR, zero
// reset) each drive an ALU instance: the LP-LFSR through its stage outputs, as in the
// BIST, and a conventional shifting LFSR through its stage outputs. For the 25-pattern
// self-test and for a longer run of 2000 patterns it counts, per pattern, toggles of
// the generator flip-flops, of the 21 ALU input bits and of the 8 ALU output bits.
// Checks: both generators emit the same serial bit sequence; the LP-LFSR toggles at
// most one pattern flip-flop and one ALU input per pattern, and fewer in total than
// the conventional LFSR. Over the long run it must also cause fewer ALU-output toggles
// and fewer flip-flop toggles even when the two toggles per step of its one-hot
// enable ring are added. Over the short 25-pattern test those two totals are printed
// but not required to be lower: there the enable ring and the ALU outputs can toggle
// more than with the conventional LFSR. Toggle counts are only a proxy for dynamic
// power; gate-level power needs a cell library.
module tb_test_power;
  import bist_pkg::*;
  localparam int N = 21, TAP = 19;

  logic         clk = 1'b0, rst = 1'b1, step = 1'b0;
  logic [N-1:0] lp_q, lp_en, cv_s;
  logic         lp_u1, cv_out;
  logic [7:0]   lp_y, cv_y;
  alu_in_t      lp_in, cv_in;
  int           checks = 0, failures = 0;

  lp_lfsr   #(.N(N), .TAP(TAP)) u_lp (.clk, .rst, .lrst(1'b0), .step, .q(lp_q), .en(lp_en), .u1(lp_u1));
  conv_lfsr #(.N(N), .TAP(TAP)) u_cv (.clk, .rst, .step, .s(cv_s), .sout(cv_out));

  always_comb begin
    lp_in = alu_in_t'(lp_q);
    cv_in = alu_in_t'(cv_s);
  end

  alu u_alu_lp (.a(lp_in.a), .b(lp_in.b), .cin(lp_in.cin), .sel(lp_in.sel), .y(lp_y));
  alu u_alu_cv (.a(cv_in.a), .b(cv_in.b), .cin(cv_in.cin), .sel(cv_in.sel), .y(cv_y));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int patterns, input bit whole);
    longint ff_lp = 0, ff_cv = 0, in_lp = 0, in_cv = 0, out_lp = 0, out_cv = 0;
    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    for (int k = 0; k < patterns; k++) begin
      automatic logic [N-1:0] pq = lp_q, ps = cv_s;
      automatic logic [7:0]   py = lp_y, pcy = cv_y;
      check(lp_u1 == cv_out, $sformatf("serial output differs at pattern %0d", k));
      step = 1'b1;
      @(posedge clk); #1 step = 1'b0;
      check($countones(lp_q ^ pq) <= 1, $sformatf("LP-LFSR changed %0d ALU inputs at pattern %0d",
                                                  $countones(lp_q ^ pq), k));
      ff_lp  += $countones(lp_q ^ pq);  ff_cv  += $countones(cv_s ^ ps);
      in_lp  += $countones(lp_in ^ alu_in_t'(pq));  in_cv += $countones(cv_in ^ alu_in_t'(ps));
      out_lp += $countones(lp_y ^ py);  out_cv += $countones(cv_y ^ pcy);
    end
    // The enable ring of the LP-LFSR also toggles two flip-flops per step.
    $display("%0d patterns: register toggles LP %0d (+%0d enable ring) conv %0d; ALU input toggles LP %0d conv %0d; ALU output toggles LP %0d conv %0d",
             patterns, ff_lp, 2 * patterns, ff_cv, in_lp, in_cv, out_lp, out_cv);
    check(ff_lp < ff_cv, "LP-LFSR register toggled no less than the conventional one");
    check(in_lp < in_cv, "ALU inputs toggled no less with the LP-LFSR");
    if (whole) begin
      check(ff_lp + 2 * patterns < ff_cv, "LP-LFSR with its enable ring toggled no less than the conventional one");
      check(out_lp < out_cv, "ALU outputs toggled no less with the LP-LFSR");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(25, 1'b0);
    run(2000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
