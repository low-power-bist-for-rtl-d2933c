// tb_lp_lfsr: self-checking testbench of the LP-LFSR.
//
// Runs the 7-stage default (x^7 + x^6 + 1) and a 21-stage instance (x^21 + x^19 + 1,
// as used in the BIST) next to conventional LFSR models and checks, every step:
//  - the serial output u1 equals the conventional LFSR's last stage;
//  - the stages, read in circular order from the enabled position, equal the
//    conventional register's state;
//  - at most one stage changes and en stays one-hot and rotates down by one.
// It also checks that the 7-stage register has period 127, that stepping stops when
// step is low, and that lrst restarts the sequence. Stage toggles of both registers
// are counted and printed: the LP-LFSR must toggle fewer flip-flops.
module tb_lp_lfsr;
  localparam int unsigned N1 = 7,  T1 = 6;
  localparam int unsigned N2 = 21, T2 = 19;

  logic clk = 1'b0, rst = 1'b1, lrst = 1'b0, step = 1'b0;
  int   checks = 0, failures = 0;

  logic [N1-1:0] q1, en1, s1;  logic u1_1, so1;
  logic [N2-1:0] q2, en2, s2;  logic u1_2, so2;

  lp_lfsr   #(.N(N1), .TAP(T1)) dut1 (.clk, .rst, .lrst, .step, .q(q1), .en(en1), .u1(u1_1));
  conv_lfsr #(.N(N1), .TAP(T1)) ref1 (.clk, .rst(rst || lrst), .step, .s(s1), .sout(so1));
  lp_lfsr   #(.N(N2), .TAP(T2)) dut2 (.clk, .rst, .lrst, .step, .q(q2), .en(en2), .u1(u1_2));
  conv_lfsr #(.N(N2), .TAP(T2)) ref2 (.clk, .rst(rst || lrst), .step, .s(s2), .sout(so2));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic int unsigned onehot_pos(input logic [63:0] v, input int unsigned n);
    for (int unsigned i = 0; i < n; i++) if (v[i]) return i;
    return n;
  endfunction

  // Conventional stage i (1..N) sits at physical ((e + i) mod N), e = enabled stage.
  function automatic logic [N2-1:0] unrotate(input logic [N2-1:0] q, input int unsigned e,
                                             input int unsigned n);
    logic [N2-1:0] r = '0;
    for (int unsigned i = 1; i <= n; i++) r[i-1] = q[(e + i) % n];
    return r;
  endfunction

  longint tog_lp1 = 0, tog_cv1 = 0, tog_lp2 = 0, tog_cv2 = 0;

  task automatic compare_all();
    int unsigned e1 = onehot_pos(64'(en1), N1), e2 = onehot_pos(64'(en2), N2);
    check($onehot(en1) && $onehot(en2), "enable not one-hot");
    check(u1_1 == so1, $sformatf("N=7 u1=%b conv=%b", u1_1, so1));
    check(u1_2 == so2, $sformatf("N=21 u1=%b conv=%b", u1_2, so2));
    check(unrotate(N2'(q1), e1, N1)[N1-1:0] == s1, $sformatf("N=7 state q=%h en=%h conv=%h", q1, en1, s1));
    check(unrotate(q2, e2, N2) == s2, $sformatf("N=21 state q=%h en=%h conv=%h", q2, en2, s2));
  endtask

  task automatic do_step();
    logic [N1-1:0] pq1 = q1, ps1 = s1, pen1 = en1;
    logic [N2-1:0] pq2 = q2, ps2 = s2;
    step = 1'b1;
    @(posedge clk); #1;
    step = 1'b0;
    check($countones(q1 ^ pq1) <= 1, "N=7: more than one stage changed");
    check($countones(q2 ^ pq2) <= 1, "N=21: more than one stage changed");
    check(en1 == {pen1[0], pen1[N1-1:1]}, "N=7: enable did not rotate down");
    tog_lp1 += $countones(q1 ^ pq1);  tog_cv1 += $countones(s1 ^ ps1);
    tog_lp2 += $countones(q2 ^ pq2);  tog_cv2 += $countones(s2 ^ ps2);
    compare_all();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N1-1:0] ref1_first;
    int unsigned   period;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(q1 == '0 && en1 == 7'b1000000, "reset state");
    compare_all();
    do_step();
    ref1_first = s1; period = 0;
    // Run 2 full periods of the 7-stage register.
    for (int k = 0; k < 254; k++) begin
      do_step();
      // The conventional state repeats after 127 steps.
      if (period == 0 && s1 == ref1_first) period = k + 1;
    end
    check(period == 127, $sformatf("period %0d, expected 127", period));
    // Hold: no step, nothing moves.
    begin
      automatic logic [N2-1:0] hq = q2, he = en2;
      repeat (5) @(posedge clk);
      #1 check(q2 == hq && en2 == he, "register moved without step");
    end
    // lrst restarts the sequence.
    lrst = 1'b1; @(posedge clk); #1 lrst = 1'b0;
    check(q1 == '0 && q2 == '0 && en2 == {1'b1, {(N2-1){1'b0}}}, "lrst did not clear");
    compare_all();
    for (int k = 0; k < 300; k++) do_step();
    $display("stage toggles N=7:  LP-LFSR %0d, conventional %0d", tog_lp1, tog_cv1);
    $display("stage toggles N=21: LP-LFSR %0d, conventional %0d", tog_lp2, tog_cv2);
    check(tog_lp1 < tog_cv1 && tog_lp2 < tog_cv2, "LP-LFSR did not toggle fewer stages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
