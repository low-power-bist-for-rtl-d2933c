// tb_bist_controller: self-checking testbench of the BIST controller.
//
// The comparator result cmp_in is driven by the testbench. For a passing run and for
// runs that fail at pattern 0, 12 and 24 it checks, every clock after reset release,
// all controller outputs against a cycle-by-cycle schedule worked out here:
//   cycle 0       S1: everything 0
//   cycle 1       S2: lrst, test mode, TEST = 1
//   cycle 2+5k+p  pattern k, phase p = 0..4 (S3..S7): lclk at p = 1, latch_clk at p = 2,
//                 cmp_in sampled at p = 3, address = k (k+1 at p = 4)
//   cycle 127     S9: normal mode, TEST = 0, for good; address NP, then 0
// and, after a mismatch at pattern f, TEST = 0,1,0,1,... starting the cycle after the
// S6 of pattern f, with test mode held. It also checks the pass time of 127 cycles.
module tb_bist_controller;
  localparam int NP = 25;

  logic       clk = 1'b0, rst = 1'b1, cmp_in = 1'b1;
  logic       lclk, lrst, mux_sel, demux_sel, latch_clk, test;
  logic [4:0] address;
  int         checks = 0, failures = 0;
  int         n_lclk = 0, n_latch = 0, n_toggle = 0;

  bist_controller #(.NUM_PATTERNS(NP)) dut (
    .clk, .rst, .cmp_in, .lclk, .lrst, .mux_sel, .demux_sel, .latch_clk, .address, .test
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One run; fail_at < 0 means every comparison matches.
  task automatic run(input int fail_at, input int cycles);
    int first_fail_cycle = (fail_at < 0) ? -1 : 5 + 5 * fail_at;
    int test_fall = -1;
    rst = 1'b1; cmp_in = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < cycles; c++) begin
      logic e_lclk = 0, e_lrst = 0, e_latch = 0, e_mode = 1, e_test = 1;
      int   e_addr = 0;
      cmp_in = !(c == first_fail_cycle);  // outputs of cycle c, state entered at the last edge
      if (c == 0) begin
        e_mode = 0; e_test = 0;
      end else if (c == 1) begin
        e_lrst = 1;
      end else if (first_fail_cycle >= 0 && c > first_fail_cycle) begin
        e_test = ((c - first_fail_cycle - 1) % 2) == 1;
        e_addr = fail_at + 1;
      end else if (c < 2 + 5 * NP) begin
        int k = (c - 2) / 5, p = (c - 2) % 5;
        e_lclk = (p == 1); e_latch = (p == 2);
        e_addr = (p == 4) ? k + 1 : k;
      end else begin
        e_mode = 0; e_test = 0;
        e_addr = (c == 2 + 5 * NP) ? NP : 0;  // S9 clears the count on leaving its first cycle
      end
      check(lclk == e_lclk && lrst == e_lrst && latch_clk == e_latch &&
            mux_sel == e_mode && demux_sel == e_mode && test == e_test && address == 5'(e_addr),
            $sformatf("fail_at=%0d cycle %0d: lclk=%b lrst=%b latch=%b mux=%b demux=%b test=%b addr=%0d, expected %b %b %b %b %b %b %0d",
                      fail_at, c, lclk, lrst, latch_clk, mux_sel, demux_sel, test, address,
                      e_lclk, e_lrst, e_latch, e_mode, e_mode, e_test, e_addr));
      if (lclk) n_lclk++;
      if (latch_clk) n_latch++;
      if (c > 1 && test_fall < 0 && !test && first_fail_cycle < 0) test_fall = c;
      if (first_fail_cycle >= 0 && c > first_fail_cycle + 1) n_toggle++;
      @(posedge clk);
      #1;
    end
    if (fail_at < 0) check(test_fall == 2 + 5 * NP, $sformatf("test fell at cycle %0d, expected %0d", test_fall, 2 + 5 * NP));
  endtask

  initial begin
    run(-1, 140);
    check(n_lclk == NP && n_latch == NP, $sformatf("pass run: %0d LFSR steps, %0d latch loads", n_lclk, n_latch));
    run(0, 20);
    run(12, 80);
    run(24, 140);
    check(n_toggle > 0, "fail loop never reached");
    $display("LFSR steps %0d, latch loads %0d, fail-loop cycles %0d", n_lclk, n_latch, n_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
