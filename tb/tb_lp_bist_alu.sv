// tb_lp_bist_alu: end-to-end testbench of the BIST-equipped ALU, at default
// parameters (21-stage LP-LFSR, 25 patterns).
//
// 1. Fault-free self-test: TEST must rise the cycle after reset release, stay 1 for
//    the 25 patterns and fall after exactly 2 + 5*25 = 127 cycles; y1 must stay 0
//    meanwhile. Every ALU input pattern is compared with this testbench's own model
//    of the LP-LFSR (x^21 + x^19 + 1, XNOR, zero reset, one stage written per step),
//    every latched response with its own ALU model, and consecutive patterns must
//    differ in at most one bit (the low-power property).
// 2. Normal operation: after the test, random normal inputs must give the ALU result
//    on y1.
// 3. Faulty ALU: bit 0 of the ALU output is forced to 1 (stuck-at-1) and the self-test
//    rerun; TEST must start toggling every clock at the first pattern whose expected
//    response has bit 0 = 0, and the ALU must stay off the normal output.
// Each mechanism (LFSR step, latch load, matching comparison, mismatch, switch to
// normal mode, TEST toggling, normal operation) is counted; one that never happens
// is a failure.
module tb_lp_bist_alu;
  import bist_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] nop1 = '0, nop2 = '0, y1;
  logic [3:0] nsel = '0;
  logic       ncin = 1'b0, test;
  int         checks = 0, failures = 0;
  int         n_step = 0, n_load = 0, n_match = 0, n_mismatch = 0, n_to_normal = 0;
  int         n_toggle = 0, n_normal_ops = 0;

  lp_bist_alu dut (.clk, .rst, .nop1, .nop2, .nsel, .ncin, .y1, .test);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [7:0] alu_ref(input logic [7:0] a, b, input logic c, input logic [3:0] s);
    int unsigned ia = 32'(a), ib = 32'(b), ic = 32'(c), r;
    case (s)
      0: r = ia;  1: r = ia + 1;  2: r = ia + 255;  3: r = ib;  4: r = ib + 1;  5: r = ib + 255;
      6: r = ia + ib;  7: r = ia + ib + ic;  8: r = 255 - ia;  9: r = 255 - ib;
      10: r = ia & ib;  11: r = ia | ib;  12: r = 255 - (ia & ib);  13: r = 255 - (ia | ib);
      14: r = ia ^ ib;  default: r = 255 - (ia ^ ib);
    endcase
    return 8'(r % 256);
  endfunction

  // Reference LP-LFSR pattern sequence.
  logic [20:0] ref_pat [25];
  initial begin
    automatic logic [20:0] q = '0;
    automatic int          e = 20;
    for (int k = 0; k < 25; k++) begin
      q[e] = ~(q[e] ^ q[(e + 19) % 21]);
      e = (e + 20) % 21;
      ref_pat[k] = q;
    end
  end

  // Mechanism monitors on the controller strobes.
  logic prev_mux = 1'b0;
  always @(posedge clk) if (!rst) begin
    if (dut.lclk) n_step++;
    if (dut.latch_clk) n_load++;
    if (prev_mux && !dut.mux_sel) n_to_normal++;
    prev_mux <= dut.mux_sel;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one self-test from reset. Returns the cycle at which TEST fell for good
  // (pass), or the cycle of the first mismatch (fault).
  task automatic self_test(input logic faulty, output int end_cycle);
    int          pattern = 0, fail_cycle = -1;
    logic [20:0] prev_pat = '0;
    logic        prev_test, prev_load = 1'b0;
    end_cycle = -1;
    rst = 1'b1;
    nop1 = 8'($urandom); nop2 = 8'($urandom); nsel = 4'($urandom); ncin = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(test == 1'b0, "TEST not 0 in the first state");
    @(posedge clk); #1;
    for (int c = 1; c < 200; c++) begin
      // cycle c
      if (fail_cycle < 0) begin
        if (c < 127) begin
          check(test == 1'b1, $sformatf("TEST low at cycle %0d during the test", c));
          check(y1 == 8'h00, $sformatf("y1=%h during the test", y1));
        end
        if (dut.latch_clk) begin
          logic [20:0] p = dut.alu_in;
          check(p == ref_pat[pattern], $sformatf("pattern %0d = %h, expected %h", pattern, p, ref_pat[pattern]));
          check($countones(p ^ prev_pat) <= 1, $sformatf("pattern %0d changed %0d inputs", pattern, $countones(p ^ prev_pat)));
          prev_pat = p;
        end
        if (prev_load) begin  // the compare state follows the latch load
          logic [7:0] good = alu_ref(ref_pat[pattern][7:0], ref_pat[pattern][15:8],
                                     ref_pat[pattern][16], ref_pat[pattern][20:17]);
          logic [7:0] seen = faulty ? (good | 8'h01) : good;
          check(dut.qout == seen, $sformatf("latched %h, expected %h", dut.qout, seen));
          check(dut.eq == (seen == good), $sformatf("eq=%b for latched %h vs expected %h", dut.eq, seen, good));
          if (dut.eq) n_match++; else n_mismatch++;
          if (seen != good) fail_cycle = c;
          pattern++;
        end
        if (!faulty && c >= 127 && end_cycle < 0 && !test) end_cycle = c;
      end else begin
        if (c > fail_cycle + 1) begin
          check(test != prev_test, $sformatf("TEST did not toggle at cycle %0d", c));
          if (test != prev_test) n_toggle++;
        end
        check(y1 == 8'h00, "faulty ALU reached the normal output");
      end
      prev_test = test;
      prev_load = dut.latch_clk;
      @(posedge clk); #1;
    end
    if (faulty) end_cycle = fail_cycle;
  endtask

  initial begin
    int t_end;
    // 1. Fault-free self-test.
    self_test(1'b0, t_end);
    check(t_end == 127, $sformatf("TEST fell at cycle %0d, expected 127", t_end));
    check(n_step == 25 && n_load == 25, $sformatf("%0d LFSR steps, %0d latch loads, expected 25", n_step, n_load));
    check(n_match == 25 && n_mismatch == 0, $sformatf("%0d matches, %0d mismatches", n_match, n_mismatch));
    // 2. Normal operation.
    for (int k = 0; k < 300; k++) begin
      nop1 = 8'($urandom); nop2 = 8'($urandom); nsel = 4'($urandom); ncin = 1'($urandom);
      #1;
      check(y1 == alu_ref(nop1, nop2, ncin, nsel) && test == 1'b0,
            $sformatf("normal op sel=%h a=%h b=%h cin=%b: y1=%h expected %h", nsel, nop1, nop2, ncin,
                      y1, alu_ref(nop1, nop2, ncin, nsel)));
      n_normal_ops++;
      @(posedge clk); #1;
    end
    // 3. Stuck-at-1 on ALU output bit 0.
    force dut.alu_y[0] = 1'b1;
    self_test(1'b1, t_end);
    release dut.alu_y[0];
    check(t_end == 2 + 5 * 2 + 3, $sformatf("mismatch seen at cycle %0d, expected 15 (pattern 2)", t_end));
    $display("mechanisms: LFSR steps %0d, latch loads %0d, matches %0d, mismatches %0d, switches to normal %0d, TEST toggles %0d, normal ops %0d",
             n_step, n_load, n_match, n_mismatch, n_to_normal, n_toggle, n_normal_ops);
    check(n_step > 0, "no LFSR step");
    check(n_load > 0, "no latch load");
    check(n_match > 0, "no matching comparison");
    check(n_mismatch > 0, "no mismatch");
    check(n_to_normal == 1, "switch to normal mode not seen exactly once");
    check(n_toggle > 0, "TEST never toggled");
    check(n_normal_ops > 0, "no normal operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
