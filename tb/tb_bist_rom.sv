// tb_bist_rom: self-checking testbench of the expected-response ROM.
//
// Works out the 25 expected responses here, from its own model of the 21-stage
// LP-LFSR (x^21 + x^19 + 1, XNOR feedback, all-zero reset, one stage written per
// step, enable moving down from stage 20) and of the ALU, and reads every address of
// the ROM in random order. It also checks the one-cycle read latency and that the
// unused words 25..31 are 0.
module tb_bist_rom;
  localparam int N = 21, TAP = 19, NP = 25;

  logic       clk = 1'b0;
  logic [4:0] addr = '0;
  logic [7:0] dout;
  logic [7:0] expected [32];
  int         checks = 0, failures = 0;

  bist_rom #(.W(8), .AW(5), .INIT_FILE("rtl/bist_rom.hex")) dut (.clk, .addr, .dout);

  always #5 clk = ~clk;

  function automatic logic [7:0] alu_ref(input logic [20:0] p);
    int unsigned a = p[7:0], b = p[15:8], c = p[16], s = p[20:17], r;
    case (s)
      0: r = a;  1: r = a + 1;  2: r = a - 1;  3: r = b;  4: r = b + 1;  5: r = b - 1;
      6: r = a + b;  7: r = a + b + c;  8: r = ~a;  9: r = ~b;  10: r = a & b;
      11: r = a | b;  12: r = ~(a & b);  13: r = ~(a | b);  14: r = a ^ b;
      default: r = ~(a ^ b);
    endcase
    return 8'(r);
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [20:0] q = '0;
    automatic int          e = N - 1;
    automatic int          order [32];
    for (int k = 0; k < 32; k++) expected[k] = 8'h00;
    for (int k = 0; k < NP; k++) begin
      q[e] = ~(q[e] ^ q[(e + TAP) % N]);
      e = (e + N - 1) % N;
      expected[k] = alu_ref(q);
    end
    for (int k = 0; k < 32; k++) order[k] = k;
    order.shuffle();
    foreach (order[i]) begin
      addr = 5'(order[i]);
      @(posedge clk); #1;
      checks++;
      if (dout !== expected[order[i]]) begin
        failures++;
        $display("FAIL addr=%0d dout=%h expected %h", order[i], dout, expected[order[i]]);
      end
      // Latency: a new address shows only after the next edge.
      addr = 5'(order[(i + 1) % 32]);
      #1;
      checks++;
      if (dout !== expected[order[i]]) begin
        failures++;
        $display("FAIL read is not registered at addr=%0d", order[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
