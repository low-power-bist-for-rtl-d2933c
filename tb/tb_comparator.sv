// tb_comparator: self-checking testbench of the response comparator.
//
// Equal pairs, pairs differing in a single bit (every position) and random pairs;
// eq must be 1 exactly when the two words are equal.
module tb_comparator;
  logic [7:0] qout, dout;
  logic       eq;
  int         checks = 0, failures = 0;

  comparator #(.W(8)) dut (.qout, .dout, .eq);

  task automatic apply(input logic [7:0] x, input logic [7:0] z);
    qout = x; dout = z;
    #1;
    checks++;
    if (eq !== (x == z)) begin
      failures++;
      if (failures < 20) $display("FAIL qout=%h dout=%h eq=%b", x, z, eq);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      apply(8'(k), 8'(k));
      for (int i = 0; i < 8; i++) apply(8'(k), 8'(k) ^ (8'h1 << i));
    end
    repeat (1000) apply(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
