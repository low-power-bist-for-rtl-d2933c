// tb_input_mux: self-checking testbench of the ALU input multiplexer.
//
// Drives random normal and pattern bundles and checks that the output equals the
// pattern when test_mode is 1 and the normal inputs when it is 0, field by field.
module tb_input_mux;
  import bist_pkg::*;

  logic    test_mode;
  alu_in_t normal, pattern, alu_in;
  int      checks = 0, failures = 0;

  input_mux dut (.test_mode, .normal, .pattern, .alu_in);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      automatic logic [20:0] rn = 21'($urandom), rp = 21'($urandom);
      normal = alu_in_t'(rn); pattern = alu_in_t'(rp); test_mode = 1'($urandom);
      #1;
      checks++;
      if (alu_in.a   !== (test_mode ? rp[7:0]   : rn[7:0])   ||
          alu_in.b   !== (test_mode ? rp[15:8]  : rn[15:8])  ||
          alu_in.cin !== (test_mode ? rp[16]    : rn[16])    ||
          alu_in.sel !== (test_mode ? rp[20:17] : rn[20:17])) begin
        failures++;
        if (failures < 20) $display("FAIL mode=%b normal=%h pattern=%h out=%h", test_mode, rn, rp, alu_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
