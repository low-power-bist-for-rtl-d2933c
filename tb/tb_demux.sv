// tb_demux: self-checking testbench of the ALU output demultiplexer.
//
// Random data in both modes: in test mode the data must appear on y_test and
// y_normal must be 0; in normal mode the reverse.
module tb_demux;
  logic       test_mode;
  logic [7:0] d, y_normal, y_test;
  int         checks = 0, failures = 0;

  demux #(.W(8)) dut (.test_mode, .d, .y_normal, .y_test);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      d = 8'($urandom); test_mode = 1'($urandom);
      #1;
      checks++;
      if (y_normal !== (test_mode ? 8'h00 : d) || y_test !== (test_mode ? d : 8'h00)) begin
        failures++;
        if (failures < 20) $display("FAIL mode=%b d=%h normal=%h test=%h", test_mode, d, y_normal, y_test);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
