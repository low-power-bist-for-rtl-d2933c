// tb_hold_latch: self-checking testbench of the response hold latch.
//
// Random data every clock with random load strobes: q must take d on a clock edge
// where load is 1, keep its value otherwise, and be 0 after reset.
module tb_hold_latch;
  logic       clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [7:0] d = '0, q, model;
  int         checks = 0, failures = 0;

  hold_latch #(.W(8)) dut (.clk, .rst, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hA5;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 1'b0;
    model = 8'h00;
    for (int k = 0; k < 1000; k++) begin
      d = 8'($urandom); load = ($urandom % 3) == 0;
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 20) $display("FAIL k=%0d load=%b q=%h expected %h", k, load, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
