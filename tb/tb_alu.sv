// tb_alu: self-checking testbench of the 8-bit ALU.
//
// Applies every select code with corner operands (0, 1, 7F, 80, FF) and 4000 random
// operand/carry/select combinations, and compares y with results worked out here
// with integer arithmetic from the operation table (s(0) is the MSB of sel).
module tb_alu;
  import bist_pkg::*;

  logic [7:0] a, b, y;
  logic       cin;
  alu_op_e    sel;
  int         checks = 0, failures = 0;

  alu dut (.a, .b, .cin, .sel, .y);

  function automatic logic [7:0] expect_y(input int unsigned ia, ib, ic, is);
    int unsigned r;
    case (is)
      0: r = ia;              1: r = ia + 1;         2: r = ia + 255;      3: r = ib;
      4: r = ib + 1;          5: r = ib + 255;       6: r = ia + ib;       7: r = ia + ib + ic;
      8: r = 255 - ia;        9: r = 255 - ib;      10: r = ia & ib;      11: r = ia | ib;
     12: r = 255 - (ia & ib); 13: r = 255 - (ia | ib); 14: r = ia ^ ib;   15: r = 255 - (ia ^ ib);
      default: r = 0;
    endcase
    return 8'(r % 256);
  endfunction

  task automatic apply(input int unsigned ia, ib, ic, is);
    a = 8'(ia); b = 8'(ib); cin = 1'(ic); sel = alu_op_e'(is);
    #1;
    checks++;
    if (y !== expect_y(ia, ib, ic, is)) begin
      failures++;
      if (failures < 20)
        $display("FAIL sel=%h a=%h b=%h cin=%0d y=%h expected %h", is, ia, ib, ic, y,
                 expect_y(ia, ib, ic, is));
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
    automatic int unsigned corner[5] = '{0, 1, 'h7f, 'h80, 'hff};
    for (int s = 0; s < 16; s++)
      foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++)
        apply(corner[i], corner[j], c, s);
    repeat (4000) apply($urandom % 256, $urandom % 256, $urandom % 2, $urandom % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
