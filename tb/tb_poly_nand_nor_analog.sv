// Test of the supply-voltage model of the NAND/NOR gate: NAND at 5 V and
// 3.9 V, NOR at 3.3 V and 3.0 V, undefined in the gap and outside the
// ranges, and the propagation delay of the output.
module tb_poly_nand_nor_analog;
  real  vdd;
  logic a, b, y, defined;
  int checks = 0, failures = 0;

  poly_nand_nor_analog #(.TPD(2)) dut (.vdd(vdd), .a(a), .b(b), .y(y), .defined(defined));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_point(input real v, input int mode); // 1 NAND, 0 NOR, -1 undefined
    vdd = v;
    for (int i = 0; i < 4; i++) begin
      logic exp_y;
      {a, b} = 2'(i);
      #5;
      exp_y = (mode == 1) ? !(a && b) : (mode == 0) ? !(a || b) : 1'b0;
      checks++;
      if (y !== exp_y || defined !== (mode >= 0)) begin
        failures++;
        $display("FAIL vdd=%f a=%0d b=%0d y=%0d defined=%0d", v, a, b, y, defined);
      end
    end
  endtask

  initial begin
    check_point(5.0, 1);
    check_point(4.5, 1);
    check_point(3.9, 1);
    check_point(3.3, 0);
    check_point(3.0, 0);
    check_point(3.8, 0);
    check_point(3.85, -1);
    check_point(2.5, -1);
    check_point(5.5, -1);
    // delay: switch inputs at 5 V (NAND) from 11 (y=0) to 00 (y=1)
    vdd = 5.0; a = 1; b = 1; #5;
    a = 0; b = 0;
    #1; checks++; if (y !== 1'b0) begin failures++; $display("FAIL output changed before delay"); end
    #2; checks++; if (y !== 1'b1) begin failures++; $display("FAIL output not changed after delay"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
