// Random test of the polymorphic multiplexer: a passes in NAND mode (high
// supply), b in NOR mode (low supply).
module tb_poly_mux;
  logic vdd_high;
  logic [19:0] a, b, y;
  int checks = 0, failures = 0;

  poly_mux #(.W(20)) dut (.vdd_high(vdd_high), .a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = 20'($urandom); b = 20'($urandom); vdd_high = 1'($urandom);
      #1;
      checks++;
      if (y !== (vdd_high ? a : b)) begin
        failures++;
        if (failures < 10) $display("FAIL vdd=%0d a=%h b=%h y=%h", vdd_high, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
