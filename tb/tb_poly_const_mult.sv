// Exhaustive test of the polymorphic constant multiplier for several
// constant pairs (240/32 of the REPOMO32 mapping, pairs with bits only in
// one constant, equal constants, a zero constant), every 8-bit input, both
// supply ranges, against the arithmetic product.
module tb_poly_const_mult;
  localparam int NP = 5;
  localparam int unsigned BS [NP] = '{240, 5, 200, 0, 255};
  localparam int unsigned BB [NP] = '{32, 250, 200, 129, 1};
  logic vdd_high;
  logic [7:0] x;
  logic [15:0] p [NP];
  int checks = 0, failures = 0;

  for (genvar j = 0; j < NP; j++) begin : g_dut
    poly_const_mult #(.XW(8), .CW(8), .B(BS[j]), .BSTAR(BB[j])) dut (
      .vdd_high(vdd_high), .x(x), .p(p[j]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      vdd_high = 1'(m);
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        for (int j = 0; j < NP; j++) begin
          int unsigned e;
          e = (m ? BS[j] : BB[j]) * v;
          checks++;
          if (p[j] !== 16'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL pair %0d vdd=%0d x=%0d p=%0d exp=%0d", j, m, v, p[j], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
