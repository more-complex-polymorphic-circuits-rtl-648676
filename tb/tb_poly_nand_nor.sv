// Exhaustive test of the polymorphic NAND/NOR gate: all four input
// combinations in both supply ranges, against the NAND and NOR truth tables
// and against the voltage-level gate model (poly_nand_nor_analog) supplied
// with 5.0 V for the high range and 3.3 V for the low range.
module tb_poly_nand_nor;
  logic vdd_high, a, b, y;
  int checks = 0, failures = 0;

  real  vdd_volts;
  logic y_analog, analog_defined;

  poly_nand_nor dut (.vdd_high(vdd_high), .a(a), .b(b), .y(y));
  poly_nand_nor_analog u_model (.vdd(vdd_volts), .a(a), .b(b), .y(y_analog), .defined(analog_defined));

  always_comb vdd_volts = vdd_high ? 5.0 : 3.3;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // truth tables written out: index {a,b}
    logic [3:0] nand_tt, nor_tt;
    nand_tt = 4'b0111;   // 11->0, 10->1, 01->1, 00->1
    nor_tt  = 4'b0001;   // only 00->1
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 4; i++) begin
        vdd_high = 1'(m);
        {a, b} = 2'(i);
        #3;
        checks++;
        if (y !== y_analog || !analog_defined) begin
          failures++;
          $display("FAIL vdd_high=%0d a=%0d b=%0d y=%0d voltage model=%0d", m, a, b, y, y_analog);
        end
        checks++;
        if (y !== (m ? nand_tt[i] : nor_tt[i])) begin
          failures++;
          $display("FAIL vdd_high=%0d a=%0d b=%0d y=%0d", m, a, b, y);
        end
      end
    // the two idioms used elsewhere: NOT and supply sensor
    for (int m = 0; m < 2; m++) begin
      vdd_high = 1'(m);
      a = 1'b1; b = 1'b1; #1; checks++; if (y !== 1'b0) failures++;
      a = 1'b0; b = 1'b1; #1; checks++; if (y !== 1'(m)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
