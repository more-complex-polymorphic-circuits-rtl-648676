// Random test of the multi-operand adder with 4 and 3 operands, including
// all-ones operands (the largest sum must not overflow).
module tb_multi_operand_adder;
  logic [3:0][15:0] in4;
  logic [17:0]      y4;
  logic [2:0][15:0] in3;
  logic [17:0]      y3;
  int checks = 0, failures = 0;

  multi_operand_adder #(.K(4), .IW(16)) dut4 (.in(in4), .y(y4));
  multi_operand_adder #(.K(3), .IW(16)) dut3 (.in(in3), .y(y3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2001; t++) begin
      longint s4, s3;
      if (t == 2000) begin in4 = '1; in3 = '1; end
      else begin
        for (int i = 0; i < 4; i++) in4[i] = 16'($urandom);
        for (int i = 0; i < 3; i++) in3[i] = 16'($urandom);
      end
      #1;
      s4 = 0; s3 = 0;
      for (int i = 0; i < 4; i++) s4 += longint'(in4[i]);
      for (int i = 0; i < 3; i++) s3 += longint'(in3[i]);
      checks += 2;
      if (y4 !== 18'(s4)) begin failures++; $display("FAIL y4=%0d exp=%0d", y4, s4); end
      if (y3 !== 18'(s3)) begin failures++; $display("FAIL y3=%0d exp=%0d", y3, s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
