// Test of the FIR delay line with N=6, M=2: random samples, switch opened
// and closed at random, against a reference shift register in which the
// registers behind the switch hold while it is open. Checks every tap every
// cycle, and that the one-cycle delay per register holds.
module tb_fir_delay_line;
  localparam int N = 6, M = 2, XW = 8;
  logic clk = 0, rst_n, connect;
  logic [XW-1:0] x;
  logic [N-1:0][XW-1:0] tap;
  logic [XW-1:0] model [N];
  int checks = 0, failures = 0, frozen_cycles = 0;

  fir_delay_line #(.N(N), .M(M), .XW(XW)) dut (.clk(clk), .rst_n(rst_n), .connect(connect), .x(x), .tap(tap));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; connect = 1; x = 0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      x = XW'($urandom);
      if (t % 50 == 0) connect = ~connect;
      #1;
      model[0] = x;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (tap[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d tap%0d=%h exp=%h", t, i, tap[i], model[i]);
        end
      end
      @(posedge clk);
      if (!connect) frozen_cycles++;
      for (int i = N - 1; i >= 1; i--)
        if (i < M || connect) model[i] = model[i-1];
    end
    checks++;
    if (frozen_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
