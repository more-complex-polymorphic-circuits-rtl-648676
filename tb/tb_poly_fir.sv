// Test of the polymorphic FIR filter at its default size (N=8, M=4, 8-bit
// samples and coefficients): random samples, the supply switched between
// the high and the low range several times, the output compared each cycle
// with a reference computed from the filter equations:
//   standard: y = sum_{i<N} B[i] * x(n-i)
//   backup:   y = sum_{i<M} BSTAR[i] * x(n-i), samples behind tap M-1 frozen.
// Also checks the impulse response (coefficient sequence, one tap per clock)
// in both modes. A second instance built with USE_C = 1 takes its mode
// from the logic signal c and must ignore the supply input, which is
// driven with random values.
module tb_poly_fir;
  localparam int N = 8, M = 4, XW = 8, YW = 19;
  localparam int unsigned B     [N] = '{240, 192, 128, 96, 64, 32, 16, 8};
  localparam int unsigned BSTAR [M] = '{32, 224, 160, 96};
  logic clk = 0, rst_n, vdd_high;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic backup_mode;
  logic [YW-1:0] y_c;
  logic backup_c, c, vdd_noise;
  int unsigned hist [N];
  int checks = 0, failures = 0, switches = 0, backup_cycles = 0;

  poly_fir dut (.clk(clk), .rst_n(rst_n), .vdd_high(vdd_high), .c(~vdd_high), .x(x), .y(y),
                .backup_mode(backup_mode));
  poly_fir #(.USE_C(1'b1)) dut_c (.clk(clk), .rst_n(rst_n), .vdd_high(vdd_noise), .c(c), .x(x),
                                  .y(y_c), .backup_mode(backup_c));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned expect_y(input logic std);
    int unsigned s = 0;
    if (std) for (int i = 0; i < N; i++) s += B[i] * hist[i];
    else     for (int i = 0; i < M; i++) s += BSTAR[i] * hist[i];
    return s;
  endfunction

  task automatic step(input logic [XW-1:0] xv, input logic v);
    @(negedge clk);
    if (v != vdd_high) switches++;
    x = xv; vdd_high = v; c = v; vdd_noise = 1'($urandom);
    #1;
    hist[0] = int'(x);
    checks++;
    if (y !== YW'(expect_y(v)) || backup_mode !== !v) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d vdd=%0d y=%0d exp=%0d", x, v, y, expect_y(v));
    end
    checks++;
    if (y_c !== YW'(expect_y(v)) || backup_c !== !v) begin
      failures++;
      if (failures < 10) $display("FAIL (c-controlled) x=%0d c=%0d y=%0d exp=%0d", x, v, y_c, expect_y(v));
    end
    @(posedge clk);
    if (!v) backup_cycles++;
    for (int i = N - 1; i >= 1; i--) if (i < M || v) hist[i] = hist[i-1];
  endtask

  initial begin
    rst_n = 0; vdd_high = 1; c = 1; vdd_noise = 0; x = 0;
    for (int i = 0; i < N; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // impulse response, standard mode: B[0], B[1], ...
    step(8'd1, 1);
    for (int i = 1; i < N + 2; i++) step(8'd0, 1);
    // impulse response, backup mode: BSTAR[0..M-1]
    step(8'd1, 0);
    for (int i = 1; i < M + 2; i++) step(8'd0, 0);
    // random data with mode changes
    for (int t = 0; t < 3000; t++) begin
      logic v;
      v = ((t / 97) % 2 == 0);
      step(XW'($urandom), v);
    end
    // full-scale input: the largest sum must not overflow
    for (int t = 0; t < N + 1; t++) step(8'hFF, 1);
    checks++; if (switches < 4) failures++;
    checks++; if (backup_cycles == 0) failures++;
    $display("mode switches=%0d backup cycles=%0d", switches, backup_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
