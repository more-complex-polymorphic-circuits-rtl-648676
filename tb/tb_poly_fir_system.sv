// End-to-end test of the polymorphic FIR system at its default parameters
// (no parameter overrides).
// 1. Loads the REPOMO32 module with the 240x/32x multiplier slice in 32
//    configuration steps.
// 2. Streams random samples through the filter while the shared supply is
//    switched between the high and low range; every cycle the filter output
//    is compared with the filter equations, and the REPOMO32 outputs
//    (driven with the low 4 bits of the sample) with bits [7:4] of 240*x
//    (high supply) or 32*x (low supply), the tap-0 coefficient pair. The
//    logic mode input fir_c is driven opposite to the supply; at the default
//    USE_C = 0 it must have no effect.
// Counts each mechanism and fails if one never happened: configuration
// writes, standard->backup and backup->standard switches, cycles with the
// upper taps disconnected, refill cycles after a return to standard mode,
// REPOMO32 evaluations in NAND and in NOR mode.
module tb_poly_fir_system;
  import repomo_mult_map_pkg::*;
  localparam int N = 8, M = 4, XW = 8, YW = 19;
  localparam int unsigned B     [N] = '{240, 192, 128, 96, 64, 32, 16, 8};
  localparam int unsigned BSTAR [M] = '{32, 224, 160, 96};
  logic clk = 0, rst_n, vdd_high;
  logic [XW-1:0] fir_x;
  logic [YW-1:0] fir_y;
  logic fir_backup, fir_c;
  logic [3:0] rp_x, rp_z;
  logic rp_we;
  logic [4:0] rp_addr;
  logic [7:0] rp_data;
  int unsigned hist [N];
  int checks = 0, failures = 0;
  int n_cfg = 0, n_to_backup = 0, n_to_std = 0, n_frozen = 0, n_refill = 0;
  int n_nand_eval = 0, n_nor_eval = 0, refill_left = 0;

  poly_fir_system dut (
    .clk(clk), .rst_n(rst_n), .vdd_high(vdd_high), .fir_c(fir_c),
    .fir_x(fir_x), .fir_y(fir_y), .fir_backup(fir_backup),
    .rp_x(rp_x), .rp_z(rp_z), .rp_we(rp_we), .rp_addr(rp_addr), .rp_data(rp_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    if (v && !vdd_high) begin n_to_std++; refill_left = N - M; end
    if (!v && vdd_high) n_to_backup++;
    fir_x = xv; rp_x = xv[3:0]; vdd_high = v; fir_c = !v;
    #1;
    hist[0] = int'(fir_x);
    checks++;
    if (fir_y !== YW'(expect_y(v)) || fir_backup !== !v) begin
      failures++;
      if (failures < 10) $display("FAIL fir x=%0d vdd=%0d y=%0d exp=%0d", fir_x, v, fir_y, expect_y(v));
    end
    checks++;
    if (rp_z !== mult240_32_expect(rp_x, v)) begin
      failures++;
      if (failures < 10) $display("FAIL repomo x=%h vdd=%0d z=%h exp=%h", rp_x, v, rp_z, mult240_32_expect(rp_x, v));
    end
    if (v) n_nand_eval++; else n_nor_eval++;
    if (v && refill_left > 0) begin n_refill++; refill_left--; end
    @(posedge clk);
    if (!v) n_frozen++;
    for (int i = N - 1; i >= 1; i--) if (i < M || v) hist[i] = hist[i-1];
  endtask

  initial begin
    rst_n = 0; vdd_high = 1; fir_c = 0; fir_x = 0; rp_x = 0; rp_we = 0; rp_addr = 0; rp_data = 0;
    for (int i = 0; i < N; i++) hist[i] = 0;
    // configuration of REPOMO32: 32 steps of addr/data then a we pulse
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); rp_addr = 5'(i); rp_data = mult240_32_cfg(i);
      @(posedge clk); rp_we = 1;
      @(negedge clk); rp_we = 0;
      n_cfg++;
    end
    @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic v;
      v = ((t / 61) % 3 != 2);   // two thirds high supply, one third low
      step(XW'($urandom), v);
    end
    checks++; if (n_cfg != 32)      begin failures++; $display("FAIL configuration writes"); end
    checks++; if (n_to_backup == 0) begin failures++; $display("FAIL no switch to backup"); end
    checks++; if (n_to_std == 0)    begin failures++; $display("FAIL no switch to standard"); end
    checks++; if (n_frozen == 0)    begin failures++; $display("FAIL no disconnected cycles"); end
    checks++; if (n_refill == 0)    begin failures++; $display("FAIL no refill cycles"); end
    checks++; if (n_nand_eval == 0) begin failures++; $display("FAIL no NAND-mode evaluation"); end
    checks++; if (n_nor_eval == 0)  begin failures++; $display("FAIL no NOR-mode evaluation"); end
    $display("config writes=%0d to_backup=%0d to_standard=%0d disconnected cycles=%0d refill cycles=%0d nand evals=%0d nor evals=%0d",
             n_cfg, n_to_backup, n_to_std, n_frozen, n_refill, n_nand_eval, n_nor_eval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
