// Polymorphic FIR filter with a standard and a backup mode.
//
// Standard mode (high supply): an ordinary N-tap FIR filter,
//   y(n) = sum_{i=0}^{N-1} B[i] * x(n-i).
// Backup mode (low supply): only the first M taps work, with reconfigured
// coefficients, and the rest of the filter is disconnected to save power:
//   y(n) = sum_{i=0}^{M-1} BSTAR[i] * x(n-i).
// By default (USE_C = 0) the mode is not a control input. The supply level
// changes the function of the polymorphic NAND/NOR gates inside the first M
// constant multipliers and inside the output multiplexer; a NAND/NOR gate
// wired as a supply sensor (inputs 0 and 1) opens the delay-line switch in
// backup mode, so no separate mode signal is needed and c is ignored.
// With USE_C = 1 the same gates are steered by the logic signal c instead
// (1 = standard, 0 = backup), the alternative the filter's diagram marks
// with c; vdd_high is then ignored. The polarity of c is this design's
// choice.
//
// Structure: fir_delay_line (N-1 registers R, switch behind tap M-1), N
// constant multipliers (taps 0..M-1 polymorphic B[i]/BSTAR[i], taps
// M..N-1 fixed B[i]), sub-adder 1 over taps 0..M-1, sub-adder 2 over taps
// M..N-1, a third adder joining them, and poly_mux choosing the third
// adder's sum (standard) or sub-adder 1 (backup). This structure follows
// the filter's block diagram. Widths, unsigned arithmetic, coefficient
// values and N, M are this design's choices.
//
// Timing: y is combinational from x and the delay line; the delay line
// shifts on each rising clock edge. After a switch from backup back to
// standard mode, taps M..N-1 still hold the samples they froze with, and y
// is the true N-tap result again after N-M clock edges.
module poly_fir #(
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 4,
  parameter int unsigned XW = 8,
  parameter int unsigned CW = 8,
  parameter int unsigned B     [N] = '{240, 192, 128, 96, 64, 32, 16, 8},
  parameter int unsigned BSTAR [M] = '{32, 224, 160, 96},
  parameter int unsigned YW = XW + CW + $clog2(N),
  parameter bit          USE_C = 1'b0  // 0: mode from the supply, 1: from c
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vdd_high,    // supply range: 1 = standard, 0 = backup
  input  logic          c,           // logic mode signal, used when USE_C = 1
  input  logic [XW-1:0] x,           // input sample x(n)
  output logic [YW-1:0] y,           // output sample y(n)
  output logic          backup_mode  // 1 while the gates sense the low supply
);
  localparam int unsigned PW  = XW + CW;
  localparam int unsigned S1W = PW + $clog2(M);
  localparam int unsigned S2W = PW + $clog2(N - M);

  logic                  ctrl;      // what steers the polymorphic gates
  logic                  sense;     // 1 in NAND mode, 0 in NOR mode
  logic [N-1:0][XW-1:0]  tap;
  logic [N-1:0][PW-1:0]  prod;
  logic [S1W-1:0]        sum_lo;
  logic [S2W-1:0]        sum_hi;
  logic [1:0][YW-1:0]    join_in;
  logic [YW-1:0]         sum_all;

  assign ctrl = USE_C ? c : vdd_high;

  poly_nand_nor u_sense (.vdd_high(ctrl), .a(1'b0), .b(1'b1), .y(sense));
  assign backup_mode = ~sense;   // 1 while the gates are in NOR mode

  fir_delay_line #(.N(N), .M(M), .XW(XW)) u_delay (
    .clk(clk), .rst_n(rst_n), .connect(sense), .x(x), .tap(tap)
  );

  for (genvar i = 0; i < N; i++) begin : g_tap
    if (i < M) begin : g_poly
      poly_const_mult #(.XW(XW), .CW(CW), .B(B[i]), .BSTAR(BSTAR[i])) u_mul (
        .vdd_high(ctrl), .x(tap[i]), .p(prod[i])
      );
    end else begin : g_fixed
      poly_const_mult #(.XW(XW), .CW(CW), .B(B[i]), .BSTAR(B[i])) u_mul (
        .vdd_high(ctrl), .x(tap[i]), .p(prod[i])
      );
    end
  end

  multi_operand_adder #(.K(M), .IW(PW)) u_add_lo (.in(prod[M-1:0]), .y(sum_lo));
  multi_operand_adder #(.K(N - M), .IW(PW)) u_add_hi (.in(prod[N-1:M]), .y(sum_hi));

  assign join_in[0] = YW'(sum_lo);
  assign join_in[1] = YW'(sum_hi);
  multi_operand_adder #(.K(2), .IW(YW), .OW(YW)) u_add_join (.in(join_in), .y(sum_all));

  poly_mux #(.W(YW)) u_mux (
    .vdd_high(ctrl), .a(sum_all), .b(YW'(sum_lo)), .y(y)
  );
endmodule
