// Polymorphic FIR system: the polymorphic FIR filter next to a REPOMO32
// reconfigurable polymorphic module, both powered from the same supply.
//
// The supply level is the one environment variable of the system: it sets
// the filter's mode (high = standard N-tap, low = backup M-tap) and the
// function of every NAND/NOR CLE in the REPOMO32 module at the same moment.
// The REPOMO32 module is the platform on which parts of the filter (for
// example slices of a polymorphic constant multiplier) are mapped; its
// four inputs, four outputs and configuration port are brought out so that
// such a mapping can be loaded and exercised. Pairing the two under one
// supply input is this design's way of presenting them together.
module poly_fir_system
  import poly_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 4,
  parameter int unsigned XW = 8,
  parameter int unsigned CW = 8,
  parameter int unsigned B     [N] = '{240, 192, 128, 96, 64, 32, 16, 8},
  parameter int unsigned BSTAR [M] = '{32, 224, 160, 96},
  parameter int unsigned YW = XW + CW + $clog2(N),
  parameter bit          USE_C = 1'b0  // filter mode from the supply (0) or from fir_c (1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     vdd_high,     // shared supply range: 1 = high, 0 = low
  // polymorphic FIR filter
  input  logic                     fir_c,        // logic mode signal, used when USE_C = 1
  input  logic [XW-1:0]            fir_x,
  output logic [YW-1:0]            fir_y,
  output logic                     fir_backup,
  // REPOMO32 module
  input  logic [REPOMO_ROWS-1:0]   rp_x,
  output logic [REPOMO_ROWS-1:0]   rp_z,
  input  logic                     rp_we,
  input  logic [REPOMO_ADDR_W-1:0] rp_addr,
  input  logic [REPOMO_CFG_W-1:0]  rp_data
);
  poly_fir #(.N(N), .M(M), .XW(XW), .CW(CW), .B(B), .BSTAR(BSTAR), .YW(YW), .USE_C(USE_C)) u_fir (
    .clk(clk), .rst_n(rst_n), .vdd_high(vdd_high), .c(fir_c),
    .x(fir_x), .y(fir_y), .backup_mode(fir_backup)
  );

  repomo32 u_repomo (
    .vdd_high(vdd_high), .x(rp_x), .z(rp_z),
    .we(rp_we), .addr(rp_addr), .data(rp_data)
  );
endmodule
