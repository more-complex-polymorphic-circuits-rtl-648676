// REPOMO32: reconfigurable polymorphic module with 32 configurable logic
// elements (CLEs) in 4 rows and 8 columns, meant to implement polymorphic
// four-input / four-output combinational circuits.
//
// Each CLE (repomo_cle) takes its two inputs from the eight outputs of the
// two columns to its left and computes AND, OR, XOR or the supply-controlled
// NAND/NOR. The chip inputs x[0..3] feed row 0..3 of the first column; the
// outputs z[0..3] are the CLEs of the last column. The chip's logic
// behaviour is set jointly by its configuration (repomo_cfg_regs, written
// through we/addr/data) and by the supply level vdd_high.
//
// Interconnect: CLE (column c, row r), columns and rows counted from 0, has
// number 4*c + r and sees in_near = outputs of column c-1 and in_far =
// outputs of column c-2. The chip inputs stand in for the missing columns:
// column 0 sees x on both, column 1 sees column 0 and x. That the first
// columns read the chip inputs is from the mapping drawing (inputs reach
// second-column CLEs); reading x in both halves of column 0 is this
// design's choice. There are no registers in the data path: z follows x
// combinationally.
module repomo32
  import poly_pkg::*;
(
  input  logic                     vdd_high, // supply range: 1 = high (NAND), 0 = low (NOR)
  input  logic [REPOMO_ROWS-1:0]   x,        // primary inputs X0..X3
  output logic [REPOMO_ROWS-1:0]   z,        // primary outputs Z0..Z3
  input  logic                     we,       // configuration write enable
  input  logic [REPOMO_ADDR_W-1:0] addr,     // CLE address
  input  logic [REPOMO_CFG_W-1:0]  data      // CLE configuration byte
);
  cle_cfg_t                 cfg [REPOMO_CLES];
  logic [REPOMO_ROWS-1:0]   col_out [REPOMO_COLS];

  repomo_cfg_regs u_cfg (.we(we), .addr(addr), .data(data), .cfg_q(cfg));

  for (genvar c = 0; c < REPOMO_COLS; c++) begin : g_col
    logic [REPOMO_ROWS-1:0] near, far;
    if (c == 0) begin : g_first
      assign near = x;
      assign far  = x;
    end else if (c == 1) begin : g_second
      assign near = col_out[0];
      assign far  = x;
    end else begin : g_rest
      assign near = col_out[c-1];
      assign far  = col_out[c-2];
    end
    for (genvar r = 0; r < REPOMO_ROWS; r++) begin : g_row
      repomo_cle u_cle (
        .vdd_high (vdd_high),
        .cfg      (cfg[c*REPOMO_ROWS + r]),
        .in_near  (near),
        .in_far   (far),
        .y        (col_out[c][r])
      );
    end
  end

  assign z = col_out[REPOMO_COLS-1];
endmodule
