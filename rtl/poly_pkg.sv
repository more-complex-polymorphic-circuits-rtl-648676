// Shared types and constants of the polymorphic FIR filter and of the
// REPOMO32 reconfigurable polymorphic module.
//
// The polymorphic gates sense their environment, the supply voltage. In the
// RTL the supply level is abstracted to one bit, vdd_high: 1 for the high
// supply range (the NAND/NOR gate acts as NAND, the filter's standard mode)
// and 0 for the low range (NOR, backup mode).
//
// REPOMO32 geometry (4 rows x 8 columns, 32 CLEs, 8 configuration bits per
// CLE, 5-bit address) follows the chip description. The numeric encoding of
// the CLE function field is this design's choice: the order AND, OR, XOR,
// NAND/NOR is the order in which the chip's functions are listed.
package poly_pkg;

  // REPOMO32 array geometry
  localparam int unsigned REPOMO_ROWS    = 4;
  localparam int unsigned REPOMO_COLS    = 8;
  localparam int unsigned REPOMO_CLES    = REPOMO_ROWS * REPOMO_COLS;
  localparam int unsigned REPOMO_CFG_W   = 8;
  localparam int unsigned REPOMO_ADDR_W  = 5;
  localparam int unsigned REPOMO_SEL_W   = 3;   // 8:1 input multiplexers

  // CLE function field, configuration bits [1:0]
  typedef enum logic [1:0] {
    CLE_AND     = 2'd0,
    CLE_OR      = 2'd1,
    CLE_XOR     = 2'd2,
    CLE_NANDNOR = 2'd3
  } cle_func_e;

  // One CLE configuration byte: bits [7:5] select input A, bits [4:2]
  // select input B, bits [1:0] select the function.
  typedef struct packed {
    logic [REPOMO_SEL_W-1:0] sel_a;
    logic [REPOMO_SEL_W-1:0] sel_b;
    cle_func_e               func;
  } cle_cfg_t;

endpackage
