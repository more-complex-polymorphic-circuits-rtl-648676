// Configurable Logic Element (CLE) of the REPOMO32 polymorphic module.
//
// A CLE has two 8:1 multiplexers that pick its inputs A and B from the
// eight signals it can see (the four outputs of the column to its left and
// the four outputs of the column before that), and a function multiplexer
// that selects one of four gates: AND, OR, XOR and the polymorphic NAND/NOR
// gate. The NAND/NOR gate is the only one whose function depends on the
// supply level: NAND when vdd_high is 1, NOR when it is 0.
//
// Configuration byte (from the chip's CLE drawing): bits [7:5] select A,
// bits [4:2] select B, bits [1:0] select the function. Multiplexer input
// index k (0..7) is the k-th signal of in_near (k = 0..3, previous column,
// rows 1..4) then in_far (k = 4..7, column before that, rows 1..4); that is
// the top-to-bottom order printed at the multiplexer. The binary reading of
// the select fields and the function encoding (poly_pkg::cle_func_e) are
// this design's choice. Purely combinational; the chip has no registers in
// its data path.
module repomo_cle
  import poly_pkg::*;
(
  input  logic                    vdd_high, // supply range: 1 = NAND, 0 = NOR
  input  cle_cfg_t                cfg,      // configuration byte of this CLE
  input  logic [REPOMO_ROWS-1:0]  in_near,  // outputs of column c-1
  input  logic [REPOMO_ROWS-1:0]  in_far,   // outputs of column c-2
  output logic                    y
);
  logic [2*REPOMO_ROWS-1:0] cand;
  logic a, b, g_poly;

  assign cand = {in_far, in_near};
  assign a    = cand[cfg.sel_a];
  assign b    = cand[cfg.sel_b];

  poly_nand_nor u_poly (.vdd_high(vdd_high), .a(a), .b(b), .y(g_poly));

  always_comb begin
    unique case (cfg.func)
      CLE_AND:     y = a & b;
      CLE_OR:      y = a | b;
      CLE_XOR:     y = a ^ b;
      CLE_NANDNOR: y = g_poly;
      default:     y = g_poly;
    endcase
  end
endmodule
