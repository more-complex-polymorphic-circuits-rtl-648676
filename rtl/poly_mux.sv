// Polymorphic output multiplexer of the polymorphic FIR filter.
//
// It has no select input: which operand it passes is decided by the supply
// level through its polymorphic NAND/NOR gate. In NAND mode (high supply)
// operand a reaches y, in NOR mode (low supply) operand b does. In the filter
// a is the full N-tap sum (standard mode) and b the M-tap sum (backup mode).
//
// Structure (this design's own, the text only fixes the behaviour): one
// NAND/NOR gate with inputs 0 and 1 gives 1 in NAND mode and 0 in NOR mode;
// that bit gates a and b in an AND-OR selector, bit by bit. Combinational.
module poly_mux #(
  parameter int unsigned W = 8
) (
  input  logic         vdd_high, // supply range: 1 = NAND mode, 0 = NOR mode
  input  logic [W-1:0] a,        // passed in NAND mode
  input  logic [W-1:0] b,        // passed in NOR mode
  output logic [W-1:0] y
);
  logic sense;

  poly_nand_nor u_sense (.vdd_high(vdd_high), .a(1'b0), .b(1'b1), .y(sense));

  assign y = (a & {W{sense}}) | (b & {W{~sense}});
endmodule
