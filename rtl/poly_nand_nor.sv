// Polymorphic two-input NAND/NOR gate.
//
// The gate's logic function is selected by its environment, the supply
// voltage, not by a configuration signal: at the high supply range it
// computes NAND, at the low range it computes NOR. The physical gate is an
// 8-transistor CMOS cell (3 nMOS, 5 pMOS) whose function follows from the
// supply level; in this RTL the supply level is abstracted to the bit
// vdd_high (1 = high range = NAND, 0 = low range = NOR), so the gate is a
// purely combinational cell with no timing of its own.
//
// Two uses of the gate recur in this design and follow directly from its
// truth tables:
//   * both inputs tied together: NOT in either mode;
//   * inputs a and ~a: constant 1 in NAND mode, 0 in NOR mode, i.e. an
//     embedded sensor of the supply range.
module poly_nand_nor (
  input  logic vdd_high,  // environment: 1 = high supply (NAND), 0 = low supply (NOR)
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb begin
    if (vdd_high) y = ~(a & b);
    else          y = ~(a | b);
  end
endmodule
