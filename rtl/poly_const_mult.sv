// Polymorphic constant multiplier: p = B * x in NAND mode (high supply,
// the filter's standard mode) and p = BSTAR * x in NOR mode (low supply,
// backup mode). With BSTAR = B it is an ordinary constant multiplier.
//
// How it works: a constant multiplier is a sum of shifted copies of x, one
// per set bit of the constant. Here every bit position k of the two
// constants gets one enable: always on where both constants have the bit,
// off where neither has it, and driven by the supply level where only one
// has it. The supply level is read by a polymorphic NAND/NOR gate with
// inputs 0 and 1 (1 in NAND mode, 0 in NOR mode). The adder structure is the
// same in both modes; only the enables change, so the circuit keeps its
// structure and changes its function with the environment. This shift-add
// structure is this design's own; the text gives the function (for example
// 240x / 32x) and a gate-level mapping of part of one such multiplier.
//
// Unsigned x and unsigned constants of CW bits. Combinational.
module poly_const_mult #(
  parameter int unsigned XW    = 8,    // width of x
  parameter int unsigned CW    = 8,    // width of the constants
  parameter int unsigned B     = 240,  // standard-mode constant
  parameter int unsigned BSTAR = 32,   // backup-mode constant
  parameter int unsigned PW    = XW + CW
) (
  input  logic          vdd_high,  // supply range: 1 = NAND (B), 0 = NOR (BSTAR)
  input  logic [XW-1:0] x,
  output logic [PW-1:0] p
);
  localparam logic [CW-1:0] BV  = CW'(B);
  localparam logic [CW-1:0] BSV = CW'(BSTAR);

  logic          sense;
  logic [CW-1:0] en;

  poly_nand_nor u_sense (.vdd_high(vdd_high), .a(1'b0), .b(1'b1), .y(sense));

  always_comb begin
    for (int k = 0; k < CW; k++) begin
      unique case ({BV[k], BSV[k]})
        2'b11:   en[k] = 1'b1;
        2'b10:   en[k] = sense;
        2'b01:   en[k] = ~sense;
        default: en[k] = 1'b0;
      endcase
    end
  end

  always_comb begin
    p = '0;
    for (int k = 0; k < CW; k++) begin
      if (en[k]) p = p + (PW'(x) << k);
    end
  end
endmodule
