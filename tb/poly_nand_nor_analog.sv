// Behavioural model, for testbenches only (not synthesizable logic), of the
// supply-voltage controlled NAND/NOR gate as it is used in the REPOMO32 chip.
//
// The function of the real gate is set by the analog level of its supply.
// This model takes that level in volts and produces the gate output:
//   vdd in [VNAND_MIN, VNAND_MAX] (3.9 V .. 5.0 V) : y = NAND(a, b)
//   vdd in [VNOR_MIN,  VNOR_MAX]  (3.0 V .. 3.8 V) : y = NOR(a, b)
// Outside those two ranges (including the gap between 3.8 V and 3.9 V) the
// function is undefined; the model then drives 0 and raises `defined` low.
// The voltage ranges are the chip's published operating ranges; the choice
// of 0 as the undefined output and the `defined` flag are this model's.
// The output follows the inputs after a propagation delay of TPD time units.
module poly_nand_nor_analog #(
  parameter real VNAND_MIN = 3.9,
  parameter real VNAND_MAX = 5.0,
  parameter real VNOR_MIN  = 3.0,
  parameter real VNOR_MAX  = 3.8,
  parameter int  TPD    = 1   // in time units of the simulation
) (
  input  real  vdd,      // supply voltage of the gate, volts
  input  logic a,
  input  logic b,
  output logic y,
  output logic defined   // 1 when vdd lies in one of the two working ranges
);
  logic y_now;
  logic def_now;

  always_comb begin
    if (vdd >= VNAND_MIN && vdd <= VNAND_MAX) begin
      y_now   = ~(a & b);
      def_now = 1'b1;
    end else if (vdd >= VNOR_MIN && vdd <= VNOR_MAX) begin
      y_now   = ~(a | b);
      def_now = 1'b1;
    end else begin
      y_now   = 1'b0;
      def_now = 1'b0;
    end
  end

  assign #(TPD) y       = y_now;
  assign #(TPD) defined = def_now;
endmodule
