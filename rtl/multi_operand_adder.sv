// Multi-operand adder: y = sum of K unsigned operands of IW bits. The
// polymorphic FIR filter uses two of these as sub-adders (taps 0..M-1 and
// taps M..N-1) and a two-operand one as the third adder that joins them.
// The output is wide enough never to overflow: IW + ceil(log2 K) bits.
// Written as a plain sum; the tools choose the adder structure.
// Combinational.
module multi_operand_adder #(
  parameter int unsigned K  = 4,
  parameter int unsigned IW = 16,
  parameter int unsigned OW = IW + $clog2(K)
) (
  input  logic [K-1:0][IW-1:0] in,
  output logic [OW-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < K; i++) y = y + OW'(in[i]);
  end
endmodule
