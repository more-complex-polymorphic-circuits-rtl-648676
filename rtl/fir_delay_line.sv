// Delay line of the polymorphic FIR filter: N-1 registers giving the taps
// x(n), x(n-1), ..., x(n-N+1), with a switch behind tap M-1.
//
// tap[0] is the current input; register i (1..N-1) loads tap[i-1] on every
// rising clock edge and drives tap[i]. The switch between tap M-1 and the
// register of tap M is closed while connect is 1 (standard mode). When it
// opens (backup mode) registers M..N-1 are disconnected: they stop loading
// and hold their contents, so the unused part of the filter does not
// toggle. After the switch closes again they refill within N-M clocks.
// Freezing all registers behind the switch (not just the first) and the
// synchronous active-low reset to zero are this design's choices.
module fir_delay_line #(
  parameter int unsigned N  = 8,   // taps
  parameter int unsigned M  = 4,   // taps kept in backup mode, M < N
  parameter int unsigned XW = 8    // sample width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  connect, // 1: switch closed (standard mode)
  input  logic [XW-1:0]         x,
  output logic [N-1:0][XW-1:0]  tap
);
  logic [N-1:1][XW-1:0] d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d <= '0;
    end else begin
      for (int i = 1; i < N; i++) begin
        if (i < M || connect) d[i] <= tap[i-1];
      end
    end
  end

  always_comb begin
    tap[0] = x;
    for (int i = 1; i < N; i++) tap[i] = d[i];
  end

  initial assert (M >= 1 && M < N) else $error("fir_delay_line: need 1 <= M < N");
endmodule
