// Configuration memory of the REPOMO32 module: 32 registers of 8 bits, one
// per CLE, built as level-sensitive latches as on the chip.
//
// Writing one CLE's configuration takes one step: present the CLE address on
// addr and the configuration byte on data, then raise we. While we is high
// the addressed latch is transparent and follows data; it holds its value
// once we falls. addr and data must be stable while we is high. The whole
// chip is reconfigured in 32 such steps. There is no reset: the chip must
// be configured before it is used.
//
// The latches are intended (the chip stores its configuration in latch
// registers), so latch warnings on cfg_q are expected. Register i configures
// the CLE with number i; numbering the CLEs column by column (0..3 in the
// first column) is taken from the chip's mapping drawing.
module repomo_cfg_regs
  import poly_pkg::*;
(
  input  logic                     we,
  input  logic [REPOMO_ADDR_W-1:0] addr,
  input  logic [REPOMO_CFG_W-1:0]  data,
  output cle_cfg_t                 cfg_q [REPOMO_CLES]
);
  for (genvar i = 0; i < REPOMO_CLES; i++) begin : g_reg
    always_latch begin
      if (we && addr == REPOMO_ADDR_W'(i)) cfg_q[i] = cle_cfg_t'(data);
    end
  end
endmodule
