// Configuration of the REPOMO32 module that computes output bits 4..7 of a
// 240x / 32x polymorphic constant multiplier for a 4-bit input x:
//   high supply (NAND mode): z = bits [7:4] of 240*x = (-x) mod 16
//   low supply  (NOR mode) : z = bits [7:4] of  32*x = {x[2:0], 1'b0}
// (bits [3:0] of both products are always 0).
//
// Mapping, column by column (CLE number = 4*column + row):
//   col0: ~x0 (NAND/NOR with both inputs x0), relays of x1, x2, x3
//   col1: m = NAND/NOR(x0, ~x0) (1 in NAND mode, 0 in NOR mode), x0, x1, x2
//   col2: a0 = x0&m, a1 = x1&m, b2 = x2&m, b3 = x3&m
//   col3: y5 = x0^a1, u6 = x1|a0, o01 = a0|a1, relay x2
//   col4: y4 = a0, y6 = b2^u6, u7 = x2|o01, relay b3
//   col5: y4, y5, y6, y7 = b3^u7
//   col6, col7: relays, z = {y7, y6, y5, y4}
// Configuration byte: {sel_a[2:0], sel_b[2:0], func[1:0]}; select index 0..3
// is the previous column, 4..7 the column before it.
package repomo_mult_map_pkg;

  function automatic logic [7:0] cb(input int sa, input int sb, input int f);
    return {3'(sa), 3'(sb), 2'(f)};
  endfunction

  localparam int F_AND = 0, F_OR = 1, F_XOR = 2, F_NN = 3;

  function automatic logic [7:0] mult240_32_cfg(input int cle);
    case (cle)
      0:  return cb(0, 0, F_NN);   1:  return cb(1, 1, F_AND);
      2:  return cb(2, 2, F_AND);  3:  return cb(3, 3, F_AND);
      4:  return cb(4, 0, F_NN);   5:  return cb(4, 4, F_AND);
      6:  return cb(1, 1, F_AND);  7:  return cb(2, 2, F_AND);
      8:  return cb(1, 0, F_AND);  9:  return cb(2, 0, F_AND);
      10: return cb(3, 0, F_AND);  11: return cb(7, 0, F_AND);
      12: return cb(5, 1, F_XOR);  13: return cb(6, 0, F_OR);
      14: return cb(0, 1, F_OR);   15: return cb(7, 7, F_AND);
      16: return cb(4, 4, F_AND);  17: return cb(6, 1, F_XOR);
      18: return cb(3, 2, F_OR);   19: return cb(7, 7, F_AND);
      20: return cb(0, 0, F_AND);  21: return cb(4, 4, F_AND);
      22: return cb(1, 1, F_AND);  23: return cb(3, 2, F_XOR);
      default: return cb(cle % 4, cle % 4, F_AND);   // columns 6, 7: relays
    endcase
  endfunction

  // Expected z for input x and supply mode
  function automatic logic [3:0] mult240_32_expect(input logic [3:0] x, input logic vdd_high);
    logic [11:0] p;
    p = vdd_high ? 12'(240 * int'(x)) : 12'(32 * int'(x));
    return p[7:4];
  endfunction

endpackage
