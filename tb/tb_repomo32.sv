// Test of the REPOMO32 module.
// 1. Random configurations (32 write steps each) and random inputs in both
//    supply ranges, compared with a reference model of the array that
//    evaluates the 32 CLEs column by column.
// 2. The 240x / 32x multiplier slice (repomo_mult_map_pkg): all 16 inputs
//    in NAND mode and NOR mode against the arithmetic products, and the
//    outputs follow a supply change with no reconfiguration.
module tb_repomo32;
  import repomo_mult_map_pkg::*;
  logic       vdd_high, we;
  logic [3:0] x, z;
  logic [4:0] addr;
  logic [7:0] data;
  logic [7:0] cfg_model [32];
  int checks = 0, failures = 0;

  repomo32 dut (.vdd_high(vdd_high), .x(x), .z(z), .we(we), .addr(addr), .data(data));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [7:0] d);
    addr = 5'(a); data = d; #1; we = 1; #1; we = 0; #1;
    cfg_model[a] = d;
  endtask

  function automatic logic [3:0] ref_z(input logic [3:0] xi, input logic v);
    logic [3:0] col [8];
    for (int c = 0; c < 8; c++) begin
      logic [7:0] src;
      logic [3:0] near, far;
      near = (c == 0) ? xi : col[c-1];
      far  = (c <= 1) ? xi : col[c-2];
      src  = {far, near};
      for (int r = 0; r < 4; r++) begin
        logic [7:0] cfg;
        logic a, b;
        cfg = cfg_model[4*c + r];
        a = src[cfg[7:5]];
        b = src[cfg[4:2]];
        case (cfg[1:0])
          2'd0: col[c][r] = a & b;
          2'd1: col[c][r] = a | b;
          2'd2: col[c][r] = a ^ b;
          default: col[c][r] = v ? ~(a & b) : ~(a | b);
        endcase
      end
    end
    return col[7];
  endfunction

  initial begin
    we = 0; addr = 0; data = 0; x = 0; vdd_high = 1;
    #1;
    for (int k = 0; k < 30; k++) begin
      for (int i = 0; i < 32; i++) write(i, 8'($urandom));
      for (int t = 0; t < 40; t++) begin
        x = 4'($urandom); vdd_high = 1'($urandom);
        #1;
        checks++;
        if (z !== ref_z(x, vdd_high)) begin
          failures++;
          if (failures < 10) $display("FAIL random cfg set %0d x=%h vdd=%0d z=%h exp=%h", k, x, vdd_high, z, ref_z(x, vdd_high));
        end
      end
    end
    // multiplier slice
    for (int i = 0; i < 32; i++) write(i, mult240_32_cfg(i));
    for (int m = 1; m >= 0; m--) begin
      vdd_high = 1'(m);
      for (int v = 0; v < 16; v++) begin
        x = 4'(v);
        #1;
        checks++;
        if (z !== mult240_32_expect(x, vdd_high)) begin
          failures++;
          $display("FAIL mult slice vdd=%0d x=%h z=%h exp=%h", vdd_high, x, z, mult240_32_expect(x, vdd_high));
        end
      end
    end
    // supply change alone changes the function: x = 5 gives 1011 then 1010
    x = 4'h5; vdd_high = 1; #1;
    checks++; if (z !== 4'b1011) failures++;
    vdd_high = 0; #1;
    checks++; if (z !== 4'b1010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
