// Random test of one REPOMO32 CLE: random configuration bytes, inputs and
// supply level, compared with a reference that decodes the byte by hand.
module tb_repomo_cle;
  import poly_pkg::*;
  logic vdd_high, y;
  logic [7:0] cfg_byte;
  logic [3:0] in_near, in_far;
  int checks = 0, failures = 0;
  int func_seen [4];

  repomo_cle dut (.vdd_high(vdd_high), .cfg(cle_cfg_t'(cfg_byte)), .in_near(in_near),
                  .in_far(in_far), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_y(logic [7:0] c, logic [3:0] n, logic [3:0] f, logic v);
    logic [7:0] src;
    logic a, b;
    src = {f, n};
    a = src[c[7:5]];
    b = src[c[4:2]];
    case (c[1:0])
      2'd0: return a & b;
      2'd1: return a | b;
      2'd2: return a ^ b;
      default: return v ? ~(a & b) : ~(a | b);
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      cfg_byte = 8'($urandom);
      in_near  = 4'($urandom);
      in_far   = 4'($urandom);
      vdd_high = 1'($urandom);
      #1;
      checks++;
      func_seen[cfg_byte[1:0]]++;
      if (y !== ref_y(cfg_byte, in_near, in_far, vdd_high)) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%02h near=%h far=%h vdd=%0d y=%0d", cfg_byte, in_near, in_far, vdd_high, y);
      end
    end
    // directed: select far row 3 (index 7) into A and near row 0 into B, NAND/NOR
    cfg_byte = {3'd7, 3'd0, 2'd3};
    in_far = 4'b1000; in_near = 4'b0001;
    vdd_high = 1; #1; checks++; if (y !== 1'b0) failures++;   // NAND(1,1)
    vdd_high = 0; #1; checks++; if (y !== 1'b0) failures++;   // NOR(1,1)
    in_near = 4'b0000;
    vdd_high = 1; #1; checks++; if (y !== 1'b1) failures++;   // NAND(1,0)
    vdd_high = 0; #1; checks++; if (y !== 1'b0) failures++;   // NOR(1,0)
    for (int i = 0; i < 4; i++) begin checks++; if (func_seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
