// Test of the REPOMO32 configuration latches: 32 write steps with random
// bytes, read back; a transaction with we low changes nothing; while we is
// high the addressed latch follows data (transparent), and it holds after
// we falls.
module tb_repomo_cfg_regs;
  import poly_pkg::*;
  logic       we;
  logic [4:0] addr;
  logic [7:0] data;
  cle_cfg_t   q [32];
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  repomo_cfg_regs dut (.we(we), .addr(addr), .data(data), .cfg_q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [7:0] d);
    addr = 5'(a); data = d; #2; we = 1; #2; we = 0; #2;
  endtask

  task automatic compare_all();
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (8'(q[i]) !== model[i]) begin
        failures++;
        $display("FAIL reg %0d = %02h expected %02h", i, 8'(q[i]), model[i]);
      end
    end
  endtask

  initial begin
    we = 0; addr = 0; data = 0;
    #2;
    for (int i = 0; i < 32; i++) begin model[i] = 8'($urandom); write(i, model[i]); end
    compare_all();
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < 40; k++) begin
        int a; logic [7:0] d;
        a = $urandom_range(0, 31); d = 8'($urandom);
        model[a] = d; write(a, d);
      end
      compare_all();
    end
    // we low: no change
    addr = 5'd7; data = ~model[7]; #4;
    compare_all();
    // transparency while we is high, hold after it falls
    addr = 5'd9; data = 8'h5A; we = 1; #1;
    checks++; if (8'(q[9]) !== 8'h5A) failures++;
    data = 8'hC3; #1;
    checks++; if (8'(q[9]) !== 8'hC3) failures++;
    we = 0; #1; data = 8'h00; #1;
    checks++; if (8'(q[9]) !== 8'hC3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
