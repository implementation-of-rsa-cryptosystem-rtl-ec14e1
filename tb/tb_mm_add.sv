// tb_mm_add -- self-checking test of the Montgomery addition module.
// Random and corner operands at SIZE = 16; the expected sum is computed with
// 64-bit integer arithmetic.
module tb_mm_add;
  localparam int unsigned SIZE = 16;
  logic [SIZE+1:0] acc, sum;
  logic [SIZE-1:0] addend;
  logic            sel, add_n;
  int checks = 0, failures = 0;

  mm_add #(.SIZE(SIZE)) dut (.acc(acc), .addend(addend), .sel(sel), .add_n(add_n), .sum(sum));

  task automatic check_one(longint unsigned a, longint unsigned d, bit s, bit h);
    longint unsigned exp;
    acc = (SIZE+2)'(a); addend = SIZE'(d); sel = s; add_n = h;
    #1;
    exp = a + (s ? d : 0);
    if (h) exp = exp / 2;
    checks++;
    if (sum !== (SIZE+2)'(exp)) begin
      failures++;
      $display("FAIL acc=%0d addend=%0d sel=%0b add_n=%0b sum=%0d exp=%0d", a, d, s, h, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0, 0, 0, 0);
    check_one(65535, 65535, 1, 0);
    check_one(2*65535, 65535, 1, 1);     // largest case: 3N-ish, then halved
    check_one(12345, 999, 0, 1);
    for (int i = 0; i < 2000; i++) begin
      automatic longint unsigned a = longint'($urandom_range(0, 2*65535));
      automatic longint unsigned d = longint'($urandom_range(0, 65535));
      check_one(a, d, 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
