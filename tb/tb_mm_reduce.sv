// tb_mm_reduce -- self-checking test of the modular reduction piece.
// Random partial sums against random moduli at SIZE = 16, including the
// equality and one-below/one-above cases; expected values from integer math.
module tb_mm_reduce;
  localparam int unsigned SIZE = 16;
  logic [SIZE+1:0] acc, diff;
  logic [SIZE-1:0] n;
  logic            ge;
  int checks = 0, failures = 0;

  mm_reduce #(.SIZE(SIZE)) dut (.acc(acc), .n(n), .ge(ge), .diff(diff));

  task automatic check_one(longint unsigned a, longint unsigned m);
    acc = (SIZE+2)'(a); n = SIZE'(m);
    #1;
    checks++;
    if (ge !== (a >= m) || (a >= m && diff !== (SIZE+2)'(a - m))) begin
      failures++;
      $display("FAIL acc=%0d n=%0d ge=%0b diff=%0d", a, m, ge, diff);
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
    check_one(41989, 41989);
    check_one(41988, 41989);
    check_one(41990, 41989);
    check_one(3*65535, 65535);
    check_one(0, 1);
    for (int i = 0; i < 2000; i++) begin
      automatic longint unsigned m = longint'($urandom_range(1, 65535));
      automatic longint unsigned a = longint'($urandom_range(0, 3*65535));
      if (i % 4 == 0) a = m + longint'($urandom_range(0, 2)) - 1;
      check_one(a, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
