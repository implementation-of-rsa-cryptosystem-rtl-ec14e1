// tb_mont_mult -- self-checking test of the bit-serial Montgomery multiplier.
//
// SIZE = 16. For random odd moduli and operands below them, checks that the
// product p satisfies p < N and p * 2^16 == A * B (mod N), using wide integer
// arithmetic, and that the latency from start to finish is exactly
// 4*SIZE + 2 + (number of reduction subtractions); the subtraction count comes
// from a small integer model of the scan, and must not exceed SIZE. Also
// checks the four-phase handshake: finish stays high while start is held and
// clears once start drops.
module tb_mont_mult;
  import rsa_ref_pkg::*;
  localparam int unsigned SIZE = 16;

  logic            clk = 0, rst = 1, start = 0, finish;
  logic [SIZE+1:0] ins1, ins2, out;
  logic [SIZE-1:0] modulus;
  int checks = 0, failures = 0, cycles = 0;

  mont_mult #(.SIZE(SIZE)) dut (
    .clk(clk), .rst(rst), .start(start), .ins1(ins1), .ins2(ins2),
    .modulus(modulus), .finish(finish), .out(out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Number of "S >= N" subtractions the scan makes.
  function automatic int subs_model(longint unsigned a, longint unsigned b, longint unsigned n);
    longint unsigned s = 0;
    int cnt = 0;
    for (int i = 0; i < SIZE; i++) begin
      if (b[i]) s += a;
      if (s[0]) s += n;
      s >>= 1;
      while (s >= n) begin s -= n; cnt++; end
    end
    return cnt;
  endfunction

  task automatic run_one(longint unsigned a, longint unsigned b, longint unsigned n);
    int lat, subs;
    @(negedge clk);
    ins1 = (SIZE+2)'(a); ins2 = (SIZE+2)'(b); modulus = SIZE'(n);
    start = 1;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!finish);
    subs = subs_model(a, b, n);
    checks++;
    if (!mont_ok(big_t'(out), big_t'(a), big_t'(b), SIZE, big_t'(n))) begin
      failures++;
      $display("FAIL product a=%0d b=%0d n=%0d out=%0d", a, b, n, out);
    end
    checks++;
    if (lat != 4*SIZE + 2 + subs || subs > SIZE) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, 4*SIZE + 2 + subs);
    end
    // finish is held while start stays high
    repeat (3) @(negedge clk);
    checks++;
    if (!finish) begin failures++; $display("FAIL finish not held"); end
    start = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (finish) begin failures++; $display("FAIL finish not cleared"); end
  endtask

  initial begin
    ins1 = '0; ins2 = '0; modulus = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // appendix modulus and message of the 16-bit vector
    run_one(41641, 41641, 41989);
    run_one(41988, 41988, 41989);
    run_one(0, 41641, 41989);
    run_one(1, 1, 41989);
    run_one(65534, 65534, 65535);
    run_one(2, 2, 3);
    for (int i = 0; i < 300; i++) begin
      automatic longint unsigned n = longint'($urandom_range(1, 32767)) * 2 + 1;
      run_one(longint'($urandom_range(0, int'(n) - 1)), longint'($urandom_range(0, int'(n) - 1)), n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
