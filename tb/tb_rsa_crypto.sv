// tb_rsa_crypto -- end-to-end test of the RSA tag engine at SIZE = 16.
//
// Runs the engine on the 16-bit reference key (N = 41989 = 211*199, E = 181,
// M = 41641), on corner cases and on random keys, and checks for each run:
//   * C' < N and C' * 2^(16(E-1)) == M^E (mod N), by wide integer arithmetic;
//   * for the reference key, C' = 21340 and the reader's correction
//     C = C' * X mod N, X = 2^(16*180) mod N = 23198, gives 36999;
//   * the exact cycle count from start to stop: engine_cycles() plus the
//     reduction subtractions the multiplier made (counted on its state);
//   * that stop is held and that runs follow each other without reset.
// Each mechanism of the design is counted and must occur: squaring,
// multiplying by M, a reduction subtraction, a multiplier wait, the
// leading-zero skip (exponent shorter than SIZE), a full-width exponent
// seeded from E[SIZE-1], and back-to-back runs.
module tb_rsa_crypto;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
  localparam int unsigned SIZE = 16;

  logic            clock = 0, reset = 1, start = 0, stop;
  logic [SIZE-1:0] m, e, n, c;
  int checks = 0, failures = 0, cycles = 0;
  int n_sq = 0, n_mu = 0, n_sub = 0, n_wait = 0, n_skip = 0, n_full = 0, n_b2b = 0;
  int subs_run = 0;

  rsa_crypto #(.SIZE(SIZE)) dut (
    .clock(clock), .reset(reset), .start(start), .m(m), .e(e), .n(n), .stop(stop), .c(c)
  );

  always #5 clock = ~clock;

  always @(posedge clock) begin
    cycles++;
    if (dut.cmd == MEM_SETSQ) n_sq++;
    if (dut.cmd == MEM_SETMU) n_mu++;
    if (dut.cmd == MEM_TAKEM) n_skip++;
    if (dut.u_ctrl.state == EXP_S4_SQ_WAIT || dut.u_ctrl.state == EXP_S9_MU_WAIT) n_wait++;
    if (dut.u_mult.state == MM_S3_REDUCE && dut.u_mult.red_ge) begin
      n_sub++; subs_run++;
    end
  end

  initial begin
    wait (cycles == 3000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(logic [SIZE-1:0] mm, logic [SIZE-1:0] ee, logic [SIZE-1:0] nn);
    longint lat = 0, exp_lat;
    @(negedge clock);
    if (stop) n_b2b++;
    m = mm; e = ee; n = nn;
    if (ee[SIZE-1]) n_full++;
    subs_run = 0;
    start = 1;
    @(negedge clock);
    start = 0;
    lat = 1;
    while (!stop) begin @(negedge clock); lat++; end
    exp_lat = engine_cycles(SIZE, big_t'(ee)) + longint'(subs_run);
    check(tag_ok(big_t'(c), big_t'(mm), big_t'(ee), SIZE, big_t'(nn)),
          $sformatf("C' m=%0d e=%0d n=%0d c=%0d", mm, ee, nn, c));
    check(lat == exp_lat, $sformatf("cycles %0d expected %0d (e=%0d)", lat, exp_lat, ee));
    repeat (2) @(negedge clock);
    check(stop && c == dut.u_mem.c_out, "stop held");
  endtask

  initial begin
    big_t x;
    m = '0; e = '0; n = '0;
    repeat (3) @(negedge clock);
    reset = 0;

    // reference key
    run(16'd41641, 16'd181, 16'd41989);
    check(c == 16'd21340, $sformatf("reference C' = %0d, expected 21340", c));
    x = reader_x(big_t'(181), SIZE, big_t'(41989));
    check(x == big_t'(23198), "reader constant X");
    check(mulmod(big_t'(c), x, big_t'(41989)) == big_t'(36999), "reader ciphertext 36999");
    $display("reference 16-bit run done");

    // corner cases
    run(16'd0, 16'd181, 16'd41989);
    run(16'd1, 16'd181, 16'd41989);
    run(16'd41988, 16'd181, 16'd41989);
    run(16'd41641, 16'd1, 16'd41989);
    run(16'd41641, 16'd2, 16'd41989);
    run(16'd41641, 16'hFFFF, 16'd41989);
    run(16'd41641, 16'h8000, 16'd41989);
    run(16'd2, 16'd5, 16'd3);

    // random keys: odd modulus, message below it, short and full exponents
    for (int i = 0; i < 60; i++) begin
      automatic logic [SIZE-1:0] nn = SIZE'($urandom) | 16'h8001;
      automatic logic [SIZE-1:0] mm = SIZE'($urandom) % nn;
      automatic logic [SIZE-1:0] ee = (i % 2 != 0) ? (SIZE'($urandom) | 16'h8000)
                                               : (SIZE'($urandom_range(1, 255)));
      run(mm, ee, nn);
    end

    $display("mechanisms: squares=%0d multiplies=%0d subtractions=%0d wait_cycles=%0d leading_zero_skips=%0d full_width_runs=%0d back_to_back=%0d",
             n_sq, n_mu, n_sub, n_wait, n_skip, n_full, n_b2b);
    check(n_sq > 0, "squaring happened");
    check(n_mu > 0, "multiply happened");
    check(n_sub > 0, "reduction subtraction happened");
    check(n_wait > 0, "multiplier wait happened");
    check(n_skip > 0, "leading-zero skip happened");
    check(n_full > 0, "full-width exponent run happened");
    check(n_b2b > 0, "back-to-back run happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
