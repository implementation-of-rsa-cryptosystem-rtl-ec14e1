// tb_rsa_full -- one complete encryption at the default size (128 bits).
//
// rsa_crypto with its default parameters on the 128-bit reference key
// (E of 64 bits). Checks the partial ciphertext against M^E mod N by wide
// integer arithmetic, the reader's conversion to the reference ciphertext,
// the exact cycle count, and that the count is within 2% of the reference
// count of 50352 cycles for this size. A second run puts the 16-bit
// reference key (N = 41989, E = 181, M = 41641) through the same 128-bit
// engine: the correction then uses k = 128, and must still give 36999.
module tb_rsa_full;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
  localparam int unsigned K = 128;
  localparam logic [K-1:0] M  = 128'hc954ba20c2f8b4a6b83c17e8a549337;
  localparam logic [K-1:0] E  = 128'hea70c4b359534fa1;
  localparam logic [K-1:0] N  = 128'h9b6bed7aabdc0496a105b0ee9e1f70eb;
  localparam logic [K-1:0] CT = 128'h120b6217d2cbff7d6bf114c1f8b940;
  localparam longint REF_CYCLES = 50352;

  logic         clock = 0, reset = 1, start = 0, stop;
  logic [K-1:0] m_in = M, e_in = E, n_in = N;
  logic [K-1:0] c;
  int           checks = 0, failures = 0;
  longint       ticks = 0, cycles = 0, subs = 0;

  rsa_crypto dut (
    .clock(clock), .reset(reset), .start(start), .m(m_in), .e(e_in), .n(n_in), .stop(stop), .c(c)
  );

  always #5 clock = ~clock;
  always @(posedge clock) begin
    ticks++;
    if (dut.u_mult.state == MM_S3_REDUCE && dut.u_mult.red_ge) subs++;
  end

  initial begin
    wait (ticks == 300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    big_t x;
    longint exp_cycles;
    repeat (3) @(negedge clock);
    reset = 0;
    @(negedge clock);
    start = 1;
    @(negedge clock);
    start = 0;
    cycles = 1;
    while (!stop) begin @(negedge clock); cycles++; end
    check(tag_ok(big_t'(c), big_t'(M), big_t'(E), K, big_t'(N)), "C' * X != M^E mod N");
    x = reader_x(big_t'(E), K, big_t'(N));
    check(mulmod(big_t'(c), x, big_t'(N)) == big_t'(CT), "reader ciphertext differs from reference");
    exp_cycles = engine_cycles(K, big_t'(E)) + subs;
    check(cycles == exp_cycles, $sformatf("cycles %0d, expected %0d", cycles, exp_cycles));
    check(cycles * 50 <= REF_CYCLES * 51 && cycles * 50 >= REF_CYCLES * 49,
          $sformatf("cycles %0d not within 2%% of %0d", cycles, REF_CYCLES));
    $display("C' = %0h, cycles = %0d, subtractions = %0d", c, cycles, subs);

    // small key on the full-size engine
    @(negedge clock);
    m_in = K'(41641); e_in = K'(181); n_in = K'(41989);
    start = 1;
    @(negedge clock);
    start = 0;
    while (!stop) @(negedge clock);
    check(tag_ok(big_t'(c), big_t'(41641), big_t'(181), K, big_t'(41989)), "16-bit key: C' * X != M^E mod N");
    check(mulmod(big_t'(c), reader_x(big_t'(181), K, big_t'(41989)), big_t'(41989)) == big_t'(36999),
          "16-bit key: reader ciphertext is not 36999");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
