// rsa_vector_run -- runs one reference key through the RSA tag engine.
//
// Instantiates rsa_crypto at the given SIZE, starts it once on (M, E, N) and
// checks, when stop rises:
//   * C' < N and C' * 2^(SIZE(E-1)) == M^E (mod N)  (wide integer arithmetic);
//   * the reader's step C = C' * X mod N, X = 2^(SIZE(E-1)) mod N, gives the
//     reference ciphertext CT;
//   * the cycle count equals engine_cycles() plus the multiplier's reduction
//     subtractions, and, if REF_CYCLES is not 0, lies within 2% of it.
// Reports through done/checks/failures/cycles so that a testbench can run
// several sizes side by side.
module rsa_vector_run
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
#(
  parameter int unsigned    SIZE       = 16,
  parameter logic [SIZE-1:0] M         = 16'd41641,
  parameter logic [SIZE-1:0] E         = 16'd181,
  parameter logic [SIZE-1:0] N         = 16'd41989,
  parameter logic [SIZE-1:0] CT        = 16'd36999,
  parameter longint         REF_CYCLES = 0
) (
  input  logic   clock,
  input  logic   reset,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint cycles
);
  logic            start = 0, stop;
  logic [SIZE-1:0] c;
  longint          subs = 0;

  rsa_crypto #(.SIZE(SIZE)) dut (
    .clock(clock), .reset(reset), .start(start), .m(M), .e(E), .n(N), .stop(stop), .c(c)
  );

  always @(posedge clock)
    if (dut.u_mult.state == MM_S3_REDUCE && dut.u_mult.red_ge) subs++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d bits] %s", SIZE, what); end
  endtask

  initial begin
    big_t   x;
    longint exp_cycles;
    done = 0; checks = 0; failures = 0; cycles = 0;
    @(negedge clock iff !reset);
    start = 1;
    @(negedge clock);
    start = 0;
    cycles = 1;
    while (!stop) begin @(negedge clock); cycles++; end
    check(tag_ok(big_t'(c), big_t'(M), big_t'(E), SIZE, big_t'(N)), "C' * X != M^E mod N");
    x = reader_x(big_t'(E), SIZE, big_t'(N));
    check(mulmod(big_t'(c), x, big_t'(N)) == big_t'(CT), "reader ciphertext differs from reference");
    exp_cycles = engine_cycles(SIZE, big_t'(E)) + subs;
    check(cycles == exp_cycles, $sformatf("cycles %0d, expected %0d", cycles, exp_cycles));
    if (REF_CYCLES != 0)
      check(cycles * 50 <= REF_CYCLES * 51 && cycles * 50 >= REF_CYCLES * 49,
            $sformatf("cycles %0d not within 2%% of %0d", cycles, REF_CYCLES));
    $display("[%0d bits] cycles=%0d (reference %0d) subtractions=%0d time at 6.78 MHz = %0d us",
             SIZE, cycles, REF_CYCLES, subs, cycles * 1000 / 6780);
    done = 1;
  end
endmodule
