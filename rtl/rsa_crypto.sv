// rsa_crypto -- RSA encryption engine for a passive RFID tag (top level).
//
// Computes the partial ciphertext
//   C' = M^E * 2^(-SIZE*(E-1)) mod N
// from a message M, public exponent E and odd modulus N, all SIZE bits, with
// one bit-serial Montgomery multiplier reused for every square and multiply.
// The tag never converts into or out of Montgomery form; the reader gets
// C = M^E mod N as C = C' * X mod N with X = 2^(SIZE*(E-1)) mod N, a constant
// per public key that it computes once.
//
// Structure: rsa_exp_ctrl (controller) steers rsa_memory (M, E, N, temp,
// operand registers, C) and mont_mult (arithmetic unit: mm_add, mm_reduce).
// Requirements on the inputs: N odd, M < N, E >= 1; M, E, N are sampled on
// the cycle start is seen high with the engine idle.
//
// Timing: stop rises when C is valid and stays high until the next start.
// For an exponent of L significant bits with W ones below the top one the run
// takes (L-1) squarings and W multiplies, each 4*SIZE+2 cycles plus one per
// reduction subtraction, plus a few controller cycles per exponent bit
// (see the README for the exact count). Synchronous active-high reset.
//
// The split into controller, memory and arithmetic unit, the port names and
// the operand widths follow the published block diagram; parallel loading of
// M, E, N and the reset style are this design's choices.
module rsa_crypto
  import rsa_pkg::*;
#(
  parameter int unsigned SIZE = 128
) (
  input  logic            clock,
  input  logic            reset,
  input  logic            start,
  input  logic [SIZE-1:0] m,      // message
  input  logic [SIZE-1:0] e,      // public exponent
  input  logic [SIZE-1:0] n,      // modulus
  output logic            stop,
  output logic [SIZE-1:0] c       // partial ciphertext C'
);
  mem_cmd_t                cmd;
  logic [$clog2(SIZE)-1:0] count;
  logic                    upsun, finish, e_bit, e_msb;
  logic [SIZE+1:0]         ins1, ins2, mult_out;
  logic [SIZE-1:0]         modulus;

  rsa_exp_ctrl #(.SIZE(SIZE)) u_ctrl (
    .clk(clock), .rst(reset), .go(start), .finish(finish),
    .e_bit(e_bit), .e_msb(e_msb),
    .cmd(cmd), .count(count), .upsun(upsun), .stop(stop)
  );

  rsa_memory #(.SIZE(SIZE)) u_mem (
    .clk(clock), .rst(reset), .cmd(cmd),
    .m_in(m), .e_in(e), .n_in(n), .count(count), .mult_out(mult_out),
    .e_bit(e_bit), .e_msb(e_msb), .ins1(ins1), .ins2(ins2),
    .modulus(modulus), .c_out(c)
  );

  mont_mult #(.SIZE(SIZE)) u_mult (
    .clk(clock), .rst(reset), .start(upsun), .ins1(ins1), .ins2(ins2),
    .modulus(modulus), .finish(finish), .out(mult_out)
  );
endmodule
