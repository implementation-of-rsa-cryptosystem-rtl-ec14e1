// mm_add -- addition module of the bit-serial Montgomery multiplier.
//
// One adder serves both additions of a Montgomery step, which the multiplier
// performs in two consecutive cycles:
//   add_n = 0 : sum = acc + (sel ? addend : 0)          (acc + A*B[i])
//   add_n = 1 : sum = (acc + (sel ? addend : 0)) >> 1   (acc + N*acc[0], halve)
// In the second form the caller passes sel = acc[0] and addend = N, so the sum
// is always even and the shift is exact. Sharing one adder for both additions
// is this design's choice; the multiplier's state diagram only gives the two
// operations. Purely combinational.
//
// Width: acc, sum are SIZE+2 bits. With acc < N and A < N, acc + A < 2N and
// acc + A + N < 3N < 2^(SIZE+2), so nothing is lost.
module mm_add #(
  parameter int unsigned SIZE = 128
) (
  input  logic [SIZE+1:0] acc,     // partial sum
  input  logic [SIZE-1:0] addend,  // multiplicand A or modulus N
  input  logic            sel,     // add the addend (else add 0)
  input  logic            add_n,   // 1: halve the sum after adding
  output logic [SIZE+1:0] sum
);
  logic [SIZE+1:0] raw;

  always_comb begin
    raw = acc + (sel ? {2'b00, addend} : '0);
    sum = add_n ? {1'b0, raw[SIZE+1:1]} : raw;
  end
endmodule
