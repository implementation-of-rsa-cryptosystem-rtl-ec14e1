// mm_reduce -- modular reduction piece of the bit-serial Montgomery multiplier.
//
// Compares the partial sum with the modulus and offers the difference. The
// multiplier applies the difference one cycle at a time while ge is 1, so the
// reduction is the repeated subtraction of the multiplier's state 3. Purely
// combinational.
module mm_reduce #(
  parameter int unsigned SIZE = 128
) (
  input  logic [SIZE+1:0] acc,   // partial sum
  input  logic [SIZE-1:0] n,     // modulus
  output logic            ge,    // acc >= n
  output logic [SIZE+1:0] diff   // acc - n (valid when ge)
);
  always_comb begin
    ge   = acc >= {2'b00, n};
    diff = acc - {2'b00, n};
  end
endmodule
