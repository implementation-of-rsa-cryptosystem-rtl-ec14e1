// mont_mult -- bit-serial Montgomery multiplier (the arithmetic unit).
//
// Computes out = ins1 * ins2 * 2^(-SIZE) mod modulus for an odd modulus and
// operands below it. The multiplier ins2 is scanned from bit 0 upwards; for
// each bit the partial sum S goes through three steps, each its own state:
//   state 1: S = S + A * B[count1]
//   state 2: S = (S + N * S[0]) / 2         (S + N*S[0] is even)
//   state 3: while S >= N: S = S - N        (one subtraction per cycle)
//   state 4: loop until size1, which starts at SIZE-1, reaches 0
// so SIZE bits take SIZE passes and S < N holds after every pass. State 5
// copies S to out and raises finish. This follows the multiplier state
// diagram; the additions use mm_add and the subtraction mm_reduce.
//
// Operands are copied into the A and B registers ("Memory: A", "Memory: B")
// when a multiplication starts. ins1/ins2 are SIZE+2 bits wide like the
// temporaries that feed them; only their low SIZE bits are used, since they are
// already reduced below N.
//
// Handshake (this design's choice): a four-phase start/finish pair. start is
// raised and held; finish rises after the product is in out and stays high
// until start falls; a new multiplication needs start low for at least one
// cycle. Latency from the cycle start is seen to finish high:
//   1 + SIZE*4 + (number of subtractions) + 1 cycles,
// with at most one subtraction per bit, since S < 1.5N after a halving.
// Synchronous active-high reset.
module mont_mult
  import rsa_pkg::*;
#(
  parameter int unsigned SIZE = 128
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,    // "upsun" from the controller
  input  logic [SIZE+1:0] ins1,     // multiplicand
  input  logic [SIZE+1:0] ins2,     // multiplier (scanned bit by bit)
  input  logic [SIZE-1:0] modulus,  // odd modulus N
  output logic            finish,   // product ready, held until start falls
  output logic [SIZE+1:0] out       // product, below N
);
  localparam int unsigned CW = (SIZE > 1) ? $clog2(SIZE) : 1;

  mm_state_t       state;
  logic [SIZE-1:0] a_q, b_q, n_q;
  logic [SIZE+1:0] s_q;
  logic [CW-1:0]   count1, size1;

  logic [SIZE+1:0] add_sum, red_diff;
  logic            red_ge;
  logic            add_phase_n;
  logic            add_sel;
  logic [SIZE-1:0] add_operand;

  assign add_phase_n = (state == MM_S2_ADD_N);
  assign add_sel     = add_phase_n ? s_q[0] : b_q[count1];
  assign add_operand = add_phase_n ? n_q : a_q;

  mm_add #(.SIZE(SIZE)) u_add (
    .acc(s_q), .addend(add_operand), .sel(add_sel), .add_n(add_phase_n), .sum(add_sum)
  );

  mm_reduce #(.SIZE(SIZE)) u_red (
    .acc(s_q), .n(n_q), .ge(red_ge), .diff(red_diff)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= MM_S0_IDLE;
      a_q    <= '0;
      b_q    <= '0;
      n_q    <= '0;
      s_q    <= '0;
      count1 <= '0;
      size1  <= '0;
      finish <= 1'b0;
      out    <= '0;
    end else begin
      unique case (state)
        MM_S0_IDLE: begin
          if (!start) begin
            finish <= 1'b0;
          end else if (!finish) begin
            a_q    <= ins1[SIZE-1:0];
            b_q    <= ins2[SIZE-1:0];
            n_q    <= modulus;
            s_q    <= '0;
            count1 <= '0;
            size1  <= CW'(SIZE - 1);
            state  <= MM_S1_ADD_A;
          end
        end
        MM_S1_ADD_A: begin
          s_q   <= add_sum;
          state <= MM_S2_ADD_N;
        end
        MM_S2_ADD_N: begin
          s_q   <= add_sum;
          state <= MM_S3_REDUCE;
        end
        MM_S3_REDUCE: begin
          if (red_ge) begin
            s_q <= red_diff;
          end else begin
            count1 <= count1 + 1'b1;
            state  <= MM_S4_LOOP;
          end
        end
        MM_S4_LOOP: begin
          if (size1 == '0) begin
            state <= MM_S5_DONE;
          end else begin
            size1 <= size1 - 1'b1;
            state <= MM_S1_ADD_A;
          end
        end
        MM_S5_DONE: begin
          out    <= s_q;
          finish <= 1'b1;
          state  <= MM_S0_IDLE;
        end
        default: state <= MM_S0_IDLE;
      endcase
    end
  end

  // The controller must hold start until the product is reported.
  property p_start_held;
    @(posedge clk) disable iff (rst) (state != MM_S0_IDLE) |-> start;
  endproperty
  a_start_held: assert property (p_start_held)
    else $error("mont_mult: start dropped during a multiplication");
endmodule
