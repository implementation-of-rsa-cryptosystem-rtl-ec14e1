// rsa_exp_ctrl -- exponentiation/control unit of the RSA tag engine.
//
// Left-to-right binary exponentiation: temp starts as M (for the exponent's
// top bit) and for every lower bit, from SIZE-2 down to 0, temp is squared
// and, if the bit is 1, multiplied by M. Every product is a Montgomery product
// that drops a factor 2^SIZE, and no operand is ever converted into Montgomery
// form, so the engine ends with
//   C' = M^E * 2^(-SIZE*(E-1)) mod N,
// which the reader turns into M^E mod N with one multiplication by
// 2^(SIZE*(E-1)) mod N.
//
// The machine follows the 13 states (0..12) of the exponentiation state
// diagram: 0 wait for go and load, 1 seed temp and count, 2-5 square (set
// operands, raise upsun, wait for finish, take the result and drop upsun),
// 6 test E[count], 7-10 multiply by M, 11 count down or finish, 12 output C.
//
// One addition of this design: the diagram seeds temp with M*E[SIZE-1], which
// is only right when the exponent fills all SIZE bits. Here a flag "primed"
// records whether temp already holds a power of M. While it is clear, states
// 2-5 are skipped (squaring nothing) and the first 1 bit of E loads temp with
// M instead of multiplying. For an exponent whose top bit is set this changes
// nothing. E = 0 is not supported (C' = 0).
//
// Interface: go is sampled in state 0; stop rises when C is written and stays
// high until the next go. upsun/finish is the four-phase handshake of
// mont_mult. Synchronous active-high reset.
module rsa_exp_ctrl
  import rsa_pkg::*;
#(
  parameter int unsigned SIZE = 128
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    go,       // start an encryption
  input  logic                    finish,   // from the multiplier
  input  logic                    e_bit,    // E[count]
  input  logic                    e_msb,    // E[SIZE-1]
  output mem_cmd_t                cmd,      // operand memory command
  output logic [$clog2(SIZE)-1:0] count,    // exponent bit index
  output logic                    upsun,    // multiplier start
  output logic                    stop      // encryption done
);
  exp_state_t state;
  logic       primed;

  // Memory command for the current state (acts on the next clock edge).
  always_comb begin
    cmd = MEM_NOP;
    unique case (state)
      EXP_S0_IDLE:    if (go) cmd = MEM_LOAD;
      EXP_S1_SEED:    cmd = MEM_SEED;
      EXP_S2_SQ_SET:  if (primed) cmd = MEM_SETSQ;
      EXP_S5_SQ_RES:  cmd = MEM_RES;
      EXP_S6_TEST:    if (e_bit && !primed) cmd = MEM_TAKEM;
      EXP_S7_MU_SET:  cmd = MEM_SETMU;
      EXP_S10_MU_RES: cmd = MEM_RES;
      EXP_S12_OUT:    cmd = MEM_OUT;
      default:        cmd = MEM_NOP;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= EXP_S0_IDLE;
      primed   <= 1'b0;
      count    <= '0;
      upsun    <= 1'b0;
      stop     <= 1'b0;
    end else begin
      unique case (state)
        EXP_S0_IDLE: begin
          upsun <= 1'b0;
          if (go) begin
            stop  <= 1'b0;
            state <= EXP_S1_SEED;
          end
        end
        EXP_S1_SEED: begin
          primed <= e_msb;
          count  <= $bits(count)'(SIZE - 2);
          state  <= EXP_S2_SQ_SET;
        end
        EXP_S2_SQ_SET: state <= primed ? EXP_S3_SQ_GO : EXP_S6_TEST;
        EXP_S3_SQ_GO: begin
          upsun <= 1'b1;
          state <= EXP_S4_SQ_WAIT;
        end
        EXP_S4_SQ_WAIT: if (finish) state <= EXP_S5_SQ_RES;
        EXP_S5_SQ_RES: begin
          upsun <= 1'b0;
          state <= EXP_S6_TEST;
        end
        EXP_S6_TEST: begin
          if (e_bit && primed) begin
            state <= EXP_S7_MU_SET;
          end else begin
            if (e_bit) primed <= 1'b1;
            state <= EXP_S11_COUNT;
          end
        end
        EXP_S7_MU_SET: state <= EXP_S8_MU_GO;
        EXP_S8_MU_GO: begin
          upsun <= 1'b1;
          state <= EXP_S9_MU_WAIT;
        end
        EXP_S9_MU_WAIT: if (finish) state <= EXP_S10_MU_RES;
        EXP_S10_MU_RES: begin
          upsun <= 1'b0;
          state <= EXP_S11_COUNT;
        end
        EXP_S11_COUNT: begin
          if (count == '0) begin
            state <= EXP_S12_OUT;
          end else begin
            count <= count - 1'b1;
            state <= EXP_S2_SQ_SET;
          end
        end
        EXP_S12_OUT: begin
          stop  <= 1'b1;
          state <= EXP_S0_IDLE;
        end
        default: state <= EXP_S0_IDLE;
      endcase
    end
  end

  // The multiplier is only started from the two "go" states.
  a_upsun_src: assert property (@(posedge clk) disable iff (rst)
      $rose(upsun) |-> ($past(state) == EXP_S3_SQ_GO || $past(state) == EXP_S8_MU_GO))
    else $error("rsa_exp_ctrl: upsun raised outside states 3 and 8");
endmodule
