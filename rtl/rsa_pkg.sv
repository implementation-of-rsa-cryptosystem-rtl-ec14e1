// rsa_pkg -- types shared by the RSA tag engine.
//
// The engine has two finite state machines: the exponentiation controller
// (states 0..12) and the bit-serial Montgomery multiplier (states 0..5). Their
// state encodings keep the state numbers of the two machines so that a
// waveform reads like the state diagrams. The controller steers the operand
// memory with one command per cycle (mem_cmd_t).
package rsa_pkg;

  // Exponentiation controller: 13 states, held in 4 bits.
  typedef enum logic [3:0] {
    EXP_S0_IDLE    = 4'd0,   // wait for go, capture M, E, N
    EXP_S1_SEED    = 4'd1,   // temp = M * E[SIZE-1], count = SIZE-2
    EXP_S2_SQ_SET  = 4'd2,   // multiplier operands = temp, temp
    EXP_S3_SQ_GO   = 4'd3,   // start multiplier (squaring)
    EXP_S4_SQ_WAIT = 4'd4,   // wait for finish
    EXP_S5_SQ_RES  = 4'd5,   // temp = product, drop start
    EXP_S6_TEST    = 4'd6,   // E[count] == 1 ?
    EXP_S7_MU_SET  = 4'd7,   // multiplier operands = temp, M
    EXP_S8_MU_GO   = 4'd8,   // start multiplier (multiply)
    EXP_S9_MU_WAIT = 4'd9,   // wait for finish
    EXP_S10_MU_RES = 4'd10,  // temp = product, drop start
    EXP_S11_COUNT  = 4'd11,  // count == 0 ? done : count - 1
    EXP_S12_OUT    = 4'd12   // C = temp
  } exp_state_t;

  // Montgomery multiplier: 6 states, held in 3 bits.
  typedef enum logic [2:0] {
    MM_S0_IDLE   = 3'd0,  // wait for start, load operands, clear the sum
    MM_S1_ADD_A  = 3'd1,  // sum += A * B[count1]
    MM_S2_ADD_N  = 3'd2,  // sum = (sum + N * sum[0]) >> 1
    MM_S3_REDUCE = 3'd3,  // while sum >= N: sum -= N
    MM_S4_LOOP   = 3'd4,  // size1 == 0 ? finish : size1 - 1
    MM_S5_DONE   = 3'd5   // out = sum, finish = 1
  } mm_state_t;

  // Commands from the controller to the operand memory.
  typedef enum logic [2:0] {
    MEM_NOP   = 3'd0,  // hold everything
    MEM_LOAD  = 3'd1,  // capture M, E, N from the inputs, clear temp
    MEM_SEED  = 3'd2,  // temp = E[SIZE-1] ? M : 0
    MEM_SETSQ = 3'd3,  // ins1 = temp, ins2 = temp, modulus = N
    MEM_SETMU = 3'd4,  // ins1 = temp, ins2 = M,    modulus = N
    MEM_RES   = 3'd5,  // temp = multiplier output
    MEM_TAKEM = 3'd6,  // temp = M (first 1 bit of an exponent with leading zeros)
    MEM_OUT   = 3'd7   // C = temp
  } mem_cmd_t;

endpackage
