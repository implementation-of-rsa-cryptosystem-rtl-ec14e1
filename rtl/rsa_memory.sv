// rsa_memory -- operand memory of the RSA tag engine.
//
// Holds the public key and message (M, E, N), the exponentiation temporary
// "temp", the transfer registers that feed the multiplier (ins1, ins2,
// modulus) and the output C. It does nothing on its own: every cycle the
// controller sends one command (rsa_pkg::mem_cmd_t) and the memory performs
// it on the next clock edge. It also returns E[count], the exponent bit the
// controller is scanning, and E[SIZE-1].
//
// Register sizes follow the memory budget of the design: M, E, N and C are
// SIZE bits; temp and the two operand registers are SIZE+2 bits, matching the
// multiplier's partial sum. M, E and N are loaded in parallel; the serial
// over-the-air buffering in front of them is outside this block.
// The registers and widths follow the published memory budget and block
// diagram; the command set is this design's encoding of the register
// transfers in the controller's state diagram. Synchronous active-high reset
// clears everything.
module rsa_memory
  import rsa_pkg::*;
#(
  parameter int unsigned SIZE = 128
) (
  input  logic            clk,
  input  logic            rst,
  input  mem_cmd_t        cmd,
  input  logic [SIZE-1:0] m_in,
  input  logic [SIZE-1:0] e_in,
  input  logic [SIZE-1:0] n_in,
  input  logic [$clog2(SIZE)-1:0] count,     // exponent bit index
  input  logic [SIZE+1:0] mult_out,          // multiplier product
  output logic            e_bit,             // E[count]
  output logic            e_msb,             // E[SIZE-1]
  output logic [SIZE+1:0] ins1,
  output logic [SIZE+1:0] ins2,
  output logic [SIZE-1:0] modulus,
  output logic [SIZE-1:0] c_out
);
  logic [SIZE-1:0] m_q, e_q, n_q;
  logic [SIZE+1:0] temp_q;

  assign e_bit = e_q[count];
  assign e_msb = e_q[SIZE-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      m_q     <= '0;
      e_q     <= '0;
      n_q     <= '0;
      temp_q  <= '0;
      ins1    <= '0;
      ins2    <= '0;
      modulus <= '0;
      c_out   <= '0;
    end else begin
      unique case (cmd)
        MEM_NOP: ;
        MEM_LOAD: begin
          m_q    <= m_in;
          e_q    <= e_in;
          n_q    <= n_in;
          temp_q <= '0;
        end
        MEM_SEED:  temp_q <= e_q[SIZE-1] ? {2'b00, m_q} : '0;
        MEM_SETSQ: begin
          ins1    <= temp_q;
          ins2    <= temp_q;
          modulus <= n_q;
        end
        MEM_SETMU: begin
          ins1    <= temp_q;
          ins2    <= {2'b00, m_q};
          modulus <= n_q;
        end
        MEM_RES:   temp_q <= mult_out;
        MEM_TAKEM: temp_q <= {2'b00, m_q};
        MEM_OUT:   c_out  <= temp_q[SIZE-1:0];
        default: ;
      endcase
    end
  end
endmodule
