// tb_rsa_memory -- self-checking test of the operand memory.
//
// SIZE = 16. Loads random M, E, N, then walks through every command and
// checks the registers it exposes: E[count] for every count and E[SIZE-1],
// the operand registers after the square and multiply set-ups, temp after
// seeding, taking M and taking a product, C after the output command, and
// that NOP and a LOAD-free cycle hold everything.
module tb_rsa_memory;
  import rsa_pkg::*;
  localparam int unsigned SIZE = 16;

  logic            clk = 0, rst = 1;
  mem_cmd_t        cmd = MEM_NOP;
  logic [SIZE-1:0] m_in, e_in, n_in, modulus, c_out;
  logic [3:0]      count;
  logic [SIZE+1:0] mult_out, ins1, ins2;
  logic            e_bit, e_msb;
  int checks = 0, failures = 0, cycles = 0;

  rsa_memory #(.SIZE(SIZE)) dut (
    .clk(clk), .rst(rst), .cmd(cmd), .m_in(m_in), .e_in(e_in), .n_in(n_in),
    .count(count), .mult_out(mult_out), .e_bit(e_bit), .e_msb(e_msb),
    .ins1(ins1), .ins2(ins2), .modulus(modulus), .c_out(c_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(mem_cmd_t c);
    @(negedge clk); cmd = c;
    @(negedge clk); cmd = MEM_NOP;
  endtask

  task automatic expect_eq(string what, logic [SIZE+1:0] got, logic [SIZE+1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [SIZE-1:0] m, e, n;
    logic [SIZE+1:0] p;
    count = '0; mult_out = '0; m_in = '0; e_in = '0; n_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 50; round++) begin
      m = SIZE'($urandom); e = SIZE'($urandom); n = SIZE'($urandom) | 1;
      if (round == 0) begin m = 16'd41641; e = 16'd181; n = 16'd41989; end
      m_in = m; e_in = e; n_in = n;
      issue(MEM_LOAD);
      m_in = ~m; e_in = ~e; n_in = ~n;   // inputs change, registers hold
      for (int i = 0; i < SIZE; i++) begin
        count = 4'(i); #1;
        expect_eq("e_bit", {17'b0, e_bit}, {17'b0, e[i]});
      end
      expect_eq("e_msb", {17'b0, e_msb}, {17'b0, e[SIZE-1]});
      issue(MEM_SEED);
      issue(MEM_SETSQ);
      expect_eq("seed/ins1", ins1, e[SIZE-1] ? {2'b0, m} : '0);
      expect_eq("seed/ins2", ins2, e[SIZE-1] ? {2'b0, m} : '0);
      expect_eq("modulus", {2'b0, modulus}, {2'b0, n});
      issue(MEM_TAKEM);
      issue(MEM_SETMU);
      expect_eq("takem/ins1", ins1, {2'b0, m});
      expect_eq("setmu/ins2", ins2, {2'b0, m});
      p = (SIZE+2)'($urandom);
      mult_out = p;
      issue(MEM_RES);
      mult_out = ~p;
      issue(MEM_NOP);
      issue(MEM_SETSQ);
      expect_eq("res/ins1", ins1, p);
      expect_eq("res/ins2", ins2, p);
      issue(MEM_SETMU);
      expect_eq("res/setmu ins1", ins1, p);
      expect_eq("res/setmu ins2", ins2, {2'b0, m});
      issue(MEM_OUT);
      expect_eq("c_out", {2'b0, c_out}, {2'b0, p[SIZE-1:0]});
    end
    rst = 1; @(negedge clk); rst = 0;
    expect_eq("reset c_out", {2'b0, c_out}, '0);
    expect_eq("reset ins1", ins1, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
