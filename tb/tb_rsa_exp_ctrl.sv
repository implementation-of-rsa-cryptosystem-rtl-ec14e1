// tb_rsa_exp_ctrl -- self-checking test of the exponentiation controller.
//
// SIZE = 16. The testbench plays memory and multiplier: it holds E, answers
// e_bit = E[count], and answers every upsun with finish after a random delay
// (four-phase handshake). It records the operand commands the controller
// issues (S = square set-up, M = multiply set-up, T = take M) and compares
// them with the sequence worked out from E: left-to-right, one square per bit
// below the leading one and one multiply per 1 bit, with T standing for the
// leading one when E does not fill all bits. It also checks the number of
// multiplier starts, that stop rises only at the end, is held, and clears on
// the next go, and that LOAD/SEED/OUT each appear once per run.
module tb_rsa_exp_ctrl;
  import rsa_pkg::*;
  localparam int unsigned SIZE = 16;

  logic       clk = 0, rst = 1, go = 0, finish = 0;
  logic [SIZE-1:0] e_reg = '0;
  logic       e_bit, e_msb, upsun, stop;
  logic [3:0] count;
  mem_cmd_t   cmd;
  int checks = 0, failures = 0, cycles = 0;
  int delay = 3, wait_cnt = 0, starts = 0;
  int n_load = 0, n_seed = 0, n_out = 0;
  string ops = "";
  logic upsun_d = 0;

  rsa_exp_ctrl #(.SIZE(SIZE)) dut (
    .clk(clk), .rst(rst), .go(go), .finish(finish), .e_bit(e_bit), .e_msb(e_msb),
    .cmd(cmd), .count(count), .upsun(upsun), .stop(stop)
  );

  assign e_bit = e_reg[count];
  assign e_msb = e_reg[SIZE-1];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    upsun_d <= upsun;
    if (upsun && !upsun_d) starts++;
    // multiplier model
    if (!upsun) begin
      finish <= 0; wait_cnt <= 0;
    end else if (!finish) begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt >= delay) finish <= 1;
    end
    case (cmd)
      MEM_SETSQ: ops = {ops, "S"};
      MEM_SETMU: ops = {ops, "M"};
      MEM_TAKEM: ops = {ops, "T"};
      MEM_LOAD:  n_load++;
      MEM_SEED:  n_seed++;
      MEM_OUT:   n_out++;
      default: ;
    endcase
  end

  initial begin
    wait (cycles == 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string expected_ops(logic [SIZE-1:0] e);
    string s = "";
    bit primed = e[SIZE-1];
    for (int i = SIZE-2; i >= 0; i--) begin
      if (primed) begin
        s = {s, "S"};
        if (e[i]) s = {s, "M"};
      end else if (e[i]) begin
        s = {s, "T"};
        primed = 1;
      end
    end
    return s;
  endfunction

  task automatic run_one(logic [SIZE-1:0] e);
    string exp = expected_ops(e);
    int exp_starts = 0;
    foreach (exp[i]) if (exp[i] != "T") exp_starts++;
    ops = ""; starts = 0; n_load = 0; n_seed = 0; n_out = 0;
    delay = $urandom_range(0, 6);
    @(negedge clk);
    e_reg = e;
    go = 1;
    @(negedge clk);
    go = 0;
    checks++;
    if (stop) begin failures++; $display("FAIL stop not cleared by go"); end
    @(posedge clk iff stop);
    @(negedge clk);
    checks++;
    if (ops != exp) begin
      failures++;
      $display("FAIL e=%0h ops=%s expected=%s", e, ops, exp);
    end
    checks++;
    if (starts != exp_starts) begin
      failures++;
      $display("FAIL e=%0h multiplier starts %0d expected %0d", e, starts, exp_starts);
    end
    checks++;
    if (n_load != 1 || n_seed != 1 || n_out != 1) begin
      failures++;
      $display("FAIL load/seed/out counts %0d %0d %0d", n_load, n_seed, n_out);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (!stop || upsun) begin failures++; $display("FAIL stop not held / upsun high when idle"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_one(16'd181);       // appendix 16-bit exponent (leading zeros)
    run_one(16'hFFFF);
    run_one(16'h8000);
    run_one(16'h8001);
    run_one(16'd1);
    run_one(16'd3);
    for (int i = 0; i < 200; i++) run_one(SIZE'($urandom) | 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
