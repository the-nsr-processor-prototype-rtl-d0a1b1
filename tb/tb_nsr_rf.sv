// tb_nsr_rf: self-checking test of the register file.
// Directed sequences check: the hard-wired R0/R14/R15, that a write to R14
// leaves it at 1, that R1 reads come from the load data queue in order, and
// that the scoreboard holds back a read of a register that is still waiting
// for its result (the operand must not appear before the result is given)
// and a second destination claim of the same register. Then 500 random
// usage words are run against a reference register file kept here.
module tb_nsr_rf;
  import nsr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic use_valid, use_ready, op_valid, op_ready, res_valid, res_ready, ldq_valid, ldq_ready;
  usage_t use_data;
  word_t op_data, res_data, ldq_data;
  logic [15:0] scoreboard;
  int checks = 0, failures = 0;

  nsr_rf #(.DEST_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;

  usage_t use_q[$];
  word_t  res_q[$], ldq_q[$], exp_op[$];
  logic   res_en = 1;
  int     op_cycle, res_cycle;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic usage_t U(input int d, input int a, input int va, input int b, input int vb);
    return '{dest: 4'(d), src_a: 4'(a), va: 1'(va), src_b: 4'(b), vb: 1'(vb)};
  endfunction

  assign use_valid = use_q.size() > 0;
  assign use_data  = use_valid ? use_q[0] : '0;
  assign res_valid = res_en && res_q.size() > 0;
  assign res_data  = (res_q.size() > 0) ? res_q[0] : '0;
  assign ldq_valid = ldq_q.size() > 0;
  assign ldq_data  = ldq_valid ? ldq_q[0] : '0;
  logic u_took = 0, r_took = 0, l_took = 0;
  always @(negedge clk) begin
    if (u_took) void'(use_q.pop_front());
    if (r_took) void'(res_q.pop_front());
    if (l_took) void'(ldq_q.pop_front());
    u_took = 0; r_took = 0; l_took = 0;
    op_ready <= ($urandom % 4) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    u_took = use_valid && use_ready;
    r_took = res_valid && res_ready;
    l_took = ldq_valid && ldq_ready;
    if (r_took) res_cycle = $time / 10;
    if (op_valid && op_ready) begin
      op_cycle = $time / 10;
      check(exp_op.size() > 0 && op_data == exp_op[0],
            $sformatf("operand %h expected %h", op_data, exp_op.size() > 0 ? exp_op[0] : 16'h0));
      if (exp_op.size() > 0) void'(exp_op.pop_front());
    end
  end

  task automatic drain();
    while (use_q.size() > 0 || exp_op.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    @(negedge clk);
  endtask

  // reference model of the registers for the random phase
  word_t ref_r [16];
  function automatic word_t ref_read(input logic [3:0] r);
    return r == 0 ? 16'h0 : r == 14 ? 16'h1 : r == 15 ? 16'hFFFF : ref_r[r];
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) ref_r[i] = 0;
    op_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // constants
    use_q.push_back(U(0, 0, 1, 14, 1)); exp_op.push_back(16'h0000); exp_op.push_back(16'h0001);
    use_q.push_back(U(0, 15, 1, 0, 0)); exp_op.push_back(16'hFFFF);
    drain();
    // scoreboard: r2 claimed, then read before its result arrives
    res_en = 0;
    use_q.push_back(U(2, 0, 0, 0, 0));
    use_q.push_back(U(0, 2, 1, 15, 1)); exp_op.push_back(16'hABCD); exp_op.push_back(16'hFFFF);
    res_q.push_back(16'hABCD);
    repeat (20) @(negedge clk);
    check(exp_op.size() == 2, "read of r2 held while its result is outstanding");
    check(scoreboard[2], "scoreboard bit of r2 set");
    res_en = 1;
    drain();
    check(op_cycle > res_cycle, "operand sent after the result was written");
    check(!scoreboard[2], "scoreboard bit of r2 cleared");
    // second claim of r3 waits for the first result
    res_en = 0;
    use_q.push_back(U(3, 0, 0, 0, 0));
    use_q.push_back(U(3, 0, 0, 0, 0));
    use_q.push_back(U(0, 3, 1, 0, 0)); exp_op.push_back(16'h0008);
    res_q.push_back(16'h0007); res_q.push_back(16'h0008);
    repeat (10) @(negedge clk);
    check(use_q.size() == 1 && exp_op.size() == 1, "second destination claim of r3 waits, so the read behind it waits");
    res_en = 1;
    drain();
    // R14 ignores writes
    use_q.push_back(U(14, 0, 0, 0, 0)); res_q.push_back(16'h5555);
    use_q.push_back(U(0, 14, 1, 0, 0)); exp_op.push_back(16'h0001);
    drain();
    // R1 reads come from the load data queue, not checked on the scoreboard
    use_q.push_back(U(0, 1, 1, 1, 1)); exp_op.push_back(16'h1111); exp_op.push_back(16'h2222);
    repeat (5) @(negedge clk);
    check(exp_op.size() == 2, "R1 read waits for loaded data");
    ldq_q.push_back(16'h1111); ldq_q.push_back(16'h2222);
    drain();
    check(ldq_q.size() == 0, "both loaded words taken");
    // random phase: results given in order of destination claims
    ref_r[2] = 16'hABCD; ref_r[3] = 16'h0008;
    for (int i = 0; i < 500; i++) begin
      logic [3:0] a = 4'($urandom % 16), b = 4'($urandom % 16), d = 4'($urandom % 16);
      logic va = 1'($urandom), vb = 1'($urandom);
      word_t v = word_t'($urandom);
      if (a == 1) a = 2;
      if (b == 1) b = 3;
      if (d == 1) d = 0;
      use_q.push_back(U(d, a, va, b, vb));
      if (va) exp_op.push_back(ref_read(a));
      if (vb) exp_op.push_back(ref_read(b));
      if (d != 0) begin res_q.push_back(v); ref_r[d] = v; end
    end
    drain();
    repeat (20) @(posedge clk);
    check(res_q.size() == 0, "all results written");
    check(scoreboard == 16'h0, "scoreboard clear at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
