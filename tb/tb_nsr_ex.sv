// tb_nsr_ex: self-checking test of the execute unit.
// 3000 random operations of every class, with random operand values, random
// result routing (register file, R1 = store data queue, R0 = discard) and
// random back-pressure on every output. Expected results are computed here
// from the instruction set's definitions and compared, per destination and
// in order. Also checks the minimum time of a two-operand ADD: operation
// word, two operands, compute, result offered (five cycles).
module tb_nsr_ex;
  import nsr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic id_valid, id_ready, op_valid, op_ready;
  word_t id_data, op_data;
  logic rf_valid, rf_ready, aq_valid, aq_ready, sdq_valid, sdq_ready;
  logic jmp_valid, jmp_ready, cc_valid, cc_ready, cc_bit;
  word_t rf_data, sdq_data, jmp_data;
  aq_t aq_data;
  int checks = 0, failures = 0;

  nsr_ex dut (.*);
  always #5 clk = ~clk;

  word_t id_q[$], op_q[$];
  word_t exp_rf[$], exp_sdq[$], exp_jmp[$];
  logic [16:0] exp_aq[$];
  logic exp_cc[$];
  int n_class[16];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Build one random operation and what it must produce.
  task automatic gen_one();
    int cls = $urandom % 14;   // 14 classes: 15..2 in the operation word
    int bit_no = 15 - cls;
    word_t a = word_t'($urandom), b = word_t'($urandom), r;
    word_t ctrl = 16'h0001 << bit_no;
    int route = $urandom % 3;   // 0 register, 1 R1, 2 R0
    logic [3:0] sh;
    logic [1:0] cnd;
    logic [7:0] imm = 8'($urandom);
    if ($urandom % 4 == 0) b = a;  // make equal compares happen
    n_class[bit_no]++;
    case (bit_no)
      EXB_SETCC: begin
        cnd = 2'($urandom);
        id_q.push_back(ctrl | 16'h0001);
        id_q.push_back({cnd, 14'h0});
        op_q.push_back(a); op_q.push_back(b);
        case (cnd)
          2'b00: exp_cc.push_back(a == b);
          2'b01: exp_cc.push_back($signed(a) > $signed(b));
          2'b10: exp_cc.push_back($signed(a) >= $signed(b));
          default: exp_cc.push_back(a != b);
        endcase
        return;
      end
      EXB_SHIFT: begin
        case ($urandom % 3) 0: sh = 4'b0001; 1: sh = 4'b0010; default: sh = 4'b0100; endcase
        op_q.push_back(a);
        r = (sh == 4'b0001) ? a << 1 : (sh == 4'b0010) ? a >> 1 : word_t'($signed(a) >>> 1);
      end
      EXB_MVIL: r = {8'h00, imm};
      EXB_MVIH: r = {imm, 8'h00};
      EXB_MVPC: r = a;
      default: begin
        op_q.push_back(a); op_q.push_back(b);
        case (bit_no)
          EXB_SUB:  r = a - b;
          EXB_AND:  r = a & b;
          EXB_OR:   r = a | b;
          EXB_XOR:  r = a ^ b;
          EXB_XNOR: r = ~(a ^ b);
          default:  r = a + b;   // ADD, SJMP, LDA, STA
        endcase
      end
    endcase
    if (route == 1) ctrl[EXB_R1] = 1'b1;
    if (route == 2) ctrl[EXB_R0] = 1'b1;
    id_q.push_back(ctrl);
    if (bit_no == EXB_SHIFT) id_q.push_back({sh, 12'h0});
    if (bit_no == EXB_MVIL || bit_no == EXB_MVIH) id_q.push_back({imm, 8'h00});
    if (bit_no == EXB_MVPC) id_q.push_back(a);
    if (bit_no == EXB_STA) exp_aq.push_back({1'b1, r});
    if (bit_no == EXB_LDA) exp_aq.push_back({1'b0, r});
    if (bit_no == EXB_SJMP) exp_jmp.push_back(r);
    if (route == 0) exp_rf.push_back(r);
    if (route == 1) exp_sdq.push_back(r);
  endtask

  // sources
  assign id_valid = id_q.size() > 0;
  assign id_data  = id_valid ? id_q[0] : '0;
  assign op_valid = op_q.size() > 0;
  assign op_data  = op_valid ? op_q[0] : '0;
  logic id_took = 0, op_took = 0;
  always @(negedge clk) begin
    if (id_took) void'(id_q.pop_front());
    if (op_took) void'(op_q.pop_front());
    id_took = 0; op_took = 0;
    rf_ready  <= ($urandom % 4) != 0;
    aq_ready  <= ($urandom % 4) != 0;
    sdq_ready <= ($urandom % 4) != 0;
    jmp_ready <= ($urandom % 4) != 0;
    cc_ready  <= ($urandom % 4) != 0;
  end

  // sinks
  always @(posedge clk) if (rst_n) begin
    id_took = id_valid && id_ready;
    op_took = op_valid && op_ready;
    if (rf_valid && rf_ready) begin
      check(exp_rf.size() > 0 && rf_data == exp_rf[0], "register-file result");
      if (exp_rf.size() > 0) void'(exp_rf.pop_front());
    end
    if (sdq_valid && sdq_ready) begin
      check(exp_sdq.size() > 0 && sdq_data == exp_sdq[0], "store data result");
      if (exp_sdq.size() > 0) void'(exp_sdq.pop_front());
    end
    if (aq_valid && aq_ready) begin
      check(exp_aq.size() > 0 && aq_data == exp_aq[0], "address queue entry");
      if (exp_aq.size() > 0) void'(exp_aq.pop_front());
    end
    if (jmp_valid && jmp_ready) begin
      check(exp_jmp.size() > 0 && jmp_data == exp_jmp[0], "jump target");
      if (exp_jmp.size() > 0) void'(exp_jmp.pop_front());
    end
    if (cc_valid && cc_ready) begin
      check(exp_cc.size() > 0 && cc_bit == exp_cc[0], "condition bit");
      if (exp_cc.size() > 0) void'(exp_cc.pop_front());
    end
  end

  initial begin
    int t0;
    rf_ready = 1; aq_ready = 1; sdq_ready = 1; jmp_ready = 1; cc_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency of one ADD with everything ready
    id_q.push_back(16'h1000); op_q.push_back(16'd3); op_q.push_back(16'd4);
    exp_rf.push_back(16'd7);
    t0 = $time;
    wait (rf_valid);
    check(($time - t0) / 10 <= 5, $sformatf("ADD result after %0d cycles", ($time - t0) / 10));
    repeat (5) @(posedge clk);
    for (int i = 0; i < 3000; i++) gen_one();
    wait (id_q.size() == 0 && op_q.size() == 0);
    repeat (50) @(posedge clk);
    check(exp_rf.size() == 0 && exp_sdq.size() == 0 && exp_aq.size() == 0 &&
          exp_jmp.size() == 0 && exp_cc.size() == 0, "every expected result delivered");
    for (int k = 2; k < 16; k++) check(n_class[k] > 0, $sformatf("class bit %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
