// tb_nsr_top: end-to-end test of the NSR processor at its default queue
// lengths.
//
// Three programs are loaded into the memory model and run from reset until
// the machine stops on a JMP whose Jmp-Queue stays empty (the usual way an
// NSR program ends). After each run the registers and memory are compared
// with the reference instruction-set model.
//   1. A feature program: MVPC/SJMP/JMP, taken and not-taken branches on
//      every compare, all shifts and logic operations, stores and loads
//      through R1, a result sent to both the address and store data queues,
//      a read-after-write that must wait on the scoreboard, a branch right
//      after its compare, and a burst of compares that fills the CC-Queue.
//   2. The Fibonacci program of the original machine's manual (22 numbers
//      written from 0x0200); the first words are also checked by hand.
//   3. The feature program again with the debug gates in use: decode's
//      input is held, stepped ten times (exactly ten words may pass), then
//      released; the bus monitor is checked against the PC.
// Each mechanism is counted and a failure is counted for any that never
// happened: CC-Queue and Jmp-Queue stalls, CC-Queue full, taken and
// not-taken branches, jumps, MVPC, scoreboard stalls on a source and on a
// destination, R1 reads waiting for memory, stores waiting for data,
// memory cycles granted to the memory unit, and discarded (R0) results.
module tb_nsr_top;
  import nsr_pkg::*;
  import nsr_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sram_req, sram_we, sram_ack;
  word_t sram_addr, sram_wdata, sram_rdata;
  logic [4:0] dbg_hold = '0, dbg_step = '0;
  logic [6:0] dbg_led;
  logic [2:0] dbg_sel = 3'd7;
  logic [3:0][6:0] dbg_seg;
  int checks = 0, failures = 0;

  nsr_top dut (.*);
  nsr_sram_model #(.LATENCY(2)) u_sram (
    .clk, .req(sram_req), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata),
    .ack(sram_ack), .rdata(sram_rdata));
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_cc_stall, n_jmp_stall, n_ccq_full, n_taken, n_not_taken, n_jump, n_mvpc;
  int n_id_in;
  int n_sb_src, n_sb_dst, n_ldq_wait, n_sdq_wait, n_mem_grant, n_discard, n_fetch;
  logic [3:0] if_op;
  assign if_op = dut.u_if.ir[15:12];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_if.state == 2'd1 && if_op == 4'h1 && !dut.cc_v) n_cc_stall++;
    if (dut.u_if.state == 2'd1 && if_op == 4'h0 && !dut.jq_v) n_jmp_stall++;
    if (dut.u_ccq.count == 4'(dut.CCQ_DEPTH)) n_ccq_full++;
    if (dut.cc_v && dut.cc_r) begin if (dut.cc_b) n_taken++; else n_not_taken++; end
    if (dut.jq_v && dut.jq_r) n_jump++;
    if (dut.u_if.state == 2'd2 && dut.ifo_r) n_mvpc++;
    if ((dut.u_rf.state == 2'd1 || dut.u_rf.state == 2'd2) && !dut.u_rf.cur_is_r1 &&
        dut.u_rf.scoreboard[dut.u_rf.cur_src]) n_sb_src++;
    if (dut.u_rf.state == 2'd3 && dut.u_rf.u.dest != 0 && dut.u_rf.scoreboard[dut.u_rf.u.dest]) n_sb_dst++;
    if ((dut.u_rf.state == 2'd1 || dut.u_rf.state == 2'd2) && dut.u_rf.cur_is_r1 && !dut.ldq_v) n_ldq_wait++;
    if (dut.u_mem.aq_h_valid && dut.u_mem.aq_h.store && !dut.u_mem.sd_h_valid) n_sdq_wait++;
    if (dut.m_ack) n_mem_grant++;
    if (dut.if_ack) n_fetch++;
    if (dut.idi_v && dut.idi_r) n_id_in++;
    if (dut.u_ex.state == 3'd4 && dut.u_ex.ctrl[EXB_R0] && !dut.u_ex.ctrl[EXB_SETCC]) n_discard++;
  end

  // Machine has stopped: fetch waits on an empty Jmp-Queue and every other
  // unit and queue is idle.
  function automatic logic stopped();
    return dut.u_if.state == 2'd1 && if_op == 4'h0 && !dut.jq_v &&
           dut.u_q_if_id.count == 0 && dut.u_q_id_ex.count == 0 && dut.u_q_id_rf.count == 0 &&
           dut.u_q_rf_ex.count == 0 && dut.u_q_ex_rf.count == 0 &&
           dut.u_id.state == 2'd0 && dut.u_ex.state == 3'd0 && dut.u_rf.state == 2'd0 &&
           !dut.u_mem.aq_h_valid && !dut.u_mem.busy;
  endfunction

  nsr_ref ref_m;
  w16 prog[$];
  int cycles;

  task automatic load_and_run(input string name, input int max_cycles);
    ref_m = new();
    for (int i = 0; i < 65536; i++) u_sram.mem[i] = 16'h0000;
    foreach (prog[i]) begin
      u_sram.mem[i] = prog[i];
      ref_m.mem[i]  = prog[i];
    end
    ref_m.run(100000);
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cycles = 0;
    while (!stopped() && cycles < max_cycles) begin
      @(posedge clk); cycles++;
    end
    repeat (20) @(posedge clk);
    check(stopped(), $sformatf("%s: machine reached its final JMP", name));
    $display("%s: %0d instructions in the reference model (%s), %0d cycles", name,
             ref_m.steps, ref_m.stop_reason, cycles);
    for (int k = 2; k < 14; k++)
      check(dut.u_rf.regs[k] == ref_m.r[k],
            $sformatf("%s: r%0d = %h expected %h", name, k, dut.u_rf.regs[k], ref_m.r[k]));
    for (int a = 0; a < 65536; a++)
      if (u_sram.mem[a] != ref_m.mem[a]) begin
        check(1'b0, $sformatf("%s: mem[%h] = %h expected %h", name, a, u_sram.mem[a], ref_m.mem[a]));
        break;
      end
    checks++;
  endtask

  // ---------------- programs ----------------
  task automatic feature_program();
    prog = {};
    prog.push_back(i_mvil(2, 8'h10));      // 0  r2 = 16
    prog.push_back(i_mvil(3, 8'h03));      // 1  r3 = 3
    prog.push_back(i_mvpc(9, 5));          // 2  r9 = 7
    prog.push_back(i_sjmp(0, 9, 0));       // 3  Jmp-Queue <- 7
    prog.push_back(i_jmp());               // 4  -> 7
    prog.push_back(i_mvil(4, 8'hEE));      // 5  skipped
    prog.push_back(i_mvil(4, 8'hEE));      // 6  skipped
    prog.push_back(i_seq(2, 3));           // 7  0
    prog.push_back(i_bcnd(3));             // 8  not taken
    prog.push_back(i_sne(2, 3));           // 9  1
    prog.push_back(i_bcnd(2));             // 10 taken -> 12
    prog.push_back(i_mvil(4, 8'hEE));      // 11 skipped
    prog.push_back(i_sgt(2, 3));           // 12 1
    prog.push_back(i_sge(3, 2));           // 13 0
    prog.push_back(i_bcnd(2));             // 14 taken -> 16
    prog.push_back(i_mvil(4, 8'hEE));      // 15 skipped
    prog.push_back(i_bcnd(5));             // 16 not taken
    prog.push_back(i_shll(5, 2));          // 17 r5 = 32
    prog.push_back(i_shrl(6, 15));         // 18 r6 = 7FFF
    prog.push_back(i_shra(7, 15));         // 19 r7 = FFFF
    prog.push_back(i_sub(8, 3, 2));        // 20 r8 = -13
    prog.push_back(i_xnor(9, 0, 3));       // 21 r9 = ~3
    prog.push_back(i_and(10, 5, 15));      // 22 r10 = 32
    prog.push_back(i_mvih(11, 8'h80));     // 23 r11 = 8000
    prog.push_back(i_sta(0, 11, 2));       // 24 store to 8010
    prog.push_back(i_or(1, 2, 3));         // 25   data 13
    prog.push_back(i_lda(0, 11, 2));       // 26 load 8010
    prog.push_back(i_lda(0, 11, 14));      // 27 load 8001
    prog.push_back(i_add(12, 1, 1));       // 28 r12 = 13 + 0
    prog.push_back(i_add(2, 2, 14));       // 29 r2 = 17
    prog.push_back(i_add(3, 2, 2));        // 30 r3 = 34, waits for r2
    prog.push_back(i_sta(1, 11, 15));      // 31 mem[7FFF] = 7FFF
    prog.push_back(i_xor(13, 7, 6));       // 32 r13 = 8000
    prog.push_back(i_seq(0, 0));           // 33
    prog.push_back(i_bcnd(1));             // 34 right after its compare
    for (int i = 0; i < 12; i++) prog.push_back(i_sne(0, 14));   // 35..46 fill CC-Queue
    for (int i = 0; i < 12; i++) prog.push_back(i_bcnd(1));      // 47..58
    prog.push_back(i_mvpc(4, -2));         // 59 r4 = 57
    prog.push_back(i_add(4, 4, 4));        // 60 r4 = 114
    prog.push_back(i_sub(13, 2, 3));       // 61 claims r13
    prog.push_back(i_mvil(13, 6));         // 62 claims r13 again: waits
    prog.push_back(i_jmp());               // 63 stop
  endtask

  task automatic fibonacci_program();
    prog = {};
    prog.push_back(i_seq(0, 0));                 // start: seq r0,r0
    prog.push_back(i_bcnd(16'h0100 - 1));        //        bcnd main
    while (prog.size() < 16'h0100) prog.push_back(16'h0000);
    prog.push_back(i_mvih(2, 8'h02));            // main: mvih r2,hi8(data)
    prog.push_back(i_mvil(3, 8'h00));            //       mvil r3,lo8(data)
    prog.push_back(i_or(2, 2, 3));               //       r2 points to output
    prog.push_back(i_mvil(3, 1));
    prog.push_back(i_mvil(4, 1));
    prog.push_back(i_mvil(10, 22));              //       limit
    prog.push_back(i_xor(8, 0, 0));              //       count = 0
    prog.push_back(i_sta(0, 2, 0));
    prog.push_back(i_or(1, 3, 0));               //       write r3
    prog.push_back(i_add(2, 2, 14));
    prog.push_back(i_sta(0, 2, 0));
    prog.push_back(i_or(1, 4, 0));               //       write r4
    prog.push_back(i_add(2, 2, 14));
    prog.push_back(i_add(5, 4, 3));              // loop: r5 = r4 + r3   (0x10D)
    prog.push_back(i_sta(0, 2, 0));
    prog.push_back(i_or(1, 5, 0));               //       write r5
    prog.push_back(i_add(2, 2, 14));
    prog.push_back(i_or(3, 4, 0));
    prog.push_back(i_or(4, 5, 0));
    prog.push_back(i_add(8, 8, 14));             //       r8++
    prog.push_back(i_sge(10, 8));                //       sle r8,r10
    prog.push_back(i_bcnd(16'h010D - 16'h0115)); //       bcnd loop
    prog.push_back(i_jmp());                     //       die
  endtask

  initial begin
    int fib_a, fib_b, fib_c, ok;
    $display("feature program");
    feature_program();
    load_and_run("feature", 20000);
    check(dut.u_rf.regs[3] == 16'd34 && dut.u_rf.regs[12] == 16'h0013 && u_sram.mem[16'h7FFF] == 16'h7FFF,
          "feature: hand-checked values");

    fibonacci_program();
    load_and_run("fibonacci", 100000);
    fib_a = 1; fib_b = 1; ok = 1;
    for (int i = 0; i < 10; i++) begin
      if (u_sram.mem[16'h0200 + i] != 16'(fib_a)) ok = 0;
      fib_c = fib_a + fib_b; fib_a = fib_b; fib_b = fib_c;
    end
    check(ok == 1, "fibonacci: 1 1 2 3 5 8 13 21 34 55 at 0x0200");

    // debug gates: hold decode's input and step it
    feature_program();
    for (int i = 0; i < 65536; i++) u_sram.mem[i] = 16'h0000;
    foreach (prog[i]) u_sram.mem[i] = prog[i];
    rst_n = 0;
    dbg_hold[0] = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (50) @(posedge clk);
    check(dut.u_id.state == 2'd0 && dbg_led[0], "held: decode idle, pending light on");
    n_id_in = 0;
    for (int s = 0; s < 10; s++) begin
      @(negedge clk) dbg_step[0] = 1'b1;
      @(negedge clk) dbg_step[0] = 1'b0;
      // the next step is given only after this one has been used
      while (dut.u_gate_id.credit) @(posedge clk);
      repeat (4) @(posedge clk);
    end
    check(n_id_in == 10, $sformatf("ten steps let ten words into decode (%0d)", n_id_in));
    dbg_sel = 3'd7;
    #1 check(dbg_seg[3] == 7'b0111111 && dbg_seg[2] == 7'b0111111, "bus monitor: PC high digits show 0");
    dbg_hold[0] = 1'b0;
    ref_m = new();
    foreach (prog[i]) ref_m.mem[i] = prog[i];
    ref_m.run(100000);
    cycles = 0;
    while (!stopped() && cycles < 20000) begin @(posedge clk); cycles++; end
    repeat (20) @(posedge clk);
    check(stopped(), "stepped run reaches its final JMP after release");
    for (int k = 2; k < 14; k++)
      check(dut.u_rf.regs[k] == ref_m.r[k], $sformatf("stepped run: r%0d", k));

    $display("mechanisms: cc_stall=%0d jmp_stall=%0d ccq_full=%0d taken=%0d not_taken=%0d jumps=%0d mvpc=%0d",
             n_cc_stall, n_jmp_stall, n_ccq_full, n_taken, n_not_taken, n_jump, n_mvpc);
    $display("mechanisms: sb_src=%0d sb_dst=%0d ldq_wait=%0d sdq_wait=%0d mem_grants=%0d discards=%0d fetches=%0d",
             n_sb_src, n_sb_dst, n_ldq_wait, n_sdq_wait, n_mem_grant, n_discard, n_fetch);
    check(n_cc_stall > 0, "CC-Queue stall happened");
    check(n_jmp_stall > 0, "Jmp-Queue stall happened");
    check(n_ccq_full > 0, "CC-Queue filled");
    check(n_taken > 0 && n_not_taken > 0, "taken and not-taken branches");
    check(n_jump > 0, "jump taken");
    check(n_mvpc > 0, "MVPC value sent");
    check(n_sb_src > 0, "scoreboard held a source");
    check(n_sb_dst > 0, "scoreboard held a destination claim");
    check(n_ldq_wait > 0, "R1 read waited for memory");
    check(n_sdq_wait > 0, "store waited for its data");
    check(n_mem_grant > 0, "memory unit won the token");
    check(n_discard > 0, "result discarded to R0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
