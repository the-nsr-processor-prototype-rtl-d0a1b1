// tb_nsr_kernels: the benchmark kernels of the original NSR performance
// measurements, run on the processor at its default queue lengths.
//
// Each kernel (a short instruction sequence) is repeated to make a loop body
// of about 1000 instructions, as in the original measurements; the loop runs
// ITER times (the original ran 65536 passes, which is too long to simulate),
// counted down in r13, and the program then stops on a JMP. Register and
// memory contents are compared with the reference model after each kernel,
// and the clock cycles per executed instruction are printed. A kernel taking
// more than 40 cycles per instruction counts as a failure (the slowest
// expected path, a load and its use, takes well under that).
module tb_nsr_kernels;
  import nsr_pkg::*;
  import nsr_tb_pkg::*;

  localparam int ITER = 2;

  logic clk = 0, rst_n = 0;
  logic sram_req, sram_we, sram_ack;
  word_t sram_addr, sram_wdata, sram_rdata;
  logic [4:0] dbg_hold = '0, dbg_step = '0;
  logic [6:0] dbg_led;
  logic [2:0] dbg_sel = 3'd0;
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

  logic [3:0] if_op;
  assign if_op = dut.u_if.ir[15:12];
  function automatic logic stopped();
    return dut.u_if.state == 2'd1 && if_op == 4'h0 && !dut.jq_v &&
           dut.u_q_if_id.count == 0 && dut.u_q_id_ex.count == 0 && dut.u_q_id_rf.count == 0 &&
           dut.u_q_rf_ex.count == 0 && dut.u_q_ex_rf.count == 0 &&
           dut.u_id.state == 2'd0 && dut.u_ex.state == 3'd0 && dut.u_rf.state == 2'd0 &&
           !dut.u_mem.aq_h_valid && !dut.u_mem.busy;
  endfunction

  w16 setup[$], prefix[$], body[$], prog[$];

  task automatic run_kernel(input string name);
    nsr_ref ref_m;
    int cycles, loop_at;
    // program: setup, then loop { prefix, body copies, r13--, branch }, jmp
    prog = {};
    foreach (setup[i]) prog.push_back(setup[i]);
    prog.push_back(i_mvil(13, ITER));
    loop_at = prog.size();
    foreach (prefix[i]) prog.push_back(prefix[i]);
    while (prog.size() - loop_at + body.size() + 3 <= 1000)
      foreach (body[i]) prog.push_back(body[i]);
    prog.push_back(i_add(13, 13, 15));
    prog.push_back(i_sne(13, 0));
    prog.push_back(i_bcnd(loop_at - prog.size()));
    prog.push_back(i_jmp());
    ref_m = new();
    for (int i = 0; i < 65536; i++) u_sram.mem[i] = 16'h0000;
    foreach (prog[i]) begin u_sram.mem[i] = prog[i]; ref_m.mem[i] = prog[i]; end
    ref_m.run(1000000);
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cycles = 0;
    while (!stopped() && cycles < 200000) begin @(posedge clk); cycles++; end
    repeat (10) @(posedge clk);
    check(stopped(), $sformatf("%s: reached its final JMP", name));
    for (int k = 2; k < 14; k++)
      check(dut.u_rf.regs[k] == ref_m.r[k], $sformatf("%s: r%0d", name, k));
    begin
      int bad = 0;
      for (int a = 0; a < 65536; a++) if (u_sram.mem[a] != ref_m.mem[a]) bad++;
      check(bad == 0, $sformatf("%s: %0d memory words differ", name, bad));
    end
    check(real'(cycles) / ref_m.steps < 40.0, $sformatf("%s: cycles per instruction", name));
    $display("%-10s loop body %0d, %0d instructions, %0d cycles, %0.2f cycles/instruction",
             name, prog.size() - loop_at - 1, ref_m.steps, cycles, real'(cycles) / ref_m.steps);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    setup = {}; prefix = {};
    body = '{i_add(9, 0, 0)};                                  run_kernel("ADD0");
    body = '{i_add(9, 14, 15)};                                run_kernel("ADD1");
    body = '{i_add(9, 0, 0), i_add(10, 0, 0), i_add(11, 0, 0), i_add(12, 0, 0)};
                                                               run_kernel("ADD2");
    body = '{i_add(0, 0, 0)};                                  run_kernel("ADD3");
    body = '{i_add(0, 0, 15)};                                 run_kernel("ADD4");
    body = '{i_add(9, 0, 15)};                                 run_kernel("ADD5");
    body = '{i_or(0, 0, 0)};                                   run_kernel("OR0");
    body = '{i_or(0, 0, 15)};                                  run_kernel("OR1");
    body = '{i_seq(0, 0), i_bcnd(1)};                          run_kernel("SEQ0");
    body = '{i_seq(0, 15), i_bcnd(1)};                         run_kernel("SEQ1");
    setup = '{i_mvil(8, 2)}; prefix = '{i_mvpc(9, 1)};
    body = '{i_sjmp(9, 9, 8), i_jmp()};                        run_kernel("JMP0");
    setup = {}; prefix = {};
    body = '{i_mvpc(9, 3), i_sjmp(0, 0, 9), i_jmp()};          run_kernel("MVPCJMP");
    body = '{i_lda(0, 0, 0), i_or(0, 0, 1)};                   run_kernel("LDA0");
    body = '{i_sta(1, 0, 15)};                                 run_kernel("STA1");
    body = '{i_sta(0, 0, 15), i_or(1, 0, 15)};                 run_kernel("STA2");
    body = '{i_lda(0, 0, 15), i_sta(1, 0, 1)};                 run_kernel("LDASTA2");
    body = '{i_lda(0, 0, 15), i_or(9, 0, 1), i_sta(1, 0, 9)};  run_kernel("LDASTA3");
    setup = '{i_add(9, 0, 15), i_add(8, 0, 14)};
    body = '{i_lda(10, 9, 8), i_lda(10, 9, 8), i_sta(11, 9, 8), i_add(1, 1, 1)};
                                                               run_kernel("MEM1");
    setup = {};
    body = '{i_lda(10, 14, 15), i_lda(10, 14, 15), i_sta(11, 14, 15), i_add(1, 1, 1)};
                                                               run_kernel("MEM1A");
    setup = '{i_xor(9, 0, 0), i_xor(8, 0, 0)};
    body = '{i_lda(10, 9, 8), i_lda(10, 9, 8), i_sta(11, 9, 8), i_add(1, 1, 1)};
                                                               run_kernel("MEM0");
    setup = {};
    body = '{i_lda(10, 0, 0), i_lda(10, 0, 0), i_sta(11, 0, 0), i_add(1, 1, 1)};
                                                               run_kernel("MEM0A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
