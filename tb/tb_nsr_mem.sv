// tb_nsr_mem: self-checking test of the memory interface.
// Checks that a store address waits for its data, that loads and stores are
// performed strictly in address-queue order (a load after a store to the
// same address returns the stored word), that loaded words come out of the
// load data queue in order, and that loads stop when that queue is full.
// Then 400 random loads and stores are checked against a reference memory.
module tb_nsr_mem;
  import nsr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic aq_valid, aq_ready, sdq_valid, sdq_ready, ldq_valid, ldq_ready;
  aq_t aq_data;
  word_t sdq_data, ldq_data;
  logic mem_req, mem_we, mem_ack;
  word_t mem_addr, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  nsr_mem #(.AQ_DEPTH(4), .SDQ_DEPTH(4), .LDQ_DEPTH(4)) dut (.*);
  nsr_sram_model #(.LATENCY(2)) u_sram (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .rdata(mem_rdata));
  always #5 clk = ~clk;

  aq_t   aq_q[$];
  word_t sd_q[$], exp_ld[$];
  logic  ld_en = 1;
  word_t ref_mem [word_t];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  assign aq_valid  = aq_q.size() > 0;
  assign aq_data   = aq_valid ? aq_q[0] : '0;
  assign sdq_valid = sd_q.size() > 0;
  assign sdq_data  = sdq_valid ? sd_q[0] : '0;
  logic a_took = 0, s_took = 0;
  always @(negedge clk) begin
    if (a_took) void'(aq_q.pop_front());
    if (s_took) void'(sd_q.pop_front());
    a_took = 0; s_took = 0;
    ldq_ready <= ld_en && (($urandom % 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    a_took = aq_valid && aq_ready;
    s_took = sdq_valid && sdq_ready;
    if (ldq_valid && ldq_ready) begin
      check(exp_ld.size() > 0 && ldq_data == exp_ld[0],
            $sformatf("loaded %h expected %h", ldq_data, exp_ld.size() > 0 ? exp_ld[0] : 16'h0));
      if (exp_ld.size() > 0) void'(exp_ld.pop_front());
    end
  end

  function automatic word_t ref_rd(input word_t a);
    return ref_mem.exists(a) ? ref_mem[a] : 16'h0000;
  endfunction

  initial begin
    int w0;
    ldq_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // store waits for its data
    aq_q.push_back('{store: 1'b1, addr: 16'h0005});
    aq_q.push_back('{store: 1'b0, addr: 16'h0005});
    repeat (10) @(negedge clk);
    check(u_sram.n_writes == 0 && u_sram.n_reads == 0, "store and the load behind it wait for store data");
    sd_q.push_back(16'h0055);
    exp_ld.push_back(16'h0055);
    ref_mem[16'h0005] = 16'h0055;
    repeat (20) @(negedge clk);
    check(u_sram.n_writes == 1 && u_sram.mem[5] == 16'h0055, "store performed");
    check(exp_ld.size() == 0, "load after store returns the stored word");
    // load data queue full stops loads
    ld_en = 0;
    for (int i = 0; i < 6; i++) begin
      aq_q.push_back('{store: 1'b0, addr: 16'(100 + i)});
      exp_ld.push_back(16'h0000);
    end
    w0 = u_sram.n_reads;
    repeat (40) @(negedge clk);
    check(u_sram.n_reads - w0 == 4, $sformatf("loads stop when the LDQ holds 4 (did %0d)", u_sram.n_reads - w0));
    ld_en = 1;
    repeat (40) @(negedge clk);
    check(exp_ld.size() == 0, "remaining loads finish once the LDQ drains");
    // random loads and stores
    for (int i = 0; i < 400; i++) begin
      word_t a = word_t'($urandom % 16);
      if ($urandom % 2) begin
        word_t d = word_t'($urandom);
        aq_q.push_back('{store: 1'b1, addr: a});
        sd_q.push_back(d);
        ref_mem[a] = d;
      end else begin
        aq_q.push_back('{store: 1'b0, addr: a});
        exp_ld.push_back(ref_rd(a));
      end
    end
    while (aq_q.size() > 0 || exp_ld.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int a = 0; a < 16; a++) check(u_sram.mem[a] == ref_rd(16'(a)), "final memory contents");
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
