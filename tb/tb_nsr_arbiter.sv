// tb_nsr_arbiter: self-checking test of the token arbiter.
// Two clients request at random; each keeps its request (and address)
// until acknowledged. Checks: every acknowledged read returns the word at
// that client's address; writes land in memory; when both sides keep
// requesting, memory cycles alternate between them (a side that was
// waiting when the other was served is served next); only one side is
// acknowledged at a time.
module tb_nsr_arbiter;
  import nsr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic if_req, if_ack, mem_req, mem_we, mem_ack, sram_req, sram_we, sram_ack, token_at_mem;
  word_t if_addr, if_rdata, mem_addr, mem_wdata, mem_rdata, sram_addr, sram_wdata, sram_rdata;
  int checks = 0, failures = 0;

  nsr_arbiter dut (.*);
  nsr_sram_model #(.LATENCY(2)) u_sram (
    .clk, .req(sram_req), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata),
    .ack(sram_ack), .rdata(sram_rdata));
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic if_en = 0, mem_en = 0;
  initial begin if_req = 0; mem_req = 0; mem_we = 0; if_addr = 0; mem_addr = 0; mem_wdata = 0; end
  int   last_side = -1, n_if = 0, n_mem = 0, alt_bad = 0, both_busy = 0;

  // Clients: raise a request when enabled and hold it until acknowledged.
  // A side that was requesting when the other side was served must be
  // served next.
  logic if_waiting_at_mem_ack = 0, mem_waiting_at_if_ack = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (if_ack) begin
        check(if_rdata == u_sram.mem[if_addr], "fetch read data");
        if (last_side == 0 && mem_waiting_at_if_ack) alt_bad++;
        mem_waiting_at_if_ack = mem_req;
        last_side = 0; n_if++;
      end
      if (mem_ack) begin
        if (!mem_we) check(mem_rdata == u_sram.mem[mem_addr], "data read data");
        if (last_side == 1 && if_waiting_at_mem_ack) alt_bad++;
        if_waiting_at_mem_ack = if_req;
        last_side = 1; n_mem++;
      end
      if (mem_req && if_req) both_busy++;
      check(!(if_ack && mem_ack), "one acknowledge at a time");
    end
    // a new request may follow an acknowledge back to back
    if ((if_ack || !if_req) && if_en && ($urandom % 4 != 0)) begin
      if_req <= 1; if_addr <= 16'h0100 + 16'($urandom % 64);
    end else if (if_ack) if_req <= 0;
    if ((mem_ack || !mem_req) && mem_en && ($urandom % 4 != 0)) begin
      mem_req <= 1; mem_we <= 1'($urandom); mem_addr <= 16'h0200 + 16'($urandom % 64);
      mem_wdata <= word_t'($urandom);
    end else if (mem_ack) mem_req <= 0;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      u_sram.mem[16'h0100 + i] = 16'h1000 + 16'(i);
      u_sram.mem[16'h0200 + i] = 16'h2000 + 16'(i);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fetch side alone, requesting continuously
    if_en = 1;
    repeat (200) @(posedge clk);
    if_en = 0;
    repeat (10) @(posedge clk);
    check(n_if > 0 && n_mem == 0, "fetch alone is served");
    // both sides
    mem_en = 1; if_en = 1;
    repeat (3000) @(posedge clk);
    if_en = 0; mem_en = 0;
    repeat (20) @(posedge clk);
    check(!if_req && !mem_req, "every request acknowledged");
    check(n_mem > 100, "memory side served");
    check(both_busy > 100, "contention happened");
    check(alt_bad == 0, $sformatf("strict alternation under contention (%0d violations)", alt_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write data check: compare each write with memory one cycle later
  always @(posedge clk) if (rst_n && sram_ack && sram_we) begin
    automatic word_t a = sram_addr, d = sram_wdata;
    @(posedge clk);
    check(u_sram.mem[a] == d, "write landed");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
