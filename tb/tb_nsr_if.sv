// tb_nsr_if: self-checking test of the fetch unit.
// A small memory answers each fetch one cycle after the request. The program
// exercises a passed instruction, MVPC with positive and negative offsets, a
// taken and a not-taken BCND, and two JMPs, the second of which waits for
// its address. The test checks the instruction stream sent to decode, the
// sequence of fetch addresses, that JMP/BCND are not passed on, that the
// unit stalls while the Jmp-Queue is empty, and the cycle count from a fetch
// acknowledge to passing the instruction on (one cycle).
module tb_nsr_if;
  import nsr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mem_req, mem_ack, cc_valid, cc_ready, cc_bit, jmp_valid, jmp_ready, out_valid, out_ready;
  word_t mem_addr, mem_rdata, jmp_addr, out_data, pc;
  int checks = 0, failures = 0;

  nsr_if dut (.*);
  always #5 clk = ~clk;

  word_t mem [word_t];
  word_t exp_out[$] = '{16'hC234, 16'h7503, 16'h0004, 16'h9600, 16'h72FF, 16'h0020, 16'h4123};
  word_t exp_fetch[$] = '{16'h0000, 16'h0001, 16'h0002, 16'h0007, 16'h0008,
                          16'h0020, 16'h0021, 16'h0022, 16'h0030, 16'h0031};
  logic  cc_q[$] = '{1'b1, 1'b0};
  word_t jmp_q[$] = '{16'h0020};
  int    jmp_stall = 0;
  int    ack_cycle = -1, cyc = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    mem[16'h0000] = 16'hC234;  // ADD r2,r3,r4
    mem[16'h0001] = 16'h7503;  // MVPC r5,+3
    mem[16'h0002] = 16'h1005;  // BCND +5   (taken -> 7)
    mem[16'h0007] = 16'h1FFD;  // BCND -3   (not taken -> 8)
    mem[16'h0008] = 16'h0000;  // JMP       (-> 0x20)
    mem[16'h0020] = 16'h9600;  // OR r6,r0,r0
    mem[16'h0021] = 16'h72FF;  // MVPC r2,-1
    mem[16'h0022] = 16'h0000;  // JMP       (waits, -> 0x30)
    mem[16'h0030] = 16'h4123;  // SUB r1,r2,r3
    mem[16'h0031] = 16'h0000;  // JMP       (queue stays empty)
  end

  // memory: acknowledge one cycle after a request
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    mem_ack <= mem_req && !mem_ack;
    if (mem_req && !mem_ack) begin
      mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 16'hFFFF;
      if (exp_fetch.size() == 0) check(1'b0, "unexpected extra fetch");
      else begin
        check(mem_addr == exp_fetch[0], $sformatf("fetch address %h", mem_addr));
        void'(exp_fetch.pop_front());
      end
    end
    if (mem_ack) ack_cycle <= cyc;
  end

  assign cc_valid  = cc_q.size() > 0;
  assign cc_bit    = cc_valid ? cc_q[0] : 1'b0;
  assign jmp_valid = jmp_q.size() > 0;
  assign jmp_addr  = jmp_valid ? jmp_q[0] : '0;
  assign out_ready = 1'b1;

  // Queue heads are removed at the falling edge after a transfer, so the
  // unit never sees them change at the edge it samples them on.
  logic cc_took = 0, jmp_took = 0;
  always @(negedge clk) begin
    if (cc_took) void'(cc_q.pop_front());
    if (jmp_took) void'(jmp_q.pop_front());
  end
  always @(posedge clk) if (rst_n) begin
    cc_took  = cc_valid && cc_ready;
    jmp_took = jmp_valid && jmp_ready;
    if (jmp_ready && !jmp_valid) jmp_stall++;
    if (out_valid && out_ready) begin
      if (exp_out.size() == 0) check(1'b0, "unexpected output word");
      else begin
        check(out_data == exp_out[0], $sformatf("output %h expected %h", out_data, exp_out[0]));
        if (out_data == 16'hC234) check(cyc == ack_cycle + 1, "instruction passed one cycle after fetch ack");
        void'(exp_out.pop_front());
      end
    end
  end

  initial begin
    mem_ack = 0; mem_rdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (jmp_stall == 20);
    #1 jmp_q.push_back(16'h0030);
    repeat (30) @(posedge clk);
    check(exp_out.size() == 0, "all expected words passed on");
    check(exp_fetch.size() == 0, "fetch sequence followed");
    check(cc_q.size() == 0, "both CC bits consumed");
    check(jmp_stall >= 20, "fetch stalled on an empty Jmp-Queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
