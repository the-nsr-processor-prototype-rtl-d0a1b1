// tb_nsr_id: self-checking test of the decode unit.
// Feeds one instruction of every class (and an MVPC with its PC word) with
// random back-pressure on both outputs, and compares the usage words and
// operation words with values worked out by hand from the encoding tables.
module tb_nsr_id;
  import nsr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, rf_valid, rf_ready, ex_valid, ex_ready;
  word_t in_data, ex_data;
  usage_t rf_usage;
  int checks = 0, failures = 0;

  nsr_id dut (.*);
  always #5 clk = ~clk;

  function automatic usage_t U(input int d, input int a, input int va, input int b, input int vb);
    return '{dest: 4'(d), src_a: 4'(a), va: 1'(va), src_b: 4'(b), vb: 1'(vb)};
  endfunction

  word_t  stim[$]   = '{16'hC234, 16'hF123, 16'h5C56, 16'h6748, 16'h335A, 16'h2012,
                        16'h7902, 16'h1234, 16'hD098, 16'hB203, 16'h4511};
  usage_t exp_rf[$] = '{U(2,3,1,4,1),   // ADD r2,r3,r4
                        U(0,2,1,3,1),   // STA r1,r2,r3
                        U(0,5,1,6,1),   // SNE r5,r6
                        U(7,0,0,8,1),   // SHRA r7,r8
                        U(3,0,0,0,0),   // MVIL r3,5A
                        U(0,0,0,0,0),   // MVIH r0,12
                        U(9,0,0,0,0),   // MVPC r9,+2
                        U(0,9,1,8,1),   // SJMP r0,r9,r8
                        U(2,0,1,3,1),   // XNOR r2,r0,r3
                        U(5,1,1,1,1)};  // SUB r5,r1,r1
  word_t  exp_ex[$] = '{16'h1000,
                        16'h8002,
                        16'h0021, 16'hC000,
                        16'h0040, 16'h4000,
                        16'h0008, 16'h5A00,
                        16'h0005, 16'h1200,
                        16'h0080, 16'h1234,
                        16'h2001,
                        16'h0800,
                        16'h0010};

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rf_valid && rf_ready) begin
      check(exp_rf.size() > 0 && rf_usage == exp_rf[0],
            $sformatf("usage %b", rf_usage));
      if (exp_rf.size() > 0) void'(exp_rf.pop_front());
    end
    if (ex_valid && ex_ready) begin
      check(exp_ex.size() > 0 && ex_data == exp_ex[0],
            $sformatf("ex word %h expected %h", ex_data, exp_ex.size() > 0 ? exp_ex[0] : 16'h0));
      if (exp_ex.size() > 0) void'(exp_ex.pop_front());
    end
  end

  always @(negedge clk) begin
    rf_ready <= ($urandom % 2) == 0;
    ex_ready <= ($urandom % 3) != 0;
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (stim[i]) begin
      in_valid = 1; in_data = stim[i];
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (40) @(posedge clk);
    check(exp_rf.size() == 0, "all usage words seen");
    check(exp_ex.size() == 0, "all operation words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
