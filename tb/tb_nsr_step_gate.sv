// tb_nsr_step_gate: checks the debug gate: open it passes every transfer,
// held it passes none, and each step pulse lets exactly one transfer through;
// the pending light shows an offered word that is not taken.
module tb_nsr_step_gate;
  logic clk = 0, rst_n = 0;
  logic hold, step, in_valid, in_ready, out_valid, out_ready, led_pending;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;
  int xfers;

  nsr_step_gate #(.WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // count transfers at the output
  always @(posedge clk) if (rst_n && out_valid && out_ready) xfers++;

  initial begin
    hold = 0; step = 0; in_valid = 0; out_ready = 1; in_data = 8'h3C; xfers = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    in_valid = 1;
    #1 check(out_valid && in_ready && out_data == 8'h3C && !led_pending, "open gate passes");
    repeat (10) @(posedge clk);
    #1 check(xfers == 10, "open: one transfer per cycle");
    hold = 1; xfers = 0;
    #1 check(!out_valid && !in_ready && led_pending, "held: nothing passes, light on");
    repeat (10) @(posedge clk);
    #1 check(xfers == 0, "held: no transfer in 10 cycles");
    for (int s = 0; s < 3; s++) begin
      step = 1; @(posedge clk); #1 step = 0;
      repeat (5) @(posedge clk);
      #1 check(xfers == s + 1, "one transfer per step");
    end
    // a step while the receiver is not ready waits for it
    out_ready = 0; xfers = 0;
    step = 1; @(posedge clk); #1 step = 0;
    repeat (4) @(posedge clk);
    #1 check(xfers == 0 && led_pending, "step waits for a ready receiver");
    out_ready = 1;
    repeat (4) @(posedge clk);
    #1 check(xfers == 1, "stepped transfer completes when ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
