// tb_chan_fifo: self-checking test of the inter-unit queue.
// Random writes and reads against a reference queue; checks the order of
// words, the word count, that a full queue refuses writes, and that a word
// written into an empty queue is readable on the next cycle.
module tb_chan_fifo;
  localparam int W = 8, D = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int full_seen = 0;

  chan_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!out_valid && in_ready && count == 0, "empty after reset");
    // latency: one word in, visible next cycle
    in_valid = 1; in_data = 8'hA5;
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid && out_data == 8'hA5, "word visible one cycle after write");
    out_ready = 1;
    @(posedge clk); #1;
    out_ready = 0;
    check(!out_valid, "empty after read");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      in_valid  = ($urandom % 3) != 0;
      in_data   = W'($urandom);
      out_ready = ($urandom % 3) == 0;
      #1;
      check(count == model.size(), "count matches reference");
      check(in_ready == (model.size() < D), "in_ready is not-full");
      check(out_valid == (model.size() > 0), "out_valid is not-empty");
      if (out_valid) check(out_data == model[0], "head word matches reference");
      if (model.size() == D) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    check(full_seen > 0, "queue filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
