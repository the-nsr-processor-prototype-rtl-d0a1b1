// nsr_sram_model: behavioural model of the 64K x 16 system memory used by
// the testbenches. A request (address, write flag, write data) held high is
// answered LATENCY cycles later with a one-cycle ack; a read returns the
// stored word with the ack. LATENCY stands for the external delay line that
// timed the real memory cycle. Counts reads and writes for the tests.
module nsr_sram_model #(
  parameter int unsigned LATENCY = 2
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic        ack,
  output logic [15:0] rdata
);
  logic [15:0] mem [65536];
  int unsigned wait_cnt = 0;
  int unsigned n_reads = 0, n_writes = 0;

  initial begin
    ack = 0; rdata = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 16'h0000;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (wait_cnt + 1 >= LATENCY) begin
        wait_cnt <= 0;
        ack <= 1'b1;
        if (we) begin
          mem[addr] <= wdata;
          n_writes++;
        end else begin
          rdata <= mem[addr];
          n_reads++;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end
endmodule
