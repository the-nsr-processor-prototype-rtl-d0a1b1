// chan_fifo: first-in first-out queue between two units of the NSR.
//
// Every connection between NSR units is a queue; the original machine built
// them as self-timed micropipelines (transition latches steered by
// C-elements). Here the same queue is a clocked circular buffer of DEPTH
// words of WIDTH bits. Both sides use a valid/ready handshake: a word moves
// on a rising clock edge where valid and ready are both high. A word written
// into an empty queue is visible at the output on the next cycle. in_ready
// is simply "not full", so a queue of length 1 passes one word every second
// cycle; this keeps ready free of any combinational path from the reader.
// The queue lengths themselves are set by each instance from the original
// design's queue-length map; the clocked buffer is this design's choice.
module chan_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [WIDTH-1:0]           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [WIDTH-1:0]           out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Storage has no reset: a word is read only after it was written.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A queue never reports more words than it can hold.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH)
    else $error("chan_fifo: count exceeds DEPTH");

endmodule
