// nsr_arbiter: round-robin token arbiter for the shared NSR memory.
//
// Fetch and the memory unit share one memory. A single token moves between
// the two sides; only the side holding it may run a memory cycle. When the
// token arrives at a side that is requesting, that side keeps it for exactly
// one memory cycle and then passes it on; a side that is not requesting
// passes it straight on. With both sides busy the cycles therefore alternate
// fetch, data, fetch, data; with the memory unit idle, fetch gets every
// cycle after a one-cycle token round trip. This is the behaviour of the
// original two-chip token ring; its gate-level form is not reproduced.
// Reset inserts the token on the fetch side (this design's choice), and a
// request already present when the token arrives is served on that pass.
//
// Timing: one clock cycle per token hop. While a side holds the token with
// its request up, its request is forwarded to the sram_* port, which holds
// it until a one-cycle sram_ack; that ack (and the read data) is returned to
// the same side, and the token moves to the other side on the next edge.
module nsr_arbiter
  import nsr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // fetch side (read only)
  input  logic  if_req,
  input  word_t if_addr,
  output logic  if_ack,
  output word_t if_rdata,
  // memory-unit side
  input  logic  mem_req,
  input  logic  mem_we,
  input  word_t mem_addr,
  input  word_t mem_wdata,
  output logic  mem_ack,
  output word_t mem_rdata,
  // shared memory
  output logic  sram_req,
  output logic  sram_we,
  output word_t sram_addr,
  output word_t sram_wdata,
  input  logic  sram_ack,
  input  word_t sram_rdata,
  // token position (debug light)
  output logic  token_at_mem
);

  // busy: the holder has claimed the token for one memory cycle.
  logic busy;

  logic holder_req;
  assign holder_req = token_at_mem ? mem_req : if_req;

  assign sram_req   = busy;
  assign sram_we    = token_at_mem && mem_we;
  assign sram_addr  = token_at_mem ? mem_addr : if_addr;
  assign sram_wdata = mem_wdata;

  assign if_ack    = busy && !token_at_mem && sram_ack;
  assign mem_ack   = busy &&  token_at_mem && sram_ack;
  assign if_rdata  = sram_rdata;
  assign mem_rdata = sram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      token_at_mem <= 1'b0;
      busy         <= 1'b0;
    end else if (busy) begin
      if (sram_ack) begin
        busy         <= 1'b0;
        token_at_mem <= !token_at_mem;
      end
    end else if (holder_req) begin
      busy <= 1'b1;
    end else begin
      token_at_mem <= !token_at_mem;
    end
  end

  // Never more than one side is acknowledged, and only its holder.
  assert property (@(posedge clk) disable iff (!rst_n) !(if_ack && mem_ack))
    else $error("nsr_arbiter: both sides acknowledged");

endmodule
