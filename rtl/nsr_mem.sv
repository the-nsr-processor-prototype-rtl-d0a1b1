// nsr_mem: Memory Interface unit of the NSR.
//
// Holds the three memory queues and turns them into memory cycles:
//   Address Queue (AQ)     addresses from execute, each with a store flag;
//   Store Data Queue (SDQ) words execute produced for destination R1;
//   Load Data Queue (LDQ)  words read from memory, taken by the register
//                          file whenever an instruction reads R1.
// Only the head of the single AQ is ever served, so loads and stores reach
// memory in program order and a load can never overtake an earlier store.
// A load address at the head starts a read once the LDQ has room; the word
// read is put into the LDQ. A store address at the head waits for a word at
// the head of the SDQ, then writes it. All of this is as in the original
// design; the queue lengths default to its values.
//
// Timing: a cycle request (mem_req with address, write flag and data) is
// raised one cycle after the head is ready and held until mem_ack; the AQ
// (and SDQ) entry is removed and the loaded word enqueued on the mem_ack
// cycle. The SRAM handshake and its delay line are outside this unit; the
// original's split into two 8-bit chips is not reproduced.
module nsr_mem
  import nsr_pkg::*;
#(
  parameter int unsigned AQ_DEPTH  = 4,
  parameter int unsigned SDQ_DEPTH = 4,
  parameter int unsigned LDQ_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // addresses from execute
  input  logic  aq_valid,
  output logic  aq_ready,
  input  aq_t   aq_data,
  // store data from execute
  input  logic  sdq_valid,
  output logic  sdq_ready,
  input  word_t sdq_data,
  // loaded data to the register file
  output logic  ldq_valid,
  input  logic  ldq_ready,
  output word_t ldq_data,
  // memory cycle port (to the arbiter)
  output logic  mem_req,
  output logic  mem_we,
  output word_t mem_addr,
  output word_t mem_wdata,
  input  logic  mem_ack,
  input  word_t mem_rdata
);

  logic  aq_h_valid, aq_h_ready;
  aq_t   aq_h;
  logic  sd_h_valid, sd_h_ready;
  word_t sd_h;
  logic  ld_in_valid, ld_in_ready;

  chan_fifo #(.WIDTH($bits(aq_t)), .DEPTH(AQ_DEPTH)) u_aq (
    .clk, .rst_n,
    .in_valid (aq_valid),   .in_ready (aq_ready),   .in_data (aq_data),
    .out_valid(aq_h_valid), .out_ready(aq_h_ready), .out_data(aq_h),
    .count    ()
  );

  chan_fifo #(.WIDTH(16), .DEPTH(SDQ_DEPTH)) u_sdq (
    .clk, .rst_n,
    .in_valid (sdq_valid),  .in_ready (sdq_ready),  .in_data (sdq_data),
    .out_valid(sd_h_valid), .out_ready(sd_h_ready), .out_data(sd_h),
    .count    ()
  );

  chan_fifo #(.WIDTH(16), .DEPTH(LDQ_DEPTH)) u_ldq (
    .clk, .rst_n,
    .in_valid (ld_in_valid), .in_ready (ld_in_ready), .in_data (mem_rdata),
    .out_valid(ldq_valid),   .out_ready(ldq_ready),   .out_data(ldq_data),
    .count    ()
  );

  // Cycle control: idle until the head entry can be served, then busy until
  // the memory acknowledges.
  logic busy;
  logic can_start;
  assign can_start = aq_h_valid && (aq_h.store ? sd_h_valid : ld_in_ready);

  assign mem_req   = busy;
  assign mem_we    = aq_h.store;
  assign mem_addr  = aq_h.addr;
  assign mem_wdata = sd_h;

  wire done = busy && mem_ack;
  assign aq_h_ready  = done;
  assign sd_h_ready  = done && aq_h.store;
  assign ld_in_valid = done && !aq_h.store;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         busy <= 1'b0;
    else if (done)      busy <= 1'b0;
    else if (can_start) busy <= 1'b1;
  end

  // The request and its address stay put until the memory acknowledges.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_we))
    else $error("nsr_mem: request dropped or changed before acknowledge");

endmodule
