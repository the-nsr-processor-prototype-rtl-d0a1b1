// nsr_top: the NSR processor, a 16-bit RISC built as decoupled units.
//
// Five units run concurrently and meet only at queues:
//   IF  fetch: PC, JMP and BCND handled and dropped here;
//   ID  decode: register-usage word to RF, operation word(s) to EX;
//   RF  register file: sends operands to EX under a per-register
//       scoreboard, writes EX results back;
//   EX  execute: computes and routes results to RF, to MEM (address or
//       store data), to the Jmp-Queue or to the CC-Queue;
//   MEM memory interface: Address, Store Data and Load Data queues.
// Branches and jumps are decoupled the same way: compares fill the CC-Queue
// and SJMP fills the Jmp-Queue ahead of the BCND or JMP that uses them; a
// consumer that finds its queue empty simply waits. Fetch and MEM share one
// memory port through the token arbiter. The queue lengths default to the
// original machine's; each parameter below names one queue.
//
// Debug features of the original machine are kept: a step gate on the
// incoming request of ID, EX, RF, MEM and on fetch (dbg_hold/dbg_step bit 0
// ID, 1 EX, 2 RF, 3 MEM, 4 fetch), lights for requests not yet taken and for
// the token position, and a four-digit hexadecimal bus monitor.
//
// Interface: sram_* is a word-addressed 64K x 16 memory cycle port; a request
// (address, write flag, write data) is held until a one-cycle sram_ack, which
// for a read carries sram_rdata. Execution starts at address 0 after reset.
// dbg_led: 0..4 pending requests at the five gates, 5 token at MEM,
// 6 token at fetch. dbg_sel picks the bus shown on dbg_seg: 0 IF->ID,
// 1 ID->EX, 2 ID->RF usage, 3 RF->EX operand, 4 EX->RF result, 5 memory
// address, 6 memory data, 7 PC.
//
// The original was self-timed with two-phase bundled-data channels; here
// every channel is a clocked valid/ready handshake, a choice of this design.
module nsr_top
  import nsr_pkg::*;
#(
  parameter int unsigned IF_ID_DEPTH = 2,
  parameter int unsigned ID_RF_DEPTH = 2,
  parameter int unsigned ID_EX_DEPTH = 2,
  parameter int unsigned RF_EX_DEPTH = 2,
  parameter int unsigned EX_RF_DEPTH = 1,
  parameter int unsigned CCQ_DEPTH   = 8,
  parameter int unsigned JMPQ_DEPTH  = 1,
  parameter int unsigned DEST_DEPTH  = 2,
  parameter int unsigned AQ_DEPTH    = 4,
  parameter int unsigned SDQ_DEPTH   = 4,
  parameter int unsigned LDQ_DEPTH   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // shared system memory
  output logic             sram_req,
  output logic             sram_we,
  output word_t            sram_addr,
  output word_t            sram_wdata,
  input  logic             sram_ack,
  input  word_t            sram_rdata,
  // debug switches, lights and bus monitor
  input  logic [4:0]       dbg_hold,
  input  logic [4:0]       dbg_step,
  output logic [6:0]       dbg_led,
  input  logic [2:0]       dbg_sel,
  output logic [3:0][6:0]  dbg_seg
);

  // ---------------- fetch and its memory path ----------------
  logic  if_req, if_ack, if_req_g, if_gate_ready;
  word_t if_addr, if_rdata, if_addr_g, pc;
  logic  cc_v, cc_r, cc_b;
  logic  jq_v, jq_r;
  word_t jq_d;
  logic  ifo_v, ifo_r;
  word_t ifo_d;

  nsr_if u_if (
    .clk, .rst_n,
    .mem_req (if_req), .mem_addr(if_addr), .mem_ack(if_ack), .mem_rdata(if_rdata),
    .cc_valid(cc_v),   .cc_ready(cc_r),    .cc_bit(cc_b),
    .jmp_valid(jq_v),  .jmp_ready(jq_r),   .jmp_addr(jq_d),
    .out_valid(ifo_v), .out_ready(ifo_r),  .out_data(ifo_d),
    .pc
  );

  nsr_step_gate #(.WIDTH(16)) u_gate_if (
    .clk, .rst_n, .hold(dbg_hold[4]), .step(dbg_step[4]),
    .in_valid (if_req),   .in_ready (if_gate_ready), .in_data (if_addr),
    .out_valid(if_req_g), .out_ready(if_ack),        .out_data(if_addr_g),
    .led_pending(dbg_led[4])
  );

  logic  m_req, m_we, m_ack;
  word_t m_addr, m_wdata, m_rdata;
  logic  token_at_mem;

  nsr_arbiter u_arb (
    .clk, .rst_n,
    .if_req (if_req_g), .if_addr(if_addr_g), .if_ack(if_ack), .if_rdata(if_rdata),
    .mem_req(m_req), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_ack(m_ack), .mem_rdata(m_rdata),
    .sram_req, .sram_we, .sram_addr, .sram_wdata, .sram_ack, .sram_rdata,
    .token_at_mem
  );

  // ---------------- IF -> ID ----------------
  logic  idq_v, idq_r, idi_v, idi_r;
  word_t idq_d, idi_d;

  chan_fifo #(.WIDTH(16), .DEPTH(IF_ID_DEPTH)) u_q_if_id (
    .clk, .rst_n,
    .in_valid (ifo_v), .in_ready (ifo_r), .in_data (ifo_d),
    .out_valid(idq_v), .out_ready(idq_r), .out_data(idq_d), .count()
  );

  nsr_step_gate #(.WIDTH(16)) u_gate_id (
    .clk, .rst_n, .hold(dbg_hold[0]), .step(dbg_step[0]),
    .in_valid (idq_v), .in_ready (idq_r), .in_data (idq_d),
    .out_valid(idi_v), .out_ready(idi_r), .out_data(idi_d),
    .led_pending(dbg_led[0])
  );

  // ---------------- ID ----------------
  logic   idrf_v, idrf_r, idex_v, idex_r;
  usage_t idrf_d;
  word_t  idex_d;

  nsr_id u_id (
    .clk, .rst_n,
    .in_valid(idi_v),  .in_ready(idi_r),  .in_data(idi_d),
    .rf_valid(idrf_v), .rf_ready(idrf_r), .rf_usage(idrf_d),
    .ex_valid(idex_v), .ex_ready(idex_r), .ex_data(idex_d)
  );

  // ---------------- ID -> RF, ID -> EX ----------------
  logic   rfu_qv, rfu_qr, rfu_v, rfu_r;
  usage_t rfu_qd, rfu_d;
  logic   exi_qv, exi_qr, exi_v, exi_r;
  word_t  exi_qd, exi_d;

  chan_fifo #(.WIDTH($bits(usage_t)), .DEPTH(ID_RF_DEPTH)) u_q_id_rf (
    .clk, .rst_n,
    .in_valid (idrf_v), .in_ready (idrf_r), .in_data (idrf_d),
    .out_valid(rfu_qv), .out_ready(rfu_qr), .out_data(rfu_qd), .count()
  );

  nsr_step_gate #(.WIDTH($bits(usage_t))) u_gate_rf (
    .clk, .rst_n, .hold(dbg_hold[2]), .step(dbg_step[2]),
    .in_valid (rfu_qv), .in_ready (rfu_qr), .in_data (rfu_qd),
    .out_valid(rfu_v),  .out_ready(rfu_r),  .out_data(rfu_d),
    .led_pending(dbg_led[2])
  );

  chan_fifo #(.WIDTH(16), .DEPTH(ID_EX_DEPTH)) u_q_id_ex (
    .clk, .rst_n,
    .in_valid (idex_v), .in_ready (idex_r), .in_data (idex_d),
    .out_valid(exi_qv), .out_ready(exi_qr), .out_data(exi_qd), .count()
  );

  nsr_step_gate #(.WIDTH(16)) u_gate_ex (
    .clk, .rst_n, .hold(dbg_hold[1]), .step(dbg_step[1]),
    .in_valid (exi_qv), .in_ready (exi_qr), .in_data (exi_qd),
    .out_valid(exi_v),  .out_ready(exi_r),  .out_data(exi_d),
    .led_pending(dbg_led[1])
  );

  // ---------------- RF ----------------
  logic  rfo_v, rfo_r, res_qv, res_qr, ldq_v, ldq_r;
  word_t rfo_d, res_qd, ldq_d;
  logic [15:0] scoreboard;

  nsr_rf #(.DEST_DEPTH(DEST_DEPTH)) u_rf (
    .clk, .rst_n,
    .use_valid(rfu_v),  .use_ready(rfu_r),  .use_data(rfu_d),
    .op_valid (rfo_v),  .op_ready (rfo_r),  .op_data (rfo_d),
    .res_valid(res_qv), .res_ready(res_qr), .res_data(res_qd),
    .ldq_valid(ldq_v),  .ldq_ready(ldq_r),  .ldq_data(ldq_d),
    .scoreboard
  );

  // ---------------- RF -> EX operands ----------------
  logic  opq_v, opq_r;
  word_t opq_d;

  chan_fifo #(.WIDTH(16), .DEPTH(RF_EX_DEPTH)) u_q_rf_ex (
    .clk, .rst_n,
    .in_valid (rfo_v), .in_ready (rfo_r), .in_data (rfo_d),
    .out_valid(opq_v), .out_ready(opq_r), .out_data(opq_d), .count()
  );

  // ---------------- EX ----------------
  logic  exr_v, exr_r, aq_v, aq_r, sdq_v, sdq_r, exj_v, exj_r, excc_v, excc_r, excc_b;
  word_t exr_d, sdq_d, exj_d;
  aq_t   aq_d;

  nsr_ex u_ex (
    .clk, .rst_n,
    .id_valid (exi_v),  .id_ready (exi_r),  .id_data (exi_d),
    .op_valid (opq_v),  .op_ready (opq_r),  .op_data (opq_d),
    .rf_valid (exr_v),  .rf_ready (exr_r),  .rf_data (exr_d),
    .aq_valid (aq_v),   .aq_ready (aq_r),   .aq_data (aq_d),
    .sdq_valid(sdq_v),  .sdq_ready(sdq_r),  .sdq_data(sdq_d),
    .jmp_valid(exj_v),  .jmp_ready(exj_r),  .jmp_data(exj_d),
    .cc_valid (excc_v), .cc_ready (excc_r), .cc_bit  (excc_b)
  );

  // ---------------- EX -> RF results, CC-Queue, Jmp-Queue ----------------
  chan_fifo #(.WIDTH(16), .DEPTH(EX_RF_DEPTH)) u_q_ex_rf (
    .clk, .rst_n,
    .in_valid (exr_v),  .in_ready (exr_r),  .in_data (exr_d),
    .out_valid(res_qv), .out_ready(res_qr), .out_data(res_qd), .count()
  );

  chan_fifo #(.WIDTH(1), .DEPTH(CCQ_DEPTH)) u_ccq (
    .clk, .rst_n,
    .in_valid (excc_v), .in_ready (excc_r), .in_data (excc_b),
    .out_valid(cc_v),   .out_ready(cc_r),   .out_data(cc_b), .count()
  );

  chan_fifo #(.WIDTH(16), .DEPTH(JMPQ_DEPTH)) u_jmpq (
    .clk, .rst_n,
    .in_valid (exj_v), .in_ready (exj_r), .in_data (exj_d),
    .out_valid(jq_v),  .out_ready(jq_r),  .out_data(jq_d), .count()
  );

  // ---------------- MEM ----------------
  logic aqg_v, aqg_r;
  aq_t  aqg_d;

  nsr_step_gate #(.WIDTH($bits(aq_t))) u_gate_mem (
    .clk, .rst_n, .hold(dbg_hold[3]), .step(dbg_step[3]),
    .in_valid (aq_v),  .in_ready (aq_r),  .in_data (aq_d),
    .out_valid(aqg_v), .out_ready(aqg_r), .out_data(aqg_d),
    .led_pending(dbg_led[3])
  );

  nsr_mem #(.AQ_DEPTH(AQ_DEPTH), .SDQ_DEPTH(SDQ_DEPTH), .LDQ_DEPTH(LDQ_DEPTH)) u_mem (
    .clk, .rst_n,
    .aq_valid (aqg_v), .aq_ready (aqg_r), .aq_data (aqg_d),
    .sdq_valid(sdq_v), .sdq_ready(sdq_r), .sdq_data(sdq_d),
    .ldq_valid(ldq_v), .ldq_ready(ldq_r), .ldq_data(ldq_d),
    .mem_req  (m_req), .mem_we   (m_we),  .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_ack  (m_ack), .mem_rdata(m_rdata)
  );

  // ---------------- lights and bus monitor ----------------
  assign dbg_led[5] = token_at_mem;
  assign dbg_led[6] = !token_at_mem;

  word_t mon_bus;
  always_comb begin
    unique case (dbg_sel)
      3'd0:    mon_bus = idq_d;
      3'd1:    mon_bus = exi_qd;
      3'd2:    mon_bus = 16'(rfu_qd);
      3'd3:    mon_bus = opq_d;
      3'd4:    mon_bus = res_qd;
      3'd5:    mon_bus = sram_addr;
      3'd6:    mon_bus = sram_we ? sram_wdata : sram_rdata;
      default: mon_bus = pc;
    endcase
  end

  nsr_busmon u_busmon (.bus(mon_bus), .seg(dbg_seg));

endmodule
