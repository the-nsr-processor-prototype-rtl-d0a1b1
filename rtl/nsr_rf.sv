// nsr_rf: Register File unit of the NSR.
//
// Sixteen 16-bit registers. R0, R14 and R15 always read 0, 1 and -1 and
// ignore writes; R1 is not a register but the head of the memory unit's Load
// Data Queue, so every read of R1 takes one loaded word. R2..R13 are
// ordinary registers, each with a scoreboard bit.
//
// Two processes run side by side, as in the original design:
//   source process: for each usage word from decode it sends source A, then
//     source B (each only if marked valid) to execute. An ordinary register
//     is sent only when its scoreboard bit is clear; R1 is taken from the
//     load data queue without a scoreboard check. Then, if the destination
//     field is non-zero, it waits for that register's scoreboard bit to be
//     clear, sets it, and puts the register number into the destination
//     queue.
//   result process: whenever the destination queue and execute's result
//     channel both hold a word, it writes the result to the register named
//     at the head of the queue and clears that register's scoreboard bit.
// A register named as a destination therefore cannot be read before its new
// value is written.
//
// Timing: each source takes one cycle once it is available and execute has
// room, the destination step one cycle; a write-back takes one cycle and a
// source waiting on it is sent in the following cycle. Registers reset to 0
// (this design's choice). The original split the file into two 8-bit slices
// on separate chips; here it is one 16-bit unit.
module nsr_rf
  import nsr_pkg::*;
#(
  parameter int unsigned DEST_DEPTH = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // usage words from decode
  input  logic   use_valid,
  output logic   use_ready,
  input  usage_t use_data,
  // operands to execute
  output logic   op_valid,
  input  logic   op_ready,
  output word_t  op_data,
  // results from execute
  input  logic   res_valid,
  output logic   res_ready,
  input  word_t  res_data,
  // head of the load data queue (R1 as a source)
  input  logic   ldq_valid,
  output logic   ldq_ready,
  input  word_t  ldq_data,
  // debug
  output logic [15:0] scoreboard
);

  word_t regs [16];

  // ---------------- source process ----------------
  typedef enum logic [1:0] {S_IDLE, S_SRCA, S_SRCB, S_DEST} state_e;
  state_e state;
  usage_t u;

  function automatic word_t read_reg(input logic [3:0] r, input word_t rf [16]);
    unique case (r)
      4'd0:    return '0;
      4'd14:   return R14_VALUE;
      4'd15:   return R15_VALUE;
      default: return rf[r];
    endcase
  endfunction

  logic [3:0] cur_src;
  logic       cur_is_r1, cur_avail;
  assign cur_src   = (state == S_SRCA) ? u.src_a : u.src_b;
  assign cur_is_r1 = (cur_src == 4'd1);
  assign cur_avail = cur_is_r1 ? ldq_valid : !scoreboard[cur_src];

  assign use_ready = (state == S_IDLE);
  assign op_valid  = ((state == S_SRCA) || (state == S_SRCB)) && cur_avail;
  assign op_data   = cur_is_r1 ? ldq_data : read_reg(cur_src, regs);
  assign ldq_ready = ((state == S_SRCA) || (state == S_SRCB)) && cur_is_r1 && op_ready;

  // destination queue
  logic       dq_in_valid, dq_in_ready, dq_out_valid, dq_out_ready;
  logic [3:0] dq_out;
  assign dq_in_valid = (state == S_DEST) && (u.dest != 4'd0) && !scoreboard[u.dest];

  chan_fifo #(.WIDTH(4), .DEPTH(DEST_DEPTH)) u_destq (
    .clk, .rst_n,
    .in_valid (dq_in_valid), .in_ready (dq_in_ready), .in_data (u.dest),
    .out_valid(dq_out_valid), .out_ready(dq_out_ready), .out_data(dq_out),
    .count    ()
  );

  // ---------------- result process ----------------
  assign res_ready    = dq_out_valid;
  assign dq_out_ready = res_valid;
  wire   wb = res_valid && dq_out_valid;

  wire set_sb = dq_in_valid && dq_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      u     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (use_valid) begin
          u     <= use_data;
          state <= use_data.va ? S_SRCA : (use_data.vb ? S_SRCB : S_DEST);
        end
        S_SRCA: if (op_valid && op_ready) state <= u.vb ? S_SRCB : S_DEST;
        S_SRCB: if (op_valid && op_ready) state <= S_DEST;
        S_DEST: if (u.dest == 4'd0 || set_sb) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scoreboard <= '0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (wb) begin
        scoreboard[dq_out] <= 1'b0;
        regs[dq_out]       <= res_data;
      end
      if (set_sb && u.dest != 4'd0) scoreboard[u.dest] <= 1'b1;
    end
  end

  // The destination step waits for a clear bit, so a set never meets a clear
  // of the same register.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(wb && set_sb && dq_out == u.dest))
    else $error("nsr_rf: scoreboard set and clear collide");

endmodule
