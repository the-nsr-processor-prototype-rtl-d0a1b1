// nsr_if: Instruction Fetch unit of the NSR.
//
// Holds the program counter, fetches one instruction at a time from the
// shared memory (through the round-robin arbiter) and decides control flow
// on its own:
//   JMP   takes an address from the Jmp-Queue and loads it into the PC;
//   BCND  takes one bit from the CC-Queue; if it is 1 the PC becomes the
//         BCND's address plus the sign-extended 12-bit offset, else PC+1;
//   MVPC  is passed to decode, followed by one more word: the MVPC's address
//         plus its sign-extended 8-bit offset; the PC then advances by one;
//   other instructions are passed on unchanged and the PC advances by one.
// JMP and BCND never leave this unit. If the queue a JMP or BCND needs is
// empty the unit simply waits, which is how the decoupled machine stalls.
//
// Timing: a fetch holds mem_req until a one-cycle mem_ack. The word is
// handled from the next cycle on; a JMP/BCND with its queue ready, or an
// instruction accepted by decode, takes one cycle, then the next fetch
// starts. The PC starts at 0x0000 after reset, as in the original design.
// The original fetch bus multiplexed address and opcode on 16 wires; here
// they are separate wires. Fetching one word at a time is this design's
// reading of the original, where the memory token is handed to the memory
// unit between every two fetches.
module nsr_if
  import nsr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // memory fetch port (to the arbiter)
  output logic  mem_req,
  output word_t mem_addr,
  input  logic  mem_ack,
  input  word_t mem_rdata,
  // head of the CC-Queue
  input  logic  cc_valid,
  output logic  cc_ready,
  input  logic  cc_bit,
  // head of the Jmp-Queue
  input  logic  jmp_valid,
  output logic  jmp_ready,
  input  word_t jmp_addr,
  // instruction stream to decode
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  // debug
  output word_t pc
);

  typedef enum logic [1:0] {S_FETCH, S_DISPATCH, S_PCVAL} state_e;
  state_e state;
  word_t  ir;

  opcode_e op;
  assign op = opcode_e'(ir[15:12]);

  word_t bcnd_target, mvpc_value;
  assign bcnd_target = pc + {{4{ir[11]}}, ir[11:0]};
  assign mvpc_value  = pc + {{8{ir[7]}}, ir[7:0]};

  assign mem_req  = (state == S_FETCH);
  assign mem_addr = pc;

  always_comb begin
    cc_ready  = 1'b0;
    jmp_ready = 1'b0;
    out_valid = 1'b0;
    out_data  = ir;
    if (state == S_DISPATCH) begin
      unique case (op)
        OP_JMP:  jmp_ready = 1'b1;
        OP_BCND: cc_ready  = 1'b1;
        default: out_valid = 1'b1;
      endcase
    end else if (state == S_PCVAL) begin
      out_valid = 1'b1;
      out_data  = mvpc_value;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FETCH;
      pc    <= '0;
      ir    <= '0;
    end else begin
      unique case (state)
        S_FETCH: if (mem_ack) begin
          ir    <= mem_rdata;
          state <= S_DISPATCH;
        end
        S_DISPATCH: unique case (op)
          OP_JMP: if (jmp_valid) begin
            pc    <= jmp_addr;
            state <= S_FETCH;
          end
          OP_BCND: if (cc_valid) begin
            pc    <= cc_bit ? bcnd_target : pc + 1'b1;
            state <= S_FETCH;
          end
          OP_MVPC: if (out_ready) state <= S_PCVAL;
          default: if (out_ready) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end
        endcase
        S_PCVAL: if (out_ready) begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
        end
        default: state <= S_FETCH;
      endcase
    end
  end

endmodule
