// nsr_id: Instruction Decode unit of the NSR.
//
// For every instruction that fetch passes on, decode tells the register
// file which registers to read and write, and tells execute what to do:
//   * a 14-bit usage word to the register file: destination (13:10, zero
//     when no register is written), source A (9:6) with its valid bit (5),
//     source B (4:1) with its valid bit (0);
//   * a one-hot 16-bit operation word to execute, one bit per instruction
//     class, plus bit 1 "result to memory (R1)" and bit 0 "discard (R0)";
//     with neither set the result goes to the register file;
//   * for MVIL/MVIH, shifts and compares, one further word to execute holding
//     the immediate (15:8), shift code (15:12) or condition (15:14); for MVPC,
//     the PC value that fetch sends right after the MVPC, unchanged.
// The word layouts are the original design's; left-aligning the extra-word
// fields, and sending a single shift source as source B, are this design's
// choices. R0 and R1 destinations produce a zero destination field, since an
// R1 result goes to the store data queue without passing the register file.
//
// Timing: an instruction is accepted when the unit is idle; its usage and
// operation words are offered together and may be taken in any order; the
// extra word (if any) follows the operation word. The next instruction is
// accepted in the cycle after all words are taken.
module nsr_id
  import nsr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  word_t  in_data,
  output logic   rf_valid,
  input  logic   rf_ready,
  output usage_t rf_usage,
  output logic   ex_valid,
  input  logic   ex_ready,
  output word_t  ex_data
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_EXTRA, S_PCWORD} state_e;
  state_e state;
  usage_t usage_q;
  word_t  ctrl_q, extra_q;
  logic   rf_pend, ex_pend, has_extra, is_mvpc;

  // Combinational decode of one instruction.
  usage_t  usage_d;
  word_t   ctrl_d, extra_d;
  logic    extra_d_v, mvpc_d;
  opcode_e op;
  logic [3:0] rd, ra, rb;
  assign op = opcode_e'(in_data[15:12]);
  assign rd = in_data[11:8];
  assign ra = in_data[7:4];
  assign rb = in_data[3:0];

  always_comb begin
    usage_d   = '0;
    ctrl_d    = '0;
    extra_d   = '0;
    extra_d_v = 1'b0;
    mvpc_d    = 1'b0;
    unique case (op)
      OP_STA, OP_LDA, OP_SJMP, OP_ADD, OP_XNOR, OP_XOR, OP_OR, OP_AND, OP_SUB: begin
        usage_d.src_a = ra; usage_d.va = 1'b1;
        usage_d.src_b = rb; usage_d.vb = 1'b1;
        unique case (op)
          OP_STA:  ctrl_d[EXB_STA]  = 1'b1;
          OP_LDA:  ctrl_d[EXB_LDA]  = 1'b1;
          OP_SJMP: ctrl_d[EXB_SJMP] = 1'b1;
          OP_ADD:  ctrl_d[EXB_ADD]  = 1'b1;
          OP_XNOR: ctrl_d[EXB_XNOR] = 1'b1;
          OP_XOR:  ctrl_d[EXB_XOR]  = 1'b1;
          OP_OR:   ctrl_d[EXB_OR]   = 1'b1;
          OP_AND:  ctrl_d[EXB_AND]  = 1'b1;
          default: ctrl_d[EXB_SUB]  = 1'b1;
        endcase
      end
      OP_SHFT: begin
        usage_d.src_b = rb; usage_d.vb = 1'b1;
        ctrl_d[EXB_SHIFT] = 1'b1;
        extra_d   = {in_data[7:4], 12'h000};
        extra_d_v = 1'b1;
      end
      OP_SCC: begin
        usage_d.src_a = ra; usage_d.va = 1'b1;
        usage_d.src_b = rb; usage_d.vb = 1'b1;
        ctrl_d[EXB_SETCC] = 1'b1;
        extra_d   = {in_data[11:10], 14'h0000};
        extra_d_v = 1'b1;
      end
      OP_MVIL, OP_MVIH: begin
        ctrl_d[(op == OP_MVIL) ? EXB_MVIL : EXB_MVIH] = 1'b1;
        extra_d   = {in_data[7:0], 8'h00};
        extra_d_v = 1'b1;
      end
      OP_MVPC: begin
        ctrl_d[EXB_MVPC] = 1'b1;
        mvpc_d = 1'b1;
      end
      default: ;  // JMP and BCND never reach decode
    endcase
    // Result routing: compares have no destination register.
    if (op == OP_SCC) begin
      ctrl_d[EXB_R0] = 1'b1;
    end else if (rd == 4'd0) begin
      ctrl_d[EXB_R0] = 1'b1;
    end else if (rd == 4'd1) begin
      ctrl_d[EXB_R1] = 1'b1;
    end else begin
      usage_d.dest = rd;
    end
  end

  assign in_ready = (state == S_IDLE) || (state == S_PCWORD);
  assign rf_valid = (state == S_ISSUE) && rf_pend;
  assign rf_usage = usage_q;
  assign ex_valid = ((state == S_ISSUE) && ex_pend) || (state == S_EXTRA);
  assign ex_data  = (state == S_EXTRA) ? extra_q : ctrl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      usage_q   <= '0;
      ctrl_q    <= '0;
      extra_q   <= '0;
      rf_pend   <= 1'b0;
      ex_pend   <= 1'b0;
      has_extra <= 1'b0;
      is_mvpc   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          usage_q   <= usage_d;
          ctrl_q    <= ctrl_d;
          extra_q   <= extra_d;
          has_extra <= extra_d_v;
          is_mvpc   <= mvpc_d;
          rf_pend   <= 1'b1;
          ex_pend   <= 1'b1;
          state     <= S_ISSUE;
        end
        S_ISSUE: begin
          if (rf_ready) rf_pend <= 1'b0;
          if (ex_ready) ex_pend <= 1'b0;
          if ((!rf_pend || rf_ready) && (!ex_pend || ex_ready))
            state <= is_mvpc ? S_PCWORD : (has_extra ? S_EXTRA : S_IDLE);
        end
        S_PCWORD: if (in_valid) begin
          // The word after an MVPC is its PC value, passed on unchanged.
          extra_q <= in_data;
          state   <= S_EXTRA;
        end
        S_EXTRA: if (ex_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
