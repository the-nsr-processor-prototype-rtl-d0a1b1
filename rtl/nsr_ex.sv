// nsr_ex: Execute unit of the NSR.
//
// Takes one one-hot operation word from decode (plus, for MVIL, MVIH, MVPC,
// shifts and compares, the extra word that follows it), collects the
// operands the operation needs from the register file over a single 16-bit
// path (two in sequence, A then B, for the two-register operations; one for
// shifts; none for MVIL/MVIH/MVPC), computes, and hands the result to every
// destination the instruction names:
//   register file      unless the R0 (discard) or R1 (memory) bit is set;
//   store data queue   when the R1 bit is set;
//   address queue      for LDA (load) and STA (store), with the store flag;
//   Jmp-Queue          for SJMP;
//   CC-Queue           for SEQ/SGT/SGE/SNE (one bit).
// Shifts move by one bit. SGT and SGE compare signed numbers; that choice
// and the one-bit shift are this design's reading, the rest is as in the
// original instruction set.
//
// Timing: one cycle per accepted word (operation, extra, each operand), one
// cycle to compute, then all destinations are offered together; the next
// operation word is accepted once every destination has taken the result.
module nsr_ex
  import nsr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // operation words from decode
  input  logic  id_valid,
  output logic  id_ready,
  input  word_t id_data,
  // operands from the register file
  input  logic  op_valid,
  output logic  op_ready,
  input  word_t op_data,
  // result to the register file
  output logic  rf_valid,
  input  logic  rf_ready,
  output word_t rf_data,
  // address queue of the memory unit
  output logic  aq_valid,
  input  logic  aq_ready,
  output aq_t   aq_data,
  // store data queue of the memory unit
  output logic  sdq_valid,
  input  logic  sdq_ready,
  output word_t sdq_data,
  // Jmp-Queue
  output logic  jmp_valid,
  input  logic  jmp_ready,
  output word_t jmp_data,
  // CC-Queue
  output logic  cc_valid,
  input  logic  cc_ready,
  output logic  cc_bit
);

  typedef enum logic [2:0] {S_CTRL, S_EXTRA, S_OPA, S_OPB, S_EXEC, S_OUT} state_e;
  state_e state;
  word_t  ctrl, extra, a, b, res;
  logic   ccr;
  // pending destinations: rf, aq, sdq, jmp, cc
  logic [4:0] pend;

  // What the operation word asks for.
  logic two_ops, one_op, needs_extra;
  always_comb begin
    two_ops = ctrl[EXB_STA] | ctrl[EXB_LDA] | ctrl[EXB_SJMP] | ctrl[EXB_ADD] |
              ctrl[EXB_XNOR] | ctrl[EXB_XOR] | ctrl[EXB_OR] | ctrl[EXB_AND] |
              ctrl[EXB_SUB] | ctrl[EXB_SETCC];
    one_op      = ctrl[EXB_SHIFT];
    needs_extra = ctrl[EXB_MVPC] | ctrl[EXB_MVIL] | ctrl[EXB_MVIH] |
                  ctrl[EXB_SHIFT] | ctrl[EXB_SETCC];
  end

  // Arithmetic and logic.
  word_t alu;
  logic  cmp;
  always_comb begin
    alu = '0;
    if (ctrl[EXB_STA] | ctrl[EXB_LDA] | ctrl[EXB_SJMP] | ctrl[EXB_ADD]) alu = a + b;
    if (ctrl[EXB_SUB])  alu = a - b;
    if (ctrl[EXB_AND])  alu = a & b;
    if (ctrl[EXB_OR])   alu = a | b;
    if (ctrl[EXB_XOR])  alu = a ^ b;
    if (ctrl[EXB_XNOR]) alu = ~(a ^ b);
    if (ctrl[EXB_MVPC]) alu = extra;
    if (ctrl[EXB_MVIL]) alu = {8'h00, extra[15:8]};
    if (ctrl[EXB_MVIH]) alu = {extra[15:8], 8'h00};
    if (ctrl[EXB_SHIFT]) begin
      unique case (extra[15:12])
        SH_LL:   alu = {a[14:0], 1'b0};
        SH_RL:   alu = {1'b0, a[15:1]};
        SH_RA:   alu = {a[15], a[15:1]};
        default: alu = a;
      endcase
    end
    unique case (cond_e'(extra[15:14]))
      CC_EQ:   cmp = (a == b);
      CC_GT:   cmp = ($signed(a) >  $signed(b));
      CC_GE:   cmp = ($signed(a) >= $signed(b));
      default: cmp = (a != b);
    endcase
  end

  assign id_ready = (state == S_CTRL) || ((state == S_EXTRA) && needs_extra);
  assign op_ready = (state == S_OPA) || (state == S_OPB);

  assign rf_valid  = (state == S_OUT) && pend[0];
  assign aq_valid  = (state == S_OUT) && pend[1];
  assign sdq_valid = (state == S_OUT) && pend[2];
  assign jmp_valid = (state == S_OUT) && pend[3];
  assign cc_valid  = (state == S_OUT) && pend[4];
  assign rf_data   = res;
  assign sdq_data  = res;
  assign jmp_data  = res;
  assign aq_data   = '{store: ctrl[EXB_STA], addr: res};
  assign cc_bit    = ccr;

  logic [4:0] taken;
  assign taken = {cc_ready, jmp_ready, sdq_ready, aq_ready, rf_ready} & pend;

  // After the extra word (or the operation word when none follows).
  function automatic state_e after_extra(input logic two, input logic one);
    return (two || one) ? S_OPA : S_EXEC;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CTRL;
      ctrl  <= '0;
      extra <= '0;
      a     <= '0;
      b     <= '0;
      res   <= '0;
      ccr   <= 1'b0;
      pend  <= '0;
    end else begin
      unique case (state)
        S_CTRL: if (id_valid) begin
          ctrl  <= id_data;
          state <= S_EXTRA;  // resolved below once ctrl is registered
        end
        S_EXTRA: begin
          if (!needs_extra) begin
            state <= after_extra(two_ops, one_op);
          end else if (id_valid) begin
            extra <= id_data;
            state <= after_extra(two_ops, one_op);
          end
        end
        S_OPA: if (op_valid) begin
          a     <= op_data;
          state <= two_ops ? S_OPB : S_EXEC;
        end
        S_OPB: if (op_valid) begin
          b     <= op_data;
          state <= S_EXEC;
        end
        S_EXEC: begin
          res     <= alu;
          ccr     <= cmp;
          pend[0] <= ~ctrl[EXB_R0] & ~ctrl[EXB_R1] & ~ctrl[EXB_SETCC];
          pend[1] <= ctrl[EXB_STA] | ctrl[EXB_LDA];
          pend[2] <= ctrl[EXB_R1];
          pend[3] <= ctrl[EXB_SJMP];
          pend[4] <= ctrl[EXB_SETCC];
          state   <= S_OUT;
        end
        S_OUT: begin
          pend <= pend & ~taken;
          if ((pend & ~taken) == '0) state <= S_CTRL;
        end
        default: state <= S_CTRL;
      endcase
    end
  end

endmodule
