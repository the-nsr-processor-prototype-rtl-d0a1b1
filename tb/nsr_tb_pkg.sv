// nsr_tb_pkg: assembler helpers and a reference instruction-set model for
// the NSR testbenches.
//
// The assembler functions build instruction words from the instruction-set
// table (opcode in 15:12, Rd 11:8, Ra 7:4, Rb 3:0; BCND offset 11:0; MVPC
// offset and MVIL/MVIH value in 7:0; compare condition in 11:10; shift code
// in 7:4). The reference model runs a program one instruction at a time with
// the architectural queues (CC, Jmp, address, store data, load data) as
// plain lists; memory requests are performed in address-queue order, a store
// once its data is there, so its final memory and registers are what the
// pipelined, decoupled hardware must end with. It stops where the hardware
// would deadlock: a JMP or BCND with its queue empty, or a read of R1 with no
// load outstanding.
package nsr_tb_pkg;

  typedef logic [15:0] w16;

  function automatic w16 rrr(input logic [3:0] op, input int rd, input int ra, input int rb);
    return {op, 4'(rd), 4'(ra), 4'(rb)};
  endfunction
  function automatic w16 i_add (input int rd, ra, rb); return rrr(4'hC, rd, ra, rb); endfunction
  function automatic w16 i_sub (input int rd, ra, rb); return rrr(4'h4, rd, ra, rb); endfunction
  function automatic w16 i_and (input int rd, ra, rb); return rrr(4'h8, rd, ra, rb); endfunction
  function automatic w16 i_or  (input int rd, ra, rb); return rrr(4'h9, rd, ra, rb); endfunction
  function automatic w16 i_xor (input int rd, ra, rb); return rrr(4'hA, rd, ra, rb); endfunction
  function automatic w16 i_xnor(input int rd, ra, rb); return rrr(4'hB, rd, ra, rb); endfunction
  function automatic w16 i_sjmp(input int rd, ra, rb); return rrr(4'hD, rd, ra, rb); endfunction
  function automatic w16 i_lda (input int rd, ra, rb); return rrr(4'hE, rd, ra, rb); endfunction
  function automatic w16 i_sta (input int rd, ra, rb); return rrr(4'hF, rd, ra, rb); endfunction
  function automatic w16 i_seq (input int ra, rb); return {4'h5, 2'b00, 2'b00, 4'(ra), 4'(rb)}; endfunction
  function automatic w16 i_sgt (input int ra, rb); return {4'h5, 2'b01, 2'b00, 4'(ra), 4'(rb)}; endfunction
  function automatic w16 i_sge (input int ra, rb); return {4'h5, 2'b10, 2'b00, 4'(ra), 4'(rb)}; endfunction
  function automatic w16 i_sne (input int ra, rb); return {4'h5, 2'b11, 2'b00, 4'(ra), 4'(rb)}; endfunction
  function automatic w16 i_shll(input int rd, rb); return {4'h6, 4'(rd), 4'b0001, 4'(rb)}; endfunction
  function automatic w16 i_shrl(input int rd, rb); return {4'h6, 4'(rd), 4'b0010, 4'(rb)}; endfunction
  function automatic w16 i_shra(input int rd, rb); return {4'h6, 4'(rd), 4'b0100, 4'(rb)}; endfunction
  function automatic w16 i_mvil(input int rd, input int v); return {4'h3, 4'(rd), 8'(v)}; endfunction
  function automatic w16 i_mvih(input int rd, input int v); return {4'h2, 4'(rd), 8'(v)}; endfunction
  function automatic w16 i_mvpc(input int rd, input int off); return {4'h7, 4'(rd), 8'(off)}; endfunction
  function automatic w16 i_bcnd(input int off); return {4'h1, 12'(off)}; endfunction
  function automatic w16 i_jmp(); return 16'h0000; endfunction

  class nsr_ref;
    w16 mem [65536];
    w16 r [16];
    logic cc_q[$];
    w16 jmp_q[$], sd_q[$], ld_q[$];
    logic [16:0] aq_q[$];
    int unsigned steps;
    string stop_reason;

    function new();
      for (int i = 0; i < 65536; i++) mem[i] = '0;
      for (int i = 0; i < 16; i++) r[i] = '0;
    endfunction

    // Serve the address queue in order as far as it can go.
    function void serve_mem();
      while (aq_q.size() > 0) begin
        if (aq_q[0][16]) begin
          if (sd_q.size() == 0) return;
          mem[aq_q[0][15:0]] = sd_q.pop_front();
        end else begin
          ld_q.push_back(mem[aq_q[0][15:0]]);
        end
        void'(aq_q.pop_front());
      end
    endfunction

    function logic rd_src(input logic [3:0] s, output w16 v);
      if (s == 1) begin
        serve_mem();
        if (ld_q.size() == 0) return 1'b0;
        v = ld_q.pop_front();
      end else if (s == 0) v = 16'h0000;
      else if (s == 14) v = 16'h0001;
      else if (s == 15) v = 16'hFFFF;
      else v = r[s];
      return 1'b1;
    endfunction

    function void put(input logic [3:0] d, input w16 v);
      if (d == 1) sd_q.push_back(v);
      else if (d >= 2 && d <= 13) r[d] = v;
    endfunction

    function void run(input int unsigned max_steps);
      w16 pc = 0, ir, a, b, res;
      steps = 0;
      stop_reason = "step limit";
      while (steps < max_steps) begin
        ir = mem[pc];
        steps++;
        case (ir[15:12])
          4'h0: begin
            if (jmp_q.size() == 0) begin stop_reason = "JMP with empty Jmp-Queue"; break; end
            pc = jmp_q.pop_front();
            continue;
          end
          4'h1: begin
            if (cc_q.size() == 0) begin stop_reason = "BCND with empty CC-Queue"; break; end
            pc = cc_q.pop_front() ? pc + {{4{ir[11]}}, ir[11:0]} : pc + 1;
            continue;
          end
          4'h2: put(ir[11:8], {ir[7:0], 8'h00});
          4'h3: put(ir[11:8], {8'h00, ir[7:0]});
          4'h7: put(ir[11:8], pc + {{8{ir[7]}}, ir[7:0]});
          4'h6: begin
            if (!rd_src(ir[3:0], b)) begin stop_reason = "R1 read with no load"; break; end
            case (ir[7:4])
              4'b0001: res = b << 1;
              4'b0010: res = b >> 1;
              default: res = {b[15], b[15:1]};
            endcase
            put(ir[11:8], res);
          end
          default: begin
            if (!rd_src(ir[7:4], a)) begin stop_reason = "R1 read with no load"; break; end
            if (!rd_src(ir[3:0], b)) begin stop_reason = "R1 read with no load"; break; end
            case (ir[15:12])
              4'h5: begin
                case (ir[11:10])
                  2'b00: cc_q.push_back(a == b);
                  2'b01: cc_q.push_back($signed(a) > $signed(b));
                  2'b10: cc_q.push_back($signed(a) >= $signed(b));
                  default: cc_q.push_back(a != b);
                endcase
              end
              default: begin
                case (ir[15:12])
                  4'h4: res = a - b;
                  4'h8: res = a & b;
                  4'h9: res = a | b;
                  4'hA: res = a ^ b;
                  4'hB: res = ~(a ^ b);
                  default: res = a + b;
                endcase
                if (ir[15:12] == 4'hF) aq_q.push_back({1'b1, res});
                if (ir[15:12] == 4'hE) aq_q.push_back({1'b0, res});
                if (ir[15:12] == 4'hD) jmp_q.push_back(res);
                put(ir[11:8], res);
              end
            endcase
          end
        endcase
        serve_mem();
        pc = pc + 1;
      end
      serve_mem();
    endfunction
  endclass

endpackage
