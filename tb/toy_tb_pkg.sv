// toy_tb_pkg: test support for the TOY processors.
//
// toy_model is an instruction-level reference model of the TOY instruction
// set, written from the instruction definitions in toy_pkg and independent
// of either processor's datapath. It also totals how many clock cycles the
// single-cycle processor (one per instruction) and the multicycle processor
// (its per-instruction stage schedule) should take. The enc_* functions
// assemble instructions, and gen_* build test programs.
package toy_tb_pkg;
  import toy_pkg::*;

  function automatic logic [15:0] enc_r(opcode_e op, int unsigned r0, int unsigned r1, int unsigned r2);
    return {op, 4'(r0), 4'(r1), 4'(r2)};
  endfunction

  function automatic logic [15:0] enc_i(opcode_e op, int unsigned r0, int unsigned imm8);
    return {op, 4'(r0), 8'(imm8)};
  endfunction

  // indexed load/store: top bit of the r0 field set, address R[r1] + R[r2]
  function automatic logic [15:0] enc_x(opcode_e op, int unsigned r0, int unsigned r1, int unsigned r2);
    return {op, 4'(r0 | 8), 4'(r1), 4'(r2)};
  endfunction

  // Clock cycles the multicycle processor spends on one instruction.
  function automatic int unsigned mc_cycles(opcode_e op);
    case (op)
      OP_HALT:         return 2;
      OP_LDA, OP_JL:   return 3;
      OP_LD:           return 5;
      default:         return 4;  // ALU ops, store, branches, jr, jmp
    endcase
  endfunction

  class toy_model;
    logic [15:0] r  [8];
    logic [15:0] dm [256];
    logic [15:0] im [256];
    logic [7:0]  pc;
    bit          halted;
    int unsigned ninstr;
    int unsigned mc_total;
    int unsigned op_count [16];
    int unsigned taken, not_taken, indexed;

    function new();
      foreach (r[i])  r[i]  = '0;
      foreach (dm[i]) dm[i] = '0;
      foreach (im[i]) im[i] = '0;
      pc = '0; halted = 0; ninstr = 0; mc_total = 0;
      foreach (op_count[i]) op_count[i] = 0;
      taken = 0; not_taken = 0; indexed = 0;
    endfunction

    function automatic logic [15:0] alu(opcode_e op, logic [15:0] a, logic [15:0] b);
      case (op)
        OP_ADD: return a + b;
        OP_SUB: return a - b;
        OP_MUL: return 16'((32'(a) * 32'(b)) & 32'hFFFF);
        OP_XOR: return a ^ b;
        OP_AND: return a & b;
        OP_SHR: return a >> b[3:0];
        OP_SHL: return a << b[3:0];
        default: return a;
      endcase
    endfunction

    function void step();
      logic [15:0] w;
      opcode_e     op;
      int unsigned d, s, t;
      logic [7:0]  imm, ea, next;
      if (halted) return;
      w   = im[pc];
      op  = opcode_e'(w[15:12]);
      d   = 32'(w[10:8]); s = 32'(w[6:4]); t = 32'(w[2:0]);
      imm = w[7:0];
      ea  = w[11] ? 8'(r[s] + r[t]) : imm;
      next = pc + 8'd1;
      ninstr++;
      mc_total += mc_cycles(op);
      op_count[op]++;
      case (op)
        OP_HALT: begin halted = 1; next = pc; end
        OP_ADD, OP_SUB, OP_MUL, OP_XOR, OP_AND, OP_SHR, OP_SHL: r[d] = alu(op, r[s], r[t]);
        OP_LDA:  r[d] = {8'h00, imm};
        OP_LD:   begin r[d] = dm[ea]; if (w[11]) indexed++; end
        OP_ST:   begin dm[ea] = r[d]; if (w[11]) indexed++; end
        OP_BZ:   if (r[d] == 0) begin next = imm; taken++; end else not_taken++;
        OP_BP:   if ($signed(r[d]) > 0) begin next = imm; taken++; end else not_taken++;
        OP_JR:   next = 8'(r[s] + r[t]);
        OP_JL:   begin r[d] = {8'h00, next}; next = imm; end
        OP_JMP:  next = imm;
        default: ;
      endcase
      pc = next;
    endfunction

    // Runs until halt or max_steps instructions; returns 1 if it halted.
    function bit run(int unsigned max_steps);
      for (int unsigned i = 0; i < max_steps && !halted; i++) step();
      return halted;
    endfunction
  endclass

  // Directed program: sums an array through indexed loads in a counted loop,
  // calls a subroutine with jump-and-link that squares and mixes the sum and
  // returns with jump-register, then takes a branch-positive and halts.
  // Data: dm[0x0F] = n, dm[0x10 ..] = array. Results: dm[0x20] = sum,
  // dm[0x21] = sum*sum, dm[0x22] = (sum*sum ^ sum) & n ... see the code.
  function automatic void gen_directed(toy_model m);
    int unsigned a;
    a = 0;
    m.im[a++] = enc_i(OP_LDA, 1, 'h10);      // 00 r1 = base
    m.im[a++] = enc_i(OP_LD, 2, 'h0F);      // 01 r2 = n
    m.im[a++] = enc_i(OP_LDA, 3, 0);          // 02 r3 = sum = 0
    m.im[a++] = enc_i(OP_LDA, 4, 1);          // 03 r4 = 1
    m.im[a++] = enc_i(OP_LDA, 5, 0);          // 04 r5 = i = 0
    m.im[a++] = enc_r(OP_SUB, 6, 2, 5);       // 05 loop: r6 = n - i
    m.im[a++] = enc_i(OP_BZ, 6, 'h0B);      // 06 if r6 == 0 goto done
    m.im[a++] = enc_x(OP_LD,  7, 1, 5);       // 07 r7 = M[base + i]
    m.im[a++] = enc_r(OP_ADD, 3, 3, 7);       // 08 sum += r7
    m.im[a++] = enc_r(OP_ADD, 5, 5, 4);       // 09 i++
    m.im[a++] = enc_i(OP_JMP, 0, 'h05);      // 0A goto loop
    m.im[a++] = enc_i(OP_ST, 3, 'h20);      // 0B done: M[0x20] = sum
    m.im[a++] = enc_i(OP_JL, 6, 'h30);      // 0C r6 = 0x0D, call 0x30
    m.im[a++] = enc_i(OP_BP, 3, 'h0F);      // 0D if sum > 0 goto 0x0F
    m.im[a++] = enc_i(OP_HALT, 0, 0);         // 0E (skipped)
    m.im[a++] = enc_x(OP_ST,  0, 1, 4);       // 0F M[base + 1] = r0
    m.im[a++] = enc_i(OP_HALT, 0, 0);         // 10
    a = 'h30;
    m.im[a++] = enc_r(OP_MUL, 7, 3, 3);       // 30 r7 = sum * sum
    m.im[a++] = enc_i(OP_ST, 7, 'h21);      // 31 M[0x21] = r7
    m.im[a++] = enc_r(OP_XOR, 0, 7, 3);       // 32 r0 = r7 ^ sum
    m.im[a++] = enc_r(OP_AND, 0, 0, 2);       // 33 r0 &= n
    m.im[a++] = enc_r(OP_SHL, 0, 0, 4);       // 34 r0 <<= 1
    m.im[a++] = enc_r(OP_SHR, 7, 7, 4);       // 35 r7 >>= 1
    m.im[a++] = enc_i(OP_ST, 7, 'h22);      // 36 M[0x22] = r7
    m.im[a++] = enc_i(OP_LDA, 5, 0);          // 37 r5 = 0
    m.im[a++] = enc_r(OP_JR,  0, 6, 5);       // 38 return to r6 + 0
  endfunction

  // Random program that always ends: registers set by lda, then random
  // instructions whose branches and calls only go forward, then a tail that
  // stores all eight registers at 0xF0..0xF7 and halts. Data is random.
  function automatic void gen_random(toy_model m, int unsigned len);
    int unsigned a, tail, k;
    opcode_e op;
    for (int i = 0; i < 256; i++) m.dm[i] = 16'($urandom);
    for (a = 0; a < 8; a++) m.im[a] = enc_i(OP_LDA, a, $urandom_range(0, 255));
    tail = 8 + len;
    for (a = 8; a < tail; a++) begin
      k  = $urandom_range(0, 15);
      op = opcode_e'(k);
      case (op)
        OP_HALT, OP_JR: m.im[a] = enc_r(OP_ADD, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
        OP_LD, OP_ST:
          if ($urandom_range(0, 1) != 0) m.im[a] = enc_x(op, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
          else                           m.im[a] = enc_i(op, $urandom_range(0, 7), $urandom_range(0, 255));
        OP_BZ, OP_BP, OP_JL, OP_JMP:
          m.im[a] = enc_i(op, $urandom_range(0, 7), $urandom_range(a + 1, tail));
        default: m.im[a] = {op, 1'b0, 3'($urandom), 1'b0, 3'($urandom), 1'b0, 3'($urandom)};
      endcase
    end
    for (k = 0; k < 8; k++) m.im[tail + k] = enc_i(OP_ST, k, 'hF0 + k);
    m.im[tail + 8] = enc_i(OP_HALT, 0, 0);
  endfunction
endpackage
