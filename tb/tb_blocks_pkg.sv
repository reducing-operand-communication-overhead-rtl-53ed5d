// tb_blocks_pkg: basic blocks used by the testbenches, and a reference
// interpreter for them.
//
// jpeg_*  the colour-conversion inner loop of a JPEG encoder (37 MIPS-like
//         instructions: byte loads, shifts, table loads, adds, shifts,
//         byte stores, loop test and branch). Its dependence graph contains
//         ten clusters.
// chain_* a block with one long dependence chain (deeper than the ALU grid,
//         longer than a cluster may be) ending in a branch.
// Register 0 reads as zero and is never a register source.
package tb_blocks_pkg;
  import clu_pkg::*;

  typedef struct {
    iclass_e     ic;
    alu_op_e     op;
    int          rd;      // -1: none
    int          rs0;     // -1: none
    int          rs1;     // -1: none (or immediate operand)
    logic        use_imm;
    logic [31:0] imm;
  } tinstr_t;

  localparam int JPEG_N  = 37;
  localparam int CHAIN_N = 10;
  localparam logic [31:0] JPEG_PC  = 32'h0041_2100;
  localparam logic [31:0] CHAIN_PC = 32'h0050_0000;

  function automatic tinstr_t mk(iclass_e ic, alu_op_e op, int rd, int rs0, int rs1,
                                 logic use_imm, logic [31:0] imm);
    tinstr_t t;
    t.ic = ic; t.op = op; t.rd = rd; t.rs0 = rs0; t.rs1 = rs1;
    t.use_imm = use_imm; t.imm = imm;
    return t;
  endfunction

  // load rd <- mem[rs0+imm]; store mem[rs0+imm] <- rs1
  function automatic tinstr_t ld(int rd, int base, int off);  return mk(IC_LOAD,  OP_ADD, rd, base, -1, 1, off); endfunction
  function automatic tinstr_t st(int rs, int base, int off);  return mk(IC_STORE, OP_ADD, -1, base, rs, 1, off); endfunction
  function automatic tinstr_t rr(alu_op_e op, int rd, int a, int b); return mk(IC_ALU, op, rd, a, b, 0, 0); endfunction
  function automatic tinstr_t ri(alu_op_e op, int rd, int a, int i); return mk(IC_ALU, op, rd, a, -1, 1, i); endfunction

  function automatic tinstr_t jpeg(int i);
    case (i)
      0:  return ld(4, 9, 0);          1:  return ld(5, 9, 1);
      2:  return ld(6, 9, 2);          3:  return ri(OP_SLL, 4, 4, 2);
      4:  return rr(OP_ADD, 4, 4, 10); 5:  return ri(OP_SLL, 5, 5, 2);
      6:  return rr(OP_ADD, 5, 5, 10); 7:  return ld(2, 4, 0);
      8:  return ld(3, 5, 1024);       9:  return ri(OP_SLL, 6, 6, 2);
      10: return rr(OP_ADD, 6, 6, 10); 11: return rr(OP_ADD, 2, 2, 3);
      12: return ld(3, 6, 2048);       13: return rr(OP_ADD, 7, 25, 8);
      14: return rr(OP_ADD, 2, 2, 3);  15: return ri(OP_SRA, 2, 2, 16);
      16: return st(2, 7, 0);          17: return ld(2, 4, 3072);
      18: return ld(3, 5, 4096);       19: return rr(OP_ADD, 2, 2, 3);
      20: return ld(3, 6, 5120);       21: return rr(OP_ADD, 7, 15, 8);
      22: return rr(OP_ADD, 2, 2, 3);  23: return ri(OP_SRA, 2, 2, 16);
      24: return st(2, 7, 0);          25: return ld(2, 4, 5120);
      26: return ld(3, 5, 6144);       27: return ri(OP_ADD, 9, 9, 3);
      28: return rr(OP_ADD, 2, 2, 3);  29: return ld(3, 6, 7168);
      30: return rr(OP_ADD, 7, 12, 8); 31: return ri(OP_ADD, 8, 8, 1);
      32: return rr(OP_ADD, 2, 2, 3);  33: return ri(OP_SRA, 2, 2, 16);
      34: return st(2, 7, 0);          35: return rr(OP_SLTU, 2, 8, 16);
      default: return mk(IC_BRANCH, OP_SUB, -1, 2, -1, 1, 0);  // bne r2, r0
    endcase
  endfunction

  function automatic tinstr_t chain(int i);
    case (i)
      0: return rr(OP_ADD, 1, 2, 3);   1: return rr(OP_ADD, 1, 1, 4);
      2: return ri(OP_SLL, 1, 1, 1);   3: return rr(OP_XOR, 1, 1, 5);
      4: return ri(OP_ADD, 1, 1, 7);   5: return rr(OP_SUB, 6, 1, 2);
      6: return rr(OP_SLT, 7, 6, 3);   7: return rr(OP_OR, 8, 7, 1);
      8: return rr(OP_ADD, 9, 8, 1);
      default: return mk(IC_BRANCH, OP_SUB, -1, 9, -1, 1, 0);  // bne r9, r0
    endcase
  endfunction

  function automatic tinstr_t blk(int b, int i);
    return (b == 0) ? jpeg(i) : chain(i);
  endfunction
  function automatic int blk_n(int b);
    return (b == 0) ? JPEG_N : CHAIN_N;
  endfunction
  function automatic logic [31:0] blk_pc(int b);
    return (b == 0) ? JPEG_PC : CHAIN_PC;
  endfunction

  // Commit-stream form of instruction i of block b.
  function automatic commit_instr_t to_commit(int b, int i);
    commit_instr_t c;
    tinstr_t t = blk(b, i);
    c = '0;
    c.pc     = blk_pc(b) + 32'(4 * i);
    c.iclass = t.ic;
    c.src_v  = {t.rs1 > 0, t.rs0 > 0};
    c.src[0] = AREG_W'(t.rs0 > 0 ? t.rs0 : 0);
    c.src[1] = AREG_W'(t.rs1 > 0 ? t.rs1 : 0);
    c.dst_v  = t.rd > 0;
    c.dst    = AREG_W'(t.rd > 0 ? t.rd : 0);
    c.bb_end = (i == blk_n(b) - 1);
    return c;
  endfunction

  // Memory contents seen by loads: a fixed function of the address.
  function automatic logic [31:0] mem_rd(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // Reference ALU, written independently of the design's.
  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    logic [63:0] ext;
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a + ~b + 1;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_NOR:  return ~a & ~b;
      OP_SLL:  return a << (b % 32);
      OP_SRL:  return a >> (b % 32);
      OP_SRA:  begin ext = {{32{a[31]}}, a}; return ext[(b % 32) +: 32]; end
      OP_SLT:  return (a[31] != b[31]) ? {31'b0, a[31]} : {31'b0, a < b};
      OP_SLTU: return {31'b0, a < b};
      OP_LUI:  return b << 16;
      default: return 0;
    endcase
  endfunction

endpackage
