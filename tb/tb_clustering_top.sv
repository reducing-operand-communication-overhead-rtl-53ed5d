// tb_clustering_top: end-to-end run of the clustering mechanism at its
// default (8-way) size, with the host core modelled here: a renamer, a
// conventional out-of-order path (four ALUs, loads with two cycles of
// latency), the physical register file, the broadcast bus and a read-only
// memory for loads.
//
// 1 The JPEG colour-conversion block and a long-chain block are committed
//   twice each; the real basic block cache and formation unit build their
//   clusters (12 expected).
// 2 The blocks are then dispatched five times. Cluster members go through the
//   cluster queue and the 4 x 4 execution unit, the rest through the modelled
//   conventional path. In the first pass the block inputs arrive late, so the
//   cluster queue fills and later clusters fall back to the conventional path.
// 3 After each pass the architectural registers, the stored (address, data)
//   pairs and the branch conditions are compared with a sequential reference
//   interpreter.
// Each mechanism (formation, local path, pass-through path, input port
// operands, mapping failure, full-queue fallback, conventional path) must
// have happened at least once.
module tb_clustering_top;
  import clu_pkg::*;
  import tb_blocks_pkg::*;

  localparam int N_IN = 8, N_OUT = 4, NB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            flush = 0, commit_v = 0, rn_v = 0;
  commit_instr_t   commit_i;
  rn_instr_t       rn_i;
  logic            iq_v;
  rn_instr_t       iq_i;
  logic            rd_v   [N_IN];
  logic [TAG_W-1:0] rd_tag[N_IN];
  logic [XLEN-1:0] rd_data[N_IN];
  logic            bc_v   [NB];
  logic [TAG_W-1:0] bc_tag[NB];
  ceu_out_t        out    [N_OUT];
  logic            formation_busy, cq_empty;
  logic [31:0]     n_local_edges, n_internal_edges, n_external_edges, n_clusters,
                   n_clustered, n_issued, n_op_local, n_op_pass, n_op_global, n_remap;

  clustering_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // host core model
  // ------------------------------------------------------------------
  localparam int NT = 1 << TAG_W;
  logic [31:0] arch [32];           // architectural state before the pass
  logic [31:0] rf   [NT];
  bit          rdy  [NT];
  int          map  [32];
  always_comb for (int p = 0; p < N_IN; p++) rd_data[p] = rf[rd_tag[p]];
  int bad_reads = 0;
  always @(posedge clk)
    if (rst_n) for (int p = 0; p < N_IN; p++) if (rd_v[p] && !rdy[rd_tag[p]]) bad_reads++;

  typedef struct { int idx; rn_instr_t ri; } pend_t;
  pend_t       convq [$];           // conventional instruction queue
  typedef struct { int due; int tag; logic [31:0] v; } wr_t;
  wr_t         wrq [$];             // results in flight
  int          bcq [$];             // tags waiting for a broadcast lane
  int          cyc = 0;

  int          cur_blk;
  int          done_cnt;
  int          st_idx_of_tag [NT];  // store waiting for its data, by data tag (-1: none)
  logic [31:0] st_addr [64];
  logic [31:0] st_data [64];
  bit          st_done [64];
  logic [31:0] br_val;
  bit          br_done;
  int          n_conv = 0, n_head_fallback = 0;

  task automatic complete_store(int i, logic [31:0] addr, int dtag);
    st_addr[i] = addr;
    st_idx_of_tag[dtag] = i;
  endtask

  // one step of the modelled core, at the falling edge
  task automatic core_step();
    int lanes, nexec;
    cyc++;
    for (int b = 0; b < NB; b++) bc_v[b] = 0;
    // results leaving the cluster execution unit
    for (int p = 0; p < N_OUT; p++) if (out[p].valid) begin
      case (out[p].kind)
        OUT_REG:    wrq.push_back('{cyc, int'(out[p].tag), out[p].value});
        OUT_LDADDR: wrq.push_back('{cyc + 2, int'(out[p].tag), mem_rd(out[p].value)});
        OUT_STADDR: begin
          int i;
          i = -1;
          for (int k = 0; k < blk_n(cur_blk); k++)
            if (blk(cur_blk, k).ic == IC_STORE && st_idx_of_tag[int'(out[p].tag)] == -2 - k) i = k;
          if (i >= 0) complete_store(i, out[p].value, int'(out[p].tag));
          else begin
            failures++;
            $display("FAIL: unexpected store address, tag %0d state %0d", out[p].tag, st_idx_of_tag[int'(out[p].tag)]);
          end
        end
        default: begin br_val = out[p].value; br_done = 1; done_cnt++; end
      endcase
    end
    // conventional path: up to four ready instructions per cycle, oldest first
    nexec = 0;
    for (int n = 0; n < convq.size() && nexec < 4; n++) begin
      rn_instr_t ri;
      logic [31:0] a, b;
      bit ok;
      ri = convq[n].ri;
      ok = (!ri.src_v[0] || rdy[ri.src_tag[0]]) &&
           (ri.iclass == IC_STORE || ri.use_imm || !ri.src_v[1] || rdy[ri.src_tag[1]]);
      if (ok) begin
        a = ri.src_v[0] ? rf[ri.src_tag[0]] : 0;
        b = ri.use_imm ? ri.imm : (ri.src_v[1] ? rf[ri.src_tag[1]] : 0);
        case (ri.iclass)
          IC_ALU:   if (ri.dst_v) wrq.push_back('{cyc + 1, int'(ri.dst_tag), ref_alu(ri.op, a, b)});
                    else done_cnt++;
          IC_LOAD:  wrq.push_back('{cyc + 2, int'(ri.dst_tag), mem_rd(a + ri.imm)});
          IC_STORE: complete_store(convq[n].idx, a + ri.imm, int'(ri.src_tag[1]));
          default:  begin br_val = ref_alu(ri.op, a, b); br_done = 1; done_cnt++; end
        endcase
        convq.delete(n);
        n--;
        nexec++;
      end
    end
    // stores whose address and data are both known
    for (int t = 0; t < NT; t++)
      if (st_idx_of_tag[t] >= 0 && rdy[t]) begin
        st_data[st_idx_of_tag[t]] = rf[t];
        st_done[st_idx_of_tag[t]] = 1;
        st_idx_of_tag[t] = -1;
        done_cnt++;
      end
    // register writes due now: write, then broadcast
    for (int n = 0; n < wrq.size(); n++)
      if (wrq[n].due <= cyc) begin
        rf[wrq[n].tag] = wrq[n].v;
        bcq.push_back(wrq[n].tag);
        wrq.delete(n);
        n--;
      end
    lanes = 0;
    while (bcq.size() > 0 && lanes < NB) begin
      int t;
      t = bcq.pop_front();
      if (!rdy[t]) done_cnt++;
      rdy[t] = 1;
      bc_v[lanes] = 1; bc_tag[lanes] = TAG_W'(t);
      lanes++;
    end
  endtask

  // ------------------------------------------------------------------
  // phases
  // ------------------------------------------------------------------
  task automatic commit_block(int b);
    for (int i = 0; i < blk_n(b); i++) begin
      @(negedge clk);
      commit_v = 1; commit_i = to_commit(b, i);
    end
    @(negedge clk);
    commit_v = 0;
    repeat (3) @(negedge clk);
    while (formation_busy) @(negedge clk);
  endtask

  // reference interpreter: one pass of block b over arch
  logic [31:0] g_arch [32];
  logic [31:0] g_st_addr [64], g_st_data [64];
  logic [31:0] g_br;
  task automatic golden(int b);
    for (int a = 0; a < 32; a++) g_arch[a] = arch[a];
    for (int i = 0; i < blk_n(b); i++) begin
      tinstr_t t;
      logic [31:0] x, y;
      t = blk(b, i);
      x = (t.rs0 > 0) ? g_arch[t.rs0] : 0;
      y = t.use_imm ? t.imm : ((t.rs1 > 0) ? g_arch[t.rs1] : 0);
      case (t.ic)
        IC_ALU:   if (t.rd > 0) g_arch[t.rd] = ref_alu(t.op, x, y);
        IC_LOAD:  g_arch[t.rd] = mem_rd(x + t.imm);
        IC_STORE: begin g_st_addr[i] = x + t.imm; g_st_data[i] = g_arch[t.rs1]; end
        default:  g_br = ref_alu(t.op, x, y);
      endcase
    end
  endtask

  bit heads [64];
  function automatic bit stores_done(int b);
    for (int i = 0; i < blk_n(b); i++)
      if (blk(b, i).ic == IC_STORE && !st_done[i]) return 0;
    return 1;
  endfunction
  task automatic run_pass(int b, bit late_inputs);
    int nexp, start, heads_seen_conv;
    cur_blk = b;
    done_cnt = 0;
    br_done = 0;
    for (int t = 0; t < NT; t++) begin rdy[t] = 0; st_idx_of_tag[t] = -1; end
    for (int i = 0; i < 64; i++) st_done[i] = 0;
    for (int a = 0; a < 32; a++) begin
      map[a] = a; rf[a] = arch[a]; rdy[a] = !late_inputs || a == 0;
    end
    nexp = 0;
    for (int i = 0; i < blk_n(b); i++) if (blk(b, i).ic != IC_BRANCH || 1) nexp++;
    start = cyc;
    begin
      int next_tag;
      next_tag = 32;
      for (int i = 0; i <= blk_n(b); i++) begin
        @(negedge clk);
        core_step();
        if (late_inputs && cyc - start == 60) for (int a = 1; a < 32; a++) bcq.push_back(a);
        rn_v = 0;
        if (i < blk_n(b)) begin
          tinstr_t t;
          rn_instr_t r;
          t = blk(b, i);
          r = '0;
          r.pc = blk_pc(b) + 32'(4 * i);
          r.iclass = t.ic; r.op = t.op; r.use_imm = t.use_imm; r.imm = t.imm;
          r.src_v = {t.rs1 > 0, t.rs0 > 0};
          r.src_tag[0] = TAG_W'(map[t.rs0 > 0 ? t.rs0 : 0]);
          r.src_tag[1] = TAG_W'(map[t.rs1 > 0 ? t.rs1 : 0]);
          r.src_rdy = {rdy[r.src_tag[1]], rdy[r.src_tag[0]]};
          if (t.rd > 0) begin
            r.dst_v = 1; r.dst_tag = TAG_W'(next_tag);
            map[t.rd] = next_tag; next_tag++;
          end
          if (t.ic == IC_STORE) st_idx_of_tag[r.src_tag[1]] = -2 - i;
          if (t.ic == IC_STORE && rdy[r.src_tag[1]]) ; // data may already be there
          rn_i = r;
          rn_v = 1;
          #1;
          // dispatch decides combinationally: conventional path or cluster queue
          if (iq_v) begin
            convq.push_back('{i, iq_i});
            n_conv++;
            if (b == 0 && heads[i]) n_head_fallback++;
          end
        end
      end
    end
    // run until every instruction has completed
    begin
      int n = 0;
      while (!(cq_empty && convq.size() == 0 && wrq.size() == 0 && bcq.size() == 0 && br_done &&
                 stores_done(b)) && n < 3000) begin
        @(negedge clk);
        core_step();
        if (late_inputs && cyc - start == 60) for (int a = 1; a < 32; a++) bcq.push_back(a);
        n++;
      end
      check(n < 3000, $sformatf("pass of block %0d completes", b));
      $display("block %0d pass: %0d cycles", b, cyc - start);
    end
    // compare with the reference
    golden(b);
    for (int a = 1; a < 32; a++)
      check(rf[map[a]] == g_arch[a], $sformatf("block %0d r%0d = %h, expected %h", b, a, rf[map[a]], g_arch[a]));
    for (int i = 0; i < blk_n(b); i++)
      if (blk(b, i).ic == IC_STORE)
        check(st_done[i] && st_addr[i] == g_st_addr[i] && st_data[i] == g_st_data[i],
              $sformatf("block %0d store %0d", b, i));
    check(br_done && ((br_val != 0) == (g_br != 0)), $sformatf("block %0d branch condition", b));
    for (int a = 0; a < 32; a++) arch[a] = g_arch[a];
    arch[0] = 0;
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin bc_v[b] = 0; bc_tag[b] = 0; end
    for (int a = 0; a < 32; a++) arch[a] = (a == 0) ? 0 : $urandom;
    arch[9] = 32'h0001_0000;    // pixel pointer
    for (int i = 0; i < 64; i++) heads[i] = 0;
    foreach (heads[i]) if (i inside {3, 5, 9, 11, 13, 19, 21, 28, 30, 31}) heads[i] = 1;
    commit_i = '0; rn_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    commit_block(0); commit_block(0);
    commit_block(1); commit_block(1);
    check(n_clusters == 12, $sformatf("12 clusters formed (got %0d)", n_clusters));
    check(n_local_edges == 23 + 11,
          $sformatf("local edges %0d", n_local_edges));

    run_pass(0, 1);
    run_pass(1, 0);
    run_pass(0, 0);
    run_pass(1, 0);
    run_pass(0, 0);

    check(bad_reads == 0, "input ports never read a value before it is written");
    $display("issued %0d, operands local %0d pass %0d global %0d, remapped %0d, conventional %0d, cluster fallbacks %0d",
             n_issued, n_op_local, n_op_pass, n_op_global, n_remap, n_conv, n_head_fallback);
    check(n_clusters > 0,      "mechanism: cluster formation");
    check(n_issued > 0,        "mechanism: clustered execution");
    check(n_op_local > 0,      "mechanism: local path");
    check(n_op_pass > 0,       "mechanism: pass-through path");
    check(n_op_global > 0,     "mechanism: input port operands");
    check(n_remap > 0,         "mechanism: mapping failure to another row");
    check(n_head_fallback > 0, "mechanism: full cluster queue fallback");
    check(n_conv > 0,          "mechanism: conventional path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
