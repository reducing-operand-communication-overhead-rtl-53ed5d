// tb_cluster_formation: checks cluster formation on the JPEG colour-conversion
// block (ten clusters, known edge counts) and on a long-chain block (a cluster
// filled to CL_MAX, the overflowing edge left out, a second cluster after it).
// The basic block cache is modelled here: formation is enabled exactly on a
// block's second reported commit. Also checked: no formation on the first
// commit or on a third one, and a block committed while the unit is busy is
// not reported.
module tb_cluster_formation;
  import clu_pkg::*;
  import tb_blocks_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            commit_v = 0;
  commit_instr_t   commit_i;
  logic            bb_commit_v, form_en, cc_wr_v, busy;
  logic [PC_W-1:0] bb_commit_pc, form_pc;
  cluster_t        cc_wr_cluster;
  logic [31:0]     n_local, n_internal, n_external, n_clusters, n_clustered;

  cluster_formation dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // basic block cache model
  int seen [logic [31:0]];
  logic fe_q = 0; logic [31:0] fp_q = 0;
  always_ff @(posedge clk) begin
    fe_q <= 0;
    if (rst_n && bb_commit_v) begin
      if (!seen.exists(bb_commit_pc)) seen[bb_commit_pc] = 0;
      seen[bb_commit_pc] = seen[bb_commit_pc] + 1;
      fe_q <= (seen[bb_commit_pc] == 2);
      fp_q <= bb_commit_pc;
    end
  end
  assign form_en = fe_q;
  assign form_pc = fp_q;

  // captured cluster cache writes
  cluster_t got [$];
  always_ff @(posedge clk) if (rst_n && cc_wr_v) got.push_back(cc_wr_cluster);
  int n_bb_reports = 0;
  always_ff @(posedge clk) if (rst_n && bb_commit_v) n_bb_reports++;

  task automatic commit_block(int b);
    for (int i = 0; i < blk_n(b); i++) begin
      commit_v <= 1; commit_i <= to_commit(b, i);
      @(posedge clk);
    end
    commit_v <= 0;
    @(posedge clk);
  endtask

  task automatic wait_idle();
    int n = 0;
    @(posedge clk);
    @(posedge clk);
    while (busy && n < 5000) begin @(posedge clk); n++; end
  endtask

  // expected clusters: member block indices and depths
  typedef struct { int n; int idx[8]; int dep[8]; } exp_t;
  exp_t exp_j [10];
  exp_t exp_c [2];
  function automatic exp_t e(int n, int i0, int i1, int i2, int i3, int i4,
                             int d0, int d1, int d2, int d3, int d4);
    exp_t x; x.n = n;
    x.idx = '{i0, i1, i2, i3, i4, 0, 0, 0}; x.dep = '{d0, d1, d2, d3, d4, 0, 0, 0};
    return x;
  endfunction

  task automatic check_clusters(int b, exp_t ex[], int first);
    for (int c = 0; c < ex.size(); c++) begin
      cluster_t g = got[first + c];
      check(int'(g.count) == ex[c].n, $sformatf("block %0d cluster %0d size %0d", b, c, g.count));
      for (int k = 0; k < ex[c].n; k++) begin
        check(g.m[k].pc == blk_pc(b) + 32'(4 * ex[c].idx[k]),
              $sformatf("block %0d cluster %0d member %0d pc %h", b, c, k, g.m[k].pc));
        check(int'(g.m[k].depth) == ex[c].dep[k],
              $sformatf("block %0d cluster %0d member %0d depth %0d", b, c, k, g.m[k].depth));
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_j[0] = e(5, 3, 4, 7, 17, 25, 0, 1, 2, 2, 2);
    exp_j[1] = e(5, 5, 6, 8, 18, 26, 0, 1, 2, 2, 2);
    exp_j[2] = e(5, 9, 10, 12, 20, 29, 0, 1, 2, 2, 2);
    exp_j[3] = e(3, 11, 14, 15, 0, 0, 0, 1, 2, 0, 0);
    exp_j[4] = e(2, 13, 16, 0, 0, 0, 0, 1, 0, 0, 0);
    exp_j[5] = e(3, 19, 22, 23, 0, 0, 0, 1, 2, 0, 0);
    exp_j[6] = e(2, 21, 24, 0, 0, 0, 0, 1, 0, 0, 0);
    exp_j[7] = e(3, 28, 32, 33, 0, 0, 0, 1, 2, 0, 0);
    exp_j[8] = e(2, 30, 34, 0, 0, 0, 0, 1, 0, 0, 0);
    exp_j[9] = e(3, 31, 35, 36, 0, 0, 0, 1, 2, 0, 0);
    exp_c[0].n = 8;
    for (int k = 0; k < 8; k++) begin exp_c[0].idx[k] = k; exp_c[0].dep[k] = k; end
    exp_c[1] = e(2, 8, 9, 0, 0, 0, 0, 1, 0, 0, 0);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // first commit: reported, no formation
    commit_block(0);
    wait_idle();
    check(got.size() == 0, "no clusters after the first commit");
    check(n_bb_reports == 1, "first commit reported");

    // second commit: formation; a block committed meanwhile is dropped
    commit_block(0);
    repeat (2) @(posedge clk);
    check(busy, "formation running after the second commit");
    commit_block(1);
    check(n_bb_reports == 2, "block committed while busy is not reported");
    wait_idle();
    check(got.size() == 10, $sformatf("JPEG block gives 10 clusters (got %0d)", got.size()));
    if (got.size() == 10) check_clusters(0, exp_j, 0);
    check(n_local == 23 && n_internal == 15 && n_external == 15,
          $sformatf("JPEG edges local/internal/external %0d/%0d/%0d",
                    n_local, n_internal, n_external));
    check(n_clustered == 33, "33 of 37 instructions clustered");
    if (got.size() == 10) begin
      // locality bits: member 1 of cluster 0 (addu r4) takes r4 locally from
      // member 0; its r4 is live out of the block; sll r4 is overwritten.
      check(got[0].m[1].src_local == 2'b01 && got[0].m[1].src_prod[0] == 0, "addu r4 local source");
      check(got[0].m[1].out_ext && got[0].m[1].out_local, "addu r4 is live out and local");
      check(!got[0].m[0].out_ext && got[0].m[0].out_local, "sll r4 only local");
      check(got[4].m[1].src_local == 2'b01, "sb: base local, data not local");
      check(got[3].m[2].out_ext, "sra r2 feeds store data (internal)");
    end

    // chain block: two commits after the busy period
    commit_block(1);
    wait_idle();
    commit_block(1);
    wait_idle();
    check(got.size() == 12, $sformatf("chain block gives 2 clusters (total %0d)", got.size()));
    if (got.size() == 12) begin
      check_clusters(1, exp_c, 10);
      check(got[10].m[7].src_local == 2'b11 && got[10].m[7].src_prod[0] == 6 &&
            got[10].m[7].src_prod[1] == 4, "or r8: two local sources (members 6 and 4)");
      check(got[10].m[7].out_ext && got[10].m[4].out_ext,
            "edges into the overflowing instruction become global");
    end
    check(n_local == 23 + 11 && n_external == 15 + 6, "chain edge counts");

    // third commit of the JPEG block: no new formation
    commit_block(0);
    wait_idle();
    check(got.size() == 12, "no formation on the third commit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
