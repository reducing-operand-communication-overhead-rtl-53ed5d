// cluster_formation: cluster formation unit. It collects the instructions of
// each committed basic block and, when the basic block cache says the block
// has now been committed twice, turns the block into instruction clusters and
// writes them to the cluster cache.
//
// Operation, one step per cycle:
//  COLLECT  committed instructions are stored in a block buffer (BB_MAX deep).
//           At the block's last instruction the block's start address is
//           reported on bb_commit_* for the basic block cache.
//  WAIT     two cycles for the cache's registered answer (form_en).
//  ANALYZE  one instruction per cycle, in program order. A last-writer table
//           finds the in-block producer of each register source; the edge is
//           classified as
//             local    producer is an integer ALU instruction and the source is
//                      used for ALU work (ALU and branch operands, the base
//                      address of a load or store),
//             internal producer is a load or FP instruction, or the source is
//                      store data or an FP operand,
//             external no producer in the block (value from earlier blocks).
//           An instruction with local sources joins its producers' cluster
//           (merging two clusters if it has two), and gets the dependence depth
//           1 + the largest depth of its local producers; otherwise it starts a
//           new cluster at depth 0.
//  LIVEOUT  a result whose register is not overwritten later in the block is
//           marked as an external output (it must reach the broadcast bus).
//  EMIT     every cluster of two or more instructions is gathered, members in
//           program order, and written to the cluster cache (scan of the block
//           buffer, one instruction per cycle).
// While the unit is busy, committed blocks are neither stored nor reported,
// so they are counted and formed on a later commit.
//
// Edge classes, the cluster definition and the depth rule follow the document
// (Sections 3 and 4). Its clusters are limited by the height of a cluster
// queue entry (CL_MAX); an instruction that would overflow a cluster does not
// join it, and the edge is then treated as a global one. Block size, the
// serial one-per-cycle schedule and the overflow rule are this design's.
module cluster_formation
  import clu_pkg::*;
#(
  parameter int BB_MAX = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // commit stream
  input  logic            commit_v,
  input  commit_instr_t   commit_i,
  // to / from the basic block cache
  output logic            bb_commit_v,
  output logic [PC_W-1:0] bb_commit_pc,
  input  logic            form_en,
  input  logic [PC_W-1:0] form_pc,
  // to the cluster cache
  output logic            cc_wr_v,
  output cluster_t        cc_wr_cluster,
  // status and statistics
  output logic            busy,
  output logic [31:0]     n_local,     // dependence edges classified local
  output logic [31:0]     n_internal,  // ... internal
  output logic [31:0]     n_external,  // ... external (block inputs)
  output logic [31:0]     n_clusters,  // clusters written
  output logic [31:0]     n_clustered  // instructions in written clusters
);

  localparam int BW = $clog2(BB_MAX);

  typedef enum logic [2:0] {S_COLLECT, S_WAIT, S_ANALYZE, S_LIVEOUT, S_EMIT_HEAD, S_EMIT_SCAN}
    state_e;
  state_e state_q;

  commit_instr_t        ib_q [BB_MAX];     // block buffer
  logic [BW:0]          cnt_q;             // instructions collected
  logic                 ovf_q;             // block longer than BB_MAX
  logic [PC_W-1:0]      start_pc_q;
  logic                 in_block_q;        // an instruction of the block has been seen
  logic                 wait_q;            // second cycle of S_WAIT

  // last-writer table over architectural registers
  logic [(1<<AREG_W)-1:0] lw_v_q;
  logic [BW-1:0]          lw_i_q [1<<AREG_W];

  // per-instruction formation state
  logic [BW-1:0]      cid_q   [BB_MAX];    // cluster identifier = first member index
  logic [IDX_W:0]     size_q  [BB_MAX];    // size of the cluster headed by this index
  logic [DEPTH_W-1:0] depth_q [BB_MAX];
  logic [1:0]         sloc_q  [BB_MAX];
  logic [BW-1:0]      sprod_q [BB_MAX][2];
  logic               oloc_q  [BB_MAX];
  logic               oext_q  [BB_MAX];
  logic [IDX_W-1:0]   midx_q  [BB_MAX];    // member index assigned during emit

  logic [BW:0]        i_q;                 // analyze / emit-head pointer
  logic [BW:0]        j_q;                 // emit-scan pointer
  cluster_t           acc_q;               // cluster being gathered

  assign busy = (state_q != S_COLLECT);

  // ---------------------------------------------------------------------
  // Edge classification of the instruction under analysis
  // ---------------------------------------------------------------------
  commit_instr_t cur;
  logic [1:0]    has_prod, is_local, is_internal, is_external;
  logic [BW-1:0] prod [2];
  logic [1:0]    joins;           // local source that will actually joins
  logic [BW-1:0] tgt_cid, oth_cid;
  logic          merge;
  logic [DEPTH_W-1:0] new_depth;

  function automatic logic alu_use(iclass_e c, int k);
    return (c == IC_ALU) || (c == IC_BRANCH) ||
           ((c == IC_LOAD || c == IC_STORE) && k == 0);
  endfunction

  always_comb begin
    cur = ib_q[i_q[BW-1:0]];
    for (int k = 0; k < 2; k++) begin
      has_prod[k]    = cur.src_v[k] && lw_v_q[cur.src[k]];
      prod[k]        = lw_i_q[cur.src[k]];
      is_local[k]    = has_prod[k] && (ib_q[prod[k]].iclass == IC_ALU) &&
                       alu_use(cur.iclass, k);
      is_internal[k] = has_prod[k] && !is_local[k];
      is_external[k] = cur.src_v[k] && !has_prod[k];
    end
    // Join rules, respecting the CL_MAX limit of a cluster.
    joins    = '0;
    merge   = 1'b0;
    tgt_cid = i_q[BW-1:0];
    oth_cid = i_q[BW-1:0];
    if (is_local[0] && size_q[cid_q[prod[0]]] < (IDX_W+1)'(CL_MAX)) begin
      joins[0] = 1'b1;
      tgt_cid = cid_q[prod[0]];
    end
    if (is_local[1]) begin
      if (!joins[0]) begin
        if (size_q[cid_q[prod[1]]] < (IDX_W+1)'(CL_MAX)) begin
          joins[1] = 1'b1;
          tgt_cid = cid_q[prod[1]];
        end
      end else if (cid_q[prod[1]] == tgt_cid) begin
        joins[1] = 1'b1;
      end else if (32'(size_q[tgt_cid]) + 32'(size_q[cid_q[prod[1]]]) < CL_MAX) begin
        joins[1] = 1'b1;
        merge   = 1'b1;
        oth_cid = cid_q[prod[1]];
      end
    end
    new_depth = '0;
    for (int k = 0; k < 2; k++)
      if (joins[k] && depth_q[prod[k]] + 1'b1 > new_depth) new_depth = depth_q[prod[k]] + 1'b1;
  end

  // merged cluster keeps the smaller (earlier) identifier
  logic [BW-1:0] keep_cid, drop_cid;
  assign keep_cid = (oth_cid < tgt_cid) ? oth_cid : tgt_cid;
  assign drop_cid = (oth_cid < tgt_cid) ? tgt_cid : oth_cid;

  // ---------------------------------------------------------------------
  // Sequencer and state updates
  // ---------------------------------------------------------------------
  logic take;   // store a committed instruction
  assign take = (state_q == S_COLLECT) && commit_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_COLLECT;
      cnt_q        <= '0;
      ovf_q        <= 1'b0;
      in_block_q   <= 1'b0;
      wait_q       <= 1'b0;
      start_pc_q   <= '0;
      bb_commit_v  <= 1'b0;
      bb_commit_pc <= '0;
      cc_wr_v      <= 1'b0;
      cc_wr_cluster <= '0;
      lw_v_q       <= '0;
      i_q          <= '0;
      j_q          <= '0;
      acc_q        <= '0;
      n_local      <= '0;
      n_internal   <= '0;
      n_external   <= '0;
      n_clusters   <= '0;
      n_clustered  <= '0;
    end else begin
      bb_commit_v <= 1'b0;
      cc_wr_v     <= 1'b0;
      unique case (state_q)
        S_COLLECT: if (take) begin
          if (!in_block_q) start_pc_q <= commit_i.pc;
          if (cnt_q < (BW+1)'(BB_MAX)) ib_q[cnt_q[BW-1:0]] <= commit_i;
          else ovf_q <= 1'b1;
          if (commit_i.bb_end) begin
            bb_commit_v  <= 1'b1;
            bb_commit_pc <= in_block_q ? start_pc_q : commit_i.pc;
            start_pc_q   <= in_block_q ? start_pc_q : commit_i.pc;
            in_block_q   <= 1'b0;
            if (cnt_q >= (BW+1)'(BB_MAX)) ovf_q <= 1'b1;
            else cnt_q <= cnt_q + 1'b1;
            state_q <= S_WAIT;
          end else begin
            in_block_q <= 1'b1;
            if (cnt_q < (BW+1)'(BB_MAX)) cnt_q <= cnt_q + 1'b1;
          end
        end
        S_WAIT: if (!wait_q) begin
          wait_q <= 1'b1;       // bb_commit_* is being registered by the cache
        end else begin
          wait_q <= 1'b0;
          if (form_en && form_pc == start_pc_q && !ovf_q) begin
            state_q <= S_ANALYZE;
            i_q     <= '0;
            lw_v_q  <= '0;
          end else begin
            state_q <= S_COLLECT;
            cnt_q   <= '0;
            ovf_q   <= 1'b0;
          end
        end
        S_ANALYZE: begin
          n_local    <= n_local    + 32'(is_local[0])    + 32'(is_local[1]);
          n_internal <= n_internal + 32'(is_internal[0]) + 32'(is_internal[1]);
          n_external <= n_external + 32'(is_external[0]) + 32'(is_external[1]);
          // record this instruction
          depth_q[i_q[BW-1:0]]  <= new_depth;
          sloc_q[i_q[BW-1:0]]   <= joins;
          sprod_q[i_q[BW-1:0]][0] <= prod[0];
          sprod_q[i_q[BW-1:0]][1] <= prod[1];
          oloc_q[i_q[BW-1:0]]   <= 1'b0;
          oext_q[i_q[BW-1:0]]   <= 1'b0;
          for (int k = 0; k < 2; k++) begin
            if (joins[k]) oloc_q[prod[k]] <= 1'b1;
            else if (has_prod[k]) oext_q[prod[k]] <= 1'b1;  // internal or demoted edge
          end
          if (joins == 2'b00) begin
            cid_q[i_q[BW-1:0]]  <= i_q[BW-1:0];
            size_q[i_q[BW-1:0]] <= (IDX_W+1)'(1);
          end else if (merge) begin
            for (int n = 0; n < BB_MAX; n++)
              if (n < int'(i_q) && cid_q[n] == drop_cid) cid_q[n] <= keep_cid;
            cid_q[i_q[BW-1:0]] <= keep_cid;
            size_q[keep_cid]   <= size_q[tgt_cid] + size_q[oth_cid] + 1'b1;
            size_q[i_q[BW-1:0]] <= (IDX_W+1)'(1);
          end else begin
            cid_q[i_q[BW-1:0]]  <= tgt_cid;
            size_q[tgt_cid]     <= size_q[tgt_cid] + 1'b1;
            size_q[i_q[BW-1:0]] <= (IDX_W+1)'(1);
          end
          if (cur.dst_v && cur.dst != '0) begin
            lw_v_q[cur.dst] <= 1'b1;
            lw_i_q[cur.dst] <= i_q[BW-1:0];
          end
          if (i_q + 1'b1 == cnt_q) state_q <= S_LIVEOUT;
          i_q <= i_q + 1'b1;
        end
        S_LIVEOUT: begin
          for (int n = 0; n < BB_MAX; n++)
            if (n < int'(cnt_q) && ib_q[n].dst_v && ib_q[n].dst != '0 &&
                lw_v_q[ib_q[n].dst] && lw_i_q[ib_q[n].dst] == BW'(n))
              oext_q[n] <= 1'b1;
          i_q     <= '0;
          state_q <= S_EMIT_HEAD;
        end
        S_EMIT_HEAD: begin
          if (i_q == cnt_q) begin
            state_q <= S_COLLECT;
            cnt_q   <= '0;
            ovf_q   <= 1'b0;
          end else if (cid_q[i_q[BW-1:0]] == i_q[BW-1:0] &&
                       size_q[i_q[BW-1:0]] >= (IDX_W+1)'(2)) begin
            acc_q   <= '0;
            j_q     <= i_q;
            state_q <= S_EMIT_SCAN;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        S_EMIT_SCAN: begin
          if (j_q == cnt_q) begin
            cc_wr_v       <= 1'b1;
            cc_wr_cluster <= acc_q;
            n_clusters    <= n_clusters + 1;
            n_clustered   <= n_clustered + 32'(acc_q.count);
            i_q           <= i_q + 1'b1;
            state_q       <= S_EMIT_HEAD;
          end else begin
            if (cid_q[j_q[BW-1:0]] == i_q[BW-1:0]) begin
              cl_member_t mm;
              mm.pc        = ib_q[j_q[BW-1:0]].pc;
              mm.depth     = depth_q[j_q[BW-1:0]];
              mm.src_local = sloc_q[j_q[BW-1:0]];
              for (int k = 0; k < 2; k++)
                mm.src_prod[k] = sloc_q[j_q[BW-1:0]][k] ? midx_q[sprod_q[j_q[BW-1:0]][k]] : '0;
              mm.out_local = oloc_q[j_q[BW-1:0]];
              mm.out_ext   = oext_q[j_q[BW-1:0]];
              acc_q.m[acc_q.count[IDX_W-1:0]] <= mm;
              acc_q.count <= acc_q.count + 1'b1;
              midx_q[j_q[BW-1:0]] <= acc_q.count[IDX_W-1:0];
            end
            j_q <= j_q + 1'b1;
          end
        end
        default: state_q <= S_COLLECT;
      endcase
    end
  end

endmodule
