// cluster_dispatch: the clustering part of the dispatch/rename stage. It
// checks the address of each renamed instruction against the cluster cache
// and moves cluster members out of the instruction stream into the cluster
// queue; every other instruction goes on to the conventional instruction queue.
//
// A cluster is opened when an instruction's address hits the cluster cache
// (the address of a cluster's first member) and the cluster queue has a free
// entry: the entry is allocated and the instruction is written as member 0.
// Up to OPEN clusters may be open at once, because the clusters of one basic
// block interleave in program order. Each open cluster waits for the address
// of its next member; when it arrives the instruction is written to that
// member's row of the entry, with the depth and locality bits from the cache.
// The cluster closes after its last member. If no entry or open slot is free
// the first member, and with it the whole cluster, takes the conventional path.
//
// One instruction per cycle, combinational from rn_v to the outputs; the open
// cluster table updates at the clock edge. `flush` (branch misprediction)
// abandons the open clusters.
// Address matching and removal from the stream follow the document (Section
// 4); the open-cluster table, its size and the one-per-cycle rate are this
// design's.
module cluster_dispatch
  import clu_pkg::*;
#(
  parameter int CQ_ENTRIES = 8,
  parameter int OPEN       = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // renamed instruction stream
  input  logic            rn_v,
  input  rn_instr_t       rn_i,
  // cluster cache lookup
  output logic [PC_W-1:0] cc_rd_pc,
  input  logic            cc_rd_hit,
  input  cluster_t        cc_rd_cluster,
  // cluster queue
  input  logic            cq_can_alloc,
  input  logic [$clog2(CQ_ENTRIES)-1:0] cq_tail,
  output logic            cq_alloc_v,
  output logic [IDX_W:0]  cq_alloc_count,
  output logic            cq_wr_v,
  output logic [$clog2(CQ_ENTRIES)-1:0] cq_wr_entry,
  output logic [IDX_W-1:0] cq_wr_idx,
  output rn_instr_t       cq_wr_instr,
  output cl_member_t      cq_wr_meta,
  // conventional instruction queue
  output logic            iq_v,
  output rn_instr_t       iq_i
);

  localparam int QW = $clog2(CQ_ENTRIES);
  localparam int OW = (OPEN > 1) ? $clog2(OPEN) : 1;

  logic [OPEN-1:0]  ov_q;
  logic [QW-1:0]    oq_q   [OPEN];
  logic [IDX_W:0]   onext_q[OPEN];
  cluster_t         ocl_q  [OPEN];

  logic          mem_hit, free_slot_v, open_new;
  logic [OW-1:0] mem_slot, free_slot;

  assign cc_rd_pc = rn_i.pc;

  always_comb begin
    mem_hit     = 1'b0;
    mem_slot    = '0;
    free_slot_v = 1'b0;
    free_slot   = '0;
    for (int s = OPEN-1; s >= 0; s--) begin
      if (ov_q[s] && ocl_q[s].m[onext_q[s][IDX_W-1:0]].pc == rn_i.pc) begin
        mem_hit  = 1'b1;
        mem_slot = OW'(s);
      end
      if (!ov_q[s]) begin
        free_slot_v = 1'b1;
        free_slot   = OW'(s);
      end
    end
    open_new = rn_v && !mem_hit && cc_rd_hit && cq_can_alloc && free_slot_v &&
               cc_rd_cluster.count >= (IDX_W+1)'(2);

    cq_alloc_v     = open_new;
    cq_alloc_count = cc_rd_cluster.count;
    cq_wr_v        = rn_v && (mem_hit || open_new);
    cq_wr_entry    = mem_hit ? oq_q[mem_slot] : cq_tail;
    cq_wr_idx      = mem_hit ? onext_q[mem_slot][IDX_W-1:0] : '0;
    cq_wr_instr    = rn_i;
    cq_wr_meta     = mem_hit ? ocl_q[mem_slot].m[onext_q[mem_slot][IDX_W-1:0]]
                             : cc_rd_cluster.m[0];
    iq_v           = rn_v && !cq_wr_v;
    iq_i           = rn_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov_q <= '0;
    end else if (flush) begin
      ov_q <= '0;
    end else begin
      if (rn_v && mem_hit) begin
        onext_q[mem_slot] <= onext_q[mem_slot] + 1'b1;
        if (onext_q[mem_slot] + 1'b1 == ocl_q[mem_slot].count) ov_q[mem_slot] <= 1'b0;
      end
      if (open_new) begin
        ov_q[free_slot]    <= 1'b1;
        oq_q[free_slot]    <= cq_tail;
        onext_q[free_slot] <= (IDX_W+1)'(1);
        ocl_q[free_slot]   <= cc_rd_cluster;
      end
    end
  end

endmodule
