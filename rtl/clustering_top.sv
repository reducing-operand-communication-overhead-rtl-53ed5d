// clustering_top: the instruction clustering mechanism of an out-of-order
// core (8-way configuration): cluster formation with its basic block cache and
// cluster cache, the clustering part of dispatch, the cluster queue with its
// scheduler, and the 4 x 4 cluster execution unit.
//
// Connections (the shaded part of the pipeline plus cluster execution):
//   commit stream  -> cluster_formation -> bb_cache (block seen twice?)
//                     cluster_formation -> cluster_cache (new clusters)
//   rename stream  -> cluster_dispatch  -> cluster_cache (lookup by address)
//                     cluster_dispatch  -> cluster_queue (members)
//                                       -> iq_* (all other instructions)
//   cluster_queue  -> cluster_exec_unit (issue packets, operand selects)
//   cluster_queue  -> rd_tag / rd_data  (register file read, input ports)
//   broadcast bus  -> cluster_queue     (wakeup)
//   cluster_exec_unit -> out            (results, load/store addresses,
//                                        branch conditions: output ports)
// The fetch/decode and rename stages, the conventional instruction queue and
// ALUs, the register file, the broadcast buses, the load/store queue and the
// commit stage are the host core's; their signals are ports here.
//
// Timing: a register-file read is combinational (rd_tag in a cycle, rd_data
// in the same cycle); output ports are registered; everything else is as in
// the sub-blocks. Parameter defaults are the 8-way machine of the document
// (8-entry cluster queue, one 4 x 4 network ALU, 256-entry cluster cache);
// the other sizes are this design's.
module clustering_top
  import clu_pkg::*;
#(
  parameter int CQ_ENTRIES = 8,
  parameter int CC_ENTRIES = 256,
  parameter int BB_ENTRIES = 256,
  parameter int BB_MAX     = 64,
  parameter int ROWS       = 4,
  parameter int COLS       = 4,
  parameter int N_IN       = 8,
  parameter int N_OUT      = 4,
  parameter int NB         = 8,
  parameter int OPEN       = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // commit stream
  input  logic            commit_v,
  input  commit_instr_t   commit_i,
  // renamed instruction stream
  input  logic            rn_v,
  input  rn_instr_t       rn_i,
  // to the conventional instruction queue
  output logic            iq_v,
  output rn_instr_t       iq_i,
  // register file read (input ports)
  output logic            rd_v   [N_IN],
  output logic [TAG_W-1:0] rd_tag[N_IN],
  input  logic [XLEN-1:0] rd_data[N_IN],
  // global broadcast bus (wakeup)
  input  logic            bc_v   [NB],
  input  logic [TAG_W-1:0] bc_tag[NB],
  // output ports
  output ceu_out_t        out    [N_OUT],
  // status and statistics
  output logic            formation_busy,
  output logic            cq_empty,
  output logic [31:0]     n_local_edges,
  output logic [31:0]     n_internal_edges,
  output logic [31:0]     n_external_edges,
  output logic [31:0]     n_clusters,
  output logic [31:0]     n_clustered,
  output logic [31:0]     n_issued,
  output logic [31:0]     n_op_local,
  output logic [31:0]     n_op_pass,
  output logic [31:0]     n_op_global,
  output logic [31:0]     n_remap
);

  localparam int QW = $clog2(CQ_ENTRIES);

  // formation <-> basic block cache <-> cluster cache
  logic            bb_commit_v, form_en;
  logic [PC_W-1:0] bb_commit_pc, form_pc;
  logic [2:0]      bb_seen;
  logic            cc_wr_v;
  cluster_t        cc_wr_cluster;

  // dispatch <-> cluster cache / queue
  logic            cc_rd_hit;
  logic [PC_W-1:0] cc_rd_pc;
  cluster_t        cc_rd_cluster;
  logic            cq_can_alloc, cq_alloc_v, cq_wr_v;
  logic [QW-1:0]   cq_tail, cq_wr_entry;
  logic [IDX_W:0]  cq_alloc_count;
  logic [IDX_W-1:0] cq_wr_idx;
  rn_instr_t       cq_wr_instr;
  cl_member_t      cq_wr_meta;

  // queue <-> execution unit
  ceu_issue_t      ceu_issue[ROWS][COLS];
  logic            buf_valid[ROWS][COLS];
  logic [XLEN-1:0] buf_value[ROWS][COLS];
  logic [7:0]      buf_id   [ROWS][COLS];

  cluster_formation #(.BB_MAX(BB_MAX)) u_form (
    .clk, .rst_n,
    .commit_v, .commit_i,
    .bb_commit_v, .bb_commit_pc,
    .form_en, .form_pc,
    .cc_wr_v, .cc_wr_cluster,
    .busy       (formation_busy),
    .n_local    (n_local_edges),
    .n_internal (n_internal_edges),
    .n_external (n_external_edges),
    .n_clusters, .n_clustered
  );

  bb_cache #(.ENTRIES(BB_ENTRIES)) u_bbc (
    .clk, .rst_n,
    .commit_v  (bb_commit_v),
    .commit_pc (bb_commit_pc),
    .form_en, .form_pc,
    .seen_count(bb_seen)
  );

  cluster_cache #(.ENTRIES(CC_ENTRIES)) u_cc (
    .clk, .rst_n,
    .wr_v      (cc_wr_v),
    .wr_cluster(cc_wr_cluster),
    .rd_pc     (cc_rd_pc),
    .rd_hit    (cc_rd_hit),
    .rd_cluster(cc_rd_cluster)
  );

  cluster_dispatch #(.CQ_ENTRIES(CQ_ENTRIES), .OPEN(OPEN)) u_disp (
    .clk, .rst_n, .flush,
    .rn_v, .rn_i,
    .cc_rd_pc, .cc_rd_hit, .cc_rd_cluster,
    .cq_can_alloc, .cq_tail, .cq_alloc_v, .cq_alloc_count,
    .cq_wr_v, .cq_wr_entry, .cq_wr_idx, .cq_wr_instr, .cq_wr_meta,
    .iq_v, .iq_i
  );

  cluster_queue #(.ENTRIES(CQ_ENTRIES), .ROWS(ROWS), .COLS(COLS),
                  .N_IN(N_IN), .N_OUT(N_OUT), .NB(NB)) u_cq (
    .clk, .rst_n, .flush,
    .can_alloc  (cq_can_alloc),
    .tail       (cq_tail),
    .alloc_v    (cq_alloc_v),
    .alloc_count(cq_alloc_count),
    .wr_v       (cq_wr_v),
    .wr_entry   (cq_wr_entry),
    .wr_idx     (cq_wr_idx),
    .wr_instr   (cq_wr_instr),
    .wr_meta    (cq_wr_meta),
    .bc_v, .bc_tag,
    .buf_valid, .buf_id,
    .ceu_issue,
    .rd_v, .rd_tag,
    .empty      (cq_empty),
    .n_issued, .n_op_local, .n_op_pass, .n_op_global, .n_remap
  );

  cluster_exec_unit #(.ROWS(ROWS), .COLS(COLS), .N_IN(N_IN), .N_OUT(N_OUT)) u_ceu (
    .clk, .rst_n,
    .issue   (ceu_issue),
    .in_data (rd_data),
    .buf_valid, .buf_value, .buf_id,
    .out
  );

endmodule
