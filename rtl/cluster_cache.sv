// cluster_cache: stores the clusters produced by the cluster formation unit
// and finds them again by instruction address at dispatch.
//
// Each entry holds one cluster: the member count and, per member in program
// order, its instruction address, its dependence depth, its source locality
// bits (with the index of the member producing each local source) and its
// destination locality bits. The cache is direct mapped and indexed by the
// address of the cluster's first member; the stored address of that member is
// the tag. A write (`wr_v`) replaces the entry selected by the new cluster's
// first address. A lookup (`rd_pc`) is combinational: `rd_hit` is high when
// the selected entry is valid and its first member has address `rd_pc`.
//
// The document gives the contents of an entry and the 256-entry size used in
// its results (Section 6); the direct-mapped organisation, the lookup by the
// first member's address and the stored producer indices are this design's.
module cluster_cache
  import clu_pkg::*;
#(
  parameter int ENTRIES = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_v,
  input  cluster_t        wr_cluster,
  input  logic [PC_W-1:0] rd_pc,
  output logic            rd_hit,
  output cluster_t        rd_cluster
);

  localparam int IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  cluster_t           ent_q [ENTRIES];

  logic [IW-1:0] wr_idx, rd_idx;
  assign wr_idx = wr_cluster.m[0].pc[IW+1:2];
  assign rd_idx = rd_pc[IW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_v) valid_q[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_v) ent_q[wr_idx] <= wr_cluster;
  end

  assign rd_cluster = ent_q[rd_idx];
  assign rd_hit     = valid_q[rd_idx] && (ent_q[rd_idx].m[0].pc == rd_pc);

endmodule
