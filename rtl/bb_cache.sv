// bb_cache: basic block cache. It counts how often each basic block has been
// committed and starts cluster formation for a block the second time the
// block commits.
//
// The cache is direct mapped and indexed by the start address of the block
// (word address bits above bit 1); each entry holds a valid bit, an address
// tag and a saturating commit count. For every committed block (`commit_v`,
// start address `commit_pc`) the entry is looked up: on a hit the count is
// incremented, on a miss the entry is replaced with a count of one. When a
// count reaches two, `form_en` pulses for one cycle, one cycle after the
// commit, with the block's address on `form_pc`.
//
// One block per cycle. Reset clears the valid bits.
// The document gives the function (indexed by block start address, counts
// sightings, enables formation on the second commit); the size, the
// direct-mapped organisation and the counter width are this design's.
module bb_cache
  import clu_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int CNT_W   = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            commit_v,
  input  logic [PC_W-1:0] commit_pc,
  output logic            form_en,
  output logic [PC_W-1:0] form_pc,
  output logic [CNT_W-1:0] seen_count   // count after this commit (for statistics)
);

  localparam int IW = $clog2(ENTRIES);
  localparam int TW = PC_W - 2 - IW;

  logic [ENTRIES-1:0] valid_q;
  logic [TW-1:0]      tag_q [ENTRIES];
  logic [CNT_W-1:0]   cnt_q [ENTRIES];

  logic [IW-1:0]    idx;
  logic [TW-1:0]    tag;
  logic             hit;
  logic [CNT_W-1:0] cnt_new;

  assign idx = commit_pc[IW+1:2];
  assign tag = commit_pc[PC_W-1:IW+2];
  assign hit = valid_q[idx] && (tag_q[idx] == tag);
  always_comb begin
    if (!hit)                  cnt_new = CNT_W'(1);
    else if (&cnt_q[idx])      cnt_new = cnt_q[idx];
    else                       cnt_new = cnt_q[idx] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (commit_v) valid_q[idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (commit_v) begin
      tag_q[idx] <= tag;
      cnt_q[idx] <= cnt_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      form_en    <= 1'b0;
      form_pc    <= '0;
      seen_count <= '0;
    end else begin
      form_en    <= commit_v && (cnt_new == CNT_W'(2));
      form_pc    <= commit_pc;
      if (commit_v) seen_count <= cnt_new;
    end
  end

endmodule
