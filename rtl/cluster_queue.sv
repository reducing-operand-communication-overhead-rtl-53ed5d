// cluster_queue: the cluster queue and the cluster scheduling logic.
//
// The queue is a circular buffer of ENTRIES columns (head = oldest, tail =
// next to allocate). A column holds one cluster: up to CL_MAX dependent
// instructions, one per row, in program order, plus an issue pointer to the
// next instruction to issue. Members are issued in order, at most one per
// cluster per cycle. A column is freed when all its members have issued and it
// is at the head.
//
// Readiness. A source that is not local waits for its physical tag on the
// broadcast bus (or is ready at dispatch) and is then read from an input port.
// A local source only needs its producer, an earlier member of the same
// cluster, to have issued: it is ready as soon as the producer's value can be
// reached inside the execution unit,
//   local path        consumer placed in the row just below the producer,
//                     from the cycle after the producer issued;
//   pass-through path consumer in any other row, from two cycles after;
//   input port        once the producer's tag has been broadcast, if the
//                     producer's buffer has meanwhile been overwritten.
//
// Steering. A member is sent to row (depth mod ROWS) so that dependent
// members land in consecutive rows. If no ALU of that row is free this cycle
// (or its operands are not reachable from there) the following rows are tried
// in turn, and the operand then uses the pass-through path. The oldest
// cluster is served first. An issue also needs free input ports (N_IN per
// cycle) for its global operands and, if its result leaves the unit, a free
// output port (N_OUT per cycle).
//
// Holding. An ALU result whose only consumers are local does not go out on an
// output port. It stays in its ALU's buffer, and that ALU takes no new
// instruction until the cluster's column retires. At most HOLD_MAX buffers are
// held at once, so at least COLS ALUs always stay free for progress. Past the
// budget the result is sent out like a global value and its consumers use the
// pass-through or input path. Results with internal or external consumers,
// load and store addresses and branch outcomes always use an output port.
//
// Implementation note: the selection walks the columns from oldest to
// youngest and records one pick per age slot. The packets are then routed
// to the array positions and input ports by constant-index loops, so the
// selection logic is one acyclic priority chain.
// The unused pc fields of the instruction and member records are only
// carried along with them (lint reports them as unused bits). rst_n feeds the
// flip-flop reset and also disables the assertions, which lint reports as
// a signal used both synchronously and asynchronously. Both are expected.
//
// Timing: dispatch writes in cycle t are visible to issue selection in t+1.
// The issue packets (ceu_issue) and register-read tags (rd_tag) are
// combinational from the queue state and the execution unit's buffer tags.
//
// The column organisation, per-column issue pointer, ready-at-dispatch local
// operands and depth-modulo-rows steering follow the document (Section 4,
// Fig. 4). The fallback rows, the port arbitration, the hold budget and the
// readiness rules of the pass-through and input paths are this design's.
module cluster_queue
  import clu_pkg::*;
#(
  parameter int ENTRIES = 8,
  parameter int ROWS    = 4,
  parameter int COLS    = 4,
  parameter int N_IN    = 8,
  parameter int N_OUT   = 4,
  parameter int NB      = 8,   // broadcast bus width (tags per cycle)
  parameter int HOLD_MAX = ROWS*COLS - COLS  // buffers that may be held at once
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // allocation and member writes from dispatch
  output logic            can_alloc,
  output logic [$clog2(ENTRIES)-1:0] tail,
  input  logic            alloc_v,
  input  logic [IDX_W:0]  alloc_count,
  input  logic            wr_v,
  input  logic [$clog2(ENTRIES)-1:0] wr_entry,
  input  logic [IDX_W-1:0] wr_idx,
  input  rn_instr_t       wr_instr,
  input  cl_member_t      wr_meta,
  // global broadcast bus (wakeup)
  input  logic            bc_v   [NB],
  input  logic [TAG_W-1:0] bc_tag[NB],
  // execution unit
  input  logic            buf_valid[ROWS][COLS],
  input  logic [7:0]      buf_id   [ROWS][COLS],
  output ceu_issue_t      ceu_issue[ROWS][COLS],
  output logic            rd_v  [N_IN],
  output logic [TAG_W-1:0] rd_tag[N_IN],
  // status and statistics
  output logic            empty,
  output logic [31:0]     n_issued,
  output logic [31:0]     n_op_local,   // operands taken from the local path
  output logic [31:0]     n_op_pass,    // operands taken from the pass-through path
  output logic [31:0]     n_op_global,  // operands taken from input ports
  output logic [31:0]     n_remap       // members not placed in their depth row
);

  localparam int QW = $clog2(ENTRIES);
  localparam int RW = 2;  // row / column fields of an ALU address ({row,col} in 4 bits)

  // ---------------------------------------------------------------------
  // Storage
  // ---------------------------------------------------------------------
  logic [ENTRIES-1:0]  ev_q;                       // column allocated
  logic [IDX_W:0]      ecnt_q [ENTRIES];           // members in the cluster
  logic [IDX_W:0]      eip_q  [ENTRIES];           // issue pointer
  logic [QW-1:0]       head_q, tail_q;
  logic [QW:0]         used_q;

  logic                mp_q   [ENTRIES][CL_MAX];   // member written
  rn_instr_t           mi_q   [ENTRIES][CL_MAX];
  cl_member_t          mm_q   [ENTRIES][CL_MAX];
  logic [1:0]          mrdy_q [ENTRIES][CL_MAX];   // source tag seen on broadcast bus
  logic                mlast_q[ENTRIES][CL_MAX];   // issued in the previous cycle
  logic [RW-1:0]       mrow_q [ENTRIES][CL_MAX];
  logic [RW-1:0]       mcol_q [ENTRIES][CL_MAX];
  logic                held_q [ROWS][COLS];        // buffer kept for local consumers
  logic [QW-1:0]       hcol_q [ROWS][COLS];        // ... until this column retires

  assign tail      = tail_q;
  assign can_alloc = (used_q < (QW+1)'(ENTRIES)) && !flush;
  assign empty     = (used_q == '0);

  function automatic logic tag_bcast(logic [TAG_W-1:0] t, logic bv[NB], logic [TAG_W-1:0] bt[NB]);
    logic hit = 1'b0;
    for (int b = 0; b < NB; b++) if (bv[b] && bt[b] == t) hit = 1'b1;
    return hit;
  endfunction

  // ---------------------------------------------------------------------
  // Issue selection, oldest column first. Slot i of the pick arrays belongs
  // to the i-th oldest column; all array writes use constant indices.
  // ---------------------------------------------------------------------
  logic               pk_v    [ENTRIES];
  logic [QW-1:0]      pk_q    [ENTRIES];
  logic [RW-1:0]      pk_row  [ENTRIES];
  logic [RW-1:0]      pk_col  [ENTRIES];
  logic               pk_hold [ENTRIES];
  ceu_issue_t         pk_pkt  [ENTRIES];
  logic [1:0]         pk_in   [ENTRIES];   // operand k is read from an input port
  logic [TAG_W-1:0]   pk_tag  [ENTRIES][2];
  logic [31:0]        cyc_local, cyc_pass, cyc_global, cyc_remap, cyc_issued;

  logic [ROWS*COLS-1:0] held_vec;
  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) held_vec[r*COLS + c] = held_q[r][c];

  always_comb begin
    logic [ROWS*COLS-1:0] used;
    logic [COLS-1:0]      rowfree;
    int         n_in_used, n_out_used, n_held;
    int         pref, r, cf, nin, p, pr;
    logic [QW-1:0]    q;
    logic [IDX_W-1:0] m;
    logic [RW-1:0]    pc;
    logic       done, hold, need_out, ok, need, issued, holds;
    logic       used_k [2];
    src_sel_e   sel [2];
    logic [3:0] sal [2];
    rn_instr_t  ins;
    cl_member_t meta;

    used       = '0;
    n_in_used  = 0;
    n_out_used = 0;
    n_held     = 0;
    for (int b = 0; b < ROWS*COLS; b++) if (held_vec[b]) n_held++;
    cyc_local  = 0;
    cyc_pass   = 0;
    cyc_global = 0;
    cyc_remap  = 0;
    cyc_issued = 0;

    for (int i = 0; i < ENTRIES; i++) begin
      q = QW'((int'(head_q) + i) % ENTRIES);
      m = eip_q[q][IDX_W-1:0];
      ins  = mi_q[q][m];
      meta = mm_q[q][m];
      pk_v[i]    = 1'b0;
      pk_q[i]    = q;
      pk_row[i]  = '0;
      pk_col[i]  = '0;
      pk_hold[i] = 1'b0;
      pk_pkt[i]  = '0;
      pk_in[i]   = '0;
      pk_tag[i][0] = ins.src_tag[0];
      pk_tag[i][1] = ins.src_tag[1];
      // A result with local consumers is held in its buffer while the budget
      // allows; it leaves on an output port only if it has internal or
      // external consumers, or could not be held.
      hold     = ins.iclass == IC_ALU && ins.dst_v && meta.out_local && n_held < HOLD_MAX;
      need_out = ins.iclass inside {IC_LOAD, IC_STORE, IC_BRANCH} ||
                 (ins.iclass == IC_ALU && ins.dst_v && (meta.out_ext || !hold));
      done = !(ev_q[q] && int'(eip_q[q]) < int'(ecnt_q[q]) && mp_q[q][m] && !flush) ||
             (need_out && n_out_used >= N_OUT);
      pref = int'(meta.depth) % ROWS;
      for (int t = 0; t < ROWS; t++) begin
        r = (pref + t) % ROWS;
        // operand reachability for this member placed in row r
        ok  = 1'b1;
        nin = 0;
        for (int k = 0; k < 2; k++) begin
          used_k[k] = 1'b0;
          sal[k]    = '0;
          sel[k]    = SRC_IMM;
          p = 0; pr = 0; pc = '0; issued = 1'b0; holds = 1'b0;
          need = ins.src_v[k] && !(k == 1 && (ins.use_imm || ins.iclass == IC_STORE));
          if (need) begin
            if (meta.src_local[k]) begin
              p  = int'(meta.src_prod[k]);
              pr = int'(mrow_q[q][p]) % ROWS;
              pc = mcol_q[q][p];
              issued = (p < int'(eip_q[q]));
              holds  = issued && buf_valid[pr][pc] &&
                       buf_id[pr][pc] == 8'({q, IDX_W'(p)});
              sal[k] = {2'(pr), 2'(pc)};
              if (holds && pr + 1 == r) sel[k] = SRC_LOCAL;
              else if (holds && !mlast_q[q][p]) sel[k] = SRC_PASS;
              else if (issued && (ins.src_rdy[k] || mrdy_q[q][m][k])) begin
                sel[k] = SRC_IN; used_k[k] = 1'b1; nin++;
              end else ok = 1'b0;
            end else if (ins.src_rdy[k] || mrdy_q[q][m][k]) begin
              sel[k] = SRC_IN; used_k[k] = 1'b1; nin++;
            end else ok = 1'b0;
          end
        end
        rowfree = ~COLS'(used >> (r*COLS)) & ~COLS'(held_vec >> (r*COLS));
        cf = -1;
        for (int c = COLS-1; c >= 0; c--) if (rowfree[c]) cf = c;
        if (!done && ok && n_in_used + nin <= N_IN && cf >= 0) begin
          done = 1'b1;
          used = used | ((ROWS*COLS)'(1) << (r*COLS + cf));
          pk_v[i]    = 1'b1;
          pk_row[i]  = RW'(r);
          pk_col[i]  = RW'(cf);
          pk_hold[i] = hold;
          if (hold) n_held++;
          cyc_issued++;
          if (t != 0) cyc_remap++;
          pk_pkt[i].valid    = 1'b1;
          pk_pkt[i].op       = ins.op;
          pk_pkt[i].imm      = ins.imm;
          pk_pkt[i].dst_tag  = (ins.iclass == IC_STORE) ? ins.src_tag[1] : ins.dst_tag;
          pk_pkt[i].id       = 8'({q, m});
          pk_pkt[i].out_v    = need_out;
          pk_pkt[i].out_port = 3'(n_out_used);
          pk_pkt[i].out_kind = (ins.iclass == IC_LOAD)   ? OUT_LDADDR :
                               (ins.iclass == IC_STORE)  ? OUT_STADDR :
                               (ins.iclass == IC_BRANCH) ? OUT_BRANCH : OUT_REG;
          if (need_out) n_out_used++;
          for (int k = 0; k < 2; k++) begin
            pk_pkt[i].sel[k]     = sel[k];
            pk_pkt[i].sel_alu[k] = sal[k];
            if (sel[k] == SRC_LOCAL) cyc_local++;
            if (sel[k] == SRC_PASS)  cyc_pass++;
            if (used_k[k]) begin
              cyc_global++;
              pk_in[i][k] = 1'b1;
              pk_pkt[i].sel_port[k] = 3'(n_in_used);
              n_in_used++;
            end
          end
        end
      end
    end
  end

  // Route the picks to the array positions, input ports and columns.
  logic          iss_v   [ENTRIES];
  logic [RW-1:0] iss_row [ENTRIES];
  logic [RW-1:0] iss_col [ENTRIES];
  logic          iss_hold[ENTRIES];
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        ceu_issue[r][c] = '0;
        for (int i = 0; i < ENTRIES; i++)
          if (pk_v[i] && int'(pk_row[i]) == r && int'(pk_col[i]) == c) ceu_issue[r][c] = pk_pkt[i];
      end
    for (int n = 0; n < N_IN; n++) begin
      rd_v[n]   = 1'b0;
      rd_tag[n] = '0;
      for (int i = 0; i < ENTRIES; i++)
        for (int k = 0; k < 2; k++)
          if (pk_v[i] && pk_in[i][k] && int'(pk_pkt[i].sel_port[k]) == n) begin
            rd_v[n]   = 1'b1;
            rd_tag[n] = pk_tag[i][k];
          end
    end
    for (int q = 0; q < ENTRIES; q++) begin
      iss_v[q]    = 1'b0;
      iss_row[q]  = '0;
      iss_col[q]  = '0;
      iss_hold[q] = 1'b0;
      for (int i = 0; i < ENTRIES; i++)
        if (pk_v[i] && int'(pk_q[i]) == q) begin
          iss_v[q]    = 1'b1;
          iss_row[q]  = pk_row[i];
          iss_col[q]  = pk_col[i];
          iss_hold[q] = pk_hold[i];
        end
    end
  end

  // ---------------------------------------------------------------------
  // State update
  // ---------------------------------------------------------------------
  logic retire;
  assign retire = ev_q[head_q] && eip_q[head_q] == ecnt_q[head_q] && used_q != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_q     <= '0;
      head_q   <= '0;
      tail_q   <= '0;
      used_q   <= '0;
      n_issued <= '0;
      n_op_local  <= '0;
      n_op_pass   <= '0;
      n_op_global <= '0;
      n_remap     <= '0;
      for (int q = 0; q < ENTRIES; q++)
        for (int m = 0; m < CL_MAX; m++) begin
          mp_q[q][m]    <= 1'b0;
          mlast_q[q][m] <= 1'b0;
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) held_q[r][c] <= 1'b0;
    end else if (flush) begin
      ev_q   <= '0;
      head_q <= '0;
      tail_q <= '0;
      used_q <= '0;
      for (int q = 0; q < ENTRIES; q++)
        for (int m = 0; m < CL_MAX; m++) begin
          mp_q[q][m]    <= 1'b0;
          mlast_q[q][m] <= 1'b0;
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) held_q[r][c] <= 1'b0;
    end else begin
      n_issued    <= n_issued + cyc_issued;
      n_op_local  <= n_op_local + cyc_local;
      n_op_pass   <= n_op_pass + cyc_pass;
      n_op_global <= n_op_global + cyc_global;
      n_remap     <= n_remap + cyc_remap;
      // wakeup
      for (int q = 0; q < ENTRIES; q++)
        for (int m = 0; m < CL_MAX; m++) begin
          mlast_q[q][m] <= 1'b0;
          for (int k = 0; k < 2; k++)
            if (tag_bcast(mi_q[q][m].src_tag[k], bc_v, bc_tag)) mrdy_q[q][m][k] <= 1'b1;
        end
      // issue
      for (int q = 0; q < ENTRIES; q++)
        if (iss_v[q]) begin
          eip_q[q] <= eip_q[q] + 1'b1;
          mlast_q[q][int'(eip_q[q]) % CL_MAX] <= 1'b1;
          mrow_q[q][int'(eip_q[q]) % CL_MAX]  <= iss_row[q];
          mcol_q[q][int'(eip_q[q]) % CL_MAX]  <= iss_col[q];
          if (iss_hold[q]) begin
            held_q[iss_row[q]][iss_col[q]] <= 1'b1;
            hcol_q[iss_row[q]][iss_col[q]] <= QW'(q);
          end
        end
      // retire the head column, releasing the buffers it held
      if (retire) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (held_q[r][c] && hcol_q[r][c] == head_q) held_q[r][c] <= 1'b0;
        ev_q[head_q] <= 1'b0;
        for (int m = 0; m < CL_MAX; m++) mp_q[head_q][m] <= 1'b0;
        head_q <= QW'((int'(head_q) + 1) % ENTRIES);
      end
      // allocate a column
      if (alloc_v) begin
        ev_q[tail_q]   <= 1'b1;
        ecnt_q[tail_q] <= alloc_count;
        eip_q[tail_q]  <= '0;
        tail_q <= QW'((int'(tail_q) + 1) % ENTRIES);
      end
      used_q <= used_q + (QW+1)'(alloc_v) - (QW+1)'(retire);
      // member write
      if (wr_v) begin
        mp_q[wr_entry][wr_idx]   <= 1'b1;
        mi_q[wr_entry][wr_idx]   <= wr_instr;
        mm_q[wr_entry][wr_idx]   <= wr_meta;
        mrdy_q[wr_entry][wr_idx] <= {tag_bcast(wr_instr.src_tag[1], bc_v, bc_tag),
                                     tag_bcast(wr_instr.src_tag[0], bc_v, bc_tag)};
        mlast_q[wr_entry][wr_idx] <= 1'b0;
      end
    end
  end

  // Dispatch never allocates into a full queue, and writes only allocated columns.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
    alloc_v |-> used_q < (QW+1)'(ENTRIES)) else $error("cluster queue overflow");
  a_wr_allocated: assert property (@(posedge clk) disable iff (!rst_n || flush)
    wr_v |-> (alloc_v || ev_q[wr_entry])) else $error("write to a free cluster queue column");

endmodule
