// tb_cluster_queue: the cluster queue and scheduler driving the real cluster
// execution unit, with the register file and broadcast bus modelled here.
// Scenarios, each with hand-worked expectations:
//  1 a 4-deep chain with ready inputs issues in 4 consecutive cycles, rows
//    0..3, every local operand on the local path, correct results;
//  2 a 6-deep chain wraps from row 3 to row 0 through the pass-through path
//    (one extra cycle) and continues on the local path;
//  3 an operand two rows down uses the pass-through path;
//  4 a member waits for its global operand's broadcast and issues the cycle
//    after it, reading the input port;
//  5 five single-depth clusters at once: four fill row 0, the fifth is placed
//    in row 1 (mapping failure);
//  6 the queue fills (can_alloc low) and frees columns as clusters complete;
//  7 a flush empties the queue.
module tb_cluster_queue;
  import clu_pkg::*;
  import tb_blocks_pkg::*;

  localparam int E = 8, ROWS = 4, COLS = 4, N_IN = 8, N_OUT = 4, NB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            flush = 0;
  logic            can_alloc;
  logic [2:0]      tail;
  logic            alloc_v = 0, wr_v = 0;
  logic [IDX_W:0]  alloc_count;
  logic [2:0]      wr_entry;
  logic [IDX_W-1:0] wr_idx;
  rn_instr_t       wr_instr;
  cl_member_t      wr_meta;
  logic            bc_v [NB];
  logic [TAG_W-1:0] bc_tag[NB];
  logic            buf_valid[ROWS][COLS];
  logic [XLEN-1:0] buf_value[ROWS][COLS];
  logic [7:0]      buf_id   [ROWS][COLS];
  ceu_issue_t      ceu_issue[ROWS][COLS];
  logic            rd_v  [N_IN];
  logic [TAG_W-1:0] rd_tag[N_IN];
  logic [XLEN-1:0] rd_data[N_IN];
  ceu_out_t        out [N_OUT];
  logic            empty;
  logic [31:0]     n_issued, n_op_local, n_op_pass, n_op_global, n_remap;

  cluster_queue #(.ENTRIES(E), .ROWS(ROWS), .COLS(COLS), .N_IN(N_IN), .N_OUT(N_OUT), .NB(NB)) dut (.*);
  cluster_exec_unit #(.ROWS(ROWS), .COLS(COLS), .N_IN(N_IN), .N_OUT(N_OUT)) u_ceu (
    .clk, .rst_n, .issue(ceu_issue), .in_data(rd_data),
    .buf_valid, .buf_value, .buf_id, .out);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register file model
  logic [XLEN-1:0] rf [1<<TAG_W];
  bit              rdy[1<<TAG_W];
  always_comb for (int p = 0; p < N_IN; p++) rd_data[p] = rf[rd_tag[p]];
  int bad_reads = 0;
  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int p = 0; p < N_IN; p++) if (rd_v[p] && !rdy[rd_tag[p]]) bad_reads++;
  end
  // output ports write the register file
  logic [XLEN-1:0] outv [1<<TAG_W];
  bit              outs [1<<TAG_W];
  always_ff @(posedge clk)
    if (rst_n) for (int p = 0; p < N_OUT; p++)
      if (out[p].valid && out[p].kind == OUT_REG) begin outv[out[p].tag] = out[p].value; outs[out[p].tag] = 1; end

  // issue monitor: cycle, row and operand sources of each {column, member}
  int       icyc [E][CL_MAX];
  int       irow [E][CL_MAX];
  src_sel_e isel [E][CL_MAX][2];
  always_ff @(posedge clk)
    if (rst_n) for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      if (ceu_issue[r][c].valid) begin
        int q, m;
        q = int'(ceu_issue[r][c].id[5:3]);
        m = int'(ceu_issue[r][c].id[2:0]);
        icyc[q][m] = cyc; irow[q][m] = r;
        isel[q][m][0] = ceu_issue[r][c].sel[0];
        isel[q][m][1] = ceu_issue[r][c].sel[1];
      end

  task automatic bcast(int t);
    @(negedge clk);
    rdy[t] = 1;
    bc_v[0] = 1; bc_tag[0] = TAG_W'(t);
    @(posedge clk);
    #1 bc_v[0] = 0;
  endtask

  // one member: op, sources (tag, local, producer), immediate, destination
  typedef struct { alu_op_e op; int s0; int s1; bit l0; bit l1; int p0; int p1;
                   int imm; bit ui; int dst; int depth; } mem_t;
  function automatic mem_t mm(alu_op_e op, int s0, int s1, bit l0, int p0, bit l1, int p1,
                              bit ui, int imm, int dst, int depth);
    mem_t x;
    x.op = op; x.s0 = s0; x.s1 = s1; x.l0 = l0; x.l1 = l1; x.p0 = p0; x.p1 = p1;
    x.ui = ui; x.imm = imm; x.dst = dst; x.depth = depth;
    return x;
  endfunction

  // dispatch a cluster, one member per cycle; returns its column
  task automatic put(mem_t ms[$], output int col);
    col = int'(tail);
    for (int k = 0; k < ms.size(); k++) begin
      @(negedge clk);
      alloc_v = (k == 0);
      alloc_count = (IDX_W+1)'(ms.size());
      wr_v = 1; wr_entry = 3'(col); wr_idx = IDX_W'(k);
      wr_instr = '0;
      wr_instr.pc = 32'h100 + 32'(4 * k);
      wr_instr.iclass = IC_ALU;
      wr_instr.op = ms[k].op;
      wr_instr.use_imm = ms[k].ui;
      wr_instr.imm = 32'(ms[k].imm);
      wr_instr.src_v = {!ms[k].ui && ms[k].s1 >= 0, ms[k].s0 >= 0};
      wr_instr.src_tag[0] = TAG_W'(ms[k].s0 < 0 ? 0 : ms[k].s0);
      wr_instr.src_tag[1] = TAG_W'(ms[k].s1 < 0 ? 0 : ms[k].s1);
      wr_instr.src_rdy = {ms[k].s1 >= 0 && rdy[ms[k].s1 < 0 ? 0 : ms[k].s1],
                          ms[k].s0 >= 0 && rdy[ms[k].s0 < 0 ? 0 : ms[k].s0]};
      wr_instr.dst_v = ms[k].dst >= 0;
      wr_instr.dst_tag = TAG_W'(ms[k].dst < 0 ? 0 : ms[k].dst);
      wr_meta = '0;
      wr_meta.depth = DEPTH_W'(ms[k].depth);
      wr_meta.src_local = {ms[k].l1, ms[k].l0};
      wr_meta.src_prod[0] = IDX_W'(ms[k].p0);
      wr_meta.src_prod[1] = IDX_W'(ms[k].p1);
      @(posedge clk);
      #1 alloc_v = 0; wr_v = 0;
    end
  endtask

  task automatic drain();
    int n = 0;
    while (!empty && n < 200) begin @(posedge clk); n++; end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    mem_t c [$];
    int q, q2;
    logic [XLEN-1:0] v;
    for (int b = 0; b < NB; b++) begin bc_v[b] = 0; bc_tag[b] = 0; end
    for (int t = 0; t < (1<<TAG_W); t++) begin rf[t] = $urandom; rdy[t] = (t < 16); outs[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1: chain t1 = r1+r2; t2 = t1 ^ r3; t3 = t2 << 3; t4 = t3 - r4
    c = {mm(OP_ADD, 1, 2, 0, 0, 0, 0, 0, 0, 40, 0),
         mm(OP_XOR, 40, 3, 1, 0, 0, 0, 0, 0, 41, 1),
         mm(OP_SLL, 41, -1, 1, 1, 0, 0, 1, 3, 42, 2),
         mm(OP_SUB, 42, 4, 1, 2, 0, 0, 0, 0, 43, 3)};
    put(c, q);
    drain();
    for (int k = 0; k < 4; k++) check(irow[q][k] == k, $sformatf("chain member %0d in row %0d", k, irow[q][k]));
    for (int k = 1; k < 4; k++) begin
      check(icyc[q][k] == icyc[q][k-1] + 1, $sformatf("chain member %0d back to back", k));
      check(isel[q][k][0] == SRC_LOCAL, $sformatf("chain member %0d local path", k));
    end
    v = ref_alu(OP_SUB, ref_alu(OP_SLL, ref_alu(OP_XOR, ref_alu(OP_ADD, rf[1], rf[2]), rf[3]), 3), rf[4]);
    check(outs[43] && outv[43] == v, "chain result");

    // 2: 6-deep chain wraps from row 3 to row 0
    c = {mm(OP_ADD, 5, 6, 0, 0, 0, 0, 0, 0, 50, 0),
         mm(OP_ADD, 50, -1, 1, 0, 0, 0, 1, 1, 51, 1),
         mm(OP_ADD, 51, -1, 1, 1, 0, 0, 1, 2, 52, 2),
         mm(OP_ADD, 52, -1, 1, 2, 0, 0, 1, 3, 53, 3),
         mm(OP_ADD, 53, -1, 1, 3, 0, 0, 1, 4, 54, 4),
         mm(OP_ADD, 54, -1, 1, 4, 0, 0, 1, 5, 55, 5)};
    put(c, q);
    drain();
    check(irow[q][4] == 0 && irow[q][5] == 1, "depth 4 and 5 wrap to rows 0 and 1");
    check(isel[q][4][0] == SRC_PASS && icyc[q][4] == icyc[q][3] + 2, "wrap uses pass-through, one extra cycle");
    check(isel[q][5][0] == SRC_LOCAL && icyc[q][5] == icyc[q][4] + 1, "after the wrap: local path");
    check(outs[55] && outv[55] == rf[5] + rf[6] + 15, "wrapped chain result");

    // 3: member 2 (depth 2) takes member 0's value (depth 0) via pass-through
    c = {mm(OP_ADD, 7, 8, 0, 0, 0, 0, 0, 0, 60, 0),
         mm(OP_AND, 60, 9, 1, 0, 0, 0, 0, 0, 61, 1),
         mm(OP_OR, 61, 60, 1, 1, 1, 0, 0, 0, 62, 2)};
    put(c, q);
    drain();
    check(isel[q][2][0] == SRC_LOCAL && isel[q][2][1] == SRC_PASS, "two rows down: pass-through");
    check(outs[62] && outv[62] == (((rf[7] + rf[8]) & rf[9]) | (rf[7] + rf[8])), "pass-through result");

    // 4: member 1 waits for global operand tag 20
    c = {mm(OP_ADD, 10, 11, 0, 0, 0, 0, 0, 0, 70, 0),
         mm(OP_SUB, 70, 20, 1, 0, 0, 0, 0, 0, 71, 1)};
    put(c, q);
    repeat (6) @(posedge clk);
    check(!empty, "waiting for the global operand");
    bcast(20);
    drain();
    check(isel[q][1][1] == SRC_IN, "global operand from an input port");
    check(isel[q][1][0] == SRC_LOCAL, "local operand from the row above");
    check(outs[71] && outv[71] == rf[10] + rf[11] - rf[20], "global-wait result");

    check(n_remap == 0, $sformatf("every member so far in its depth row (%0d remapped)", n_remap));

    // 5: five depth-0 clusters without results issue together: row 0 holds four
    begin
      int qs [5];
      tail_dummy: for (int n = 0; n < 5; n++) begin
        mem_t c1 [$];
        c1 = {mm(OP_ADD, 21 + n, -1, 0, 0, 0, 0, 1, 5, -1, 0),
              mm(OP_ADD, 12, 13, 0, 0, 0, 0, 0, 0, -1, 1)};
        put(c1, qs[n]);
      end
      repeat (3) @(posedge clk);
      check(!can_alloc == 0, "queue has room for more");
      for (int n = 21; n < 26; n++) rdy[n] = 1;
      @(negedge clk);
      for (int n = 0; n < 5; n++) begin bc_v[n] = 1; bc_tag[n] = TAG_W'(21 + n); end
      @(posedge clk);
      #1 for (int n = 0; n < 5; n++) bc_v[n] = 0;
      drain();
      begin
        int in0 = 0, in1 = 0;
        for (int n = 0; n < 5; n++) begin
          if (irow[qs[n]][0] == 0) in0++;
          if (irow[qs[n]][0] == 1) in1++;
        end
        check(in0 == 4 && in1 == 1, $sformatf("row 0 takes four (%0d), one remapped (%0d)", in0, in1));
        check(n_remap == 1, "exactly one remap counted");
      end
    end

    // 6: fill the queue with clusters waiting on tag 30
    for (int n = 0; n < E; n++) begin
      mem_t c1 [$];
      c1 = {mm(OP_ADD, 30, 1, 0, 0, 0, 0, 0, 0, 80 + n, 0),
            mm(OP_ADD, 80 + n, 2, 1, 0, 0, 0, 0, 0, 90 + n, 1)};
      put(c1, q2);
    end
    @(posedge clk);
    check(!can_alloc, "queue full after 8 clusters");
    bcast(30);
    drain();
    check(can_alloc && empty, "queue drained");
    for (int n = 0; n < E; n++)
      check(outs[90 + n] && outv[90 + n] == rf[30] + rf[1] + rf[2], $sformatf("full-queue result %0d", n));

    // 7: flush
    c = {mm(OP_ADD, 31, 1, 0, 0, 0, 0, 0, 0, 100, 0)};
    put(c, q);
    check(!empty, "cluster waiting before flush");
    @(negedge clk); flush = 1; @(posedge clk); #1 flush = 0;
    #1;
    check(empty && can_alloc, "flush empties the queue");

    check(bad_reads == 0, "no input port read of a value not yet written");
    check(n_op_local > 0 && n_op_pass > 0 && n_op_global > 0, "all three operand paths used");
    $display("issued %0d local %0d pass %0d global %0d remap %0d", n_issued, n_op_local,
             n_op_pass, n_op_global, n_remap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
