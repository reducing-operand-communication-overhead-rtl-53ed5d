// tb_cluster_dispatch: the cluster cache and the cluster queue's allocation
// side are modelled here. Interleaved clusters of one block are streamed
// through dispatch and every instruction's destination is checked against a
// hand-worked table: (cluster queue column, member row) or the conventional
// queue. Also checked: a full cluster queue sends the whole cluster to the
// conventional path, at most OPEN clusters are open at once, and a flush
// abandons the open clusters.
module tb_cluster_dispatch;
  import clu_pkg::*;

  localparam int CQ = 8, OPEN = 4;
  localparam logic [31:0] P = 32'h0040_1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            flush = 0, rn_v = 0;
  rn_instr_t       rn_i;
  logic [PC_W-1:0] cc_rd_pc;
  logic            cc_rd_hit;
  cluster_t        cc_rd_cluster;
  logic            cq_can_alloc;
  logic [2:0]      cq_tail;
  logic            cq_alloc_v, cq_wr_v, iq_v;
  logic [IDX_W:0]  cq_alloc_count;
  logic [2:0]      cq_wr_entry;
  logic [IDX_W-1:0] cq_wr_idx;
  rn_instr_t       cq_wr_instr, iq_i;
  cl_member_t      cq_wr_meta;

  cluster_dispatch #(.CQ_ENTRIES(CQ), .OPEN(OPEN)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cluster cache model: clusters listed by member word offsets from P
  cluster_t cl [6];
  bit       room = 1;
  logic [2:0] tail_q = 0;
  function automatic cluster_t mkc(int n, int o0, int o1, int o2);
    cluster_t c = '0;
    int o [3] = '{o0, o1, o2};
    c.count = 4'(n);
    for (int k = 0; k < n; k++) begin
      c.m[k].pc = P + 32'(4 * o[k]);
      c.m[k].depth = 3'(k);
      c.m[k].src_local = (k > 0) ? 2'b01 : 2'b00;
    end
    return c;
  endfunction
  always_comb begin
    cc_rd_hit = 0;
    cc_rd_cluster = '0;
    for (int i = 0; i < 6; i++)
      if (cl[i].m[0].pc == cc_rd_pc) begin cc_rd_hit = 1; cc_rd_cluster = cl[i]; end
  end
  assign cq_can_alloc = room;
  assign cq_tail = tail_q;
  always_ff @(posedge clk) if (rst_n && cq_alloc_v) tail_q <= tail_q + 1;

  // send instruction at word offset o; expect column e / row x, or e = -1: conventional
  task automatic send(int o, int e, int x);
    @(negedge clk);
    rn_v = 1;
    rn_i = '0;
    rn_i.pc = P + 32'(4 * o);
    rn_i.dst_tag = TAG_W'(o);
    #1;
    checks++;
    if (e < 0) begin
      if (!iq_v || cq_wr_v) begin failures++; $display("FAIL pc+%0d expected conventional", o); end
    end else begin
      if (iq_v || !cq_wr_v || int'(cq_wr_entry) != e || int'(cq_wr_idx) != x ||
          cq_wr_instr.dst_tag != TAG_W'(o) || int'(cq_wr_meta.depth) != x) begin
        failures++;
        $display("FAIL pc+%0d expected column %0d row %0d, got v=%b %0d %0d", o, e, x,
                 cq_wr_v, cq_wr_entry, cq_wr_idx);
      end
    end
    @(posedge clk);
    #1 rn_v = 0;
  endtask

  initial begin
    cl[0] = mkc(3, 0, 2, 4);
    cl[1] = mkc(2, 1, 3, 0);
    cl[2] = mkc(2, 5, 6, 0);
    cl[3] = mkc(2, 10, 15, 0);
    cl[4] = mkc(2, 11, 16, 0);
    cl[5] = mkc(2, 12, 17, 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // interleaved clusters
    send(0, 0, 0); send(1, 1, 0); send(2, 0, 1); send(3, 1, 1);
    send(4, 0, 2); send(5, 2, 0); send(6, 2, 1); send(7, -1, 0);
    // more open clusters than slots: clusters at 10, 11, 12 open while 0 and 5 are open
    send(0, 3, 0);  send(5, 4, 0);  send(10, 5, 0); send(11, 6, 0);
    send(12, -1, 0);                   // no free slot: whole cluster conventional
    send(2, 3, 1); send(15, 5, 1); send(16, 6, 1);
    send(17, -1, 0);                   // member of a cluster that never opened
    send(6, 4, 1); send(4, 3, 2);
    // full cluster queue
    room = 0;
    send(0, -1, 0); send(2, -1, 0); send(4, -1, 0);
    room = 1;
    // flush abandons an open cluster
    send(1, 7, 0);
    @(negedge clk); flush = 1; @(posedge clk); #1 flush = 0;
    send(3, -1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
