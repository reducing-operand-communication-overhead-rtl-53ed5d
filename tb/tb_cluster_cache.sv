// tb_cluster_cache: writes random clusters and looks up random addresses.
// A reference array (one entry per index, replaced on write) predicts hits,
// misses (empty entry, different first address) and the returned cluster.
module tb_cluster_cache;
  import clu_pkg::*;

  localparam int ENTRIES = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            wr_v;
  cluster_t        wr_cluster;
  logic [PC_W-1:0] rd_pc;
  logic            rd_hit;
  cluster_t        rd_cluster;

  cluster_cache #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cluster_t ref_e [ENTRIES];
  bit       ref_v [ENTRIES];
  int       hits = 0;

  function automatic logic [PC_W-1:0] rnd_pc();
    return 32'h0041_0000 + 32'(($urandom % 96) * 4);
  endfunction

  initial begin
    for (int i = 0; i < ENTRIES; i++) ref_v[i] = 0;
    wr_v = 0; wr_cluster = '0; rd_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // lookup (combinational)
      rd_pc = rnd_pc();
      #1;
      begin
        int ix;
        bit eh;
        ix = int'(rd_pc[6:2]);
        eh = ref_v[ix] && ref_e[ix].m[0].pc == rd_pc;
        checks++;
        if (rd_hit !== eh || (eh && rd_cluster !== ref_e[ix])) begin
          failures++;
          $display("FAIL lookup %h hit=%b exp=%b", rd_pc, rd_hit, eh);
        end
        if (eh) hits++;
      end
      // write
      wr_v = ($urandom % 2) != 0;
      for (int k = 0; k < CL_MAX; k++) begin
        wr_cluster.m[k].pc        = rnd_pc();
        wr_cluster.m[k].depth     = DEPTH_W'($urandom);
        wr_cluster.m[k].src_local = 2'($urandom);
        wr_cluster.m[k].src_prod  = 6'($urandom);
        wr_cluster.m[k].out_local = 1'($urandom);
        wr_cluster.m[k].out_ext   = 1'($urandom);
      end
      wr_cluster.count = 4'(2 + $urandom % 7);
      if (wr_v) begin
        int ix;
        ix = int'(wr_cluster.m[0].pc[6:2]);
        ref_e[ix] = wr_cluster;
        ref_v[ix] = 1;
      end
      @(posedge clk);
      #1 wr_v = 0;
    end
    checks++;
    if (hits < 50) failures++;
    $display("hits: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
