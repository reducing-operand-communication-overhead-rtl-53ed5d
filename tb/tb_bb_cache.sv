// tb_bb_cache: random commits of blocks from a small address pool, some
// sharing a cache index. A reference model (exact per-index contents) predicts
// when form_en must pulse: exactly on the second commit of a block since it
// entered the cache.
module tb_bb_cache;
  import clu_pkg::*;

  localparam int ENTRIES = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            commit_v;
  logic [PC_W-1:0] commit_pc;
  logic            form_en;
  logic [PC_W-1:0] form_pc;
  logic [2:0]      seen_count;

  bb_cache #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PC_W-1:0] ref_pc  [ENTRIES];
  int              ref_cnt [ENTRIES];
  int              forms = 0;

  initial begin
    for (int i = 0; i < ENTRIES; i++) ref_cnt[i] = 0;
    commit_v = 0; commit_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic exp_form;
      int   ix;
      @(negedge clk);
      commit_v  = ($urandom % 3) != 0;
      // 24 block addresses, several mapping to one index
      commit_pc = 32'h0040_0000 + 32'(($urandom % 24) * 4 * 11);
      ix = int'(commit_pc[5:2]);
      exp_form = 0;
      if (commit_v) begin
        if (ref_cnt[ix] > 0 && ref_pc[ix] == commit_pc) ref_cnt[ix] = ref_cnt[ix] + 1;
        else begin ref_pc[ix] = commit_pc; ref_cnt[ix] = 1; end
        exp_form = (ref_cnt[ix] == 2);
      end
      @(posedge clk);
      #1;
      checks++;
      if (form_en !== exp_form || (exp_form && form_pc !== commit_pc)) begin
        failures++;
        $display("FAIL pc=%h form_en=%b exp=%b", commit_pc, form_en, exp_form);
      end
      if (form_en) forms++;
    end
    checks++;
    if (forms == 0) failures++;
    $display("formations: %0d", forms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
