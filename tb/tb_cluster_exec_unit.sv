// tb_cluster_exec_unit: random issue packets on the 4 x 4 array. Every
// operand picks one of the four sources (local path from the row above,
// pass-through from any buffer, an input port, the immediate); up to N_OUT of
// the issuing ALUs also claim an output port. A reference model of the
// buffers predicts each ALU's buffer one cycle later and each output port.
module tb_cluster_exec_unit;
  import clu_pkg::*;
  import tb_blocks_pkg::*;

  localparam int ROWS = 4, COLS = 4, N_IN = 8, N_OUT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ceu_issue_t      issue    [ROWS][COLS];
  logic [XLEN-1:0] in_data  [N_IN];
  logic            buf_valid[ROWS][COLS];
  logic [XLEN-1:0] buf_value[ROWS][COLS];
  logic [7:0]      buf_id   [ROWS][COLS];
  ceu_out_t        out      [N_OUT];

  cluster_exec_unit #(.ROWS(ROWS), .COLS(COLS), .N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

  int checks = 0, failures = 0;
  int n_sel [4];
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [XLEN-1:0] mval [ROWS][COLS];
  bit              mv   [ROWS][COLS];
  logic [XLEN-1:0] eval_ [ROWS][COLS];
  ceu_out_t        eout [N_OUT];

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      issue[r][c] = '0; mv[r][c] = 0; mval[r][c] = 0;
    end
    for (int p = 0; p < N_IN; p++) in_data[p] = 0;
    for (int k = 0; k < 4; k++) n_sel[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int nout;
      @(negedge clk);
      nout = 0;
      for (int p = 0; p < N_OUT; p++) eout[p] = '0;
      for (int p = 0; p < N_IN; p++) in_data[p] = $urandom;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        ceu_issue_t is;
        logic [XLEN-1:0] opv [2];
        is = '0;
        is.valid = ($urandom % 3) != 0;
        is.op    = alu_op_e'($urandom % 12);
        is.imm   = $urandom % 64;
        is.id    = 8'($urandom);
        is.dst_tag = TAG_W'($urandom);
        is.out_kind = out_kind_e'($urandom % 4);
        for (int k = 0; k < 2; k++) begin
          int s, sr, sc;
          s  = $urandom % 4;
          sr = $urandom % ROWS;
          sc = $urandom % COLS;
          if (s == 1 && (r == 0 || !mv[r-1][sc])) s = 3;
          if (s == 2 && !mv[sr][sc]) s = 3;
          is.sel[k] = src_sel_e'((s == 0) ? SRC_IN : (s == 1) ? SRC_LOCAL : (s == 2) ? SRC_PASS : SRC_IMM);
          is.sel_port[k] = 3'($urandom % N_IN);
          is.sel_alu[k]  = (s == 1) ? {2'(r - 1), 2'(sc)} : {2'(sr), 2'(sc)};
          case (s)
            0: opv[k] = in_data[is.sel_port[k]];
            1: opv[k] = mval[r-1][sc];
            2: opv[k] = mval[sr][sc];
            default: opv[k] = is.imm;
          endcase
          if (is.valid) n_sel[s]++;
        end
        eval_[r][c] = ref_alu(is.op, opv[0], opv[1]);
        if (is.valid && nout < N_OUT && ($urandom % 2)) begin
          is.out_v = 1; is.out_port = 3'(nout);
          eout[nout].valid = 1; eout[nout].kind = is.out_kind;
          eout[nout].tag = is.dst_tag; eout[nout].value = eval_[r][c];
          nout++;
        end
        issue[r][c] = is;
      end
      @(posedge clk);
      #1;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        if (issue[r][c].valid) begin
          mval[r][c] = eval_[r][c]; mv[r][c] = 1;
          checks++;
          if (!buf_valid[r][c] || buf_value[r][c] !== eval_[r][c] || buf_id[r][c] !== issue[r][c].id) begin
            failures++;
            $display("FAIL alu %0d,%0d got %h exp %h", r, c, buf_value[r][c], eval_[r][c]);
          end
        end else if (mv[r][c]) begin
          checks++;
          if (buf_value[r][c] !== mval[r][c]) begin failures++; $display("FAIL hold %0d,%0d", r, c); end
        end
      end
      for (int p = 0; p < N_OUT; p++) begin
        checks++;
        if (out[p].valid !== eout[p].valid ||
            (eout[p].valid && out[p] !== eout[p])) begin
          failures++;
          $display("FAIL out port %0d", p);
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_sel[k] == 0) failures++;
    end
    $display("operand sources in/local/pass/imm: %0d %0d %0d %0d", n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
