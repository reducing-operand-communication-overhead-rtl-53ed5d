// tb_network_alu: random operations through one networked ALU. Each result
// is compared with an independent reference one cycle later, and the buffer
// is checked to hold its value while the ALU is idle.
module tb_network_alu;
  import clu_pkg::*;
  import tb_blocks_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            valid;
  alu_op_e         op;
  logic [XLEN-1:0] a, b;
  logic [7:0]      id;
  logic            buf_valid;
  logic [XLEN-1:0] buf_value;
  logic [7:0]      buf_id;

  network_alu dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] exp_v;
    logic [7:0]      exp_id;
    bit              any = 0;
    valid = 0; op = OP_ADD; a = 0; b = 0; id = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (buf_valid) failures++;
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      valid = ($urandom % 4) != 0;
      op    = alu_op_e'($urandom % 12);
      a     = $urandom;
      b     = ($urandom % 3 == 0) ? ($urandom % 40) : $urandom;
      id    = 8'($urandom);
      if (valid) begin exp_v = ref_alu(op, a, b); exp_id = id; any = 1; end
      @(posedge clk);
      #1;
      if (any) begin
        checks++;
        if (!buf_valid || buf_value !== exp_v || buf_id !== exp_id) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h got=%h exp=%h", op.name(), a, b, buf_value, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
