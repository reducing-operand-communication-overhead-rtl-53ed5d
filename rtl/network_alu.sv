// network_alu: one networked ALU of the cluster execution unit, with the
// result buffer that feeds the local and pass-through paths.
//
// When `valid` is high the ALU applies `op` to the two operands, which the
// surrounding interconnect has already selected, and stores the result in its
// buffer at the clock edge together with the identifier of the instruction
// that produced it. The buffer keeps that value until the ALU executes its next
// instruction, so consumers in the next row (local path) and elsewhere
// (pass-through path) can read it in later cycles.
//
// Timing: operands and opcode in cycle t, result visible on buf_value from
// cycle t+1. Reset clears only the buffer's valid flag.
// The ALU and its buffer are the document's (Fig. 5); the single-cycle integer
// operation set and the identifier kept with the value are this design's.
module network_alu
  import clu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [7:0]      id,
  output logic            buf_valid,
  output logic [XLEN-1:0] buf_value,
  output logic [7:0]      buf_id
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0;
      buf_value <= '0;
      buf_id    <= '0;
    end else if (valid) begin
      buf_valid <= 1'b1;
      buf_value <= alu_eval(op, a, b);
      buf_id    <= id;
    end
  end

endmodule
