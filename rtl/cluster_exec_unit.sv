// cluster_exec_unit: the networked ALU array that executes clustered
// instructions (a ROWS x COLS grid, 4 x 4 by default).
//
// Each grid position holds a network_alu with a result buffer. An operand of
// the ALU at row r is taken from one of four places, chosen per operand by the
// issue packet:
//   SRC_LOCAL  the buffer of any ALU in row r-1 (the dedicated local path, a
//              full crossbar between consecutive rows; no extra latency),
//   SRC_PASS   the buffer of any ALU (the input/pass-through path, used when a
//              value must skip one or more rows; the scheduler allows it one
//              cycle after the value could have used the local path),
//   SRC_IN     one of N_IN input ports driven by the register file / global
//              broadcast bus,
//   SRC_IMM    the immediate of the instruction.
// Row 0 has no row above it, so its local path is unused.
// Results whose issue packet asks for it leave on one of N_OUT output ports
// (the output path), registered, in the cycle after execution.
//
// Timing: issue packets and input-port data in cycle t; the buffer and the
// output port carry the result from cycle t+1.
// The array shape, the three paths and the 4 x 4 size follow the document
// (Fig. 5, Table 1). The port counts (8 in, 4 out, i.e. the ports of the four
// conventional ALUs the array replaces), the crossbar-per-row local path and
// the single-cycle ALUs are this design's reading of it.
module cluster_exec_unit
  import clu_pkg::*;
#(
  parameter int ROWS  = 4,
  parameter int COLS  = 4,
  parameter int N_IN  = 8,
  parameter int N_OUT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ceu_issue_t      issue    [ROWS][COLS],
  input  logic [XLEN-1:0] in_data  [N_IN],
  output logic            buf_valid[ROWS][COLS],
  output logic [XLEN-1:0] buf_value[ROWS][COLS],
  output logic [7:0]      buf_id   [ROWS][COLS],
  output ceu_out_t        out      [N_OUT]
);

  logic [XLEN-1:0] opnd   [ROWS][COLS][2];
  logic [XLEN-1:0] result [ROWS][COLS];

  // Operand selection: local, pass-through, input port or immediate.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        for (int k = 0; k < 2; k++) begin
          logic [1:0] sr, sc;
          sr = issue[r][c].sel_alu[k][3:2];
          sc = issue[r][c].sel_alu[k][1:0];
          unique case (issue[r][c].sel[k])
            SRC_LOCAL: opnd[r][c][k] = (r > 0) ? buf_value[(r > 0) ? r-1 : 0][int'(sc) % COLS]
                                               : '0;
            SRC_PASS:  opnd[r][c][k] = buf_value[int'(sr) % ROWS][int'(sc) % COLS];
            SRC_IN:    opnd[r][c][k] = in_data[int'(issue[r][c].sel_port[k]) % N_IN];
            SRC_IMM:   opnd[r][c][k] = issue[r][c].imm;
          endcase
        end
        result[r][c] = alu_eval(issue[r][c].op, opnd[r][c][0], opnd[r][c][1]);
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      network_alu u_alu (
        .clk, .rst_n,
        .valid    (issue[r][c].valid),
        .op       (issue[r][c].op),
        .a        (opnd[r][c][0]),
        .b        (opnd[r][c][1]),
        .id       (issue[r][c].id),
        .buf_valid(buf_valid[r][c]),
        .buf_value(buf_value[r][c]),
        .buf_id   (buf_id[r][c])
      );
    end
  end

  // Output path: each output port is claimed by at most one ALU per cycle.
  ceu_out_t out_d [N_OUT];
  always_comb begin
    for (int p = 0; p < N_OUT; p++) out_d[p] = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (issue[r][c].valid && issue[r][c].out_v) begin
          out_d[int'(issue[r][c].out_port) % N_OUT].valid = 1'b1;
          out_d[int'(issue[r][c].out_port) % N_OUT].kind  = issue[r][c].out_kind;
          out_d[int'(issue[r][c].out_port) % N_OUT].tag   = issue[r][c].dst_tag;
          out_d[int'(issue[r][c].out_port) % N_OUT].value = result[r][c];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_OUT; p++) out[p] <= '0;
    end else begin
      for (int p = 0; p < N_OUT; p++) out[p] <= out_d[p];
    end
  end

  // An output port may carry one value per cycle.
  for (genvar p = 0; p < N_OUT; p++) begin : g_port_chk
    logic [7:0] claims;
    always_comb begin
      claims = '0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (issue[r][c].valid && issue[r][c].out_v && int'(issue[r][c].out_port) % N_OUT == p)
            claims = claims + 1'b1;
    end
    a_one_claim: assert property (@(posedge clk) disable iff (!rst_n) claims <= 8'd1)
      else $error("output port %0d claimed twice", p);
  end

endmodule
