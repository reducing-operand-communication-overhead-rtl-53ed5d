// clu_pkg: types and constants shared by the instruction-clustering blocks.
//
// The clustering hardware sits beside a conventional out-of-order core. It
// sees committed instructions (to form clusters), renamed instructions (to
// steer cluster members into the cluster queue) and physical register tags
// (to wake up and read operands). The instruction encoding used here is an
// abstract MIPS/PISA-like one: an ALU opcode, an instruction class, up to two
// register sources, an optional immediate and one destination. The class and
// edge-type definitions follow the document; field widths are this design's
// choice (32 architectural integer registers as in PISA, 7-bit physical tags).
package clu_pkg;

  localparam int XLEN    = 32;  // datapath width (PISA integer registers)
  localparam int PC_W    = 32;  // instruction address width
  localparam int AREG_W  = 5;   // architectural register number
  localparam int TAG_W   = 7;   // physical register tag
  localparam int CL_MAX  = 8;   // instructions per cluster (rows of a cluster queue entry)
  localparam int IDX_W   = $clog2(CL_MAX);
  localparam int DEPTH_W = 3;   // dependence depth field held per instruction

  // Integer operations the networked ALUs perform (single cycle).
  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR,
    OP_SLL, OP_SRL, OP_SRA, OP_SLT, OP_SLTU, OP_LUI
  } alu_op_e;

  // Instruction class, used to classify dependence edges (Section 3).
  typedef enum logic [2:0] {
    IC_ALU, IC_BRANCH, IC_LOAD, IC_STORE, IC_FP, IC_OTHER
  } iclass_e;

  // Kind of value leaving the cluster execution unit on an output port.
  typedef enum logic [1:0] {
    OUT_REG,     // register result (to register file / broadcast bus)
    OUT_LDADDR,  // effective address of a load (to load/store queue)
    OUT_STADDR,  // effective address of a store (to load/store queue)
    OUT_BRANCH   // branch condition (to branch resolution)
  } out_kind_e;

  // A committed instruction as seen by the cluster formation unit.
  // Loads and stores use src[0] as base address; a store uses src[1] as data.
  typedef struct packed {
    logic [PC_W-1:0]   pc;
    iclass_e           iclass;
    logic [1:0]        src_v;
    logic [1:0][AREG_W-1:0] src;
    logic              dst_v;
    logic [AREG_W-1:0] dst;
    logic              bb_end;   // last instruction of the basic block
  } commit_instr_t;

  // Per-instruction record stored in a cluster cache entry.
  typedef struct packed {
    logic [PC_W-1:0]    pc;
    logic [DEPTH_W-1:0] depth;     // dependence depth within the cluster
    logic [1:0]         src_local; // source operand arrives over a local edge
    logic [1:0][IDX_W-1:0] src_prod; // producing member for a local source
    logic               out_local; // result feeds a local edge
    logic               out_ext;   // result feeds an internal or external edge
  } cl_member_t;

  // A cluster cache entry: one cluster, members in program order.
  typedef struct packed {
    logic [IDX_W:0] count;
    cl_member_t [CL_MAX-1:0] m;
  } cluster_t;

  // A renamed instruction as presented by the rename/dispatch stage.
  typedef struct packed {
    logic [PC_W-1:0]  pc;
    iclass_e          iclass;
    alu_op_e          op;
    logic             use_imm;   // second ALU operand is the immediate
    logic [XLEN-1:0]  imm;
    logic [1:0]       src_v;
    logic [1:0][TAG_W-1:0] src_tag;
    logic [1:0]       src_rdy;   // source already available at dispatch
    logic             dst_v;
    logic [TAG_W-1:0] dst_tag;
  } rn_instr_t;

  // Where an ALU operand comes from inside the cluster execution unit.
  typedef enum logic [1:0] {
    SRC_IN,    // input port (register file / global broadcast bus)
    SRC_LOCAL, // buffer of an ALU in the previous row (local path)
    SRC_PASS,  // buffer of any ALU through the pass-through path
    SRC_IMM    // immediate carried with the instruction
  } src_sel_e;

  // Instruction issued to one networked ALU.
  typedef struct packed {
    logic             valid;
    alu_op_e          op;
    logic [XLEN-1:0]  imm;
    src_sel_e [1:0]   sel;
    logic [1:0][3:0]  sel_alu;     // {row,col} of the ALU buffer for LOCAL/PASS (grids up to 4x4)
    logic [1:0][2:0]  sel_port;    // input port number for IN
    logic             out_v;       // result leaves on an output port
    logic [2:0]       out_port;
    out_kind_e        out_kind;
    logic [TAG_W-1:0] dst_tag;
    logic [7:0]       id;          // {cluster queue entry, member index}, marks the buffer
  } ceu_issue_t;

  // Value leaving the cluster execution unit.
  typedef struct packed {
    logic             valid;
    out_kind_e        kind;
    logic [TAG_W-1:0] tag;
    logic [XLEN-1:0]  value;
  } ceu_out_t;

  // Single-cycle integer operation of a networked ALU.
  function automatic logic [XLEN-1:0] alu_eval(alu_op_e op, logic [XLEN-1:0] a,
                                               logic [XLEN-1:0] b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_NOR:  return ~(a | b);
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      OP_SRA:  return $signed(a) >>> b[4:0];
      OP_SLT:  return {31'b0, $signed(a) < $signed(b)};
      OP_SLTU: return {31'b0, a < b};
      OP_LUI:  return {b[15:0], 16'b0};
      default: return '0;
    endcase
  endfunction

endpackage
