// rcfu_pkg: types and constants shared by the reconfigurable custom
// functional unit (RCFU) and the VLIW execute slice it is attached to.
//
// The RCFU is a grid of coarse-grain processing elements (PEs). Each PE is
// one of three kinds, as in the generated RCFU shapes: Add/Sub/Move,
// Logic/Move and Shift/Move. A PE position may also be empty, so that rows of
// different widths can be described. Every PE is configured per customized
// instruction by a pe_cfg_t: an operation and two operand selects. The
// select fields have a fixed width (SEL_W) so that the configuration word does
// not depend on the array size; the array checks that its sizes fit.
// The encodings, the 8-bit constant operand and the base FU operation set are
// this design's own choices.
package rcfu_pkg;

  localparam int XLEN  = 32;  // data path width (32-bit RCFU)
  localparam int SEL_W = 4;   // operand select: up to 16 sources per row
  localparam int OSEL_W = 6;  // output select: up to 64 PEs
  localparam int IMM_W = 8;   // constant operand of a PE, sign-extended

  // Kind of a PE position in the grid.
  typedef enum logic [1:0] {
    PE_NONE  = 2'd0,  // no PE built at this position
    PE_ARITH = 2'd1,  // Add/Sub/Move
    PE_LOGIC = 2'd2,  // Logic/Move: NOT, AND, OR, XOR
    PE_SHIFT = 2'd3   // Shift/Move: SLL, SRL, SRA
  } pe_kind_e;

  // PE operation. MOVE (pass operand A down a level) exists in every kind.
  typedef enum logic [3:0] {
    OP_MOVE = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_AND  = 4'd3,
    OP_OR   = 4'd4,
    OP_XOR  = 4'd5,
    OP_NOT  = 4'd6,
    OP_SLL  = 4'd7,
    OP_SRL  = 4'd8,
    OP_SRA  = 4'd9
  } pe_op_e;

  // Configuration of one PE inside one customized instruction.
  typedef struct packed {
    pe_op_e             op;     // operation
    logic [SEL_W-1:0]   src_a;  // row 0: RCFU input; row r>0: PE of row r-1
    logic [SEL_W-1:0]   src_b;  // as src_a, ignored when b_imm is set
    logic               b_imm;  // operand B is the constant below
    logic [IMM_W-1:0]   imm;    // constant, sign-extended to XLEN
  } pe_cfg_t;


  // Operation of a base functional unit of the VLIW processor.
  typedef enum logic [3:0] {
    FU_NOP  = 4'd0,
    FU_ADD  = 4'd1,
    FU_SUB  = 4'd2,
    FU_AND  = 4'd3,
    FU_OR   = 4'd4,
    FU_XOR  = 4'd5,
    FU_SLL  = 4'd6,
    FU_SRL  = 4'd7,
    FU_SRA  = 4'd8,
    FU_SLT  = 4'd9,
    FU_SLTU = 4'd10,
    FU_MUL  = 4'd11,
    FU_PASSB = 4'd12   // y = b (load a constant through the immediate)
  } fu_op_e;

  // Does a PE of kind k implement operation op?
  function automatic logic pe_supports(pe_kind_e k, pe_op_e op);
    unique case (k)
      PE_ARITH: return op inside {OP_MOVE, OP_ADD, OP_SUB};
      PE_LOGIC: return op inside {OP_MOVE, OP_AND, OP_OR, OP_XOR, OP_NOT};
      PE_SHIFT: return op inside {OP_MOVE, OP_SLL, OP_SRL, OP_SRA};
      default:  return 1'b0;
    endcase
  endfunction

endpackage
