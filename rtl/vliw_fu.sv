// vliw_fu: one base functional unit of the VLIW processor.
//
// An integer ALU with a multiplier: the operations the base processor keeps
// for itself include those the RCFU's PEs leave out, notably multiply.
// FU_PASSB forwards operand B, which with an immediate B loads a constant.
// The document only says that the base processor has N FUs that run in
// parallel with the RCFU and that multiply/divide, load/store and branch are
// not placed in PEs; the operation set here is this design's choice, and
// divide, load/store and branch are not included.
//
// Timing: combinational; y follows op, a and b within the issue cycle.
module vliw_fu
  import rcfu_pkg::*;
#(
  parameter int W = XLEN
) (
  input  fu_op_e       op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int SH_W = $clog2(W);

  always_comb begin
    unique case (op)
      FU_ADD:   y = a + b;
      FU_SUB:   y = a - b;
      FU_AND:   y = a & b;
      FU_OR:    y = a | b;
      FU_XOR:   y = a ^ b;
      FU_SLL:   y = a << b[SH_W-1:0];
      FU_SRL:   y = a >> b[SH_W-1:0];
      FU_SRA:   y = W'($signed(a) >>> b[SH_W-1:0]);
      FU_SLT:   y = W'($signed(a) < $signed(b));
      FU_SLTU:  y = W'(a < b);
      FU_MUL:   y = a * b;
      FU_PASSB: y = b;
      default:  y = '0;   // FU_NOP
    endcase
  end

endmodule
