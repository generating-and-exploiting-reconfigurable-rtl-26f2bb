// rcfu_pe: one processing element of the RCFU grid.
//
// A PE is a small combinational operator of one fixed kind (parameter KIND):
// Add/Sub/Move, Logic/Move (NOT, AND, OR, XOR) or Shift/Move (SLL, SRL, SRA by
// b[4:0]). MOVE passes operand A through unchanged; it is how a value reaches
// a PE more than one level below its producer. Multiply, divide and memory
// operations are deliberately absent, so that a PE stays short and small.
// The three kinds follow the document; the exact shift set, the shift amount
// taken from b[4:0] and the zero result with `unsupported` raised for an
// operation outside the PE's kind are this design's choices.
//
// Timing: purely combinational, y and unsupported follow op, a and b.
module rcfu_pe
  import rcfu_pkg::*;
#(
  parameter pe_kind_e KIND = PE_ARITH,
  parameter int       W    = XLEN
) (
  input  pe_op_e       op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         unsupported
);

  localparam int SH_W = $clog2(W);

  logic [SH_W-1:0] shamt;
  assign shamt = b[SH_W-1:0];

  always_comb begin
    y = '0;
    unsupported = !pe_supports(KIND, op);
    if (!unsupported) begin
      unique case (op)
        OP_MOVE: y = a;
        OP_ADD:  y = a + b;
        OP_SUB:  y = a - b;
        OP_AND:  y = a & b;
        OP_OR:   y = a | b;
        OP_XOR:  y = a ^ b;
        OP_NOT:  y = ~a;
        OP_SLL:  y = a << shamt;
        OP_SRL:  y = a >> shamt;
        OP_SRA:  y = W'($signed(a) >>> shamt);
        default: y = '0;
      endcase
    end
  end

endmodule
