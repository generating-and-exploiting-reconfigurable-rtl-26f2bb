// tb_rcfu_pe: self-checking test of the three PE kinds.
//
// One PE of each kind (Add/Sub/Move, Logic/Move, Shift/Move) sees the same
// random operands and every operation code. Each output is compared with a
// reference computed here; an operation outside a PE's kind must give 0 and
// raise unsupported.
module tb_rcfu_pe;
  import rcfu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pe_op_e          op;
  logic [31:0]     a, b;
  logic [31:0]     y_a, y_l, y_s;
  logic            u_a, u_l, u_s;

  rcfu_pe #(.KIND(PE_ARITH)) dut_a (.op(op), .a(a), .b(b), .y(y_a), .unsupported(u_a));
  rcfu_pe #(.KIND(PE_LOGIC)) dut_l (.op(op), .a(a), .b(b), .y(y_l), .unsupported(u_l));
  rcfu_pe #(.KIND(PE_SHIFT)) dut_s (.op(op), .a(a), .b(b), .y(y_s), .unsupported(u_s));

  function automatic logic [31:0] ref_y(pe_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      OP_MOVE: return x;
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_NOT:  return ~x;
      OP_SLL:  return x << z[4:0];
      OP_SRL:  return x >> z[4:0];
      OP_SRA:  begin
                 logic [31:0] r;
                 r = x >> z[4:0];
                 if (x[31] && z[4:0] != 0) r = r | ~(32'hFFFF_FFFF >> z[4:0]);
                 return r;
               end
      default: return 32'h0;
    endcase
  endfunction

  task automatic check(string who, pe_op_e o, logic in_kind, logic [31:0] y, logic u);
    logic [31:0] exp;
    exp = in_kind ? ref_y(o, a, b) : 32'h0;
    checks++;
    if (y !== exp || u !== !in_kind) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h y=%h exp=%h unsup=%b", who, o, a, b, y, exp, u);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      a = $urandom;
      b = (it % 4 == 0) ? 32'($urandom_range(0, 31)) : $urandom;
      if (it == 1) a = 32'h8000_0001;
      for (int o = 0; o <= 9; o++) begin
        op = pe_op_e'(o);
        #1;
        check("arith", op, op inside {OP_MOVE, OP_ADD, OP_SUB}, y_a, u_a);
        check("logic", op, op inside {OP_MOVE, OP_AND, OP_OR, OP_XOR, OP_NOT}, y_l, u_l);
        check("shift", op, op inside {OP_MOVE, OP_SLL, OP_SRL, OP_SRA}, y_s, u_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
