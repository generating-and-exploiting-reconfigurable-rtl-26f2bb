// tb_vliw_fu: self-checking test of a base functional unit.
//
// Every operation is applied to random operands (and a few corner values)
// and compared with a reference computed here in a different way.
module tb_vliw_fu;
  import rcfu_pkg::*;

  int checks = 0, failures = 0;
  fu_op_e      op;
  logic [31:0] a, b, y;

  vliw_fu #(.W(32)) dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_y(fu_op_e o, logic [31:0] x, logic [31:0] z);
    longint unsigned prod;
    case (o)
      FU_ADD:  return x + z;
      FU_SUB:  return x + ~z + 1;
      FU_AND:  return x & z;
      FU_OR:   return x | z;
      FU_XOR:  return x ^ z;
      FU_SLL:  return x << z[4:0];
      FU_SRL:  return x >> z[4:0];
      FU_SRA:  return (x >> z[4:0]) | ((x[31] && z[4:0] != 0) ? ~(32'hFFFF_FFFF >> z[4:0]) : 32'h0);
      FU_SLT:  return (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z};
      FU_SLTU: return {31'b0, x < z};
      FU_MUL:  begin prod = longint'(x) * longint'(z); return prod[31:0]; end
      FU_PASSB: return z;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      a = $urandom;
      b = (it % 3 == 0) ? 32'($urandom_range(0, 31)) : $urandom;
      if (it == 0) begin a = 32'h8000_0000; b = 32'h7FFF_FFFF; end
      if (it == 1) begin a = 32'hFFFF_FFFF; b = 32'h1; end
      for (int o = 0; o <= 12; o++) begin
        op = fu_op_e'(o);
        #1;
        checks++;
        if (y !== ref_y(op, a, b)) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, ref_y(op, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
