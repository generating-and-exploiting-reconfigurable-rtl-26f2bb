// tb_rcfu_array: self-checking test of the PE grid.
//
// Two arrays with the default shape (row 0: A A L, row 1: A L S, 6 inputs,
// 3 outputs) are driven with the same random configurations and operands:
// a single-cycle one and one with LATENCY=3. A level-by-level reference
// model written here computes every PE output; the selected outputs must
// match, in the same cycle for the first array and exactly two clock edges
// later for the second. Configurations that ask a PE for an operation of
// another kind, or select a missing source, must raise cfg_err.
module tb_rcfu_array;
  import rcfu_pkg::*;

  localparam int NIN = 6, NOUT = 3, ROWS = 2, COLS = 3, NPE = ROWS * COLS;
  localparam logic [2*NPE-1:0] MAP = 12'hE65;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                        in_valid;
  logic [NIN-1:0][31:0]        operands;
  pe_cfg_t [NPE-1:0]           pe_cfg;
  logic [NOUT-1:0][OSEL_W-1:0] out_sel;
  logic [NOUT-1:0][31:0]       res1, res3;
  logic                        v1, v3, err1, err3;

  rcfu_array #(.NIN(NIN), .NOUT(NOUT), .ROWS(ROWS), .COLS(COLS), .LATENCY(1), .PE_KIND_MAP(MAP))
    dut1 (.clk, .rst_n, .in_valid, .operands, .pe_cfg, .out_sel, .result(res1), .res_valid(v1), .cfg_err(err1));
  rcfu_array #(.NIN(NIN), .NOUT(NOUT), .ROWS(ROWS), .COLS(COLS), .LATENCY(3), .PE_KIND_MAP(MAP))
    dut3 (.clk, .rst_n, .in_valid, .operands, .pe_cfg, .out_sel, .result(res3), .res_valid(v3), .cfg_err(err3));

  // Kind of each position, as a plain table.
  pe_kind_e kinds [NPE] = '{PE_ARITH, PE_ARITH, PE_LOGIC, PE_ARITH, PE_LOGIC, PE_SHIFT};

  pe_op_e ops_of [4][] = '{'{OP_MOVE}, '{OP_MOVE, OP_ADD, OP_SUB},
                           '{OP_MOVE, OP_AND, OP_OR, OP_XOR, OP_NOT},
                           '{OP_MOVE, OP_SLL, OP_SRL, OP_SRA}};

  function automatic logic [31:0] alu(pe_op_e o, logic [31:0] x, logic [31:0] z);
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
      OP_SRA:  return 32'($signed(x) >>> z[4:0]);
      default: return 0;
    endcase
  endfunction

  logic [NOUT-1:0][31:0] exp_hist [4];
  logic [NOUT-1:0][31:0] exp_now;
  logic                  exp_err;
  int                    n_err_cases = 0;

  // Reference: walk the grid level by level.
  task automatic model();
    logic [31:0] y [NPE];
    exp_err = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int p = r * COLS + c;
        logic [31:0] a, b;
        int nsrc = (r == 0) ? NIN : COLS;
        a = 0; b = 0;
        if (int'(pe_cfg[p].src_a) < nsrc) a = (r == 0) ? operands[pe_cfg[p].src_a] : y[(r-1)*COLS + int'(pe_cfg[p].src_a)];
        else exp_err = 1;
        if (pe_cfg[p].b_imm) b = {{24{pe_cfg[p].imm[7]}}, pe_cfg[p].imm};
        else if (int'(pe_cfg[p].src_b) < nsrc) b = (r == 0) ? operands[pe_cfg[p].src_b] : y[(r-1)*COLS + int'(pe_cfg[p].src_b)];
        else exp_err = 1;
        y[p] = 0;
        if (pe_supports(kinds[p], pe_cfg[p].op)) y[p] = alu(pe_cfg[p].op, a, b);
        else exp_err = 1;
      end
    for (int o = 0; o < NOUT; o++) exp_now[o] = y[int'(out_sel[o])];
  endtask

  task automatic randomize_cfg(bit make_error);
    for (int p = 0; p < NPE; p++) begin
      int k = int'(kinds[p]);
      int r = p / COLS;
      int nsrc = (r == 0) ? NIN : COLS;
      pe_cfg[p].op    = ops_of[k][$urandom_range(0, ops_of[k].size() - 1)];
      pe_cfg[p].src_a = SEL_W'($urandom_range(0, nsrc - 1));
      pe_cfg[p].src_b = SEL_W'($urandom_range(0, nsrc - 1));
      pe_cfg[p].b_imm = ($urandom_range(0, 3) == 0);
      pe_cfg[p].imm   = 8'($urandom);
    end
    for (int o = 0; o < NOUT; o++) out_sel[o] = OSEL_W'($urandom_range(0, NPE - 1));
    if (make_error) begin
      int p = $urandom_range(0, NPE - 1);
      if ($urandom_range(0, 1) == 0) pe_cfg[p].op = (kinds[p] == PE_ARITH) ? OP_XOR : OP_ADD;
      else pe_cfg[p].src_a = SEL_W'(15);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    operands = '0;
    pe_cfg = '0;
    out_sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      bit mk_err;
      mk_err = (it % 10 == 9);
      @(negedge clk);
      for (int i = 0; i < NIN; i++) operands[i] = $urandom;
      randomize_cfg(mk_err);
      in_valid = 1;
      #1;
      model();
      if (mk_err) n_err_cases++;
      // single-cycle array: same cycle
      checks++;
      if (!mk_err && (res1 !== exp_now || v1 !== 1'b1)) begin
        failures++;
        $display("FAIL lat1 it=%0d res=%h exp=%h", it, res1, exp_now);
      end
      checks++;
      if (err1 !== exp_err || err3 !== exp_err) begin
        failures++;
        $display("FAIL cfg_err it=%0d got=%b/%b exp=%b", it, err1, err3, exp_err);
      end
      exp_hist[it % 4] = exp_now;
      // three-cycle array: the result of the issue two edges ago
      if (it >= 2) begin
        checks++;
        if (v3 !== 1'b1 || (!((it - 2) % 10 == 9) && res3 !== exp_hist[(it - 2) % 4])) begin
          failures++;
          $display("FAIL lat3 it=%0d res=%h exp=%h v=%b", it, res3, exp_hist[(it - 2) % 4], v3);
        end
      end
    end
    // valid must drain two cycles after the last issue
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (v3 !== 1'b1) begin failures++; $display("FAIL lat3 second-last valid missing"); end
    @(negedge clk);
    checks++;
    if (v3 !== 1'b1) begin failures++; $display("FAIL lat3 last valid missing"); end
    @(negedge clk);
    checks++;
    if (v3 !== 1'b0 || v1 !== 1'b0) begin failures++; $display("FAIL valid did not drop"); end
    checks++;
    if (n_err_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
