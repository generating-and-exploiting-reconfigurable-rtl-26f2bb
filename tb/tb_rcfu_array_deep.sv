// tb_rcfu_array_deep: the PE grid at the largest size evaluated for an
// 8-read / 4-write processor: eight levels, 8 inputs, 4 outputs, in a
// trapezoid of 4,4,3,3,2,2,1,1 PEs per level (empty positions elsewhere):
//   row 0: A A L S   row 1: A L S A   row 2: A L S -   row 3: L A S -
//   row 4: A S - -   row 5: L A - -   row 6: A - - -   row 7: S - - -
// Random legal configurations are compared with a level-by-level reference
// model here, for a single-cycle grid and a four-cycle one (three register
// stages). Choosing an empty position as an output must raise cfg_err.
module tb_rcfu_array_deep;
  import rcfu_pkg::*;

  localparam int NIN = 8, NOUT = 4, ROWS = 8, COLS = 4, NPE = ROWS * COLS;
  localparam logic [2*NPE-1:0] MAP = 64'h0301_060d_3639_79e5;
  localparam int LAT = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                        in_valid;
  logic [NIN-1:0][31:0]        operands;
  pe_cfg_t [NPE-1:0]           pe_cfg;
  logic [NOUT-1:0][OSEL_W-1:0] out_sel;
  logic [NOUT-1:0][31:0]       res1, res4;
  logic                        v1, v4, err1, err4;

  rcfu_array #(.NIN(NIN), .NOUT(NOUT), .ROWS(ROWS), .COLS(COLS), .LATENCY(1), .PE_KIND_MAP(MAP))
    dut1 (.clk, .rst_n, .in_valid, .operands, .pe_cfg, .out_sel, .result(res1), .res_valid(v1), .cfg_err(err1));
  rcfu_array #(.NIN(NIN), .NOUT(NOUT), .ROWS(ROWS), .COLS(COLS), .LATENCY(LAT), .PE_KIND_MAP(MAP))
    dut4 (.clk, .rst_n, .in_valid, .operands, .pe_cfg, .out_sel, .result(res4), .res_valid(v4), .cfg_err(err4));

  pe_op_e ops_of [4][] = '{'{OP_MOVE}, '{OP_MOVE, OP_ADD, OP_SUB},
                           '{OP_MOVE, OP_AND, OP_OR, OP_XOR, OP_NOT},
                           '{OP_MOVE, OP_SLL, OP_SRL, OP_SRA}};

  function automatic pe_kind_e kind(int p);
    return pe_kind_e'(MAP[2*p +: 2]);
  endfunction

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

  function automatic logic [NOUT-1:0][31:0] model();
    logic [31:0] y [NPE];
    logic [NOUT-1:0][31:0] r;
    for (int p = 0; p < NPE; p++) begin
      int row = p / COLS;
      logic [31:0] a, b;
      if (kind(p) == PE_NONE) begin y[p] = 0; continue; end
      a = (row == 0) ? operands[pe_cfg[p].src_a] : y[(row-1)*COLS + int'(pe_cfg[p].src_a)];
      if (pe_cfg[p].b_imm) b = 32'($signed(pe_cfg[p].imm));
      else b = (row == 0) ? operands[pe_cfg[p].src_b] : y[(row-1)*COLS + int'(pe_cfg[p].src_b)];
      y[p] = alu(pe_cfg[p].op, a, b);
    end
    for (int o = 0; o < NOUT; o++) r[o] = y[int'(out_sel[o])];
    return r;
  endfunction

  logic [NOUT-1:0][31:0] hist [8];
  bit                    hist_bad [8];
  int                    n_deep = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; operands = '0; pe_cfg = '0; out_sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      logic [NOUT-1:0][31:0] e;
      bit bad;
      @(negedge clk);
      for (int i = 0; i < NIN; i++) operands[i] = $urandom;
      for (int p = 0; p < NPE; p++) begin
        int k, nsrc;
        k = int'(kind(p));
        nsrc = (p < COLS) ? NIN : COLS;
        pe_cfg[p].op    = ops_of[k][$urandom_range(0, ops_of[k].size() - 1)];
        pe_cfg[p].src_a = SEL_W'($urandom_range(0, nsrc - 1));
        pe_cfg[p].src_b = SEL_W'($urandom_range(0, nsrc - 1));
        pe_cfg[p].b_imm = ($urandom_range(0, 3) == 0);
        pe_cfg[p].imm   = 8'($urandom);
      end
      for (int o = 0; o < NOUT; o++) begin
        int s;
        do s = $urandom_range(0, NPE - 1); while (kind(s) == PE_NONE);
        out_sel[o] = OSEL_W'(s);
        if (s / COLS == ROWS - 1) n_deep++;
      end
      bad = (it % 25 == 24);
      if (bad) out_sel[0] = OSEL_W'(NPE - 1);   // an empty position
      in_valid = 1;
      #1;
      e = model();
      checks++;
      if (err1 !== bad || err4 !== bad) begin
        failures++; $display("FAIL cfg_err it=%0d %b %b", it, err1, err4);
      end
      if (!bad) begin
        checks++;
        if (res1 !== e || v1 !== 1'b1) begin
          failures++; $display("FAIL lat1 it=%0d res=%h exp=%h", it, res1, e);
        end
      end
      hist[it % 8] = e;
      hist_bad[it % 8] = bad;
      if (it >= LAT - 1 && !hist_bad[(it - (LAT - 1)) % 8]) begin
        checks++;
        if (res4 !== hist[(it - (LAT - 1)) % 8] || v4 !== 1'b1) begin
          failures++; $display("FAIL lat%0d it=%0d res=%h exp=%h", LAT, it, res4, hist[(it - (LAT - 1)) % 8]);
        end
      end
    end
    checks++;
    if (n_deep == 0) begin failures++; $display("FAIL level 7 never selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
