// tb_rcfu: self-checking test of the complete RCFU (configuration store plus
// PE grid) with hand-written customized instructions.
//
// Three configurations are loaded into a single-cycle unit and a two-cycle
// unit (LATENCY=2):
//   CI 0: (i0+i1)+(i2-i3), (i4^i5)&(i0+i1), (i4^i5)>>1
//   CI 1: i5 moved down a level and shifted left by 3; ~i0 moved; i1-i2
//   CI 2: asks the Shift/Move PE for an ADD (illegal: cfg_err)
// Random operands are applied while switching between CIs every cycle; each
// result is compared with the expression above, in the issue cycle for the
// single-cycle unit and one edge later for the two-cycle unit.
module tb_rcfu;
  import rcfu_pkg::*;

  localparam int NIN = 6, NOUT = 3, ROWS = 2, COLS = 3, NPE = 6;
  localparam int CFG_W = NPE * $bits(pe_cfg_t) + NOUT * OSEL_W;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  cfg_we;
  logic [3:0]            cfg_addr;
  logic [CFG_W-1:0]      cfg_wdata;
  logic                  ci_valid;
  logic [3:0]            ci_idx;
  logic [NIN-1:0][31:0]  operands;
  logic [NOUT-1:0][31:0] res1, res2;
  logic                  v1, v2, e1, e2;

  rcfu #(.LATENCY(1)) dut1 (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .ci_valid, .ci_idx,
                            .operands, .result(res1), .res_valid(v1), .cfg_err(e1));
  rcfu #(.LATENCY(2)) dut2 (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .ci_valid, .ci_idx,
                            .operands, .result(res2), .res_valid(v2), .cfg_err(e2));

  function automatic pe_cfg_t pe(pe_op_e op, int a, int b, bit imm = 0, int k = 0);
    pe_cfg_t c;
    c.op = op; c.src_a = SEL_W'(a); c.src_b = SEL_W'(b); c.b_imm = imm; c.imm = IMM_W'(k);
    return c;
  endfunction

  function automatic logic [CFG_W-1:0] pack(pe_cfg_t p [NPE], int o0, int o1, int o2);
    logic [CFG_W-1:0] v;
    for (int i = 0; i < NPE; i++) v[i*$bits(pe_cfg_t) +: $bits(pe_cfg_t)] = p[i];
    v[NPE*$bits(pe_cfg_t) +: OSEL_W]            = OSEL_W'(o0);
    v[NPE*$bits(pe_cfg_t) + OSEL_W +: OSEL_W]   = OSEL_W'(o1);
    v[NPE*$bits(pe_cfg_t) + 2*OSEL_W +: OSEL_W] = OSEL_W'(o2);
    return v;
  endfunction

  function automatic logic [NOUT-1:0][31:0] expect_ci(int ci, logic [NIN-1:0][31:0] i);
    logic [NOUT-1:0][31:0] r;
    case (ci)
      0: begin
        r[0] = (i[0] + i[1]) + (i[2] - i[3]);
        r[1] = (i[4] ^ i[5]) & (i[0] + i[1]);
        r[2] = (i[4] ^ i[5]) >> 1;
      end
      1: begin
        r[0] = i[5] << 3;
        r[1] = ~i[0];
        r[2] = i[1] - i[2];
      end
      default: r = '0;
    endcase
    return r;
  endfunction

  task automatic load(int idx, logic [CFG_W-1:0] w);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 4'(idx); cfg_wdata = w;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NOUT-1:0][31:0] prev_exp;
  int                    prev_ci;

  initial begin
    pe_cfg_t c0 [NPE], c1 [NPE], c2 [NPE];
    cfg_we = 0; cfg_addr = 0; cfg_wdata = '0; ci_valid = 0; ci_idx = 0; operands = '0;
    // positions: 0 A, 1 A, 2 L | 3 A, 4 L, 5 S
    c0 = '{pe(OP_ADD, 0, 1), pe(OP_SUB, 2, 3), pe(OP_XOR, 4, 5),
           pe(OP_ADD, 0, 1), pe(OP_AND, 2, 0), pe(OP_SRL, 2, 0, 1, 1)};
    c1 = '{pe(OP_SUB, 1, 2), pe(OP_MOVE, 5, 0), pe(OP_NOT, 0, 0),
           pe(OP_MOVE, 0, 0), pe(OP_MOVE, 2, 0), pe(OP_SLL, 1, 0, 1, 3)};
    c2 = c0;
    c2[5] = pe(OP_ADD, 0, 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(0, pack(c0, 3, 4, 5));
    load(1, pack(c1, 5, 4, 3));
    load(2, pack(c2, 3, 4, 5));
    prev_ci = -1;
    for (int it = 0; it < 400; it++) begin
      int ci;
      logic [NOUT-1:0][31:0] e;
      @(negedge clk);
      ci = (it % 17 == 16) ? 2 : $urandom_range(0, 1);
      for (int k = 0; k < NIN; k++) operands[k] = $urandom;
      ci_valid = 1;
      ci_idx = 4'(ci);
      #1;
      e = expect_ci(ci, operands);
      checks++;
      if (e1 !== (ci == 2) || e2 !== (ci == 2)) begin
        failures++; $display("FAIL cfg_err ci=%0d got %b %b", ci, e1, e2);
      end
      if (ci != 2) begin
        checks++;
        if (res1 !== e || v1 !== 1'b1) begin
          failures++; $display("FAIL lat1 ci=%0d res=%h exp=%h", ci, res1, e);
        end
      end
      if (it > 0 && prev_ci != 2) begin
        checks++;
        if (res2 !== prev_exp || v2 !== 1'b1) begin
          failures++; $display("FAIL lat2 ci=%0d res=%h exp=%h", prev_ci, res2, prev_exp);
        end
      end
      prev_exp = e;
      prev_ci = ci;
    end
    @(negedge clk);
    ci_valid = 0;
    #1;
    checks++;
    if (v1 !== 1'b0 || v2 !== 1'b1) begin failures++; $display("FAIL valid timing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
