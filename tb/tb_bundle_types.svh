// tb_bundle_types.svh: bundle and configuration types of vliw_rcfu_core as
// seen by a testbench, with helpers to build them. The including module
// declares N, NR, AW, PSEL_W, WSEL_W, CI_AW, NPE before including this.

  typedef struct packed {
    fu_op_e              op;
    logic [PSEL_W-1:0]   a;
    logic [PSEL_W-1:0]   b;
    logic                b_imm;
    logic [15:0]         imm;
  } fu_slot_t;

  typedef struct packed {
    logic                en;
    logic [WSEL_W-1:0]   src;
    logic [AW-1:0]       rd;
  } wb_slot_t;

  typedef struct packed {
    logic                  halt;
    wb_slot_t [N-1:0]      wb;
    logic                  ci_valid;
    logic [CI_AW-1:0]      ci_idx;
    fu_slot_t [N-1:0]      fu;
    logic [NR-1:0][AW-1:0] rd;
  } bundle_t;

  localparam int BUNDLE_W = $bits(bundle_t);
  localparam int CFG_W = NPE * $bits(pe_cfg_t) + N * OSEL_W;

  // FU slot: register operands given as read-port numbers.
  function automatic fu_slot_t fu_rr(fu_op_e op, int pa, int pb);
    fu_slot_t f = '0;
    f.op = op; f.a = PSEL_W'(pa); f.b = PSEL_W'(pb);
    return f;
  endfunction

  // FU slot: port operand and sign-extended immediate.
  function automatic fu_slot_t fu_ri(fu_op_e op, int pa, int imm);
    fu_slot_t f = '0;
    f.op = op; f.a = PSEL_W'(pa); f.b_imm = 1; f.imm = 16'(imm);
    return f;
  endfunction

  function automatic wb_slot_t wb(int src, int rd);
    wb_slot_t w;
    w.en = 1; w.src = WSEL_W'(src); w.rd = AW'(rd);
    return w;
  endfunction

  function automatic pe_cfg_t pe(pe_op_e op, int a, int b = 0, bit imm = 0, int k = 0);
    pe_cfg_t c;
    c.op = op; c.src_a = SEL_W'(a); c.src_b = SEL_W'(b); c.b_imm = imm; c.imm = IMM_W'(k);
    return c;
  endfunction
