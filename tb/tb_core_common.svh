// tb_core_common.svh: body shared by the end-to-end testbenches of
// vliw_rcfu_core. The including module declares LAT (the RCFU latency of its
// DUT), the DUT on the signals declared here and a watchdog.
//
// The test runs random straight-line programs. Each program first loads
// constants with FU_PASSB, then mixes FU operations and customized
// instructions (CIs) from a set of random, always legal, RCFU configurations,
// with random register reads and write-backs that respect the port budget.
// An architectural reference model written here executes the same bundles
// (its own grid evaluator, its own ALU) and the register file, the
// statistics counters and the cycle count are compared with it after every
// program. A last program issues an illegal CI and writes an RCFU result that
// does not exist, to check the two error flags.
// Mechanisms counted (each must happen at least once): FU and RCFU busy in
// the same cycle, switching CI configuration, a value passed down a level by
// MOVE, a two-level dependent chain inside one CI, each PE kind doing its own
// operation, all write ports used by mixed FU/RCFU results, delayed RCFU
// write-back (LAT>1 only), and both error flags.

  import rcfu_pkg::*;

  localparam int N = 3, NR = 6, AW = 5, PSEL_W = 3, WSEL_W = 3, CI_AW = 4, IA_W = 6;
  localparam int ROWS = 2, COLS = 3, NPE = 6, NREG = 32, IMEM_DEPTH = 64;
  localparam int FU_SLOT_W = 4 + 2 * PSEL_W + 1 + 16;
  localparam int WB_SLOT_W = 1 + WSEL_W + AW;
  localparam int BUNDLE_W = NR * AW + N * FU_SLOT_W + CI_AW + 1 + N * WB_SLOT_W + 1;
  localparam int CFG_W = NPE * $bits(pe_cfg_t) + N * OSEL_W;
  localparam int NCFG = 6;
  localparam int NPROG = 25;

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

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                imem_we;
  logic [IA_W-1:0]     imem_addr;
  logic [BUNDLE_W-1:0] imem_wdata;
  logic                cfg_we;
  logic [CI_AW-1:0]    cfg_addr;
  logic [CFG_W-1:0]    cfg_wdata;
  logic                start, busy, done;
  logic [AW-1:0]       dbg_addr;
  logic [31:0]         dbg_data;
  logic                cfg_err, sched_err;
  logic [31:0]         stat_cycles, stat_fu_ops, stat_ci, stat_overlap, stat_reconf;

  pe_kind_e kinds [NPE] = '{PE_ARITH, PE_ARITH, PE_LOGIC, PE_ARITH, PE_LOGIC, PE_SHIFT};
  pe_op_e ops_of [4][] = '{'{OP_MOVE}, '{OP_MOVE, OP_ADD, OP_SUB},
                           '{OP_MOVE, OP_AND, OP_OR, OP_XOR, OP_NOT},
                           '{OP_MOVE, OP_SLL, OP_SRL, OP_SRA}};

  pe_cfg_t         cfgs    [8][NPE];
  logic [OSEL_W-1:0] osel  [8][N];
  bundle_t         prog    [IMEM_DEPTH];
  int              prog_len;

  // reference state
  logic [31:0] R [NREG];
  int m_fu_ops, m_ci, m_overlap, m_reconf, m_last_ci;
  bit m_cfg_err, m_sched_err;
  logic [N-1:0][31:0] m_rc_hold;   // value the RCFU result register holds (LAT>1)
  bit                 m_rc_vld;

  // mechanism counters
  int n_overlap = 0, n_reconf = 0, n_move = 0, n_chain = 0, n_mixed_wb = 0, n_delayed = 0;
  int n_kind [4] = '{0, 0, 0, 0};

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

  function automatic logic [31:0] fu_ref(fu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      FU_ADD:  return x + z;
      FU_SUB:  return x - z;
      FU_AND:  return x & z;
      FU_OR:   return x | z;
      FU_XOR:  return x ^ z;
      FU_SLL:  return x << z[4:0];
      FU_SRL:  return x >> z[4:0];
      FU_SRA:  return 32'($signed(x) >>> z[4:0]);
      FU_SLT:  return {31'b0, $signed(x) < $signed(z)};
      FU_SLTU: return {31'b0, x < z};
      FU_MUL:  return x * z;
      FU_PASSB: return z;
      default: return 0;
    endcase
  endfunction

  // Evaluate configuration k on the read-port values; count what it exercised.
  function automatic logic [N-1:0][31:0] eval_ci(int k, logic [NR-1:0][31:0] rv, bit count);
    logic [31:0] y [NPE];
    logic [N-1:0][31:0] r;
    bit err = 0;
    for (int p = 0; p < NPE; p++) begin
      int row = p / COLS;
      logic [31:0] a, b;
      a = (row == 0) ? rv[cfgs[k][p].src_a] : y[int'(cfgs[k][p].src_a)];
      if (cfgs[k][p].b_imm) b = 32'($signed(cfgs[k][p].imm));
      else b = (row == 0) ? rv[cfgs[k][p].src_b] : y[int'(cfgs[k][p].src_b)];
      if (!pe_supports(kinds[p], cfgs[k][p].op)) begin err = 1; y[p] = 0; end
      else y[p] = alu(cfgs[k][p].op, a, b);
    end
    for (int o = 0; o < N; o++) begin
      int s = int'(osel[k][o]);
      r[o] = y[s];
      if (count && s >= COLS) begin
        if (cfgs[k][s].op == OP_MOVE) n_move++;
        else n_chain++;
      end
    end
    if (count) begin
      if (err) m_cfg_err = 1;
      for (int p = 0; p < NPE; p++) if (cfgs[k][p].op != OP_MOVE) n_kind[int'(kinds[p])]++;
    end
    return r;
  endfunction

  // Architectural execution of the loaded program.
  task automatic model_run();
    m_fu_ops = 0; m_ci = 0; m_overlap = 0; m_reconf = 0; m_last_ci = -1;
    m_cfg_err = 0; m_sched_err = 0;
    for (int t = 0; t < prog_len; t++) begin
      bundle_t bb = prog[t];
      logic [NR-1:0][31:0] rv;
      logic [N-1:0][31:0] fy, rc, rc_now;
      bit any_fu = 0, rc_ok, used_fu = 0, used_rc = 0;
      int nw = 0;
      for (int p = 0; p < NR; p++) rv[p] = R[bb.rd[p]];
      for (int i = 0; i < N; i++) begin
        logic [31:0] a, b;
        a = (int'(bb.fu[i].a) < NR) ? rv[bb.fu[i].a] : 0;
        b = bb.fu[i].b_imm ? 32'($signed(bb.fu[i].imm)) : ((int'(bb.fu[i].b) < NR) ? rv[bb.fu[i].b] : 0);
        fy[i] = fu_ref(bb.fu[i].op, a, b);
        if (bb.fu[i].op != FU_NOP) begin any_fu = 1; m_fu_ops++; end
      end
      rc = '0;
      if (bb.ci_valid) begin
        rc = eval_ci(int'(bb.ci_idx), rv, 1);
        m_ci++;
        if (any_fu) m_overlap++;
        if (m_last_ci >= 0 && m_last_ci != int'(bb.ci_idx)) m_reconf++;
        m_last_ci = int'(bb.ci_idx);
      end
      if (LAT == 1) begin
        rc_now = rc; rc_ok = bb.ci_valid;
      end else begin
        rc_now = m_rc_hold; rc_ok = m_rc_vld;
        if (bb.ci_valid) m_rc_hold = rc;
        m_rc_vld = bb.ci_valid;
      end
      for (int j = 0; j < N; j++) begin
        if (bb.wb[j].en) begin
          int s = int'(bb.wb[j].src);
          nw++;
          if (s < N) begin R[bb.wb[j].rd] = fy[s]; used_fu = 1; end
          else begin
            used_rc = 1;
            if (!rc_ok) m_sched_err = 1;   // the write is dropped
            else begin
              R[bb.wb[j].rd] = rc_now[s - N];
              if (LAT > 1) n_delayed++;
            end
          end
        end
      end
      if (nw == N && used_fu && used_rc) n_mixed_wb++;
    end
  endtask

  function automatic pe_cfg_t rand_pe(int p);
    pe_cfg_t c;
    int k = int'(kinds[p]);
    int nsrc = (p < COLS) ? NR : COLS;
    c.op    = ops_of[k][$urandom_range(0, ops_of[k].size() - 1)];
    c.src_a = SEL_W'($urandom_range(0, nsrc - 1));
    c.src_b = SEL_W'($urandom_range(0, nsrc - 1));
    c.b_imm = ($urandom_range(0, 3) == 0);
    c.imm   = IMM_W'($urandom);
    return c;
  endfunction

  function automatic logic [CFG_W-1:0] pack_cfg(int k);
    logic [CFG_W-1:0] v;
    for (int p = 0; p < NPE; p++) v[p*$bits(pe_cfg_t) +: $bits(pe_cfg_t)] = cfgs[k][p];
    for (int o = 0; o < N; o++) v[NPE*$bits(pe_cfg_t) + o*OSEL_W +: OSEL_W] = osel[k][o];
    return v;
  endfunction

  task automatic make_cfgs();
    for (int k = 0; k < NCFG; k++) begin
      for (int p = 0; p < NPE; p++) cfgs[k][p] = rand_pe(p);
      for (int o = 0; o < N; o++) osel[k][o] = OSEL_W'($urandom_range(0, NPE - 1));
    end
    // CI 0 always holds a level skip (MOVE in row 1) and a two-level chain.
    cfgs[0][3].op = OP_MOVE;
    cfgs[0][4].op = OP_XOR;
    osel[0][0] = 3; osel[0][1] = 4;
    // CI 7 is illegal: the Shift/Move PE is asked to add.
    for (int p = 0; p < NPE; p++) cfgs[7][p] = rand_pe(p);
    cfgs[7][5].op = OP_ADD;
    for (int o = 0; o < N; o++) osel[7][o] = OSEL_W'(o);
  endtask

  function automatic bundle_t rand_bundle(bit rc_avail_next_ok, output bit issued_ci);
    bundle_t b = '0;
    int used [$];
    for (int p = 0; p < NR; p++) b.rd[p] = AW'($urandom_range(0, NREG - 1));
    for (int i = 0; i < N; i++) begin
      b.fu[i].op = ($urandom_range(0, 4) == 0) ? FU_NOP : fu_op_e'($urandom_range(1, 12));
      b.fu[i].a = PSEL_W'($urandom_range(0, NR - 1));
      b.fu[i].b = PSEL_W'($urandom_range(0, NR - 1));
      b.fu[i].b_imm = ($urandom_range(0, 3) == 0);
      b.fu[i].imm = 16'($urandom);
    end
    b.ci_valid = ($urandom_range(0, 1) == 1);
    b.ci_idx = CI_AW'($urandom_range(0, NCFG - 1));
    issued_ci = b.ci_valid;
    for (int j = 0; j < N; j++) begin
      int r;
      do r = $urandom_range(0, NREG - 1); while (r inside {used});
      used.push_back(r);
      b.wb[j].rd = AW'(r);
      b.wb[j].en = ($urandom_range(0, 3) != 0);
      if ((LAT == 1 && b.ci_valid) || (LAT > 1 && rc_avail_next_ok))
        b.wb[j].src = WSEL_W'($urandom_range(0, 2 * N - 1));
      else
        b.wb[j].src = WSEL_W'($urandom_range(0, N - 1));
    end
    return b;
  endfunction

  task automatic make_program(int len);
    bit prev_ci = 0, ci;
    prog_len = len;
    // four bundles of constants: 12 registers
    for (int t = 0; t < 4; t++) begin
      prog[t] = '0;
      for (int j = 0; j < N; j++) begin
        prog[t].fu[j].op = FU_PASSB;
        prog[t].fu[j].b_imm = 1;
        prog[t].fu[j].imm = 16'($urandom);
        prog[t].wb[j].en = 1;
        prog[t].wb[j].src = WSEL_W'(j);
        prog[t].wb[j].rd = AW'(t * N + j);
      end
    end
    for (int t = 4; t < len; t++) begin
      prog[t] = rand_bundle(prev_ci, ci);
      prev_ci = ci;
    end
    prog[len - 1].halt = 1;
  endtask

  task automatic load_and_run(string tag);
    int cyc;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = CI_AW'(k); cfg_wdata = pack_cfg(k);
    end
    for (int t = 0; t < prog_len; t++) begin
      @(negedge clk);
      cfg_we = 0;
      imem_we = 1; imem_addr = IA_W'(t); imem_wdata = prog[t];
    end
    @(negedge clk);
    cfg_we = 0; imem_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    model_run();
    // one bundle per cycle: the halt bundle executes at edge prog_len
    checks++;
    if (cyc != prog_len + 1 || stat_cycles != 32'(prog_len)) begin
      failures++; $display("FAIL %s cycles: took %0d, stat %0d, bundles %0d", tag, cyc, stat_cycles, prog_len);
    end
    for (int r = 0; r < NREG; r++) begin
      dbg_addr = AW'(r);
      #1;
      checks++;
      if (dbg_data !== R[r]) begin
        failures++; $display("FAIL %s r%0d = %h, expected %h", tag, r, dbg_data, R[r]);
      end
    end
    checks++;
    if (stat_fu_ops != 32'(m_fu_ops) || stat_ci != 32'(m_ci) || stat_overlap != 32'(m_overlap) ||
        stat_reconf != 32'(m_reconf)) begin
      failures++;
      $display("FAIL %s stats fu %0d/%0d ci %0d/%0d ovl %0d/%0d rcf %0d/%0d", tag,
               stat_fu_ops, m_fu_ops, stat_ci, m_ci, stat_overlap, m_overlap, stat_reconf, m_reconf);
    end
    checks++;
    if (cfg_err !== m_cfg_err || sched_err !== m_sched_err) begin
      failures++; $display("FAIL %s flags cfg %b/%b sched %b/%b", tag, cfg_err, m_cfg_err, sched_err, m_sched_err);
    end
    n_overlap += m_overlap;
    n_reconf += m_reconf;
  endtask

  int n_cfg_err = 0, n_sched_err = 0;

  initial begin
    imem_we = 0; imem_addr = 0; imem_wdata = '0;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    start = 0; dbg_addr = 0;
    for (int r = 0; r < NREG; r++) R[r] = 0;
    m_rc_hold = '0; m_rc_vld = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int pg = 0; pg < NPROG; pg++) begin
      make_cfgs();
      make_program($urandom_range(8, IMEM_DEPTH));
      load_and_run($sformatf("prog%0d", pg));
    end
    // error program: illegal CI, then an RCFU write with no result ready
    begin
      bundle_t b0, b1, b2;
      b0 = '0; b1 = '0; b2 = '0;
      b0.ci_valid = 1; b0.ci_idx = 7;
      b1.wb[0].en = 1; b1.wb[0].src = WSEL_W'(N); b1.wb[0].rd = 5'd20;
      b2.wb[0].en = 1; b2.wb[0].src = WSEL_W'(N + 1); b2.wb[0].rd = 5'd21;
      b2.halt = 1;
      prog[0] = b0; prog[1] = b1; prog[2] = b2; prog_len = 3;
      load_and_run("errors");
      if (cfg_err) n_cfg_err++;
      if (sched_err) n_sched_err++;
    end
    // flags clear on the next start
    make_cfgs();
    make_program(10);
    load_and_run("after-errors");
    $display("mechanisms: overlap=%0d reconf=%0d move=%0d chain=%0d arith=%0d logic=%0d shift=%0d mixed_wb=%0d delayed=%0d cfg_err=%0d sched_err=%0d",
             n_overlap, n_reconf, n_move, n_chain, n_kind[1], n_kind[2], n_kind[3], n_mixed_wb, n_delayed,
             n_cfg_err, n_sched_err);
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL never FU+RCFU overlap"); end
    checks++; if (n_reconf == 0) begin failures++; $display("FAIL never reconfigured"); end
    checks++; if (n_move == 0) begin failures++; $display("FAIL never moved a value down"); end
    checks++; if (n_chain == 0) begin failures++; $display("FAIL never chained two levels"); end
    for (int k = 1; k < 4; k++) begin
      checks++; if (n_kind[k] == 0) begin failures++; $display("FAIL PE kind %0d unused", k); end
    end
    checks++; if (n_mixed_wb == 0) begin failures++; $display("FAIL never mixed write-back"); end
    if (LAT > 1) begin
      checks++; if (n_delayed == 0) begin failures++; $display("FAIL never delayed write-back"); end
    end
    checks++; if (n_cfg_err == 0) begin failures++; $display("FAIL cfg_err never seen"); end
    checks++; if (n_sched_err == 0) begin failures++; $display("FAIL sched_err never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
