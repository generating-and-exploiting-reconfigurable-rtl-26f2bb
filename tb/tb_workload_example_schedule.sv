// tb_workload_example_schedule: the two-cycle mapping example of a 2-issue
// machine (2 FUs, 4 read / 2 write ports) with a five-PE, three-level RCFU:
//   row 0: PE0 Add/Sub, PE1 Add/Sub
//   row 1: PE2 Add/Sub, PE3 Logic
//   row 2: PE4 Shift          (the sixth position is left empty)
// Eight operations are scheduled in two bundles, the FU and the RCFU working
// in the same cycle:
//   cycle 0  FU0: op4 = a * b (multiply has no PE)
//            RCFU: op0 = a + b (PE0), op1 = b - c (PE1), op2 = op0 + 7 (PE2),
//                  op1 passed down by MOVE on PE3, op3 = op2 >> op1 (PE4)
//   cycle 1  RCFU: op5 = op4 + op3 (PE1), op7 = op5 ^ 0x5A (PE3),
//                  op6 = op7 >>> 2 (PE4)
// Cycle 0 reads three registers and writes two (op4, op3); cycle 1 reads two
// and writes two (op7, op6), within the port budget. The operation values of
// the graph are this test's own; the checks are the final register values
// against expressions evaluated here and the two-bundle run time.
module tb_workload_example_schedule;
  import rcfu_pkg::*;

  localparam int N = 2, NR = 4, AW = 5, PSEL_W = 2, WSEL_W = 2, CI_AW = 4, NPE = 6;
  localparam logic [11:0] MAP = 12'h395;   // A A | A L | S -
`include "tb_bundle_types.svh"

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                imem_we;
  logic [5:0]          imem_addr;
  logic [BUNDLE_W-1:0] imem_wdata;
  logic                cfg_we;
  logic [CI_AW-1:0]    cfg_addr;
  logic [CFG_W-1:0]    cfg_wdata;
  logic                start, busy, done;
  logic [AW-1:0]       dbg_addr;
  logic [31:0]         dbg_data;
  logic                cfg_err, sched_err;
  logic [31:0]         stat_cycles, stat_fu_ops, stat_ci, stat_overlap, stat_reconf;

  vliw_rcfu_core #(.N(N), .ROWS(3), .COLS(2), .PE_KIND_MAP(MAP)) dut (.*);

  bundle_t prog [4];

  function automatic logic [CFG_W-1:0] pack(pe_cfg_t p [NPE], int o0, int o1);
    logic [CFG_W-1:0] v;
    for (int i = 0; i < NPE; i++) v[i*$bits(pe_cfg_t) +: $bits(pe_cfg_t)] = p[i];
    v[NPE*$bits(pe_cfg_t) +: OSEL_W]          = OSEL_W'(o0);
    v[NPE*$bits(pe_cfg_t) + OSEL_W +: OSEL_W] = OSEL_W'(o1);
    return v;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_cfg_t c0 [NPE], c1 [NPE];
    logic [31:0] a, b, c, op0, op1, op2, op3, op4, op5, op6, op7;
    logic [31:0] got [8];
    int cyc;
    imem_we = 0; imem_addr = 0; imem_wdata = '0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    start = 0; dbg_addr = 0;
    a = 32'd1234; b = 32'd77; c = 32'd74;
    op0 = a + b; op1 = b - c; op2 = op0 + 7; op3 = op2 >> op1[4:0]; op4 = a * b;
    op5 = op4 + op3; op7 = op5 ^ 32'h5A; op6 = 32'($signed(op7) >>> 2);
    // CI 0 (cycle 0) and CI 1 (cycle 1); the empty position 5 is never used
    c0 = '{pe(OP_ADD, 0, 1), pe(OP_SUB, 1, 2),
           pe(OP_ADD, 0, 0, 1, 7), pe(OP_MOVE, 1),
           pe(OP_SRL, 0, 1), pe(OP_MOVE, 0)};
    c1 = '{pe(OP_MOVE, 0), pe(OP_ADD, 0, 1),
           pe(OP_MOVE, 0), pe(OP_XOR, 1, 0, 1, 'h5A),
           pe(OP_SRA, 1, 0, 1, 2), pe(OP_MOVE, 0)};
    // setup: r1 = a, r2 = b, r3 = c
    prog[0] = '0;
    prog[0].fu[0] = fu_ri(FU_PASSB, 0, int'(a)); prog[0].wb[0] = wb(0, 1);
    prog[0].fu[1] = fu_ri(FU_PASSB, 0, int'(b)); prog[0].wb[1] = wb(1, 2);
    prog[1] = '0;
    prog[1].fu[0] = fu_ri(FU_PASSB, 0, int'(c)); prog[1].wb[0] = wb(0, 3);
    // cycle 0 of the schedule
    prog[2] = '0;
    prog[2].rd[0] = 1; prog[2].rd[1] = 2; prog[2].rd[2] = 3;
    prog[2].fu[0] = fu_rr(FU_MUL, 0, 1); prog[2].wb[0] = wb(0, 4);
    prog[2].ci_valid = 1; prog[2].ci_idx = 0; prog[2].wb[1] = wb(N + 0, 5);
    // cycle 1 of the schedule
    prog[3] = '0;
    prog[3].rd[0] = 4; prog[3].rd[1] = 5;
    prog[3].ci_valid = 1; prog[3].ci_idx = 1;
    prog[3].wb[0] = wb(N + 0, 7); prog[3].wb[1] = wb(N + 1, 6);
    prog[3].halt = 1;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) cfg_we = 1; cfg_addr = 0; cfg_wdata = pack(c0, 4, 0);
    @(negedge clk) cfg_we = 1; cfg_addr = 1; cfg_wdata = pack(c1, 3, 4);
    for (int t = 0; t < 4; t++) begin
      @(negedge clk) cfg_we = 0; imem_we = 1; imem_addr = 6'(t); imem_wdata = prog[t];
    end
    @(negedge clk) imem_we = 0; start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    for (int r = 1; r < 8; r++) begin
      dbg_addr = AW'(r);
      #1;
      got[r] = dbg_data;
    end
    checks++; if (got[4] !== op4) begin failures++; $display("FAIL op4 %h exp %h", got[4], op4); end
    checks++; if (got[5] !== op3) begin failures++; $display("FAIL op3 %h exp %h", got[5], op3); end
    checks++; if (got[7] !== op7) begin failures++; $display("FAIL op7 %h exp %h", got[7], op7); end
    checks++; if (got[6] !== op6) begin failures++; $display("FAIL op6 %h exp %h", got[6], op6); end
    // two setup bundles plus the two-cycle schedule
    checks++;
    if (cyc != 5 || stat_cycles != 4 || stat_overlap != 1 || stat_ci != 2 || cfg_err || sched_err) begin
      failures++; $display("FAIL timing/stats: %0d cycles, overlap %0d", cyc, stat_overlap);
    end
    $display("example: op3=%h op4=%h op6=%h op7=%h; schedule took 2 cycles", got[5], got[4], got[6], got[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
