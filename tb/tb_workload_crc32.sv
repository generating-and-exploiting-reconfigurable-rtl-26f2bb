// tb_workload_crc32: CRC-32 (reflected polynomial 0xEDB88320, as used by
// the CRC32 benchmark) computed by the default VLIW slice with its RCFU.
//
// The bit-serial CRC step
//     mask = -(crc & 1);  crc = (crc >> 1) ^ (poly & mask)
// needs four dependent operations, more than the two-level RCFU holds, so it
// is split into two customized instructions:
//   CI 0: row 0  z = crc - crc, c = MOVE crc, t = crc & 1
//         row 1  mask = z - t (Add/Sub PE), sh = c >> 1 (Shift PE)
//   CI 1: row 0  s = MOVE sh, m = mask & poly
//         row 1  crc' = s ^ m (Logic PE)
// While the RCFU runs the step, an FU counts the processed bits in parallel:
// each bundle uses the FUs and the RCFU in the same cycle.
// The program (setup, three bytes "abc", final inversion) is built here; the
// result must equal 0x352441C2, computed independently by a function below,
// and the run must take exactly one cycle per bundle (2 per bit).
module tb_workload_crc32;
  import rcfu_pkg::*;

  localparam int N = 3, NR = 6, AW = 5, PSEL_W = 3, WSEL_W = 3, CI_AW = 4, NPE = 6;
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

  vliw_rcfu_core dut (.*);

  // registers: r1 poly, r4 crc, r5..r7 data bytes, r9 bit counter, r3 scratch
  localparam int R_POLY = 1, R_MASK = 2, R_TMP = 3, R_CRC = 4, R_BYTE0 = 5, R_SH = 8, R_CNT = 9;
  byte unsigned msg [3] = '{8'h61, 8'h62, 8'h63};   // "abc"

  bundle_t prog [64];
  int      plen = 0;

  function automatic logic [31:0] crc32_ref(byte unsigned m [3]);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < 3; i++) begin
      c = c ^ {24'h0, m[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  task automatic emit(bundle_t b);
    prog[plen] = b;
    plen++;
  endtask

  function automatic logic [CFG_W-1:0] pack(pe_cfg_t p [NPE], int o0, int o1, int o2);
    logic [CFG_W-1:0] v;
    for (int i = 0; i < NPE; i++) v[i*$bits(pe_cfg_t) +: $bits(pe_cfg_t)] = p[i];
    v[NPE*$bits(pe_cfg_t) +: OSEL_W]            = OSEL_W'(o0);
    v[NPE*$bits(pe_cfg_t) + OSEL_W +: OSEL_W]   = OSEL_W'(o1);
    v[NPE*$bits(pe_cfg_t) + 2*OSEL_W +: OSEL_W] = OSEL_W'(o2);
    return v;
  endfunction

  task automatic build();
    bundle_t b;
    // setup: poly = (0xEDB8 << 16) | (0x8320 & 0xFFFF), crc = ~0, bytes
    b = '0;
    b.fu[0] = fu_ri(FU_PASSB, 0, 16'hEDB8); b.wb[0] = wb(0, R_POLY);
    b.fu[1] = fu_ri(FU_PASSB, 0, 16'h8320); b.wb[1] = wb(1, R_MASK);
    b.fu[2] = fu_ri(FU_PASSB, 0, -1);       b.wb[2] = wb(2, R_TMP);
    emit(b);
    b = '0;
    b.rd[0] = AW'(R_POLY); b.rd[1] = AW'(R_TMP);
    b.fu[0] = fu_ri(FU_SLL, 0, 16); b.wb[0] = wb(0, R_POLY);
    b.fu[1] = fu_ri(FU_SRL, 1, 16); b.wb[1] = wb(1, R_TMP);
    b.fu[2] = fu_ri(FU_PASSB, 0, -1); b.wb[2] = wb(2, R_CRC);
    emit(b);
    b = '0;
    b.rd[0] = AW'(R_MASK); b.rd[1] = AW'(R_TMP);
    b.fu[0] = fu_rr(FU_AND, 0, 1); b.wb[0] = wb(0, R_MASK);
    b.fu[1] = fu_ri(FU_PASSB, 0, msg[0]); b.wb[1] = wb(1, R_BYTE0);
    b.fu[2] = fu_ri(FU_PASSB, 0, msg[1]); b.wb[2] = wb(2, R_BYTE0 + 1);
    emit(b);
    b = '0;
    b.rd[0] = AW'(R_POLY); b.rd[1] = AW'(R_MASK);
    b.fu[0] = fu_rr(FU_OR, 0, 1); b.wb[0] = wb(0, R_POLY);
    b.fu[1] = fu_ri(FU_PASSB, 0, msg[2]); b.wb[1] = wb(1, R_BYTE0 + 2);
    b.fu[2] = fu_ri(FU_PASSB, 0, 0); b.wb[2] = wb(2, R_CNT);
    emit(b);
    for (int i = 0; i < 3; i++) begin
      // crc ^= byte
      b = '0;
      b.rd[0] = AW'(R_CRC); b.rd[1] = AW'(R_BYTE0 + i);
      b.fu[0] = fu_rr(FU_XOR, 0, 1); b.wb[0] = wb(0, R_CRC);
      emit(b);
      for (int k = 0; k < 8; k++) begin
        // CI 0 on crc; FU counts the bit
        b = '0;
        b.rd[0] = AW'(R_CRC); b.rd[1] = AW'(R_CNT);
        b.ci_valid = 1; b.ci_idx = 0;
        b.fu[0] = fu_ri(FU_ADD, 1, 1); b.wb[0] = wb(0, R_CNT);
        b.wb[1] = wb(N + 0, R_MASK);
        b.wb[2] = wb(N + 1, R_SH);
        emit(b);
        // CI 1: crc = sh ^ (mask & poly)
        b = '0;
        b.rd[0] = AW'(R_SH); b.rd[1] = AW'(R_MASK); b.rd[2] = AW'(R_POLY);
        b.ci_valid = 1; b.ci_idx = 1;
        b.fu[0] = fu_rr(FU_SUB, 1, 1); b.wb[0] = wb(0, R_TMP);   // busy FU, result unused
        b.wb[1] = wb(N + 0, R_CRC);
        emit(b);
      end
    end
    b = '0;
    b.rd[0] = AW'(R_CRC);
    b.fu[0] = fu_ri(FU_XOR, 0, -1); b.wb[0] = wb(0, R_CRC);
    b.halt = 1;
    emit(b);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_cfg_t c0 [NPE], c1 [NPE];
    int cyc;
    logic [31:0] crc_got;
    imem_we = 0; imem_addr = 0; imem_wdata = '0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    start = 0; dbg_addr = 0;
    // positions: 0 A, 1 A, 2 L | 3 A, 4 L, 5 S
    c0 = '{pe(OP_SUB, 0, 0), pe(OP_MOVE, 0), pe(OP_AND, 0, 0, 1, 1),
           pe(OP_SUB, 0, 2), pe(OP_MOVE, 0), pe(OP_SRL, 1, 0, 1, 1)};
    c1 = '{pe(OP_MOVE, 0), pe(OP_MOVE, 0), pe(OP_AND, 1, 2),
           pe(OP_MOVE, 0), pe(OP_XOR, 0, 2), pe(OP_MOVE, 0)};
    build();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) cfg_we = 1; cfg_addr = 0; cfg_wdata = pack(c0, 3, 5, 0);
    @(negedge clk) cfg_we = 1; cfg_addr = 1; cfg_wdata = pack(c1, 4, 0, 0);
    for (int t = 0; t < plen; t++) begin
      @(negedge clk) cfg_we = 0; imem_we = 1; imem_addr = 6'(t); imem_wdata = prog[t];
    end
    @(negedge clk) imem_we = 0; start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    dbg_addr = AW'(R_CRC);
    #1;
    crc_got = dbg_data;
    checks++;
    if (dbg_data !== crc32_ref(msg) || dbg_data !== 32'h3524_41C2) begin
      failures++; $display("FAIL crc %h expected %h", dbg_data, crc32_ref(msg));
    end
    dbg_addr = AW'(R_CNT);
    #1;
    checks++;
    if (dbg_data !== 32'd24) begin failures++; $display("FAIL bit count %0d", dbg_data); end
    checks++;
    if (cyc != plen + 1 || stat_cycles != 32'(plen) || plen != 4 + 3 * 17 + 1) begin
      failures++; $display("FAIL cycles %0d for %0d bundles", cyc, plen);
    end
    checks++;
    if (stat_ci != 48 || stat_overlap != 48 || stat_reconf != 47 || cfg_err || sched_err) begin
      failures++; $display("FAIL stats ci %0d overlap %0d reconf %0d", stat_ci, stat_overlap, stat_reconf);
    end
    $display("crc32(\"abc\") = %h in %0d cycles, %0d customized instructions, %0d with FUs busy",
             crc_got, stat_cycles, stat_ci, stat_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
