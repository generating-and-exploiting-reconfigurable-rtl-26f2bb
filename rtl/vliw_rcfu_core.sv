// vliw_rcfu_core: N-issue VLIW execute slice with a tightly coupled RCFU.
//
// The processor issues one long instruction word (a bundle) per cycle. A
// bundle names the registers for the 2N register-file read ports, gives each
// of the N base FUs an operation and picks its operands from those ports, may
// issue one customized instruction (CI) on the RCFU, and tells each of the N
// write ports which result to store where. The FUs and the RCFU work in the
// same cycle; they share the read and write ports, so an operation segment
// only runs on the RCFU if it fits the ports left by the FUs of its bundle.
// This is the point of the design: the RCFU is not a separate mode of the
// processor but one more slot of the VLIW word.
//
// Bundle layout (BUNDLE_W bits, LSB first; see bundle_t):
//   rd[p]     AW bits each, p = 0..2N-1    register read by port p
//   fu[i]     op(4) a(PSEL_W) b(PSEL_W) b_imm(1) imm(16), i = 0..N-1
//             a and b are read-port numbers; b_imm uses the sign-extended imm
//   ci_idx    CI_AW bits, ci_valid 1 bit   customized instruction to issue
//   wb[j]     rd(AW) src(WSEL_W) en(1), j = 0..N-1
//             src 0..N-1: FU src; src N..2N-1: RCFU result port src-N
//   halt      1 bit                        last bundle of the program
// The RCFU's inputs are the 2N read-port values themselves.
//
// Operation: load bundles (imem_*) and CI configurations (cfg_*), pulse
// start. Bundles 0,1,2,... execute one per cycle until one with halt set has
// executed; then done is high until the next start. The register file can be
// read at any time through dbg_addr/dbg_data. Statistics count run cycles,
// FU operations, CIs, cycles where FUs and the RCFU were both busy, and CIs
// that switched to a different configuration than the previous CI.
//
// Timing: single execute stage. Reads, FU and (for RCFU_LAT=1) RCFU work are
// combinational in the issue cycle; results are written at its end. With
// RCFU_LAT=L>1 the RCFU result is written by the bundle executing L-1 cycles
// after the CI (latency exposed to the compiler). sched_err is a sticky flag
// for a write-back of an RCFU result when none is valid (the write is
// dropped); cfg_err is a sticky flag for an issued CI that asks a PE for an
// operation it lacks (the PE then outputs 0).
//
// Following the document: N FUs, 2N read and N write ports, a 32-bit RCFU of
// two levels for the 6-read / 3-write machine, FUs and RCFU running at the
// same time, single-cycle RCFU as the main case. This design's own: the
// bundle format, the bundle memory and sequencer (no branches, no memory
// operations), the PE kinds of the default shape, the register count and the
// statistics counters.
module vliw_rcfu_core
  import rcfu_pkg::*;
#(
  parameter int                     N          = 3,
  parameter int                     ROWS       = 2,
  parameter int                     COLS       = 3,
  parameter logic [2*ROWS*COLS-1:0] PE_KIND_MAP = 12'hE65,
  parameter int                     RCFU_LAT   = 1,
  parameter int                     NREG       = 32,
  parameter int                     IMEM_DEPTH = 64,
  parameter int                     CI_DEPTH   = 16,
  // derived
  parameter int NR       = 2 * N,
  parameter int AW       = $clog2(NREG),
  parameter int PSEL_W   = $clog2(NR),
  parameter int WSEL_W   = $clog2(2 * N),
  parameter int CI_AW    = $clog2(CI_DEPTH),
  parameter int IA_W     = $clog2(IMEM_DEPTH),
  parameter int FU_SLOT_W = 4 + 2 * PSEL_W + 1 + 16,
  parameter int WB_SLOT_W = 1 + WSEL_W + AW,
  parameter int BUNDLE_W = NR * AW + N * FU_SLOT_W + CI_AW + 1 + N * WB_SLOT_W + 1,
  parameter int CFG_W    = ROWS * COLS * $bits(pe_cfg_t) + N * OSEL_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // program load
  input  logic                  imem_we,
  input  logic [IA_W-1:0]       imem_addr,
  input  logic [BUNDLE_W-1:0]   imem_wdata,
  input  logic                  cfg_we,
  input  logic [CI_AW-1:0]      cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  // control
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // register inspection
  input  logic [AW-1:0]         dbg_addr,
  output logic [XLEN-1:0]       dbg_data,
  // error flags (sticky until start)
  output logic                  cfg_err,
  output logic                  sched_err,
  // statistics (cleared by start)
  output logic [31:0]           stat_cycles,
  output logic [31:0]           stat_fu_ops,
  output logic [31:0]           stat_ci,
  output logic [31:0]           stat_overlap,
  output logic [31:0]           stat_reconf
);

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

  initial begin
    assert ($bits(bundle_t) == BUNDLE_W) else $error("vliw_rcfu_core: BUNDLE_W mismatch");
    assert ($bits(fu_slot_t) == FU_SLOT_W) else $error("vliw_rcfu_core: FU_SLOT_W mismatch");
  end

  // ---------------------------------------------------------------- bundles
  logic [BUNDLE_W-1:0] imem [IMEM_DEPTH];

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  // -------------------------------------------------------------- sequencer
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e          state;
  logic [IA_W-1:0] pc;
  bundle_t         bnd;
  logic            issue;

  assign bnd   = bundle_t'(imem[pc]);
  assign issue = (state == S_RUN);
  assign busy  = issue;
  assign done  = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
    end else if (start && state != S_RUN) begin
      state <= S_RUN;
      pc    <= '0;
    end else if (issue) begin
      if (bnd.halt) state <= S_DONE;
      else          pc    <= pc + 1'b1;
    end
  end

  // ---------------------------------------------------------- register file
  logic [NR-1:0][AW-1:0]   rf_raddr;
  logic [NR-1:0][XLEN-1:0] rf_rdata;
  logic [N-1:0]            rf_we;
  logic [N-1:0][AW-1:0]    rf_waddr;
  logic [N-1:0][XLEN-1:0]  rf_wdata;

  assign rf_raddr = bnd.rd;

  vliw_regfile #(.NREG(NREG), .W(XLEN), .NR(NR), .NW(N)) u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .raddr    (rf_raddr),
    .rdata    (rf_rdata),
    .we       (rf_we),
    .waddr    (rf_waddr),
    .wdata    (rf_wdata),
    .dbg_addr (dbg_addr),
    .dbg_data (dbg_data)
  );

  // --------------------------------------------------------------- base FUs
  logic [N-1:0][XLEN-1:0] fu_y;
  logic [N-1:0]           fu_busy;

  for (genvar i = 0; i < N; i++) begin : g_fu
    logic [XLEN-1:0] a, b;
    always_comb begin
      a = (int'(bnd.fu[i].a) < NR) ? rf_rdata[int'(bnd.fu[i].a)] : '0;
      if (bnd.fu[i].b_imm)          b = XLEN'($signed(bnd.fu[i].imm));
      else if (int'(bnd.fu[i].b) < NR) b = rf_rdata[int'(bnd.fu[i].b)];
      else                          b = '0;
    end
    vliw_fu #(.W(XLEN)) u_fu (.op(bnd.fu[i].op), .a(a), .b(b), .y(fu_y[i]));
    assign fu_busy[i] = issue && (bnd.fu[i].op != FU_NOP);
  end

  // ------------------------------------------------------------------ RCFU
  logic                   ci_issue;
  logic [N-1:0][XLEN-1:0] rc_y;
  logic                   rc_valid;
  logic                   rc_err;

  assign ci_issue = issue && bnd.ci_valid;

  rcfu #(
    .NIN(NR), .NOUT(N), .ROWS(ROWS), .COLS(COLS), .LATENCY(RCFU_LAT),
    .CI_DEPTH(CI_DEPTH), .PE_KIND_MAP(PE_KIND_MAP)
  ) u_rcfu (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_wdata (cfg_wdata),
    .ci_valid  (ci_issue),
    .ci_idx    (bnd.ci_idx),
    .operands  (rf_rdata),
    .result    (rc_y),
    .res_valid (rc_valid),
    .cfg_err   (rc_err)
  );

  // ------------------------------------------------------------- write back
  logic wb_bad;

  always_comb begin
    wb_bad = 1'b0;
    for (int j = 0; j < N; j++) begin
      rf_we[j]    = issue && bnd.wb[j].en;
      rf_waddr[j] = bnd.wb[j].rd;
      if (int'(bnd.wb[j].src) < N) begin
        rf_wdata[j] = fu_y[int'(bnd.wb[j].src)];
      end else if (int'(bnd.wb[j].src) < 2 * N) begin
        rf_wdata[j] = rc_y[int'(bnd.wb[j].src) - N];
        if (rf_we[j] && !rc_valid) begin
          // no RCFU result this cycle: drop the write, flag the schedule
          wb_bad   = 1'b1;
          rf_we[j] = 1'b0;
        end
      end else begin
        rf_wdata[j] = '0;
        if (rf_we[j]) begin
          wb_bad   = 1'b1;
          rf_we[j] = 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------ flags, statistics
  logic             last_ci_vld;
  logic [CI_AW-1:0] last_ci;

  always_ff @(posedge clk) begin
    if (!rst_n || (start && state != S_RUN)) begin
      cfg_err      <= 1'b0;
      sched_err    <= 1'b0;
      stat_cycles  <= '0;
      stat_fu_ops  <= '0;
      stat_ci      <= '0;
      stat_overlap <= '0;
      stat_reconf  <= '0;
      last_ci_vld  <= 1'b0;
      last_ci      <= '0;
    end else if (issue) begin
      if (rc_err) cfg_err   <= 1'b1;
      if (wb_bad) sched_err <= 1'b1;
      stat_cycles <= stat_cycles + 1;
      stat_fu_ops <= stat_fu_ops + 32'($countones(fu_busy));
      if (ci_issue) begin
        stat_ci     <= stat_ci + 1;
        last_ci_vld <= 1'b1;
        last_ci     <= bnd.ci_idx;
        if (|fu_busy) stat_overlap <= stat_overlap + 1;
        if (last_ci_vld && last_ci != bnd.ci_idx) stat_reconf <= stat_reconf + 1;
      end
    end
  end

endmodule
