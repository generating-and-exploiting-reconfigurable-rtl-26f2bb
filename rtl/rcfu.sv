// rcfu: reconfigurable custom functional unit, tightly coupled to the VLIW
// register file.
//
// The unit pairs a configuration store (rcfu_cfg_mem) with the PE grid
// (rcfu_array). Issuing a customized instruction (ci_valid with ci_idx)
// selects one stored configuration, which sets every PE's operation and
// operand routing and chooses which PE outputs go to the NOUT result ports.
// The NIN operands are the register-file read ports, so the unit is limited
// by the same 2N-read / N-write budget as the base FUs; the default sizes
// (6 inputs, 3 outputs, 2 levels) are those of the 6-read / 3-write
// processor with a two-level unit. The configuration table is this design's
// own way of holding customized instructions.
//
// Configuration word layout (CFG_W bits, LSB first):
//   [NPE*$bits(pe_cfg_t)-1:0]           pe_cfg_t of position p at p*$bits(pe_cfg_t)
//   [+NOUT*OSEL_W]               out_sel of result port o at o*OSEL_W above it
//
// Timing: see rcfu_array; result and res_valid follow ci_valid after
// LATENCY-1 clock edges (same cycle for LATENCY=1). cfg_err is raised in the
// issue cycle of a configuration that asks a PE for something it lacks.
module rcfu
  import rcfu_pkg::*;
#(
  parameter int                     NIN      = 6,
  parameter int                     NOUT     = 3,
  parameter int                     ROWS     = 2,
  parameter int                     COLS     = 3,
  parameter int                     LATENCY  = 1,
  parameter int                     CI_DEPTH = 16,
  parameter logic [2*ROWS*COLS-1:0] PE_KIND_MAP = 12'hE65,
  parameter int                     CI_AW    = $clog2(CI_DEPTH),
  parameter int                     CFG_W    = ROWS*COLS*$bits(pe_cfg_t) + NOUT*OSEL_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration load
  input  logic                      cfg_we,
  input  logic [CI_AW-1:0]          cfg_addr,
  input  logic [CFG_W-1:0]          cfg_wdata,
  // issue
  input  logic                      ci_valid,
  input  logic [CI_AW-1:0]          ci_idx,
  input  logic [NIN-1:0][XLEN-1:0]  operands,
  // results
  output logic [NOUT-1:0][XLEN-1:0] result,
  output logic                      res_valid,
  output logic                      cfg_err
);

  localparam int NPE   = ROWS * COLS;
  localparam int PCW_W = NPE * $bits(pe_cfg_t);

  logic [CFG_W-1:0]            cfg;
  pe_cfg_t [NPE-1:0]           pe_cfg;
  logic [NOUT-1:0][OSEL_W-1:0] out_sel;

  rcfu_cfg_mem #(.DEPTH(CI_DEPTH), .W(CFG_W)) u_cfg (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_we),
    .waddr (cfg_addr),
    .wdata (cfg_wdata),
    .raddr (ci_idx),
    .rdata (cfg)
  );

  assign pe_cfg  = cfg[PCW_W-1:0];
  assign out_sel = cfg[CFG_W-1:PCW_W];

  rcfu_array #(
    .NIN(NIN), .NOUT(NOUT), .ROWS(ROWS), .COLS(COLS),
    .LATENCY(LATENCY), .PE_KIND_MAP(PE_KIND_MAP)
  ) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ci_valid),
    .operands  (operands),
    .pe_cfg    (pe_cfg),
    .out_sel   (out_sel),
    .result    (result),
    .res_valid (res_valid),
    .cfg_err   (cfg_err)
  );

endmodule
