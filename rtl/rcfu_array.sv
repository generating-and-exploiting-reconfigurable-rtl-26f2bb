// rcfu_array: the grid of processing elements at the heart of the RCFU.
//
// ROWS levels of COLS PE positions. Position (r,c) holds a PE of the kind
// given by PE_KIND_MAP (2 bits per position, position r*COLS+c at the low
// end); kind PE_NONE builds nothing there, so each row can have its own width
// and mix of kinds. Data flows strictly downwards, one level at a time:
//   - a PE of row 0 takes its operands from any of the NIN RCFU inputs
//     (the register-file read ports);
//   - a PE of row r>0 takes its operands from any PE of row r-1;
//   - operand B may instead be the PE's 8-bit sign-extended constant.
// A value that must skip a level travels through a PE doing MOVE. Each of the
// NOUT outputs (the register-file write ports) selects the output of any PE.
// The whole configuration (pe_cfg for every position, out_sel) comes from the
// customized instruction being executed.
//
// The downward-only, level-to-level connection, the hybrid PE kinds per level
// and the port counts follow the document. Reading "adjacent lower PEs" as a
// full crossbar between consecutive rows, the constant operand, and a
// multi-cycle unit built as LATENCY-1 output register stages are this
// design's choices.
//
// Timing: with LATENCY=1 the array is combinational (result and res_valid
// follow the inputs in the same cycle). With LATENCY=L>1 the result and
// res_valid appear L-1 clock edges after in_valid. cfg_err flags, in the
// issue cycle, that an issued configuration uses an operation a PE lacks,
// a select that points outside the array, or an empty position as output.
module rcfu_array
  import rcfu_pkg::*;
#(
  parameter int                        NIN     = 6,
  parameter int                        NOUT    = 3,
  parameter int                        ROWS    = 2,
  parameter int                        COLS    = 3,
  parameter int                        LATENCY = 1,
  parameter logic [2*ROWS*COLS-1:0]    PE_KIND_MAP = 12'hE65  // row0 A A L, row1 A L S
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [NIN-1:0][XLEN-1:0]        operands,
  input  pe_cfg_t [ROWS*COLS-1:0]         pe_cfg,
  input  logic [NOUT-1:0][OSEL_W-1:0]     out_sel,
  output logic [NOUT-1:0][XLEN-1:0]       result,
  output logic                            res_valid,
  output logic                            cfg_err
);

  localparam int NPE = ROWS * COLS;

  // Elaboration-time checks that the fixed select widths cover the array.
  initial begin
    assert (NIN  <= 2**SEL_W)  else $error("rcfu_array: NIN exceeds SEL_W");
    assert (COLS <= 2**SEL_W)  else $error("rcfu_array: COLS exceeds SEL_W");
    assert (NPE  <= 2**OSEL_W) else $error("rcfu_array: too many PEs for OSEL_W");
    assert (LATENCY >= 1)      else $error("rcfu_array: LATENCY must be >= 1");
  end

  logic [XLEN-1:0] pe_y   [NPE];     // all PE outputs, 0 at empty positions
  logic [NPE-1:0]  pe_bad;           // per-position configuration error

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    // Outputs of this row; the row below reads them. Kept per row so that the
    // level-to-level flow is visible as acyclic.
    logic [XLEN-1:0] row_y [COLS];
    // Sources this row can select from.
    logic [XLEN-1:0] src   [NIN > COLS ? NIN : COLS];
    localparam int NSRC = (r == 0) ? NIN : COLS;

    if (r == 0) begin : g_src_in
      for (genvar i = 0; i < (NIN > COLS ? NIN : COLS); i++) begin : g_s
        if (i < NIN) begin : g_on
          assign src[i] = operands[i];
        end else begin : g_off
          assign src[i] = '0;
        end
      end
    end else begin : g_src_up
      for (genvar i = 0; i < (NIN > COLS ? NIN : COLS); i++) begin : g_s
        if (i < COLS) begin : g_on
          assign src[i] = g_row[r-1].row_y[i];
        end else begin : g_off
          assign src[i] = '0;
        end
      end
    end

    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int       IDX  = r * COLS + c;
      localparam pe_kind_e KIND = pe_kind_e'(PE_KIND_MAP[2*IDX +: 2]);

      if (KIND == PE_NONE) begin : g_empty
        assign row_y[c]    = '0;
        assign pe_bad[IDX] = 1'b0;
      end else begin : g_pe
        pe_cfg_t         cfg;
        logic [XLEN-1:0] a, b, y;
        logic            unsup, sel_bad;

        assign cfg = pe_cfg[IDX];

        // Operand routing from the inputs (row 0) or the row above.
        always_comb begin
          a = '0;
          b = '0;
          sel_bad = 1'b0;
          if (int'(cfg.src_a) < NSRC) a = src[int'(cfg.src_a)];
          else                        sel_bad = 1'b1;
          if (cfg.b_imm) begin
            b = XLEN'($signed(cfg.imm));
          end else if (int'(cfg.src_b) < NSRC) begin
            b = src[int'(cfg.src_b)];
          end else begin
            sel_bad = 1'b1;
          end
        end

        rcfu_pe #(.KIND(KIND), .W(XLEN)) u_pe (
          .op          (cfg.op),
          .a           (a),
          .b           (b),
          .y           (y),
          .unsupported (unsup)
        );

        assign row_y[c]    = y;
        assign pe_bad[IDX] = unsup | sel_bad;
      end

      assign pe_y[IDX] = row_y[c];
    end
  end

  // Output selection onto the write ports.
  logic [NOUT-1:0][XLEN-1:0] res_comb;
  logic                      out_bad;

  always_comb begin
    out_bad = 1'b0;
    for (int o = 0; o < NOUT; o++) begin
      res_comb[o] = '0;
      if (int'(out_sel[o]) < NPE) begin
        res_comb[o] = pe_y[int'(out_sel[o])];
        if (pe_kind_e'(PE_KIND_MAP[2*out_sel[o] +: 2]) == PE_NONE) out_bad = 1'b1;
      end else begin
        out_bad = 1'b1;
      end
    end
  end

  assign cfg_err = in_valid & ((|pe_bad) | out_bad);

  // Multi-cycle unit: LATENCY-1 register stages on the result.
  if (LATENCY == 1) begin : g_comb
    assign result    = res_comb;
    assign res_valid = in_valid;
  end else begin : g_pipe
    logic [NOUT-1:0][XLEN-1:0] res_q [LATENCY-1];
    logic [LATENCY-2:0]        vld_q;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld_q <= '0;
        for (int s = 0; s < LATENCY-1; s++) res_q[s] <= '0;
      end else begin
        vld_q[0] <= in_valid;
        if (in_valid) res_q[0] <= res_comb;
        for (int s = 1; s < LATENCY-1; s++) begin
          vld_q[s] <= vld_q[s-1];
          res_q[s] <= res_q[s-1];
        end
      end
    end

    assign result    = res_q[LATENCY-2];
    assign res_valid = vld_q[LATENCY-2];
  end

endmodule
