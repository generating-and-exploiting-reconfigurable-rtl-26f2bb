// vliw_regfile: multi-ported register file of the VLIW base processor.
//
// NR combinational read ports and NW write ports (2N and N for an N-issue
// machine: 6 and 3 by default). Both the base FUs and the RCFU draw their
// operands from the read ports and return results through the write ports,
// so these port counts are the constraint the customized instructions are
// generated and scheduled under. An extra read port (dbg_*) lets a test or a
// debugger inspect any register without using an issue port.
// The port counts follow the document; the register count, the reset to
// zero, read-before-write and the write-port priority are this design's
// choices.
//
// Timing: reads are combinational and return the value before this cycle's
// writes. Writes happen at the rising edge. If two ports write the same
// register in one cycle the highest-numbered port wins (and an assertion
// reports it, since a correct schedule never does this).
module vliw_regfile #(
  parameter int NREG = 32,
  parameter int W    = 32,
  parameter int NR   = 6,
  parameter int NW   = 3,
  parameter int AW   = $clog2(NREG)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NR-1:0][AW-1:0]  raddr,
  output logic [NR-1:0][W-1:0]   rdata,
  input  logic [NW-1:0]          we,
  input  logic [NW-1:0][AW-1:0]  waddr,
  input  logic [NW-1:0][W-1:0]   wdata,
  input  logic [AW-1:0]          dbg_addr,
  output logic [W-1:0]           dbg_data
);

  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NW; p++) begin
        if (we[p]) regs[waddr[p]] <= wdata[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) rdata[p] = regs[raddr[p]];
  end

  assign dbg_data = regs[dbg_addr];

  // A legal schedule never writes one register twice in a cycle.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NW; p++)
        for (int q = p + 1; q < NW; q++)
          assert (!(we[p] && we[q] && waddr[p] == waddr[q]))
            else $error("vliw_regfile: write ports %0d and %0d both write r%0d", p, q, waddr[p]);
    end
  end

endmodule
