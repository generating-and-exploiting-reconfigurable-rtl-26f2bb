// rcfu_cfg_mem: store of customized-instruction configurations.
//
// Each entry is the complete configuration of the RCFU for one customized
// instruction (the operation and operand selects of every PE plus the output
// selects). A customized instruction names its entry by index; the entry is
// read combinationally so that the array is configured in the issue cycle.
// Entries are written one at a time through a synchronous write port, which
// is how a program's customized instructions are loaded before it runs.
// The document names customized instructions but not how their
// configuration is held; the table, its depth and the write port are this
// design's choices.
//
// Timing: write at the rising edge when we is high; rdata follows raddr
// combinationally (a write is visible from the next cycle). Reset clears all
// entries.
module rcfu_cfg_mem #(
  parameter int DEPTH = 16,
  parameter int W     = 144,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
