// tb_vliw_rcfu_core: end-to-end test of the VLIW slice with its RCFU at the
// default sizes (N=3: 6 read / 3 write ports, 2x3 PE grid, single-cycle
// RCFU). Random programs and customized instructions are run and compared
// with an architectural model; see tb_core_common.svh for what is checked.
module tb_vliw_rcfu_core;
  localparam int LAT = 1;
`include "tb_core_common.svh"

  vliw_rcfu_core dut (
    .clk, .rst_n, .imem_we, .imem_addr, .imem_wdata, .cfg_we, .cfg_addr, .cfg_wdata,
    .start, .busy, .done, .dbg_addr, .dbg_data, .cfg_err, .sched_err,
    .stat_cycles, .stat_fu_ops, .stat_ci, .stat_overlap, .stat_reconf
  );

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
