// tb_vliw_rcfu_core_lat2: end-to-end test of the VLIW slice with a two-cycle
// RCFU (RCFU_LAT=2): a customized instruction's results are written by the
// bundle that follows it. Otherwise as tb_vliw_rcfu_core; see
// tb_core_common.svh for what is checked.
module tb_vliw_rcfu_core_lat2;
  localparam int LAT = 2;
`include "tb_core_common.svh"

  vliw_rcfu_core #(.RCFU_LAT(LAT)) dut (
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
