// tb_vliw_regfile: self-checking test of the 6-read / 3-write register file.
//
// Random reads and writes on all ports are checked against a shadow copy:
// reads are combinational and return the value from before this cycle's
// writes, all three write ports store in the same edge, and the inspection
// port sees the same contents. Registers read as zero after reset.
module tb_vliw_regfile;
  localparam int NREG = 32, NR = 6, NW = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NR-1:0][4:0]  raddr;
  logic [NR-1:0][31:0] rdata;
  logic [NW-1:0]       we;
  logic [NW-1:0][4:0]  waddr;
  logic [NW-1:0][31:0] wdata;
  logic [4:0]          dbg_addr;
  logic [31:0]         dbg_data;
  logic [31:0]         shadow [NREG];

  vliw_regfile #(.NREG(NREG), .W(32), .NR(NR), .NW(NW)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = '0; we = '0; waddr = '0; wdata = '0; dbg_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < NREG; i++) shadow[i] = 0;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) raddr[p] = 5'($urandom);
      dbg_addr = 5'($urandom);
      // three distinct destinations
      waddr[0] = 5'($urandom);
      waddr[1] = waddr[0] + 5'($urandom_range(1, 10));
      waddr[2] = waddr[1] + 5'($urandom_range(1, 10));
      for (int p = 0; p < NW; p++) begin
        we[p] = $urandom_range(0, 1);
        wdata[p] = $urandom;
      end
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL read port %0d r%0d got %h exp %h", p, raddr[p], rdata[p], shadow[raddr[p]]);
        end
      end
      checks++;
      if (dbg_data !== shadow[dbg_addr]) begin failures++; $display("FAIL dbg read"); end
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
