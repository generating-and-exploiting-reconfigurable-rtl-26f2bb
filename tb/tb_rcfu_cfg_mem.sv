// tb_rcfu_cfg_mem: self-checking test of the configuration store.
//
// After reset every entry must read as zero. Random writes are mirrored in a
// shadow array here; every entry is then read back, and a write must not be
// visible before the clock edge that performs it.
module tb_rcfu_cfg_mem;
  localparam int DEPTH = 16, W = 144;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         we;
  logic [3:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [DEPTH];

  rcfu_cfg_mem #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 16] = 16'($urandom);
    for (int i = 16; i < W; i += 32) v[i +: 16] = 16'($urandom);
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
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = '0;
      raddr = 4'(i); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL entry %0d not cleared", i); end
    end
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      we = 1;
      waddr = 4'($urandom_range(0, DEPTH - 1));
      wdata = rand_word();
      raddr = waddr;
      #1;
      checks++;
      if (rdata !== shadow[waddr]) begin failures++; $display("FAIL write visible early at %0d", waddr); end
      @(posedge clk);
      shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== wdata) begin failures++; $display("FAIL write %0d not stored", waddr); end
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 4'(i); #1;
      checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL readback %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
