// tb_global_memory: writes words at spread addresses over the full 16-bit
// range, then reads them back checking the one-cycle read latency and that
// rdata holds when re is low.
module tb_global_memory;
  logic clk = 0, we, re;
  logic [15:0] waddr, raddr;
  logic [127:0] wdata, rdata, last;
  logic [15:0] addrs [64];
  logic [127:0] vals [64];
  int checks = 0, failures = 0;

  global_memory dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 16'(i * 1021 + 7);
      vals[i]  = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); we = 1; waddr = addrs[i]; wdata = vals[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); re = 1; raddr = addrs[i];
      @(negedge clk); re = 0; raddr = addrs[(i + 1) % 64];
      checks++;
      if (rdata !== vals[i]) begin failures++; $display("FAIL read %h", addrs[i]); end
      last = rdata;
      @(negedge clk);
      checks++;
      if (rdata !== last) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
