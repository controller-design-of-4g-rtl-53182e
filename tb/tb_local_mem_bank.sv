// tb_local_mem_bank: fills the bank, reads every word with the one-cycle
// latency, and checks simultaneous read/write of different words and that
// a write without WE changes nothing.
module tb_local_mem_bank;
  logic clk = 0, we, re;
  logic [7:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] shadow [256];
  int checks = 0, failures = 0;

  local_mem_bank dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = {$urandom, $urandom, $urandom, $urandom};
      shadow[i] = wdata;
    end
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      re = 1; raddr = 8'($urandom);
      we = $urandom_range(0, 1); waddr = raddr + 8'd1; wdata = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL raddr=%0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
