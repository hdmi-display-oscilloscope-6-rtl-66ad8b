// sample_bram_tb: writes random words to random addresses of the full 131072-word
// memory, reads them back with the one-clock read latency, and checks read-first
// behaviour when a read and a write hit the same address.
module sample_bram_tb;
  logic        clk = 0, we = 0;
  logic [16:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [int];
  int          addrs [$];
  int checks = 0, failures = 0;

  sample_bram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int a;
      do a = int'($urandom % 131072); while (ref_mem.exists(a));
      #1 we = 1; addr = 17'(a); wdata = 16'($urandom);
      ref_mem[a] = wdata;
      addrs.push_back(a);
      @(posedge clk);
    end
    #1 we = 0;
    foreach (addrs[i]) begin
      #1 addr = 17'(addrs[i]);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== ref_mem[addrs[i]]) begin
        failures++;
        $display("addr %0d: got %0h want %0h", addrs[i], rdata, ref_mem[addrs[i]]);
      end
    end
    // read-first on a write
    #1 we = 1; addr = 17'(addrs[0]); wdata = ~ref_mem[addrs[0]];
    @(posedge clk);
    #1 we = 0;
    checks++;
    if (rdata !== ref_mem[addrs[0]]) begin failures++; $display("read-first failed"); end
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== ~ref_mem[addrs[0]]) begin failures++; $display("write after read failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
