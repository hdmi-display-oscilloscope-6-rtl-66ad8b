// adc_fifo_tb: drives random samples into adc_fifo and checks that every output equals
// the input DEPTH clocks earlier (zero while the line is still filling after reset).
// hist holds the input of each clock cycle; in cycle t the output must be hist[t-DEPTH].
module adc_fifo_tb;
  localparam int DEPTH = 16;
  logic       clk = 0, rst = 1;
  logic [7:0] din = 0, dout;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  adc_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .rst, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      din = 8'($urandom);
      @(posedge clk);
      hist.push_back(din);
      #1;
      checks++;
      if (hist.size() >= DEPTH) begin
        if (dout !== hist[hist.size()-DEPTH]) begin
          failures++;
          $display("mismatch at %0d: got %0h want %0h", n, dout, hist[hist.size()-DEPTH]);
        end
      end else if (dout !== 8'h00) begin
        failures++;
        $display("nonzero while filling at %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
