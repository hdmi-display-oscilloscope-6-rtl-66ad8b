// adc_fifo: fixed-length sample FIFO placed between one ADC channel and the trigger.
//
// The FIFO is always full: every clock it accepts the newest ADC sample and releases the
// sample it accepted DEPTH clocks earlier. The trigger compares the sample entering the
// FIFO with the one leaving it, so a crossing is judged over DEPTH sample periods, which
// keeps noise near the threshold from retriggering; the released samples are the ones
// stored, so each record starts DEPTH samples before the trigger point.
//
// Interface: din is sampled on every rising clk edge; dout is the value of din DEPTH
// edges earlier (latency DEPTH, throughput one sample per clock). A synchronous reset
// clears the contents to zero. The 8-bit width follows the ADC; DEPTH is a choice of
// this design, and the FIFO is a shift register rather than a vendor FIFO core.
module adc_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] line [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else begin
      line[0] <= din;
      for (int i = 1; i < DEPTH; i++) line[i] <= line[i-1];
    end
  end

  assign dout = line[DEPTH-1];

endmodule
