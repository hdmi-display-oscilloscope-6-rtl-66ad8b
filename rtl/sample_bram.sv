// sample_bram: on-chip memory holding one capture record of both ADC channels.
//
// Each 16-bit word holds one sample time: channel 1 in bits [15:8], channel 0 in bits
// [7:0]. The memory is single-ported; the trigger module owns the port and hands it to
// the data processing side when that side asks for access. Width 16 and 17 address bits
// (131072 words, the "130k" of the design) are the design's own numbers; the channel
// packing is this design's choice.
//
// Timing: a write takes effect at the clock edge where we is high. A read is synchronous:
// rdata shows the word at addr one clock after addr is presented (read-first on a write).
module sample_bram #(
  parameter int WIDTH  = 16,
  parameter int ADDR_W = 17,
  parameter int DEPTH  = 131072
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
