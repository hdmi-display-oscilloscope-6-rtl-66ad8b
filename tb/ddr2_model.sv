// ddr2_model: behavioural model of the frame-buffer memory seen through the DDR2
// controller's user port, for simulation only (not synthesizable as a real DRAM).
// One access per clock: a write (en & we) stores wdata at addr at the clock edge; a read
// (en & !we) returns the word on rdata RD_LAT clocks later. Contents start at zero.
module ddr2_model #(
  parameter int ADDR_W = 22,
  parameter int RD_LAT = 2
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata
);
  logic [15:0] mem [1 << ADDR_W];
  logic [15:0] pipe [RD_LAT];

  initial begin
    for (int i = 0; i < (1 << ADDR_W); i++) mem[i] = '0;
    for (int i = 0; i < RD_LAT; i++) pipe[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    pipe[0] <= (en && !we) ? mem[addr] : 16'h0000;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[RD_LAT-1];
endmodule
