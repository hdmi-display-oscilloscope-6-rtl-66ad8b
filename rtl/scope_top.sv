// scope_top: FPGA logic of a two-channel, 100 MS/s digital oscilloscope with a
// 1366x768 HDMI display.
//
// Three stages run in series:
//   capture and storage - a FIFO per channel (adc_fifo), the edge trigger
//       (trigger_module) and the sample record memory (sample_bram);
//   data processing     - the front-panel settings and analog front-end control
//       (display_setting_fsm) and the frame renderer (pixel_calc);
//   display             - the frame-buffer arbiter (memory_coordinator).
// The DDR2 memory controller and the HDMI serializer are external cores: this module
// brings out the memory user port (one access per clock, fixed read latency) and the
// parallel video (4-bit R, G, B, HSYNC, VSYNC and the pixel strobe pix_ce). The ADC
// sample clock is generated outside as well; the ADC samples arrive as adc0_data and
// adc1_data, one per clk.
//
// All logic here runs from the single clock clk. The separate ADC, pixel and memory
// clocks of a board build, and the clock-domain crossings between them, are not part of
// this RTL; the pixel rate is clk / SLOTS through pix_ce.
module scope_top
  import scope_pkg::*;
#(
  parameter int H_ACTIVE     = H_ACTIVE_D,
  parameter int H_FP         = H_FP_D,
  parameter int H_SYNC       = H_SYNC_D,
  parameter int H_BP         = H_BP_D,
  parameter int V_ACTIVE     = V_ACTIVE_D,
  parameter int V_FP         = V_FP_D,
  parameter int V_SYNC       = V_SYNC_D,
  parameter int V_BP         = V_BP_D,
  parameter int X0           = 43,
  parameter int Y0           = 160,
  parameter int DIV_W        = 128,
  parameter int DIV_H        = 64,
  parameter int TEXT_X       = 43,
  parameter int TEXT_Y       = 40,
  parameter int TEXT_SCALE   = 4,
  parameter int FIFO_DEPTH   = 16,
  parameter int SAMPLE_AW    = 17,
  parameter int REC_LEN      = 131072,
  parameter int HOLDOFF_UNIT = 1024,
  parameter int LOAD_CYCLES  = 4,
  parameter int FB_AW        = 22,
  parameter int SLOTS        = 4,
  parameter int MEM_RD_LAT   = 2
) (
  input  logic             clk,
  input  logic             rst,
  // ADC data
  input  logic [7:0]       adc0_data,
  input  logic [7:0]       adc1_data,
  // front panel
  input  logic [9:0]       user_data,
  input  logic [1:0]       user_sel,
  input  logic [3:0]       user_pos,
  // analog front-end control
  output logic [7:0]       dac_data,
  output logic             load_dac_n,
  output logic             atten_en,
  output logic             ac_couple,
  // DDR2 controller user port
  output logic             mem_en,
  output logic             mem_we,
  output logic [FB_AW-1:0] mem_addr,
  output logic [15:0]      mem_wdata,
  input  logic [15:0]      mem_rdata,
  // video to the HDMI serializer
  output logic             pix_ce,
  output logic [3:0]       vid_r,
  output logic [3:0]       vid_g,
  output logic [3:0]       vid_b,
  output logic             vid_hsync,
  output logic             vid_vsync,
  // status
  output logic             trig_event,   // pulse on each accepted trigger
  output logic             drawing,      // a frame is being drawn
  output logic             display_on,   // initialisation done, video running
  output logic             front_buf     // frame buffer being shown
);

  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;

  // capture and storage
  logic [7:0]           adc0_in, adc1_in;
  logic                 bram_we;
  logic [SAMPLE_AW-1:0] bram_addr;
  logic [15:0]          bram_wdata, bram_rdata;
  logic                 triggered;

  // data processing
  logic [7:0]           trig_lvl;
  logic                 trig_chan, trig_slope;
  logic [3:0]           v_per_div, t_holdoff;
  logic [2:0]           t_per_div;
  logic                 single_mode;
  logic signed [3:0]    ch0_offset, ch1_offset;
  logic                 trig_en, holdoff, done, access;
  logic [SAMPLE_AW-1:0] rd_addr;
  logic [15:0]          rd_data;
  logic                 busy;

  // display
  logic                 wr_valid, wr_ready, new_frame;
  logic [FB_AW-2:0]     wr_addr;
  fb_word_t             wr_data;
  logic                 running, render_buf;

  adc_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo0 (
    .clk, .rst, .din(adc0_data), .dout(adc0_in)
  );

  adc_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst, .din(adc1_data), .dout(adc1_in)
  );

  trigger_module #(.ADDR_W(SAMPLE_AW), .REC_LEN(REC_LEN)) u_trigger (
    .clk, .rst,
    .adc0_compare(adc0_data), .adc0_in,
    .adc1_compare(adc1_data), .adc1_in,
    .trig_lvl, .trig_chan, .trig_slope,
    .trig_en, .holdoff, .done, .access, .rd_addr, .rd_data,
    .bram_we, .bram_addr, .bram_wdata, .bram_rdata,
    .triggered
  );

  sample_bram #(.WIDTH(16), .ADDR_W(SAMPLE_AW), .DEPTH(REC_LEN)) u_bram (
    .clk, .we(bram_we), .addr(bram_addr), .wdata(bram_wdata), .rdata(bram_rdata)
  );

  display_setting_fsm #(.LOAD_CYCLES(LOAD_CYCLES)) u_settings (
    .clk, .rst, .user_data, .user_sel, .user_pos, .ch0_offset, .ch1_offset,
    .trig_lvl, .trig_chan, .trig_slope,
    .v_per_div, .t_per_div, .t_holdoff, .single_mode,
    .dac_data, .load_dac_n, .atten_en, .ac_couple
  );

  pixel_calc #(
    .H_TOTAL(H_TOTAL), .X0(X0), .Y0(Y0), .DIV_W(DIV_W), .DIV_H(DIV_H),
    .TEXT_X(TEXT_X), .TEXT_Y(TEXT_Y), .TEXT_SCALE(TEXT_SCALE),
    .ADDR_W(SAMPLE_AW), .REC_LEN(REC_LEN), .FB_ADDR_W(FB_AW - 1),
    .HOLDOFF_UNIT(HOLDOFF_UNIT)
  ) u_pixel_calc (
    .clk, .rst,
    .v_per_div, .t_per_div, .t_holdoff, .single_mode, .ch0_offset, .ch1_offset,
    .trig_en, .holdoff, .done, .access, .rd_addr, .rd_data,
    .new_frame, .wr_valid, .wr_addr, .wr_data, .wr_ready,
    .busy
  );

  memory_coordinator #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .ADDR_W(FB_AW), .SLOTS(SLOTS), .RD_LAT(MEM_RD_LAT)
  ) u_mem_coord (
    .clk, .rst,
    .wr_valid, .wr_addr, .wr_data, .wr_ready, .new_frame,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .pix_ce, .vid_r, .vid_g, .vid_b, .vid_hsync, .vid_vsync,
    .running, .render_buf
  );

  assign trig_event = triggered;
  assign drawing    = busy;
  assign display_on = running;
  assign front_buf  = render_buf;

endmodule
