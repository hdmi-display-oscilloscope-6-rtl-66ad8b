// scope_top_full_tb: the oscilloscope at its full size (1366x768 in a 1792x798 frame,
// 131072-sample records, 16-sample FIFOs, 22-bit frame-buffer addresses) through one
// complete operation: memory initialisation, a first frame drawn without a record, a
// capture triggered on the rising edge of channel 0, that record drawn into the next
// frame and shown in the frame after. The shown frame is captured from the video
// output and checked: graticule, text readout present, both traces at the rows the
// testbench computes from the samples it fed in at the observed trigger time, sync
// pulses at the right positions, and no pixel outside graticule, text and traces lit.
module scope_top_full_tb;
  import scope_pkg::*;

  localparam int H_TOTAL = 1792, V_TOTAL = 798, FRAME = H_TOTAL * V_TOTAL;
  localparam int X0 = 43, Y0 = 160, DIV_W = 128, DIV_H = 64, D = 16;
  localparam int NCYC = 24_000_000;

  logic        clk = 0, rst = 1;
  logic [7:0]  adc0_data, adc1_data;
  logic [9:0]  user_data = 0;
  logic [1:0]  user_sel = 0;
  logic [3:0]  user_pos = 0;
  logic [7:0]  dac_data;
  logic        load_dac_n, atten_en, ac_couple;
  logic        mem_en, mem_we;
  logic [21:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  logic        pix_ce, vid_hsync, vid_vsync;
  logic [3:0]  vid_r, vid_g, vid_b;
  logic        trig_event, drawing, display_on, front_buf;

  scope_top dut (.*);

  ddr2_model #(.ADDR_W(22), .RD_LAT(2)) mdl (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  logic [11:0] img [FRAME];
  int  cyc = 0, pix = 0, nframes = 0, first_trig = -1, sync_bad = 0;
  int  checks = 0, failures = 0;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", cyc, msg); end
  endtask

  function automatic logic [7:0] s0(int t);   // channel 0: triangle 20..235, period 2000
    int ph = t % 2000;
    return (ph < 1000) ? 8'(20 + 215 * ph / 1000) : 8'(235 - 215 * (ph - 1000) / 1000);
  endfunction
  function automatic logic [7:0] s1(int t);   // channel 1: triangle 60..180, period 3000
    int ph = t % 3000;
    return (ph < 1500) ? 8'(60 + 120 * ph / 1500) : 8'(180 - 120 * (ph - 1500) / 1500);
  endfunction
  function automatic int row_of(logic [7:0] s);
    return Y0 + (255 - int'(s)) * (8 * DIV_H) / 256;
  endfunction

  always @(posedge clk) begin
    #1;
    adc0_data = s0(cyc);
    adc1_data = s1(cyc);
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (trig_event && first_trig < 0) first_trig <= cyc;
      if (pix_ce && display_on) begin
        // keep video frame 2, the first one that can show a record
        if (pix / FRAME == 2) begin
          img[pix % FRAME] <= {vid_r, vid_g, vid_b};
          if (vid_hsync != ((pix % H_TOTAL) >= 1366 + 70 && (pix % H_TOTAL) < 1366 + 70 + 143) ||
              vid_vsync != ((pix % FRAME) / H_TOTAL >= 768 + 3 && (pix % FRAME) / H_TOTAL < 768 + 3 + 3))
            sync_bad <= sync_bad + 1;
        end
        pix <= pix + 1;
      end
    end
  end

  initial begin
    #(64'd10 * NCYC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad, lit, expect_lit, r0, r1, p0, p1;
    adc0_data = s0(0);
    adc1_data = s1(0);
    repeat (3) @(posedge clk);
    #2 rst = 0;
    wait (pix >= 3 * FRAME);
    @(posedge clk);
    #1;
    chk(first_trig > 0, "no trigger");
    chk(s0(first_trig - D) < 128 && s0(first_trig) >= 128, "trigger condition");
    chk(sync_bad == 0, $sformatf("%0d pixels with wrong sync", sync_bad));
    // graticule corners and a middle line
    chk(img[Y0 * H_TOTAL + X0 + 10 * DIV_W] == COL_GRID, "graticule corner");
    chk(img[(Y0 + 8 * DIV_H) * H_TOTAL + X0 + 10 * DIV_W] == COL_GRID, "graticule corner");
    chk(img[(Y0 + 4 * DIV_H) * H_TOTAL + X0 + 10 * DIV_W - 1] == COL_GRID, "graticule middle");
    // text: the V/div digit "3" has its top row lit
    chk(img[40 * H_TOTAL + 43] == COL_TEXT, "text readout");
    // traces, and everything else in the plot area dark or graticule
    bad = 0;
    p0 = 0; p1 = 0;
    expect_lit = 0;
    for (int x = 0; x < 10 * DIV_W; x++) begin
      int t;
      t = first_trig - D + x;
      r0 = row_of(s0(t));
      r1 = row_of(s1(t));
      if (img[r1 * H_TOTAL + X0 + x] != COL_CH1) bad++;
      if (img[r0 * H_TOTAL + X0 + x] != COL_CH0 && img[r0 * H_TOTAL + X0 + x] != COL_CH1) bad++;
    end
    chk(bad == 0, $sformatf("%0d trace points wrong", bad));
    lit = 0;
    for (int y = 0; y < 768; y++) for (int x = 0; x < 1366; x++) begin
      logic [11:0] c;
      c = img[y * H_TOTAL + x];
      if (c != 0 && c != COL_GRID && c != COL_TEXT && c != COL_CH0 && c != COL_CH1) bad++;
      if (c != 0 && (x < X0 || x > X0 + 10 * DIV_W || y > Y0 + 8 * DIV_H || (y < Y0 && y >= 80))) lit++;
    end
    chk(bad == 0, "unexpected colour");
    chk(lit == 0, $sformatf("%0d pixels lit outside the plot and readout", lit));
    $display("trigger at cycle %0d, %0d cycles simulated", first_trig, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
