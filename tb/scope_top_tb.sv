// scope_top_tb: the whole oscilloscope at a reduced size (64x48 active screen in an
// 80x56 frame, 4x4-pixel divisions, 512-sample records, FIFO depth 4) with a
// behavioural frame-buffer memory. Both ADC inputs carry triangle waves; the front panel
// is exercised through USER_DATA. The video output is captured frame by frame and every
// drawn trace column is checked against the samples the testbench itself fed in at the
// trigger time it observed (after checking that the trigger condition held there).
// Each mechanism of the design is counted and must occur: no-record timeout, triggers
// on both slopes and channels, holdoff, memory access hand-over, buffer swaps, word
// invalidation, drawing back-pressure, DAC loads, the attenuator switch, frames drawn
// with channel display offsets (traces moved and clipped) and the single-shot hold.
module scope_top_tb;
  import scope_pkg::*;

  localparam int H_ACTIVE = 64, H_FP = 4, H_SYNC = 8, H_BP = 4;
  localparam int V_ACTIVE = 48, V_FP = 2, V_SYNC = 2, V_BP = 4;
  localparam int H_TOTAL = 80, FRAME = 80 * 56;
  localparam int X0 = 4, Y0 = 12, DIV_W = 4, DIV_H = 4;
  localparam int D = 4, REC_LEN = 512, FB_AW = 14;
  localparam int NF = 24;            // video frames captured
  localparam int NCYC = 600000;

  logic             clk = 0, rst = 1;
  logic [7:0]       adc0_data, adc1_data;
  logic [9:0]       user_data = 0;
  logic [1:0]       user_sel = 0;
  logic [3:0]       user_pos = 0;
  logic [7:0]       dac_data;
  logic             load_dac_n, atten_en, ac_couple;
  logic             mem_en, mem_we;
  logic [FB_AW-1:0] mem_addr;
  logic [15:0]      mem_wdata, mem_rdata;
  logic             pix_ce, vid_hsync, vid_vsync;
  logic [3:0]       vid_r, vid_g, vid_b;
  logic             trig_event, drawing, display_on, front_buf;

  scope_top #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .X0(X0), .Y0(Y0), .DIV_W(DIV_W), .DIV_H(DIV_H), .TEXT_X(4), .TEXT_Y(2), .TEXT_SCALE(1),
    .FIFO_DEPTH(D), .SAMPLE_AW(17), .REC_LEN(REC_LEN), .HOLDOFF_UNIT(8), .LOAD_CYCLES(2),
    .FB_AW(FB_AW), .SLOTS(4), .MEM_RD_LAT(2)
  ) dut (.*);

  ddr2_model #(.ADDR_W(FB_AW), .RD_LAT(2)) mdl (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  logic [7:0]  s0h [NCYC];
  logic [7:0]  s1h [NCYC];
  logic [12:0] img [NF][FRAME];       // {valid sync, colour} per video frame
  int          rec_n0 [NF];           // trigger cycle of the record drawn into frame m
  int          rec_dec [NF];          // decimation used for frame m
  int          rec_off0 [NF];         // display offsets used for frame m
  int          rec_off1 [NF];
  int          off0 = 0, off1 = 0;    // offsets set through user_pos
  int          cyc = 0, pix = 0, nframes_started = 0, last_trig = -1;
  int          checks = 0, failures = 0;
  // mechanism counters
  int n_timeout = 0, n_trig_rise0 = 0, n_trig_fall1 = 0, n_holdoff = 0, n_access = 0;
  int n_swap = 0, n_invalidate = 0, n_backpressure = 0, n_dacload = 0, n_atten = 0;
  int n_single_hold = 0, n_offset = 0;
  logic [7:0] nw, od;
  logic access_in_frame = 0;
  logic prev_access = 0, prev_holdoff = 0, prev_load = 1, prev_atten = 0, prev_buf = 0;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", cyc, msg); end
  endtask

  function automatic int row_of(logic [7:0] s, int off);
    int r;
    r = (255 - int'(s)) * (8 * DIV_H) / 256 - off * (DIV_H / 2);
    if (r < 0) r = 0;
    if (r > 8 * DIV_H) r = 8 * DIV_H;
    return Y0 + r;
  endfunction

  function automatic logic [7:0] tri_wave(int t, int period, int lo, int hi);
    int ph = t % period;
    int h = period / 2;
    return (ph < h) ? 8'(lo + (hi - lo) * ph / h) : 8'(hi - (hi - lo) * (ph - h) / h);
  endfunction

  // ADC stimulus, changed just after each clock edge
  always @(posedge clk) begin
    #1;
    adc0_data = s0h[cyc];
    adc1_data = s1h[cyc];
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) monitor();
  end

  // everything observed after reset, once per clock
  task automatic monitor();
    if (trig_event) begin
      nw = dut.trig_chan ? s1h[cyc] : s0h[cyc];
      od = dut.trig_chan ? s1h[cyc - D] : s0h[cyc - D];
      checks++;
      if (dut.trig_slope ? !(od >= dut.trig_lvl && nw < dut.trig_lvl)
                         : !(od < dut.trig_lvl && nw >= dut.trig_lvl)) begin
        failures++;
        $display("FAIL trigger at %0d without a crossing", cyc);
      end
      if (!dut.trig_chan && !dut.trig_slope) n_trig_rise0++;
      if (dut.trig_chan && dut.trig_slope) n_trig_fall1++;
      last_trig <= cyc;
    end
    if (dut.holdoff && !prev_holdoff) n_holdoff++;
    prev_holdoff <= dut.holdoff;
    if (dut.access && !prev_access) begin
      n_access++;
      if (nframes_started < NF) begin
        rec_n0[nframes_started] <= last_trig;
        rec_dec[nframes_started] <= int'(tbase_decim(dut.t_per_div));
        rec_off0[nframes_started] <= off0;
        rec_off1[nframes_started] <= off1;
      end
    end
    prev_access <= dut.access;
    // a frame drawn without reading a record: the wait for done timed out
    if (dut.access) access_in_frame <= 1;
    if (dut.new_frame) begin
      if (nframes_started > 0 && !access_in_frame) n_timeout++;
      access_in_frame <= 0;
      nframes_started <= nframes_started + 1;
    end
    if (display_on && front_buf != prev_buf) n_swap++;
    prev_buf <= front_buf;
    if (display_on && mem_en && mem_we && !mem_wdata[1]) n_invalidate++;
    if (dut.wr_valid && !dut.wr_ready) n_backpressure++;
    if (!load_dac_n && prev_load) n_dacload++;
    prev_load <= load_dac_n;
    if (atten_en != prev_atten) n_atten++;
    prev_atten <= atten_en;
    if (pix_ce && display_on) begin
      if (pix / FRAME < NF) img[pix / FRAME][pix % FRAME] <= {1'b1, vid_r, vid_g, vid_b};
      pix <= pix + 1;
    end
  endtask

  task automatic press(int b);
    @(posedge clk); #2 user_data[b] = 1;
    @(posedge clk); #2 user_data[b] = 0;
    repeat (8) @(posedge clk);
  endtask

  task automatic press_pos(int b);
    @(posedge clk); #2 user_pos[b] = 1;
    @(posedge clk); #2 user_pos[b] = 0;
    case (b)
      0: off0++;
      1: off0--;
      2: off1++;
      default: off1--;
    endcase
  endtask

  task automatic frames(int n);
    for (int i = 0; i < n; i++) begin
      do @(posedge clk); while (!dut.new_frame);
    end
  endtask

  // check the traces of video frame m (drawn during render frame m-1)
  task automatic check_frame(int m);
    int n0, dec, idx, bad = 0;
    logic [11:0] c;
    n0  = rec_n0[m];
    dec = rec_dec[m];
    if (n0 >= 0 && (rec_off0[m] != 0 || rec_off1[m] != 0)) n_offset++;
    chk(img[m][Y0 * H_TOTAL + X0 + 10 * DIV_W] == {1'b1, COL_GRID}, $sformatf("frame %0d graticule", m));
    if (n0 < 0) return;
    for (int x = 0; x < 10 * DIV_W; x++) begin
      idx = x * dec;
      if (idx > REC_LEN - 1) idx = REC_LEN - 1;
      c = img[m][row_of(s1h[n0 - D + idx], rec_off1[m]) * H_TOTAL + X0 + x][11:0];
      if (c != COL_CH1) bad++;
      c = img[m][row_of(s0h[n0 - D + idx], rec_off0[m]) * H_TOTAL + X0 + x][11:0];
      if (c != COL_CH0 && c != COL_CH1) bad++;
    end
    chk(bad == 0, $sformatf("frame %0d: %0d trace points wrong (record at %0d)", m, bad, n0));
  endtask

  initial begin
    #(64'd10 * NCYC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m0, trig_before;
    for (int t = 0; t < NCYC; t++) begin
      s0h[t] = tri_wave(t, 60, 20, 235);
      s1h[t] = tri_wave(t + 11, 84, 40, 200);
    end
    for (int m = 0; m < NF; m++) begin rec_n0[m] = -1; rec_dec[m] = 1; rec_off0[m] = 0; rec_off1[m] = 0; end
    adc0_data = s0h[0];
    adc1_data = s1h[0];
    repeat (3) @(posedge clk);
    #2 rst = 0;

    // defaults: rising edge on channel 0 at level 128, one sample per column
    frames(5);
    // holdoff 2, two samples per column, two ranges up (attenuator switches in)
    press(2); press(2); press(6); press(4); press(4);
    frames(4);
    // falling edge on channel 1
    user_sel = 2'b11;
    frames(2);
    // channel 0 two steps up, channel 1 three steps down; both traces clip
    press_pos(0); press_pos(0); press_pos(3); press_pos(3); press_pos(3);
    frames(2);
    // single shot: one capture, then the record is held
    press(9);
    frames(2);
    trig_before = n_trig_fall1;
    frames(4);
    if (n_trig_fall1 == trig_before) n_single_hold++;
    frames(2);

    m0 = pix / FRAME;
    for (int m = 1; m < m0 && m < NF; m++) check_frame(m);

    chk(n_timeout > 0, "no-record timeout never happened");
    chk(n_trig_rise0 > 0, "no rising trigger on channel 0");
    chk(n_trig_fall1 > 0, "no falling trigger on channel 1");
    chk(n_holdoff > 0, "holdoff never asserted");
    chk(n_access > 0, "memory access never granted");
    chk(n_swap > 0, "buffers never swapped");
    chk(n_invalidate > 0, "no word invalidated");
    chk(n_backpressure > 0, "drawing never stalled");
    chk(n_dacload > 1, "DAC never reloaded");
    chk(n_atten > 0, "attenuator never switched");
    chk(n_single_hold > 0, "single shot did not hold the record");
    chk(n_offset > 0, "no frame checked with display offsets");
    $display("timeouts=%0d rise0=%0d fall1=%0d holdoff=%0d access=%0d swaps=%0d invalidations=%0d stalls=%0d dacloads=%0d atten=%0d single_hold=%0d offset_frames=%0d frames=%0d",
             n_timeout, n_trig_rise0, n_trig_fall1, n_holdoff, n_access, n_swap, n_invalidate,
             n_backpressure, n_dacload, n_atten, n_single_hold, n_offset, m0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
