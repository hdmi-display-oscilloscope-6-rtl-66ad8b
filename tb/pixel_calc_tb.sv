// pixel_calc_tb: pixel_calc on a small 80-word-wide screen (4x4-pixel divisions, plot
// at (4,12), 1x text at (4,2), 256-sample records). A one-clock-latency memory model
// serves the samples and the write port sees random back-pressure. Every written pixel
// is recorded into an image that is compared, word by word, with an image built here
// from the geometry: graticule lines, three hex digits, and per column the two trace
// spans from the previous row to the new one, moved by the channel display offsets and
// clipped to the plot area. Also checked: trig_en dropped at the
// frame start and raised after drawing, holdoff high for t_holdoff*HOLDOFF_UNIT clocks,
// access only while traces are read, the timeout when no record arrives, the clamp of
// the sample index at the end of the record, and the single-shot sequence.
module pixel_calc_tb;
  import scope_pkg::*;

  localparam int H_TOTAL = 80, ROWS = 64;
  localparam int X0 = 4, Y0 = 12, DIV_W = 4, DIV_H = 4;
  localparam int TEXT_X = 4, TEXT_Y = 2;
  localparam int REC_LEN = 256, HOLDOFF_UNIT = 4;
  localparam int NPIX = H_TOTAL * ROWS;

  logic        clk = 0, rst = 1;
  logic [3:0]  v_per_div = 3, t_holdoff = 2;
  logic [2:0]  t_per_div = 2;
  logic        single_mode = 0;
  logic signed [3:0] ch0_offset = 0, ch1_offset = 0;
  logic        trig_en, holdoff, access, done = 0;
  logic [16:0] rd_addr;
  logic [15:0] rd_data;
  logic        new_frame = 0, wr_valid, wr_ready = 0, busy;
  logic [20:0] wr_addr;
  fb_word_t    wr_data;

  logic [15:0] smem [REC_LEN];
  logic [12:0] img  [NPIX];   // {written, colour}
  logic [12:0] want [NPIX];
  int checks = 0, failures = 0;
  int nwrites = 0, access_cycles = 0, trig_low_seen = 0;

  pixel_calc #(
    .H_TOTAL(H_TOTAL), .X0(X0), .Y0(Y0), .DIV_W(DIV_W), .DIV_H(DIV_H),
    .TEXT_X(TEXT_X), .TEXT_Y(TEXT_Y), .TEXT_SCALE(1), .ADDR_W(17), .REC_LEN(REC_LEN),
    .FB_ADDR_W(21), .HOLDOFF_UNIT(HOLDOFF_UNIT)
  ) dut (
    .clk, .rst, .v_per_div, .t_per_div, .t_holdoff, .single_mode, .ch0_offset, .ch1_offset,
    .trig_en, .holdoff, .done, .access, .rd_addr, .rd_data,
    .new_frame, .wr_valid, .wr_addr, .wr_data, .wr_ready, .busy
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  always_ff @(posedge clk) begin
    rd_data  <= smem[rd_addr[7:0]];
    wr_ready <= ($urandom % 10) < 7;
    if (access) access_cycles <= access_cycles + 1;
    if (!trig_en) trig_low_seen <= 1;
    if (wr_valid && wr_ready) begin
      nwrites <= nwrites + 1;
      if (wr_addr >= 21'(NPIX) || !wr_data.marker || wr_data.hsync || wr_data.vsync) begin
        failures <= failures + 1;
        $display("FAIL bad write %0h %0h", wr_addr, wr_data);
      end else img[wr_addr] <= {1'b1, wr_data.r, wr_data.g, wr_data.b};
    end
  end

  function automatic int row_of(logic [7:0] s, int off);
    int r;
    r = (255 - int'(s)) * (8 * DIV_H) / 256 - off * (DIV_H / 2);
    if (r < 0) r = 0;
    if (r > 8 * DIV_H) r = 8 * DIV_H;
    return Y0 + r;
  endfunction

  task automatic put(int x, int y, logic [11:0] c);
    want[y * H_TOTAL + x] = {1'b1, c};
  endtask

  task automatic build_expected(logic traces, int decim);
    int prev0, prev1, y0, y1, idx;
    logic [3:0] d;
    logic [14:0] g;
    for (int i = 0; i < NPIX; i++) want[i] = '0;
    for (int k = 0; k <= 10; k++) for (int p = 0; p <= 8 * DIV_H; p++) put(X0 + k * DIV_W, Y0 + p, COL_GRID);
    for (int k = 0; k <= 8; k++) for (int p = 0; p <= 10 * DIV_W; p++) put(X0 + p, Y0 + k * DIV_H, COL_GRID);
    for (int c = 0; c < 3; c++) begin
      d = (c == 0) ? v_per_div : (c == 1) ? {1'b0, t_per_div} : t_holdoff;
      g = hex_font(d);
      for (int r = 0; r < 5; r++) for (int cc = 0; cc < 3; cc++)
        if (g[r * 3 + cc]) put(TEXT_X + c * 4 + cc, TEXT_Y + r, COL_TEXT);
    end
    if (traces) begin
      for (int x = 0; x < 10 * DIV_W; x++) begin
        idx = x * decim;
        if (idx > REC_LEN - 1) idx = REC_LEN - 1;
        y0 = row_of(smem[idx][7:0], int'(ch0_offset));
        y1 = row_of(smem[idx][15:8], int'(ch1_offset));
        if (x == 0) begin prev0 = y0; prev1 = y1; end
        for (int y = (prev0 < y0 ? prev0 : y0); y <= (prev0 < y0 ? y0 : prev0); y++) put(X0 + x, y, COL_CH0);
        for (int y = (prev1 < y1 ? prev1 : y1); y <= (prev1 < y1 ? y1 : prev1); y++) put(X0 + x, y, COL_CH1);
        prev0 = y0; prev1 = y1;
      end
    end
  endtask

  // run one frame; returns the clocks from trig_en rising to holdoff falling
  task automatic frame(logic traces, int decim, string name, output int ho_len);
    int t = 0, diffs = 0;
    for (int i = 0; i < NPIX; i++) img[i] = '0;
    access_cycles = 0;
    trig_low_seen = 0;
    @(posedge clk); #1 new_frame = 1;
    @(posedge clk); #1 new_frame = 0;
    while (busy && t < 100000) begin @(posedge clk); #1; t++; end
    // let the last write drain, then time the holdoff pulse
    ho_len = 0;
    while (holdoff) begin @(posedge clk); #1; ho_len++; end
    repeat (5) @(posedge clk);
    #1;
    build_expected(traces, decim);
    for (int i = 0; i < NPIX; i++) if (img[i] != want[i]) begin
      diffs++;
      if (diffs < 5) $display("%s: pixel (%0d,%0d) got %0h want %0h", name, i % H_TOTAL, i / H_TOTAL, img[i], want[i]);
    end
    chk(diffs == 0, $sformatf("%s: %0d pixels differ", name, diffs));
    chk(t < 100000, {name, ": frame never finished"});
    chk(traces ? access_cycles > 0 : access_cycles == 0, {name, ": access use"});
    chk(!access, {name, ": access left high"});
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ho;
    for (int i = 0; i < REC_LEN; i++) smem[i] = {8'((i * 13) % 128), 8'(128 + (i * 7) % 128)};
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // run mode with a record: trig_en dropped, traces drawn, re-armed with holdoff
    done = 1;
    frame(1, 5, "run/decim5", ho);
    chk(trig_low_seen == 1 && trig_en, "trig_en not cycled");
    chk(ho == 2 * HOLDOFF_UNIT, $sformatf("holdoff %0d clocks after drawing", ho));

    // run mode, no record: waits REC_LEN+16 clocks, draws no trace, re-arms
    done = 0;
    t_holdoff = 0;
    frame(0, 5, "run/no-record", ho);
    chk(trig_en && !holdoff, "not re-armed after timeout");

    // slowest timebase: sample index clamps at the end of the record
    done = 1;
    t_per_div = 6;
    v_per_div = 4'hB;
    frame(1, 100, "run/decim100", ho);

    // display offsets: channel 0 pushed down past the bottom, channel 1 up past the top
    ch0_offset = -8;
    ch1_offset = 7;
    frame(1, 100, "run/offset", ho);
    ch0_offset = 3;
    ch1_offset = -2;
    frame(1, 100, "run/offset2", ho);
    ch0_offset = 0;
    ch1_offset = 0;

    // single shot: entering single mode disarms, one capture is armed and then kept
    single_mode = 1;
    done = 0;
    @(posedge clk); @(posedge clk); #1;
    chk(!trig_en, "single mode entry did not disarm");
    frame(0, 100, "single/wait", ho);
    chk(trig_en, "single capture not armed");
    done = 1;                     // the capture completed
    frame(1, 100, "single/draw", ho);
    chk(!trig_en, "re-armed after the single capture");
    frame(1, 100, "single/hold", ho);
    chk(!trig_en, "re-armed while holding");

    $display("writes=%0d", nwrites);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
