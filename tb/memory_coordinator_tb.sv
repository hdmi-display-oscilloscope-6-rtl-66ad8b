// memory_coordinator_tb: memory_coordinator with a 16x10-word frame (8x6 active) and a
// behavioural memory with two clocks of read latency. Checks: the initialisation pass
// writes every word of both buffers once with the right sync bits and MARKER clear; the
// video stream has one pixel every SLOTS clocks with HSYNC/VSYNC where the timing puts
// them; pixels written during frame j appear in frame j+1 and nowhere else; a buffer
// shown once comes back black (every word is invalidated after it is read); one read
// per pixel period and at most SLOTS-2 drawing writes.
module memory_coordinator_tb;
  import scope_pkg::*;

  localparam int H_ACTIVE = 8, H_FP = 2, H_SYNC = 3, H_BP = 3;
  localparam int V_ACTIVE = 6, V_FP = 1, V_SYNC = 2, V_BP = 1;
  localparam int H_TOTAL = 16, V_TOTAL = 10, FRAME = 160;
  localparam int ADDR_W = 9, SLOTS = 4, RD_LAT = 2;
  localparam int NFRAMES = 5;

  logic              clk = 0, rst = 1;
  logic              wr_valid = 0, wr_ready, new_frame;
  logic [ADDR_W-2:0] wr_addr = 0;
  fb_word_t          wr_data = '0;
  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [15:0]       mem_wdata, mem_rdata;
  logic              pix_ce, vid_hsync, vid_vsync, running, render_buf;
  logic [3:0]        vid_r, vid_g, vid_b;

  logic [11:0] drawn [NFRAMES][FRAME];     // colour expected on screen, per frame
  logic [12:0] seen  [NFRAMES][FRAME];     // {hsync/vsync ok, colour} observed
  int          pix = 0, last_ce = -1, cyc = 0, init_writes = 0;
  int          reads_in_period = 0, pc_writes = 0;
  int checks = 0, failures = 0;

  memory_coordinator #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .ADDR_W(ADDR_W), .SLOTS(SLOTS), .RD_LAT(RD_LAT)
  ) dut (
    .clk, .rst, .wr_valid, .wr_addr, .wr_data, .wr_ready, .new_frame,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .pix_ce, .vid_r, .vid_g, .vid_b, .vid_hsync, .vid_vsync, .running, .render_buf
  );

  ddr2_model #(.ADDR_W(ADDR_W), .RD_LAT(RD_LAT)) mdl (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic logic hs_at(int k);
    int x = k % H_TOTAL;
    return x >= H_ACTIVE + H_FP && x < H_ACTIVE + H_FP + H_SYNC;
  endfunction
  function automatic logic vs_at(int k);
    int y = k / H_TOTAL;
    return y >= V_ACTIVE + V_FP && y < V_ACTIVE + V_FP + V_SYNC;
  endfunction

  // observe the video stream and the memory port
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && !running && mem_en && mem_we) init_writes <= init_writes + 1;
    if (running && mem_en && !mem_we) reads_in_period <= reads_in_period + 1;
    if (wr_valid && wr_ready) pc_writes <= pc_writes + 1;
    if (pix_ce && running) begin
      if (last_ce >= 0 && cyc - last_ce != SLOTS) begin
        failures <= failures + 1;
        $display("FAIL pixel period %0d", cyc - last_ce);
      end
      last_ce <= cyc;
      if (pix / FRAME < NFRAMES)
        seen[pix / FRAME][pix % FRAME] <= {(vid_hsync == hs_at(pix % FRAME)) && (vid_vsync == vs_at(pix % FRAME)),
                                           vid_r, vid_g, vid_b};
      pix <= pix + 1;
    end
  end

  // draw n random active pixels into the back buffer, remembering them for frame f
  task automatic draw(int f, int n);
    int x, y;
    for (int i = 0; i < n; i++) begin
      x = int'($urandom % H_ACTIVE);
      y = int'($urandom % V_ACTIVE);
      wr_valid = 1;
      wr_addr  = (ADDR_W-1)'(y * H_TOTAL + x);
      wr_data  = '{r: 4'($urandom | 1), g: 4'($urandom), b: 4'($urandom),
                   hsync: 1'b0, vsync: 1'b0, marker: 1'b1, unused: 1'b0};
      drawn[f][y * H_TOTAL + x] = {wr_data.r, wr_data.g, wr_data.b};
      do @(posedge clk); while (!wr_ready);
      #1;
    end
    wr_valid = 0;
  endtask

  task automatic wait_new_frame();
    do @(posedge clk); while (!new_frame);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    for (int f = 0; f < NFRAMES; f++) for (int k = 0; k < FRAME; k++) drawn[f][k] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // initialisation pass
    wait_new_frame();
    chk(init_writes == 2 * FRAME, $sformatf("init wrote %0d words", init_writes));
    bad = 0;
    for (int b = 0; b < 2; b++) for (int k = 0; k < FRAME; k++)
      if (mdl.mem[b * 256 + k] != {12'h000, hs_at(k), vs_at(k), 2'b00}) bad++;
    chk(bad == 0, $sformatf("%0d words wrong after initialisation", bad));

    // frame 0 shown from buffer 0; draw set A into buffer 1 for frame 1
    chk(render_buf == 0, "first frame not from buffer 0");
    draw(1, 20);
    wait_new_frame();             // frame 1: nothing drawn for frame 2
    chk(render_buf == 1, "buffers did not swap");
    wait_new_frame();             // frame 2: draw set B for frame 3
    draw(3, 20);
    wait_new_frame();             // frame 3
    wait_new_frame();             // frame 4
    repeat (FRAME * SLOTS + 10) @(posedge clk);
    #1;

    chk(pix >= NFRAMES * FRAME, "not enough pixels");
    for (int f = 0; f < NFRAMES; f++) begin
      // one check per pixel for its sync bits and one for its colour
      for (int k = 0; k < FRAME; k++) begin
        chk(seen[f][k][12], $sformatf("frame %0d pixel %0d: sync bits wrong", f, k));
        chk(seen[f][k][11:0] == drawn[f][k],
            $sformatf("frame %0d pixel %0d: got %0h want %0h", f, k, seen[f][k][11:0], drawn[f][k]));
      end
    end
    chk(reads_in_period > 0 && reads_in_period <= pix + 2, "more than one read per pixel");
    chk(pc_writes == 40, $sformatf("%0d drawing writes accepted", pc_writes));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
