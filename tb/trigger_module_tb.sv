// trigger_module_tb: trigger_module with a 64-word sample_bram. The testbench plays the
// FIFOs itself: in cycle n it presents sample n as *_compare and sample n-D as *_in.
// Checks: no trigger while disarmed or held off; the trigger fires on the first cycle
// after release whose (old, new) pair crosses the level in the selected direction on the
// selected channel; the record holds samples n0-D .. n0-D+REC_LEN-1 of both channels;
// done rises exactly REC_LEN clocks after the trigger and survives dropping trig_en;
// the record is read back through access / rd_addr with one clock of latency.
module trigger_module_tb;
  localparam int REC_LEN = 64;
  localparam int D       = 8;
  localparam int NMAX    = 4000;

  logic        clk = 0, rst = 1;
  logic [7:0]  adc0_compare, adc0_in, adc1_compare, adc1_in;
  logic [7:0]  trig_lvl = 8'd100;
  logic        trig_chan = 0, trig_slope = 0;
  logic        trig_en = 0, holdoff = 0, access = 0;
  logic [16:0] rd_addr = 0;
  logic        done, triggered, bram_we;
  logic [15:0] rd_data, bram_wdata, bram_rdata;
  logic [16:0] bram_addr;

  logic [7:0]  s0 [NMAX];
  logic [7:0]  s1 [NMAX];
  int n = 0;
  int checks = 0, failures = 0;

  trigger_module #(.ADDR_W(17), .REC_LEN(REC_LEN)) dut (
    .clk, .rst, .adc0_compare, .adc0_in, .adc1_compare, .adc1_in,
    .trig_lvl, .trig_chan, .trig_slope, .trig_en, .holdoff, .done, .access,
    .rd_addr, .rd_data, .bram_we, .bram_addr, .bram_wdata, .bram_rdata, .triggered
  );
  sample_bram #(.WIDTH(16), .ADDR_W(17), .DEPTH(REC_LEN)) u_bram (
    .clk, .we(bram_we), .addr(bram_addr), .wdata(bram_wdata), .rdata(bram_rdata)
  );

  always #5 clk = ~clk;

  function automatic logic [7:0] tri_wave(int t, int period, int amp);
    int ph = t % period;
    return (ph < period / 2) ? 8'(ph * amp * 2 / period) : 8'((period - ph) * amp * 2 / period);
  endfunction

  function automatic logic crosses(int t, logic ch, logic slope, logic [7:0] lvl);
    logic [7:0] nw, od;
    nw = ch ? s1[t] : s0[t];
    od = (t >= D) ? (ch ? s1[t-D] : s0[t-D]) : 8'h00;
    return slope ? (od >= lvl && nw < lvl) : (od < lvl && nw >= lvl);
  endfunction

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", n, msg); end
  endtask

  // one clock cycle: present sample n, settle, run the caller's checks, clock
  task automatic present();
    adc0_compare = s0[n];
    adc1_compare = s1[n];
    adc0_in      = (n >= D) ? s0[n-D] : 8'h00;
    adc1_in      = (n >= D) ? s1[n-D] : 8'h00;
    #1;
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
    n++;
    present();
  endtask

  // wait for a trigger after release cycle rel; returns the trigger cycle
  task automatic expect_trigger(int rel, logic ch, logic slope, output int n0);
    n0 = -1;
    for (int k = 0; k < 500 && n0 < 0; k++) begin
      if (triggered) begin
        n0 = n;
        chk(crosses(n, ch, slope, trig_lvl), "trigger without a crossing");
        chk(bram_we && bram_addr == 0, "first record word not written to address 0");
      end else begin
        chk(!(n >= rel && crosses(n, ch, slope, trig_lvl)), "crossing missed");
        tick();
      end
    end
    chk(n0 >= 0, "no trigger");
  endtask

  task automatic check_record(int n0);
    int t;
    access = 1;
    for (int i = 0; i < REC_LEN; i++) begin
      rd_addr = 17'(i);
      tick();
      tick();
      t = n0 - D + i;
      chk(rd_data == {(t >= 0) ? s1[t] : 8'h00, (t >= 0) ? s0[t] : 8'h00}, $sformatf("record word %0d", i));
    end
    access = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, rel, tdone;
    for (int t = 0; t < NMAX; t++) begin
      s0[t] = tri_wave(t, 40, 100);          // 0..200, period 40
      s1[t] = 8'(255 - int'(tri_wave(t + 7, 52, 110)));  // 35..255, period 52
    end
    present();
    repeat (3) tick();
    rst = 0;
    present();

    // 1. disarmed: crossings are ignored
    for (int k = 0; k < 100; k++) begin
      chk(!triggered && !bram_we && !done, "activity while disarmed");
      tick();
    end

    // 2. armed but held off, then released: rising edge on channel 0
    trig_en = 1; holdoff = 1;
    tick();
    for (int k = 0; k < 60; k++) begin
      chk(!triggered && !bram_we, "trigger during holdoff");
      tick();
    end
    holdoff = 0;
    present();
    rel = n;
    expect_trigger(rel, 1'b0, 1'b0, n0);
    tdone = -1;
    for (int k = 0; k < REC_LEN + 5; k++) begin
      tick();
      if (done && tdone < 0) tdone = n;
      if (tdone < 0) chk(!triggered, "second trigger during capture");
    end
    chk(tdone == n0 + REC_LEN, $sformatf("done at %0d, want %0d", tdone, n0 + REC_LEN));
    for (int k = 0; k < 20; k++) begin
      chk(done && !bram_we && !triggered, "record not held while armed and full");
      tick();
    end
    trig_en = 0;
    tick();
    tick();
    chk(done, "done lost after disarming");
    check_record(n0);

    // 3. falling edge on channel 1, level 150
    trig_chan = 1; trig_slope = 1; trig_lvl = 8'd150;
    tick();
    trig_en = 1;
    tick();
    tick();
    chk(!done, "done high while armed before a new record");
    rel = n;
    expect_trigger(rel, 1'b1, 1'b1, n0);
    // 4. dropping trig_en mid-capture lets the record finish
    tick();
    trig_en = 0;
    tdone = -1;
    for (int k = 0; k < REC_LEN + 5; k++) begin
      tick();
      if (done && tdone < 0) tdone = n;
    end
    chk(tdone == n0 + REC_LEN, $sformatf("done at %0d, want %0d (disarmed capture)", tdone, n0 + REC_LEN));
    check_record(n0);

    // 5. access blocks triggering while armed
    trig_en = 1; access = 1; trig_chan = 0; trig_slope = 0; trig_lvl = 8'd100;
    for (int k = 0; k < 100; k++) begin
      chk(!triggered, "trigger during access");
      tick();
    end
    access = 0;
    present();
    expect_trigger(n, 1'b0, 1'b0, n0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
