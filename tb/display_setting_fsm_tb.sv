// display_setting_fsm_tb: presses the front-panel buttons and checks each setting
// against a reference worked out here: trigger level steps of 4 with saturation, holdoff
// 0..15, timebase 0..6, the ten full-scale ranges with their attenuator setting and DAC
// code (code = round(255 * span / 2 V), span = range, or range / 50 with the
// attenuator), a load_dac_n pulse of exactly LOAD_CYCLES clocks after reset and after
// every range change, the coupling switch, the single-shot toggle, user_sel and the
// per-channel display offsets (-8..+7, saturating).
module display_setting_fsm_tb;
  localparam int LOAD_CYCLES = 4;

  logic       clk = 0, rst = 1;
  logic [9:0] user_data = 0;
  logic [1:0] user_sel = 0;
  logic [3:0] user_pos = 0;
  logic signed [3:0] ch0_offset, ch1_offset;
  logic [7:0] trig_lvl, dac_data;
  logic       trig_chan, trig_slope, single_mode, load_dac_n, atten_en, ac_couple;
  logic [3:0] v_per_div, t_holdoff;
  logic [2:0] t_per_div;
  int checks = 0, failures = 0;

  // full-scale range in mV for each index, and the DAC code expected for it
  int fs_mv [10] = '{100, 200, 500, 1000, 2000, 5000, 10000, 20000, 50000, 100000};

  display_setting_fsm #(.LOAD_CYCLES(LOAD_CYCLES)) dut (
    .clk, .rst, .user_data, .user_sel, .user_pos, .ch0_offset, .ch1_offset, .trig_lvl, .trig_chan, .trig_slope,
    .v_per_div, .t_per_div, .t_holdoff, .single_mode,
    .dac_data, .load_dac_n, .atten_en, .ac_couple
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic int exp_dac(int idx);
    int span_mv;
    span_mv = (fs_mv[idx] >= 5000) ? fs_mv[idx] / 50 : fs_mv[idx];
    return (span_mv * 255 + 1000) / 2000;
  endfunction

  // press one button; returns the number of clocks load_dac_n was low afterwards
  task automatic press(int bit_no, output int low_cycles);
    user_data[bit_no] = 1'b1;
    @(posedge clk); #1;
    user_data[bit_no] = 1'b0;
    low_cycles = 0;
    for (int k = 0; k < 12; k++) begin
      if (k > 0) begin @(posedge clk); #1; end
      if (!load_dac_n) begin
        low_cycles++;
        chk(dac_data == 8'(exp_dac(v_per_div)), "dac_data not stable during load");
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int low, lvl;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    low = 0;
    for (int k = 0; k < 10; k++) begin
      if (!load_dac_n) low++;
      @(posedge clk); #1;
    end
    chk(low == LOAD_CYCLES, $sformatf("reset load pulse %0d clocks", low));
    chk(v_per_div == 3 && dac_data == 8'(exp_dac(3)) && !atten_en, "reset range");
    chk(trig_lvl == 128 && t_per_div == 0 && t_holdoff == 0 && !single_mode, "reset settings");

    // trigger level up to saturation, then down to saturation
    lvl = 128;
    for (int k = 0; k < 40; k++) begin
      press(0, low);
      lvl = (lvl + 4 > 255) ? 255 : lvl + 4;
      chk(trig_lvl == 8'(lvl), $sformatf("trig up: %0d want %0d", trig_lvl, lvl));
      chk(low == 0, "load pulse on trigger change");
    end
    for (int k = 0; k < 70; k++) begin
      press(1, low);
      lvl = (lvl - 4 < 0) ? 0 : lvl - 4;
      chk(trig_lvl == 8'(lvl), $sformatf("trig down: %0d want %0d", trig_lvl, lvl));
    end

    // holdoff
    for (int k = 1; k <= 17; k++) begin
      press(2, low);
      chk(t_holdoff == 4'((k > 15) ? 15 : k), "holdoff up");
    end
    press(3, low);
    chk(t_holdoff == 14, "holdoff down");

    // timebase
    for (int k = 1; k <= 8; k++) begin
      press(6, low);
      chk(t_per_div == 3'((k > 6) ? 6 : k), "timebase up");
    end
    for (int k = 5; k >= -2; k--) begin
      press(7, low);
      chk(t_per_div == 3'((k < 0) ? 0 : k), "timebase down");
    end

    // every vertical range, up then down
    for (int k = 4; k <= 10; k++) begin
      int idx;
      idx = (k > 9) ? 9 : k;
      press(4, low);
      chk(v_per_div == 4'(idx), $sformatf("range up: %0d want %0d", v_per_div, idx));
      chk(dac_data == 8'(exp_dac(idx)), $sformatf("dac %0d want %0d", dac_data, exp_dac(idx)));
      chk(atten_en == (fs_mv[idx] >= 5000), "attenuator");
      chk(low == ((k > 9) ? 0 : LOAD_CYCLES), $sformatf("load pulse %0d clocks", low));
    end
    for (int k = 8; k >= -1; k--) begin
      int idx;
      idx = (k < 0) ? 0 : k;
      press(5, low);
      chk(v_per_div == 4'(idx), "range down");
      chk(dac_data == 8'(exp_dac(idx)), $sformatf("dac %0d want %0d at %0d", dac_data, exp_dac(idx), idx));
      chk(atten_en == (fs_mv[idx] >= 5000), "attenuator down");
    end

    // a held button counts once
    user_data[4] = 1;
    repeat (20) @(posedge clk);
    #1 user_data[4] = 0;
    repeat (12) @(posedge clk);
    #1 chk(v_per_div == 1, "held button counted more than once");

    // coupling switch, single shot, trigger source
    user_data[8] = 1;
    repeat (2) @(posedge clk);
    #1 chk(ac_couple, "AC coupling");
    user_data[8] = 0;
    repeat (2) @(posedge clk);
    #1 chk(!ac_couple, "DC coupling");
    press(9, low);
    chk(single_mode, "single mode on");
    press(9, low);
    chk(!single_mode, "single mode off");
    user_sel = 2'b11;
    repeat (2) @(posedge clk);
    #1 chk(trig_chan && trig_slope, "trigger source/slope");

    // display offsets: channel 0 up ten times saturates at +7, channel 1 down ten
    // times at -8; a held button counts once
    chk(ch0_offset == 0 && ch1_offset == 0, "offsets reset to zero");
    for (int i = 0; i < 10; i++) begin
      user_pos = 4'b1000 | 4'b0001;
      repeat (3) @(posedge clk);
      user_pos = 0;
      repeat (2) @(posedge clk);
      #1 chk(ch0_offset == ((i + 1 > 7) ? 7 : i + 1), "channel 0 offset up");
      chk(ch1_offset == ((i + 1 > 8) ? -8 : -(i + 1)), "channel 1 offset down");
    end
    user_pos = 4'b0010;
    repeat (2) @(posedge clk);
    user_pos = 4'b0100;
    repeat (2) @(posedge clk);
    user_pos = 0;
    repeat (2) @(posedge clk);
    #1 chk(ch0_offset == 6 && ch1_offset == -7, "offsets step back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
