// display_setting_fsm: front-panel settings register and analog front-end control.
//
// USER_DATA carries ten front-panel lines (bit 0 first): trigger-level up/down,
// holdoff up/down, V/div up/down, T/div up/down, the AC/DC coupling switch and the
// single-shot button. The eight up/down buttons and the single-shot button act on their
// rising edge (they are expected to be debounced already); the coupling switch is a
// level. Each press moves its setting one step, saturating at the ends of its range.
// A second input, user_sel, gives the trigger channel (bit 0) and slope (bit 1, 1 =
// falling); it is registered here with the rest of the settings. A third, user_pos,
// carries up/down buttons for the vertical display offset of each channel (bits 0/1 for
// channel 0, 2/3 for channel 1); each offset is a signed step count from -8 to +7.
//
// The vertical setting is one of ten full-scale ranges (0.1 V .. 100 V in 1-2-5 steps).
// From it the FSM selects the 1:50 attenuator (atten_en) and the reference DAC code
// (dac_data). Whenever the range changes, and once after reset, the state machine goes
// through LOAD, holding load_dac_n low for LOAD_CYCLES clocks with dac_data stable, and
// then returns to IDLE. ac_couple is 1 for AC coupling. The single-shot button toggles
// single_mode; each entry into single mode asks the pixel calculator for one capture.
//
// Which settings exist and where they go follow the design; the bit order of USER_DATA,
// the steps, ranges, reset values, user_sel, user_pos and the DAC load timing are this
// design's choices.
module display_setting_fsm
  import scope_pkg::*;
#(
  parameter int          LOAD_CYCLES = 4,
  parameter logic [7:0]  TRIG_STEP   = 8'd4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] user_data,
  input  logic [1:0] user_sel,
  input  logic [3:0] user_pos,
  // to the trigger module
  output logic [7:0] trig_lvl,
  output logic       trig_chan,
  output logic       trig_slope,
  // to the pixel calculator
  output logic [3:0] v_per_div,
  output logic [2:0] t_per_div,
  output logic [3:0] t_holdoff,
  output logic       single_mode,
  output logic signed [3:0] ch0_offset,
  output logic signed [3:0] ch1_offset,
  // to the analog front-end control
  output logic [7:0] dac_data,
  output logic       load_dac_n,
  output logic       atten_en,
  output logic       ac_couple
);

  typedef enum logic [0:0] {S_IDLE, S_LOAD} state_t;

  localparam int LC_W = $clog2(LOAD_CYCLES + 1);

  state_t          state;
  logic [LC_W-1:0] load_cnt;
  logic [9:0]      prev;
  logic [9:0]      press;
  logic [3:0]      pos_prev;
  logic [3:0]      pos_press;

  assign press     = user_data & ~prev;
  assign pos_press = user_pos & ~pos_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_LOAD;
      load_cnt    <= '0;
      prev        <= user_data;
      pos_prev    <= user_pos;
      ch0_offset  <= '0;
      ch1_offset  <= '0;
      trig_lvl    <= 8'd128;
      trig_chan   <= 1'b0;
      trig_slope  <= 1'b0;
      v_per_div   <= 4'd3;
      t_per_div   <= 3'd0;
      t_holdoff   <= 4'd0;
      single_mode <= 1'b0;
      ac_couple   <= 1'b0;
      dac_data    <= vrange_dac(4'd3);
      atten_en    <= vrange_atten(4'd3);
    end else begin
      prev       <= user_data;
      pos_prev   <= user_pos;
      trig_chan  <= user_sel[0];
      trig_slope <= user_sel[1];
      ac_couple  <= user_data[8];

      if (press[0]) trig_lvl <= (trig_lvl > 8'hFF - TRIG_STEP) ? 8'hFF : trig_lvl + TRIG_STEP;
      else if (press[1]) trig_lvl <= (trig_lvl < TRIG_STEP) ? 8'h00 : trig_lvl - TRIG_STEP;

      if (press[2] && t_holdoff != 4'hF) t_holdoff <= t_holdoff + 1'b1;
      else if (press[3] && t_holdoff != 4'h0) t_holdoff <= t_holdoff - 1'b1;

      if (press[6] && t_per_div != 3'(N_TBASE - 1)) t_per_div <= t_per_div + 1'b1;
      else if (press[7] && t_per_div != 3'd0) t_per_div <= t_per_div - 1'b1;

      if (press[9]) single_mode <= !single_mode;

      if (pos_press[0] && ch0_offset != 4'sd7) ch0_offset <= ch0_offset + 4'sd1;
      else if (pos_press[1] && ch0_offset != -4'sd8) ch0_offset <= ch0_offset - 4'sd1;
      if (pos_press[2] && ch1_offset != 4'sd7) ch1_offset <= ch1_offset + 4'sd1;
      else if (pos_press[3] && ch1_offset != -4'sd8) ch1_offset <= ch1_offset - 4'sd1;

      case (state)
        S_IDLE: begin
          if (press[4] && v_per_div != 4'(N_VRANGE - 1)) begin
            v_per_div <= v_per_div + 1'b1;
            dac_data  <= vrange_dac(v_per_div + 1'b1);
            atten_en  <= vrange_atten(v_per_div + 1'b1);
            state     <= S_LOAD;
            load_cnt  <= '0;
          end else if (press[5] && v_per_div != 4'd0) begin
            v_per_div <= v_per_div - 1'b1;
            dac_data  <= vrange_dac(v_per_div - 1'b1);
            atten_en  <= vrange_atten(v_per_div - 1'b1);
            state     <= S_LOAD;
            load_cnt  <= '0;
          end
        end
        S_LOAD: begin
          // V/div presses during a load are ignored
          load_cnt <= load_cnt + 1'b1;
          if (load_cnt == LC_W'(LOAD_CYCLES - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load_dac_n = (state != S_LOAD);

endmodule
