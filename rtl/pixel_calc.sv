// pixel_calc: draws each new frame of the oscilloscope screen into the back frame buffer
// and paces the trigger so that at most one capture is used per displayed frame.
//
// On each new_frame pulse it draws, in order:
//   1. the graticule: 11 vertical and 9 horizontal lines bounding a 10 x 8 division
//      plot area whose top-left corner is (X0, Y0), DIV_W x DIV_H pixels per division;
//   2. the settings readout: three hex digits (V/div index, T/div index, holdoff index)
//      in a 3x5 font magnified TEXT_SCALE times, starting at (TEXT_X, TEXT_Y);
//   3. both channel traces, if the trigger module reports a complete record (done).
//      For plot column x it reads sample word x * decimation (clamped to REC_LEN-1)
//      with access held high, maps each 8-bit sample s to row Y0 + ((255-s)*PLOT_H)/256
//      (255 at the top), moved up by the channel's display offset times DIV_H/2 rows and
//      clipped to the plot area, and fills the column from the previous column's row to
//      the new one so that steep edges stay connected.
// Only coloured pixels are written; everything else stays invalid in the buffer and
// is shown black. Each write is {colour, HSYNC=0, VSYNC=0, MARKER=1} at address
// y*H_TOTAL + x through a valid/ready port (wr_*), one pixel per accepted transfer.
//
// Trigger pacing. Run mode: trig_en is dropped at new_frame, the calculator waits up to
// REC_LEN+16 clocks for done (a running capture is allowed to finish), draws, then
// raises trig_en again and holds holdoff high for t_holdoff * HOLDOFF_UNIT clocks, during
// which the trigger ignores edges. Single mode: entering it drops trig_en and re-arms
// once; the frame after that capture completes draws it and leaves trig_en low, so the
// same record is shown until single mode is entered again.
//
// The three jobs (graticule, settings, traces) and the signals to the trigger module and
// to the display follow the design; geometry, colours, the readout format, the
// valid/ready write port and the pacing rules are this design's choices.
module pixel_calc
  import scope_pkg::*;
#(
  parameter int H_TOTAL      = H_ACTIVE_D + H_FP_D + H_SYNC_D + H_BP_D,
  parameter int X0           = 43,
  parameter int Y0           = 160,
  parameter int DIV_W        = 128,
  parameter int DIV_H        = 64,
  parameter int TEXT_X       = 43,
  parameter int TEXT_Y       = 40,
  parameter int TEXT_SCALE   = 4,
  parameter int ADDR_W       = 17,
  parameter int REC_LEN      = 131072,
  parameter int FB_ADDR_W    = 21,
  parameter int HOLDOFF_UNIT = 1024
) (
  input  logic                 clk,
  input  logic                 rst,
  // settings from the display setting FSM
  input  logic [3:0]           v_per_div,
  input  logic [2:0]           t_per_div,
  input  logic [3:0]           t_holdoff,
  input  logic                 single_mode,
  input  logic signed [3:0]    ch0_offset,
  input  logic signed [3:0]    ch1_offset,
  // trigger module / sample memory
  output logic                 trig_en,
  output logic                 holdoff,
  input  logic                 done,
  output logic                 access,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic [15:0]          rd_data,
  // display module
  input  logic                 new_frame,
  output logic                 wr_valid,
  output logic [FB_ADDR_W-1:0] wr_addr,
  output fb_word_t             wr_data,
  input  logic                 wr_ready,
  // status: high while a frame is being drawn
  output logic                 busy
);

  localparam int PLOT_W  = 10 * DIV_W;
  localparam int PLOT_H  = 8 * DIV_H;
  localparam int PITCH   = 4 * TEXT_SCALE;
  localparam int OFF_STEP = DIV_H / 2;
  localparam int WAIT_MAX = REC_LEN + 16;
  localparam int CW      = 16;                 // coordinate width
  localparam int WW      = $clog2(WAIT_MAX + 1);
  localparam int HW      = 4 + $clog2(HOLDOFF_UNIT + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_VLINE, S_HLINE, S_TEXT, S_WAITD, S_TADDR, S_TWAIT, S_TCALC, S_SPAN0, S_SPAN1, S_ARM
  } state_t;

  state_t          state;
  logic [CW-1:0]   k, p;                 // line index and position along a line
  logic [1:0]      chr, col;             // text: character and font column
  logic [2:0]      row;                  // text: font row
  logic [CW-1:0]   sx, sy;               // text: magnification counters
  logic [WW-1:0]   wait_cnt;
  logic [HW-1:0]   ho_cnt;
  logic [CW-1:0]   tx;                   // trace column
  logic [CW-1:0]   ylo, yhi;             // span being drawn
  logic [CW-1:0]   yprev0, yprev1, ynew0, ynew1;
  logic            first_col;
  logic            single_need, single_prev, fresh_single;

  logic            can_emit;
  logic            emit;
  logic [CW-1:0]   ex, ey;
  logic [11:0]     ecol;
  logic [3:0]      digit;
  logic [14:0]     glyph;
  logic [CW+7:0]   samp_idx;

  assign can_emit = !wr_valid || wr_ready;
  assign busy     = (state != S_IDLE);

  function automatic logic [CW-1:0] sample_row(input logic [7:0] s, input logic signed [3:0] off);
    logic [7:0] inv;
    int         r;
    inv = 8'hFF - s;
    r   = ((int'(inv) * PLOT_H) >> 8) - int'(off) * OFF_STEP;
    if (r < 0) r = 0;
    if (r > PLOT_H) r = PLOT_H;
    return CW'(Y0 + r);
  endfunction

  // Pixel to emit in the current state
  always_comb begin
    digit = (chr == 2'd0) ? v_per_div : (chr == 2'd1) ? {1'b0, t_per_div} : t_holdoff;
    glyph = hex_font(digit);
    emit  = 1'b0;
    ex    = '0;
    ey    = '0;
    ecol  = COL_GRID;
    case (state)
      S_VLINE: begin
        emit = 1'b1;
        ex   = CW'(X0 + k * DIV_W);
        ey   = CW'(Y0) + p;
      end
      S_HLINE: begin
        emit = 1'b1;
        ex   = CW'(X0) + p;
        ey   = CW'(Y0 + k * DIV_H);
      end
      S_TEXT: begin
        emit = glyph[row*3 + col];
        ex   = CW'(TEXT_X + chr * PITCH + col * TEXT_SCALE) + sx;
        ey   = CW'(TEXT_Y + row * TEXT_SCALE) + sy;
        ecol = COL_TEXT;
      end
      S_SPAN0: begin
        emit = 1'b1;
        ex   = CW'(X0) + tx;
        ey   = ylo;
        ecol = COL_CH0;
      end
      S_SPAN1: begin
        emit = 1'b1;
        ex   = CW'(X0) + tx;
        ey   = ylo;
        ecol = COL_CH1;
      end
      default: ;
    endcase
    samp_idx = tx * tbase_decim(t_per_div);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      wr_valid     <= 1'b0;
      wr_addr      <= '0;
      wr_data      <= '0;
      trig_en      <= 1'b0;
      holdoff      <= 1'b0;
      ho_cnt       <= '0;
      access       <= 1'b0;
      rd_addr      <= '0;
      k            <= '0;
      p            <= '0;
      chr          <= '0;
      col          <= '0;
      row          <= '0;
      sx           <= '0;
      sy           <= '0;
      wait_cnt     <= '0;
      tx           <= '0;
      ylo          <= '0;
      yhi          <= '0;
      yprev0       <= '0;
      yprev1       <= '0;
      ynew0        <= '0;
      ynew1        <= '0;
      first_col    <= 1'b1;
      single_need  <= 1'b0;
      single_prev  <= 1'b0;
      fresh_single <= 1'b0;
    end else begin
      // write port register
      if (can_emit) begin
        wr_valid <= emit;
        if (emit) begin
          wr_addr <= FB_ADDR_W'(ey * H_TOTAL + ex);
          wr_data <= '{r: ecol[11:8], g: ecol[7:4], b: ecol[3:0],
                       hsync: 1'b0, vsync: 1'b0, marker: 1'b1, unused: 1'b0};
        end
      end

      // holdoff timer
      if (ho_cnt != '0) ho_cnt <= ho_cnt - 1'b1;
      holdoff <= (ho_cnt > HW'(1));

      // single-shot requests
      single_prev <= single_mode;
      if (single_mode && !single_prev) begin
        single_need <= 1'b1;
        trig_en     <= 1'b0;
      end

      case (state)
        S_IDLE: if (new_frame) begin
          if (!single_mode) trig_en <= 1'b0;
          state <= S_VLINE;
          k <= '0;
          p <= '0;
        end
        S_VLINE: if (can_emit) begin
          if (p == CW'(PLOT_H)) begin
            p <= '0;
            if (k == CW'(10)) begin
              k <= '0;
              state <= S_HLINE;
            end else k <= k + 1'b1;
          end else p <= p + 1'b1;
        end
        S_HLINE: if (can_emit) begin
          if (p == CW'(PLOT_W)) begin
            p <= '0;
            if (k == CW'(8)) begin
              state <= S_TEXT;
              chr <= '0; col <= '0; row <= '0; sx <= '0; sy <= '0;
            end else k <= k + 1'b1;
          end else p <= p + 1'b1;
        end
        S_TEXT: if (can_emit || !emit) begin
          if (sx != CW'(TEXT_SCALE - 1)) sx <= sx + 1'b1;
          else begin
            sx <= '0;
            if (col != 2'd2) col <= col + 1'b1;
            else begin
              col <= '0;
              if (sy != CW'(TEXT_SCALE - 1)) sy <= sy + 1'b1;
              else begin
                sy <= '0;
                if (row != 3'd4) row <= row + 1'b1;
                else begin
                  row <= '0;
                  if (chr != 2'd2) chr <= chr + 1'b1;
                  else begin
                    state    <= S_WAITD;
                    wait_cnt <= '0;
                  end
                end
              end
            end
          end
        end
        S_WAITD: begin
          wait_cnt <= wait_cnt + 1'b1;
          fresh_single <= single_mode && single_need && trig_en;
          if (done) begin
            access    <= 1'b1;
            tx        <= '0;
            first_col <= 1'b1;
            state     <= S_TADDR;
          end else if (single_mode || wait_cnt == WW'(WAIT_MAX)) begin
            fresh_single <= 1'b0;
            state <= S_ARM;
          end
        end
        S_TADDR: begin
          rd_addr <= (samp_idx > (CW+8)'(REC_LEN - 1)) ? ADDR_W'(REC_LEN - 1) : ADDR_W'(samp_idx);
          wait_cnt <= '0;
          state <= S_TWAIT;
        end
        S_TWAIT: begin
          // one clock for the address to reach the memory, one for the read
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == WW'(1)) state <= S_TCALC;
        end
        S_TCALC: begin
          ynew0 <= sample_row(rd_data[7:0], ch0_offset);
          ynew1 <= sample_row(rd_data[15:8], ch1_offset);
          if (first_col) begin
            ylo <= sample_row(rd_data[7:0], ch0_offset);
            yhi <= sample_row(rd_data[7:0], ch0_offset);
          end else begin
            ylo <= (yprev0 < sample_row(rd_data[7:0], ch0_offset)) ? yprev0 : sample_row(rd_data[7:0], ch0_offset);
            yhi <= (yprev0 < sample_row(rd_data[7:0], ch0_offset)) ? sample_row(rd_data[7:0], ch0_offset) : yprev0;
          end
          state <= S_SPAN0;
        end
        S_SPAN0: if (can_emit) begin
          if (ylo == yhi) begin
            if (first_col) begin
              ylo <= ynew1;
              yhi <= ynew1;
            end else begin
              ylo <= (yprev1 < ynew1) ? yprev1 : ynew1;
              yhi <= (yprev1 < ynew1) ? ynew1 : yprev1;
            end
            state <= S_SPAN1;
          end else ylo <= ylo + 1'b1;
        end
        S_SPAN1: if (can_emit) begin
          if (ylo == yhi) begin
            yprev0    <= ynew0;
            yprev1    <= ynew1;
            first_col <= 1'b0;
            if (tx == CW'(PLOT_W - 1)) begin
              access <= 1'b0;
              state  <= S_ARM;
            end else begin
              tx    <= tx + 1'b1;
              state <= S_TADDR;
            end
          end else ylo <= ylo + 1'b1;
        end
        S_ARM: begin
          if (fresh_single) begin
            single_need <= 1'b0;
            trig_en     <= 1'b0;
          end else if (!single_mode || single_need) begin
            if (!trig_en) begin
              trig_en <= 1'b1;
              ho_cnt  <= HW'(t_holdoff) * HW'(HOLDOFF_UNIT);
              holdoff <= (t_holdoff != 4'd0);
            end
          end
          fresh_single <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
