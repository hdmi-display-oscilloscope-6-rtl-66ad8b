// memory_coordinator: shares the external frame-buffer memory between display refresh
// and drawing, and produces the parallel video stream for the HDMI serializer.
//
// The memory holds two frame buffers of H_TOTAL x V_TOTAL 16-bit words each, including
// the blanking intervals, so each word carries its own HSYNC and VSYNC bits. Address bit
// ADDR_W-1 selects the buffer: the render pointer reads buffer render_buf, and pixel
// writes from the pixel calculator go to the other one (its MSB is the inverse of the
// render pointer's). Within a buffer, word y*H_TOTAL + x is pixel (x, y).
//
// The memory port takes one access per clock and there are SLOTS clocks per pixel:
//   slot 0         read the word under the render pointer;
//   slot 1         write back the word shown in the previous pixel period with MARKER
//                  and colour cleared, so the buffer is empty when drawing starts on it;
//   slots 2..      accept one pixel-calculator write each (wr_ready high).
// Read data return RD_LAT clocks after the read (RD_LAT <= SLOTS-2). At the last slot
// the word goes to the video outputs: colour if MARKER is set and black otherwise, the
// sync bits always. pix_ce is high for one clock per pixel period, in the clock where the
// video outputs take their new value. When the render pointer wraps, the buffers swap
// and new_frame pulses for one clock.
//
// After reset, before any video, an initialisation pass writes every word of both
// buffers once (one per clock) with MARKER clear and the sync bits the video timing
// demands for that position; without it the sync bits in memory would be undefined.
//
// The two buffers selected by the pointer MSB, the word format, the read-then-invalidate
// rule and reads and writes never sharing a memory cycle follow the design; the slot
// schedule, the fixed read latency of the memory port and the initialisation pass are
// this design's choices. With SLOTS = 4 the port needs four accesses per pixel: at the
// default 85.5 MHz pixel clock that is the two transfers per clock of a DDR2 interface
// running at twice the pixel clock.
module memory_coordinator
  import scope_pkg::*;
#(
  parameter int H_ACTIVE = H_ACTIVE_D,
  parameter int H_FP     = H_FP_D,
  parameter int H_SYNC   = H_SYNC_D,
  parameter int H_BP     = H_BP_D,
  parameter int V_ACTIVE = V_ACTIVE_D,
  parameter int V_FP     = V_FP_D,
  parameter int V_SYNC   = V_SYNC_D,
  parameter int V_BP     = V_BP_D,
  parameter int ADDR_W   = 22,
  parameter int SLOTS    = 4,
  parameter int RD_LAT   = 2
) (
  input  logic              clk,
  input  logic              rst,
  // pixel calculator side
  input  logic              wr_valid,
  input  logic [ADDR_W-2:0] wr_addr,
  input  fb_word_t          wr_data,
  output logic              wr_ready,
  output logic              new_frame,
  // memory controller user port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [15:0]       mem_wdata,
  input  logic [15:0]       mem_rdata,
  // video to the HDMI serializer
  output logic              pix_ce,
  output logic [3:0]        vid_r,
  output logic [3:0]        vid_g,
  output logic [3:0]        vid_b,
  output logic              vid_hsync,
  output logic              vid_vsync,
  // status
  output logic              running,
  output logic              render_buf
);

  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int FRAME   = H_TOTAL * V_TOTAL;
  localparam int PW      = ADDR_W - 1;
  localparam int SW      = $clog2(SLOTS);
  localparam int XW      = $clog2(H_TOTAL);
  localparam int YW      = $clog2(V_TOTAL);

  typedef enum logic [0:0] {S_INIT, S_RUN} state_t;

  state_t          state;
  // initialisation sweep
  logic [XW-1:0]   ix;
  logic [YW-1:0]   iy;
  logic            ib;
  logic [PW-1:0]   ilin;
  // refresh
  logic [SW-1:0]   slot;
  logic [PW-1:0]   rptr;
  logic [ADDR_W-1:0] cur_addr, prev_addr;
  logic            prev_valid;
  fb_word_t        rd_word, sync_word;
  // full word addresses: render pointer and pixel calculator pointer, whose MSBs differ
  logic [ADDR_W-1:0] render_ptr, pixel_calc_ptr;

  assign render_ptr     = {render_buf, rptr};
  assign pixel_calc_ptr = {~render_buf, wr_addr};

  always_comb begin
    sync_word        = '0;
    sync_word.hsync  = (ix >= XW'(H_ACTIVE + H_FP)) && (ix < XW'(H_ACTIVE + H_FP + H_SYNC));
    sync_word.vsync  = (iy >= YW'(V_ACTIVE + V_FP)) && (iy < YW'(V_ACTIVE + V_FP + V_SYNC));
  end

  assign running  = (state == S_RUN);
  assign wr_ready = (state == S_RUN) && (slot >= SW'(2));

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (state == S_INIT) begin
      mem_en    = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = {ib, ilin};
      mem_wdata = sync_word;
    end else if (slot == SW'(0)) begin
      mem_en   = 1'b1;
      mem_addr = render_ptr;
    end else if (slot == SW'(1)) begin
      mem_en    = prev_valid;
      mem_we    = prev_valid;
      mem_addr  = prev_addr;
      mem_wdata = {8'h00, 4'h0, vid_hsync, vid_vsync, 2'b00};
    end else if (wr_valid) begin
      mem_en    = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = pixel_calc_ptr;
      mem_wdata = wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      ix         <= '0;
      iy         <= '0;
      ib         <= 1'b0;
      ilin       <= '0;
      slot       <= '0;
      rptr       <= '0;
      render_buf <= 1'b0;
      cur_addr   <= '0;
      prev_addr  <= '0;
      prev_valid <= 1'b0;
      rd_word    <= '0;
      new_frame  <= 1'b0;
      pix_ce     <= 1'b0;
      vid_r      <= '0;
      vid_g      <= '0;
      vid_b      <= '0;
      vid_hsync  <= 1'b0;
      vid_vsync  <= 1'b0;
    end else begin
      new_frame <= 1'b0;
      pix_ce    <= 1'b0;
      case (state)
        S_INIT: begin
          ilin <= ilin + 1'b1;
          if (ix == XW'(H_TOTAL - 1)) begin
            ix <= '0;
            if (iy == YW'(V_TOTAL - 1)) begin
              iy   <= '0;
              ilin <= '0;
              ib   <= 1'b1;
              if (ib) begin
                state     <= S_RUN;
                new_frame <= 1'b1;
              end
            end else iy <= iy + 1'b1;
          end else ix <= ix + 1'b1;
        end
        S_RUN: begin
          slot <= (slot == SW'(SLOTS - 1)) ? '0 : slot + 1'b1;
          if (slot == SW'(0)) begin
            cur_addr <= render_ptr;
            if (rptr == PW'(FRAME - 1)) begin
              rptr       <= '0;
              render_buf <= ~render_buf;
              new_frame  <= 1'b1;
            end else rptr <= rptr + 1'b1;
          end
          if (slot == SW'(RD_LAT)) rd_word <= mem_rdata;
          if (slot == SW'(SLOTS - 1)) begin
            pix_ce     <= 1'b1;
            vid_r      <= rd_word.marker ? rd_word.r : 4'h0;
            vid_g      <= rd_word.marker ? rd_word.g : 4'h0;
            vid_b      <= rd_word.marker ? rd_word.b : 4'h0;
            vid_hsync  <= rd_word.hsync;
            vid_vsync  <= rd_word.vsync;
            prev_addr  <= cur_addr;
            prev_valid <= 1'b1;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  initial begin
    assert (RD_LAT >= 1 && RD_LAT <= SLOTS - 2)
      else $error("memory_coordinator: RD_LAT must be between 1 and SLOTS-2");
    assert (2 * FRAME <= (1 << ADDR_W))
      else $error("memory_coordinator: two frames do not fit in the address space");
  end

endmodule
