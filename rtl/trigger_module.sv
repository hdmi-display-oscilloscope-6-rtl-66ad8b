// trigger_module: edge trigger, record writer and sample-memory arbiter.
//
// An edge is found on the selected channel by comparing the sample entering its FIFO
// (cmp, the newest) with the one leaving it (fifo, DEPTH samples older) against the
// trigger level: rising when the old sample is below the level and the new one is at or
// above it, falling for the reverse. The data processing side arms the trigger with
// trig_en and may block it with holdoff. An edge seen while armed, not held off and
// without a memory access in progress starts a record: REC_LEN words of the FIFO
// outputs, {ch1, ch0}, are written to addresses 0..REC_LEN-1, one per clock, starting
// with the FIFO output of the trigger clock. done then rises.
//
// States: IDLE (not armed), ARMED, CAPTURE, FULL (record complete, still armed).
// Dropping trig_en returns ARMED and FULL to IDLE at once; a CAPTURE always completes.
// done is high in FULL, and in IDLE once any record has been completed: it means the
// memory holds a whole record and no capture can start, so the reader may use it.
// While access is high (and no capture is running) the memory address comes from
// rd_addr and rd_data returns the word one clock later.
//
// The edge rule over the FIFO span, trig_en, holdoff, done, access and the 16-bit data /
// 17-bit address follow the design; the state machine, the meaning given to done and
// the record layout are this design's choices.
module trigger_module #(
  parameter int ADDR_W  = 17,
  parameter int REC_LEN = 131072
) (
  input  logic              clk,
  input  logic              rst,
  // samples from the ADC side
  input  logic [7:0]        adc0_compare,
  input  logic [7:0]        adc0_in,
  input  logic [7:0]        adc1_compare,
  input  logic [7:0]        adc1_in,
  // settings
  input  logic [7:0]        trig_lvl,
  input  logic              trig_chan,   // 0: channel 0, 1: channel 1
  input  logic              trig_slope,  // 0: rising, 1: falling
  // handshake with the data processing side
  input  logic              trig_en,
  input  logic              holdoff,
  output logic              done,
  input  logic              access,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [15:0]       rd_data,
  // sample memory port
  output logic              bram_we,
  output logic [ADDR_W-1:0] bram_addr,
  output logic [15:0]       bram_wdata,
  input  logic [15:0]       bram_rdata,
  // a pulse on each accepted trigger event
  output logic              triggered
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_CAPTURE, S_FULL} state_t;

  state_t            state;
  logic [ADDR_W-1:0] wr_ptr;
  logic              rec_valid;
  logic [7:0]        s_new, s_old;
  logic              edge_hit;

  always_comb begin
    s_new = trig_chan ? adc1_compare : adc0_compare;
    s_old = trig_chan ? adc1_in      : adc0_in;
    if (!trig_slope) edge_hit = (s_old <  trig_lvl) && (s_new >= trig_lvl);
    else             edge_hit = (s_old >= trig_lvl) && (s_new <  trig_lvl);
  end

  assign triggered = (state == S_ARMED) && trig_en && !holdoff && !access && edge_hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      wr_ptr    <= '0;
      rec_valid <= 1'b0;
    end else begin
      case (state)
        S_IDLE:  if (trig_en) state <= S_ARMED;
        S_ARMED: begin
          if (!trig_en) state <= S_IDLE;
          else if (triggered) begin
            state  <= (REC_LEN == 1) ? S_FULL : S_CAPTURE;
            wr_ptr <= ADDR_W'(1);
            if (REC_LEN == 1) rec_valid <= 1'b1;
          end
        end
        S_CAPTURE: begin
          wr_ptr <= wr_ptr + 1'b1;
          if (wr_ptr == ADDR_W'(REC_LEN - 1)) begin
            rec_valid <= 1'b1;
            state     <= trig_en ? S_FULL : S_IDLE;
          end
        end
        S_FULL:  if (!trig_en) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bram_wdata = {adc1_in, adc0_in};
    bram_we    = triggered || (state == S_CAPTURE);
    if (triggered)                bram_addr = '0;
    else if (state == S_CAPTURE)  bram_addr = wr_ptr;
    else                          bram_addr = rd_addr;
  end

  assign rd_data = bram_rdata;
  assign done    = (state == S_FULL) || ((state == S_IDLE) && rec_valid);

  // The reader must not use the memory while a record is being written.
  a_no_access_in_capture: assert property (@(posedge clk) disable iff (rst)
    !(access && state == S_CAPTURE));

endmodule
