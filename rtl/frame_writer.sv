// frame_writer: frame start/stop recognition, data selector and multiplexer,
// and header writer of the front end; it fills pk_fifo.
//
// The mode selects one of five sources, each a (frame, valid, data) stream:
// the chip's event frame and write enable with the external ADC (MX and Y
// matrices, and the external-ADC test mode), the ST event former, the framed
// on-chip ADC, and the internal test pattern. Each word is widened to the
// 32-bit fifo word: {20'b0, ADC[11:0]}, {22'b0, AD[9:0]}, and for ST
// {time stamp[11:0], ST word[19:0]}.
//
// A rising edge of the selected frame while DAQ is on is a frame start; a
// frame already running when DAQ is switched on is ignored, and one running
// when it is switched off is completed. Every start adds one to the frame
// counter. A frame is written only if pk_fifo has room for the
// whole of it (header plus the frame length: PIX_FRAME_SIZE for MX, Y and the
// test modes, 1024 for the chip ADC, 128 for ST); otherwise it is skipped as
// a whole. A written frame is a 3-word header (frame number, time stamp
// [63:32], time stamp [31:0], as they were at the start) followed by its
// words. The header words go out in the start cycle and the two after it;
// the data words pass through a 3-stage delay line so they follow the header
// without a gap. Words beyond the frame length are dropped, so the room
// reserved is never exceeded. After a frame stop the writer waits until the
// delay line is empty; a start that comes earlier is counted and skipped.
//
// Following the readout: the sources, the 32-bit mux with the stamp in the
// ST word, whole-frame skipping and the always-counting frame counter. Own
// choices: the header layout and length, the delay-line timing, truncation.
// rst is asynchronous, active high.
module frame_writer
  import pix_pkg::*;
#(
  parameter int unsigned FREE_W = 15  // width of the pk_fifo free-space count
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              daq_on,
  input  logic [3:0]        mode,
  input  logic [10:0]       frame_size,
  input  logic [63:0]       ts,
  // sources
  input  logic              ext_frame,
  input  logic              ext_valid,
  input  logic [11:0]       adc_data,
  input  logic              st_frame,
  input  logic              st_valid,
  input  logic [19:0]       st_data,
  input  logic              cadc_frame,
  input  logic              cadc_valid,
  input  logic [9:0]        cadc_data,
  input  logic              tint_frame,
  input  logic              tint_valid,
  input  logic [31:0]       tint_data,
  input  logic              text_frame,
  input  logic              text_valid,
  input  logic [11:0]       text_data,
  // pk_fifo write port
  input  logic [FREE_W-1:0] wfree,
  output logic              fifo_we,
  output logic [31:0]       fifo_wdata,
  // status
  output logic              almost_full,
  output logic              idle,
  output logic [31:0]       frame_count,
  output logic [31:0]       frames_written,
  output logic [31:0]       frames_skipped
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA, S_FLUSH} state_e;

  state_e      state;
  logic        sel_frame, sel_valid, frame_q, rise, space_ok, accept, capture;
  logic [31:0] sel_data;
  logic [11:0] need;
  logic [11:0] ncap;
  logic [1:0]  hcnt;
  logic [31:0] ts_hi, ts_lo;
  logic [2:0]  dl_v;
  logic [31:0] dl_d [3];
  logic        hdr_we;
  logic [31:0] hdr_word;

  // ---- data selector and multiplexer ----
  always_comb begin
    sel_frame = 1'b0;
    sel_valid = 1'b0;
    sel_data  = '0;
    need      = {1'b0, frame_size};
    unique case (mode)
      MODE_MX, MODE_Y: begin
        sel_frame = ext_frame;
        sel_valid = ext_valid;
        sel_data  = {20'b0, adc_data};
      end
      MODE_ST: begin
        sel_frame = st_frame;
        sel_valid = st_valid;
        sel_data  = {ts[11:0], st_data};
        need      = 12'(ST_EVENT_WORDS);
      end
      MODE_ADC: begin
        sel_frame = cadc_frame;
        sel_valid = cadc_valid;
        sel_data  = {22'b0, cadc_data};
        need      = 12'(ADC_EVENT_WORDS);
      end
      MODE_TEST_INT: begin
        sel_frame = tint_frame;
        sel_valid = tint_valid;
        sel_data  = tint_data;
      end
      MODE_TEST_EXT: begin
        sel_frame = text_frame;
        sel_valid = text_valid;
        sel_data  = {20'b0, text_data};
      end
      default: ;
    endcase
  end

  // ---- frame start recognition and room check ----
  // a frame is only started while DAQ is on, but once started it is written
  // to its end, so switching DAQ on or off never leaves a partial frame
  assign rise        = sel_frame && !frame_q && daq_on;
  assign space_ok    = 32'(wfree) >= 32'(need) + HDR_WORDS;
  assign almost_full = !space_ok;
  assign accept      = (state == S_IDLE) && rise && space_ok;
  assign idle        = (state == S_IDLE);
  assign capture     = sel_valid && sel_frame &&
                       ((accept && need != '0) ||
                        ((state == S_HDR || state == S_DATA) && ncap < need));

  // ---- header words ----
  always_comb begin
    hdr_we   = 1'b0;
    hdr_word = '0;
    if (accept) begin
      hdr_we   = 1'b1;
      hdr_word = frame_count;
    end else if (state == S_HDR) begin
      hdr_we   = 1'b1;
      hdr_word = (hcnt == 2'd1) ? ts_hi : ts_lo;
    end
  end

  assign fifo_we    = hdr_we || dl_v[2];
  assign fifo_wdata = hdr_we ? hdr_word : dl_d[2];

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      state          <= S_IDLE;
      frame_q        <= 1'b0;
      ncap           <= '0;
      hcnt           <= '0;
      ts_hi          <= '0;
      ts_lo          <= '0;
      dl_v           <= '0;
      dl_d           <= '{default: '0};
      frame_count    <= '0;
      frames_written <= '0;
      frames_skipped <= '0;
    end else begin
      frame_q <= sel_frame;
      // delay line behind the header
      dl_v    <= {dl_v[1:0], capture};
      dl_d[0] <= sel_data;
      dl_d[1] <= dl_d[0];
      dl_d[2] <= dl_d[1];
      if (capture) ncap <= ncap + 1'b1;

      if (rise) begin
        frame_count <= frame_count + 1'b1;
        if (accept) frames_written <= frames_written + 1'b1;
        else        frames_skipped <= frames_skipped + 1'b1;
      end

      unique case (state)
        S_IDLE: if (accept) begin
          state <= S_HDR;
          hcnt  <= 2'd1;
          ts_hi <= ts[63:32];
          ts_lo <= ts[31:0];
          ncap  <= capture ? 12'd1 : 12'd0;
        end
        S_HDR: begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == 2'(HDR_WORDS - 1)) state <= S_DATA;
        end
        S_DATA:  if (!sel_frame) state <= S_FLUSH;
        S_FLUSH: if (dl_v == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end

  // The header and the delayed data never compete for the write port.
  a_no_collision: assert property (@(posedge clk) disable iff (rst) !(hdr_we && dl_v[2]));
endmodule
