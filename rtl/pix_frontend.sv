// pix_frontend: the front-end clock domain of the readout core.
//
// Everything here runs on pk_clk, the divided front-end clock. It gathers
// the event sources and writes frames into pk_fifo through frame_writer:
//   - the chip's event frame and write enable, delayed by the ADC pipeline
//     delay (adc_pipe_delay) to line up with the 12-bit external ADC data,
//     serve the MX and Y matrices;
//   - the 10-bit on-chip ADC has no frames; frame_gen cuts it into 1024-word
//     events;
//   - the ST events arrive already framed from st_event_fifo; this block
//     enables their forming in ST mode (st_ena);
//   - in the test modes a second frame_gen makes PIX_FRAME_SIZE-word frames
//     either of an internal pattern (an incrementing 32-bit count, one step
//     per pk_clk) or of the external ADC data;
//   - timestamp_counter keeps the 64-bit stamp from the trigger lines.
// Sources start frames only while DAQ is on and the mode selects them; a
// frame running when DAQ goes off is finished (the pattern keeps counting in
// its mode, so such a frame stays a clean count). The
// structure follows the readout's front end; the pattern's form is this
// implementation's choice. rst is asynchronous, active high.
module pix_frontend
  import pix_pkg::*;
#(
  parameter int unsigned FREE_W = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              daq_on,
  input  logic [3:0]        mode,
  input  logic [10:0]       frame_size,
  input  logic [3:0]        adc_pipe,
  // chip side
  input  logic              ext_frame,
  input  logic              ext_wr_en,
  input  logic [11:0]       adc_data,
  input  logic [9:0]        ad_data,
  input  logic              trig_clk,
  input  logic              trig_rst,
  // ST events
  output logic              st_ena,
  input  logic              st_frame,
  input  logic              st_valid,
  input  logic [19:0]       st_data,
  // pk_fifo write side
  input  logic [FREE_W-1:0] wfree,
  output logic              fifo_we,
  output logic [31:0]       fifo_wdata,
  // status
  output logic              almost_full,
  output logic [63:0]       ts,
  output logic [31:0]       frame_count,
  output logic [31:0]       frames_written,
  output logic [31:0]       frames_skipped
);
  logic        ext_frame_d, ext_valid_d;
  logic        cadc_frame, cadc_valid;
  logic [9:0]  cadc_data;
  logic        test_frame, test_valid;
  logic [31:0] test_data, pattern;
  logic        test_mode, test_int;

  assign st_ena    = daq_on && mode == MODE_ST;
  assign test_int  = mode == MODE_TEST_INT;
  assign test_mode = test_int || mode == MODE_TEST_EXT;

  adc_pipe_delay #(.W(2), .MAX_DELAY(15)) u_pipe (
    .clk(clk), .rst(rst), .delay(adc_pipe),
    .d({ext_frame, ext_wr_en}), .q({ext_frame_d, ext_valid_d})
  );

  frame_gen #(.W(10), .SW(11)) u_cadc_gen (
    .clk(clk), .rst(rst), .ena(daq_on && mode == MODE_ADC),
    .size(11'(ADC_EVENT_WORDS)), .din(ad_data),
    .frame(cadc_frame), .valid(cadc_valid), .dout(cadc_data)
  );

  always_ff @(posedge clk or posedge rst)
    if (rst)                      pattern <= '0;
    else if (test_int)            pattern <= pattern + 1'b1;

  frame_gen #(.W(32), .SW(11)) u_test_gen (
    .clk(clk), .rst(rst), .ena(daq_on && test_mode), .size(frame_size),
    .din(test_int ? pattern : {20'b0, adc_data}),
    .frame(test_frame), .valid(test_valid), .dout(test_data)
  );

  timestamp_counter #(.W(64)) u_ts (
    .clk(clk), .rst(rst), .trig_clk(trig_clk), .trig_rst(trig_rst), .ts(ts)
  );

  frame_writer #(.FREE_W(FREE_W)) u_writer (
    .clk(clk), .rst(rst), .daq_on(daq_on), .mode(mode), .frame_size(frame_size), .ts(ts),
    .ext_frame(ext_frame_d), .ext_valid(ext_valid_d), .adc_data(adc_data),
    .st_frame(st_frame), .st_valid(st_valid), .st_data(st_data),
    .cadc_frame(cadc_frame), .cadc_valid(cadc_valid), .cadc_data(cadc_data),
    .tint_frame(test_frame), .tint_valid(test_valid), .tint_data(test_data),
    .text_frame(test_frame), .text_valid(test_valid), .text_data(test_data[11:0]),
    .wfree(wfree), .fifo_we(fifo_we), .fifo_wdata(fifo_wdata),
    .almost_full(almost_full), .idle(), .frame_count(frame_count),
    .frames_written(frames_written), .frames_skipped(frames_skipped)
  );
endmodule
