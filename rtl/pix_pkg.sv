// pix_pkg: types and constants shared by the SOI readout core.
//
// Mode codes, event sizes and the decoded configuration record that the
// slave-register block hands to the rest of the core. Mode codes and event
// sizes are the readout's own numbers; the header length and the field
// grouping of the configuration record are choices of this implementation.
package pix_pkg;

  // Mode of operation, slv_reg0 bits 7:4 (processor numbering).
  typedef enum logic [3:0] {
    MODE_MX       = 4'b1000,  // big (MX) matrix readout through the external ADC
    MODE_Y        = 4'b0100,  // Y matrix readout through the external ADC
    MODE_ST       = 4'b0010,  // self-triggering matrix, serial
    MODE_ADC      = 4'b0001,  // on-chip 10-bit ADC
    MODE_TEST_INT = 4'b1111,  // test: internal pattern generator
    MODE_TEST_EXT = 4'b1110   // test: external ADC, internally framed
  } mode_e;

  localparam int unsigned MX_EVENT_WORDS  = 576;   // 36 rows x 16 columns
  localparam int unsigned Y_EVENT_WORDS   = 128;
  localparam int unsigned ADC_EVENT_WORDS = 1024;  // artificial chip-ADC frame
  localparam int unsigned ST_EVENT_WORDS  = 128;   // ST event formed at the FIFO threshold
  localparam int unsigned HDR_WORDS       = 3;     // frame number, stamp high, stamp low

  // Configuration decoded from the slave registers.
  typedef struct packed {
    logic [10:0] frame_size;  // PIX_FRAME_SIZE
    mode_e       mode;
    logic        daq_on;
    logic        use_trigger;
    logic        fifo_reset;  // pk_fifo and PFIFO reset
    logic        fe_reset;    // front-end general reset
    logic [7:0]  pk_div;      // pk_clk counter limit
    logic [7:0]  int_div;     // Y integration clock counter limit
    logic        adc_clk_inv; // invert external ADC clock
    logic [3:0]  adc_pipe;    // ADC pipeline delay, pk_clk cycles
  } pix_cfg_t;

  function automatic logic mode_valid(logic [3:0] m);
    return m inside {MODE_MX, MODE_Y, MODE_ST, MODE_ADC, MODE_TEST_INT, MODE_TEST_EXT};
  endfunction

endpackage
