// st_event_fifo: the ST event-forming FIFO (1k x 20), crossing from the ST
// clock domain to the front-end clock domain and cutting the frameless ST
// word stream into events.
//
// ST words from the deserializer are written on st_clk. On the pk_clk side,
// once the fill level reaches the threshold EVENT_WORDS (128 in the readout)
// and ena is high, the block reads exactly EVENT_WORDS words, one per pk_clk
// cycle, and presents them with ev_frame and ev_valid high; ev_frame then
// falls, and the next event cannot start for GAP cycles, so a downstream
// writer sees a clean frame stop. Words written while the FIFO is full are
// lost (wfull tells).
//
// The FIFO size, the 20-bit word and the threshold-made event of 128 words
// are the readout's; the reading sequence and the GAP spacing are this
// implementation's choices. rst is asynchronous, active high.
module st_event_fifo #(
  parameter int unsigned W           = 20,
  parameter int unsigned AW          = 10,
  parameter int unsigned EVENT_WORDS = 128,
  parameter int unsigned GAP         = 4
) (
  input  logic         rst,
  // ST clock domain
  input  logic         st_clk,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  // front-end clock domain
  input  logic         pk_clk,
  input  logic         ena,
  output logic         ev_ready,  // threshold reached
  output logic         ev_frame,
  output logic         ev_valid,
  output logic [W-1:0] ev_data
);
  localparam int unsigned CW = $clog2(EVENT_WORDS + GAP + 1);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_GAP} state_e;

  logic [AW:0]   rcount;
  logic          rd, rempty, prst;
  logic [CW-1:0] n;
  state_e        state;

  async_fifo #(.W(W), .AW(AW)) u_fifo (
    .rst   (rst),
    .wclk  (st_clk), .we(we), .wdata(wdata), .wfull(wfull), .wfree(),
    .rclk  (pk_clk), .rd(rd), .rdata(ev_data), .rempty(rempty), .rcount(rcount)
  );

  reset_sync u_prst (.clk(pk_clk), .rst_in(rst), .rst_out(prst));

  assign ev_ready = (rcount >= (AW+1)'(EVENT_WORDS));
  assign rd       = (state == S_READ);

  always_ff @(posedge pk_clk or posedge prst)
    if (prst) begin
      state    <= S_IDLE;
      n        <= '0;
      ev_valid <= 1'b0;
    end else begin
      ev_valid <= rd && !rempty;
      unique case (state)
        S_IDLE: if (ena && ev_ready) begin
          state <= S_READ;
          n     <= '0;
        end
        S_READ: begin
          n <= n + 1'b1;
          if (n == CW'(EVENT_WORDS - 1)) begin
            state <= S_GAP;
            n     <= '0;
          end
        end
        S_GAP: begin
          n <= n + 1'b1;
          if (n == CW'(GAP)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end

  assign ev_frame = ev_valid;

  // An event is only started with all of its words present.
  a_words_present: assert property (@(posedge pk_clk) disable iff (prst)
    rd |-> !rempty);
endmodule
