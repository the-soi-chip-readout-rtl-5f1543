// st_deserializer: serial-to-parallel converter for the self-triggering (ST)
// matrix, running in the fast ST clock domain.
//
// The ST matrix sends its hits serially; each hit is a W-bit word (10 bits of
// position, 10 bits of time for W = 20, as in the readout). The word width
// is the readout's; the serial framing is this implementation's choice since
// the format on the wire is not specified: one bit per st_clk edge, most
// significant bit first, while the word-enable line sen is high. After the
// W-th bit the word appears on word with word_valid high for one st_clk
// cycle (the cycle after the last bit). If sen falls before W bits have
// arrived, the partial word is discarded. rst is synchronous, active high.
module st_deserializer #(
  parameter int unsigned W = 20
) (
  input  logic         st_clk,
  input  logic         rst,
  input  logic         sdata,
  input  logic         sen,
  output logic [W-1:0] word,
  output logic         word_valid
);
  localparam int unsigned CW = $clog2(W);

  logic [W-1:0]  sh;
  logic [CW-1:0] nbits;

  always_ff @(posedge st_clk)
    if (rst) begin
      sh         <= '0;
      nbits      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (sen) begin
        sh <= {sh[W-2:0], sdata};
        if (nbits == CW'(W - 1)) begin
          word       <= {sh[W-2:0], sdata};
          word_valid <= 1'b1;
          nbits      <= '0;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else begin
        nbits <= '0;
      end
    end
endmodule
