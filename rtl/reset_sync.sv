// reset_sync: reset synchronizer for one clock domain.
//
// The output asserts as soon as rst_in is high (asynchronously) and releases
// two clk rising edges after rst_in falls, so every flip-flop of the domain
// leaves reset on the same edge. Active-high in and out. The register powers
// up asserted (an FPGA register initial value), so each domain also starts
// in reset before any reset edge has been seen.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic [1:0] sh = 2'b11;
  always_ff @(posedge clk or posedge rst_in)
    if (rst_in) sh <= 2'b11;
    else        sh <= {sh[0], 1'b0};
  assign rst_out = sh[1];
endmodule
