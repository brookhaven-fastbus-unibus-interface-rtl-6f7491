// word_latch -- load-enabled holding register.
//
// Used for the interface's four data registers: the high-word latch (HWL,
// holds the high half of a 32-bit FASTBUS read until UNIBUS reads it, or of
// a FASTBUS DMA write until the second UNIBUS cycle), the low-word latch
// (LWL, holds the first UNIBUS word of a 32-bit pair), the low-order
// broadcast register (LBR, 16 bits) and the FASTBUS broadcast register
// (FBR, 32 bits). Loads d on a clock edge with ld high; synchronous reset to
// zero (the reset value is this design's choice).
module word_latch #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end
endmodule
