// pixel_counter: address counter of the image memory.
//
// Counts up by one on every rising clock edge, so that one pixel is read
// (and processed) per clock period. The output has ADDR_W bits (17 lines,
// 16..0, as in the block diagram of the design), but the count runs only
// over the image, 0 .. DEPTH-1, and then wraps to 0 to start the next frame;
// with DEPTH = 65536 the top address line stays 0. `wrap` is high during the
// cycle in which the last address of the frame is presented.
//
// The synchronous, active-high reset is this design's own addition (the
// block diagram shows only the clock); it returns the count to 0.
module pixel_counter #(
  parameter int unsigned ADDR_W = image_pkg::ADDR_W,
  parameter int unsigned DEPTH  = image_pkg::IMG_PIXELS
) (
  input  logic              clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] adresa,
  output logic              wrap
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(DEPTH - 1);

  initial assert (DEPTH >= 2 && 64'(DEPTH) <= (64'd1 << ADDR_W))
    else $error("pixel_counter: DEPTH %0d does not fit %0d address bits", DEPTH, ADDR_W);

  assign wrap = (adresa == LAST);

  always_ff @(posedge clk) begin
    if (rst || wrap) adresa <= '0;
    else             adresa <= adresa + 1'b1;
  end

endmodule
