// negative_system: the negative-image pipeline.
//
// The same scheme as the pseudo-coloring pipeline with the colour unit
// replaced by the negative unit: pixel_counter steps the address on each
// rising clock edge, image_memory returns the grey pixel combinationally,
// and negative registers 255 - pixel on the following falling edge. One
// pixel per clock period, 65536 periods per 256 x 256 frame. Port names
// follow the original schematic; rst and frame_end (high while the last
// pixel of the frame is addressed) are this design's additions.
module negative_system #(
  parameter int unsigned ADDR_W    = image_pkg::ADDR_W,
  parameter int unsigned DEPTH     = image_pkg::IMG_PIXELS,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] adresa,
  output image_pkg::pixel_t date,
  output image_pkg::pixel_t iesire,
  output logic              frame_end
);

  pixel_counter #(.ADDR_W(ADDR_W), .DEPTH(DEPTH)) u_counter (
    .clk   (clk),
    .rst   (rst),
    .adresa(adresa),
    .wrap  (frame_end)
  );

  image_memory #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) u_memory (
    .adresa(adresa),
    .date  (date)
  );

  negative u_negative (
    .clk    (clk),
    .intrare(date),
    .iesire (iesire)
  );

endmodule
