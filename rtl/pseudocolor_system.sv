// pseudocolor_system: the pseudo-coloring pipeline.
//
// pixel_counter steps the address once per rising clock edge, image_memory
// returns the addressed grey pixel combinationally, and color registers its
// RGB colour on the following falling edge. A 256 x 256 frame therefore
// takes 65536 clock periods; at 300 MHz (3.33 ns per pixel) that is about
// 218 us. The block structure and the port names (adresa, date, iesire_r/g/b)
// follow the original schematic; rst and frame_end are this design's
// additions (frame_end = the counter's wrap flag, high while the last pixel
// of the frame is addressed).
module pseudocolor_system #(
  parameter int unsigned ADDR_W    = image_pkg::ADDR_W,
  parameter int unsigned DEPTH     = image_pkg::IMG_PIXELS,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] adresa,
  output image_pkg::pixel_t date,
  output logic [7:0]        iesire_r,
  output logic [7:0]        iesire_g,
  output logic [7:0]        iesire_b,
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

  color u_color (
    .clk     (clk),
    .intrare (date),
    .iesire_r(iesire_r),
    .iesire_g(iesire_g),
    .iesire_b(iesire_b)
  );

endmodule
