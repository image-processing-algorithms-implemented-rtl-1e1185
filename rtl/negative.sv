// negative: negative-image unit.
//
// Each grey pixel is replaced by 255 minus its value (black <-> white),
// which for 8-bit pixels is the bitwise complement. One subtraction per
// pixel, no state besides the output register.
//
// Interface: intrare is the grey pixel, iesire the negative pixel.
// Timing: iesire is registered on the falling edge of clk, like the
// pseudo-coloring unit it replaces in the same pipeline, giving one
// result per clock period.
module negative (
  input  logic              clk,
  input  image_pkg::pixel_t intrare,
  output image_pkg::pixel_t iesire
);

  always_ff @(negedge clk) begin
    iesire <= 8'd255 - intrare;
  end

endmodule
