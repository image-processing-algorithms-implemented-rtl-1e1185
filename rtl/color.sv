// color: pseudo-coloring unit (grey level -> HOT-scale RGB).
//
// The 256 grey levels are split into 16 regions and every pixel of a region
// gets the same colour, read from TABLE. Region boundaries follow the
// comparisons of the original unit: region k (k = 1..15) holds the levels
// 16k+1 .. 16k+16, region 0 holds 0..16, so region 15 holds 241..255.
// The region is found by comparing the pixel with the 15 thresholds
// 16, 32, ..., 240 and counting how many it exceeds.
//
// Interface: intrare is the grey pixel; iesire_r/g/b are the colour
// components. Timing: the outputs are registered on the falling edge of
// clk, half a period after the pixel address changed on the rising edge,
// so a new colour appears every clock period (one pixel per clock).
// The three 8-bit output registers are the original unit's; the colour
// table entries other than regions 1, 2, 3 and 6 are this design's choice
// (see image_pkg::HOT_TABLE).
module color #(
  parameter image_pkg::color_table_t TABLE = image_pkg::HOT_TABLE
) (
  input  logic              clk,
  input  image_pkg::pixel_t intrare,
  output logic [7:0]        iesire_r,
  output logic [7:0]        iesire_g,
  output logic [7:0]        iesire_b
);

  logic [3:0]      region;
  image_pkg::rgb_t rgb;

  always_comb begin
    region = '0;
    for (int k = 1; k < 16; k++) begin
      if (intrare > 8'(16 * k)) region = 4'(k);
    end
    rgb = TABLE[region];
  end

  always_ff @(negedge clk) begin
    iesire_r <= rgb.r;
    iesire_g <= rgb.g;
    iesire_b <= rgb.b;
  end

endmodule
