// image_proc_top: both image-processing pipelines side by side.
//
// The pseudo-coloring pipeline (counter -> image memory -> colour unit) and
// the negative-image pipeline (counter -> image memory -> negative unit) are
// two separate designs built on the same scheme; here they share only the
// clock and reset and each brings out its own ports (prefix pc_ and ng_).
// Each processes one pixel per clock period: a full 256 x 256 frame takes
// 65536 periods, after which its counter wraps and the frame repeats.
// Both memories are loaded from the same INIT_FILE (empty: built-in test
// image, see image_memory).
module image_proc_top #(
  parameter int unsigned ADDR_W    = image_pkg::ADDR_W,
  parameter int unsigned DEPTH     = image_pkg::IMG_PIXELS,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rst,
  // pseudo-coloring pipeline
  output logic [ADDR_W-1:0] pc_adresa,
  output image_pkg::pixel_t pc_date,
  output logic [7:0]        pc_iesire_r,
  output logic [7:0]        pc_iesire_g,
  output logic [7:0]        pc_iesire_b,
  output logic              pc_frame_end,
  // negative-image pipeline
  output logic [ADDR_W-1:0] ng_adresa,
  output image_pkg::pixel_t ng_date,
  output image_pkg::pixel_t ng_iesire,
  output logic              ng_frame_end
);

  pseudocolor_system #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) u_pseudocolor (
    .clk      (clk),
    .rst      (rst),
    .adresa   (pc_adresa),
    .date     (pc_date),
    .iesire_r (pc_iesire_r),
    .iesire_g (pc_iesire_g),
    .iesire_b (pc_iesire_b),
    .frame_end(pc_frame_end)
  );

  negative_system #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) u_negative (
    .clk      (clk),
    .rst      (rst),
    .adresa   (ng_adresa),
    .date     (ng_date),
    .iesire   (ng_iesire),
    .frame_end(ng_frame_end)
  );

endmodule
