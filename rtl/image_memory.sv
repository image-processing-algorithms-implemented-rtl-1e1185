// image_memory: the grey-scale image store, DEPTH words of 8 bits.
//
// A read-only memory with an asynchronous read port: `date` follows `adresa`
// within the same clock period, so the counter's new address and the pixel
// it selects are both ready before the falling edge on which the processing
// unit registers its result. The address has ADDR_W = 17 lines; only the low
// $clog2(DEPTH) of them select a word (DEPTH = 65536 words = 512 kbit).
//
// Contents: if INIT_FILE names a hex file (one 8-bit pixel per line, as
// written by an image-to-hex converter) it is loaded with $readmemh. The file
// may be shorter than the memory: words it does not reach keep the built-in
// test image, pixel(x, y) = x XOR y for column x = address[7:0] and row
// y = address[15:8], which holds every grey level and so exercises every
// colour region. The built-in pattern is this design's choice; the
// original design was loaded with a photograph.
module image_memory #(
  parameter int unsigned ADDR_W    = image_pkg::ADDR_W,
  parameter int unsigned DEPTH     = image_pkg::IMG_PIXELS,
  parameter string       INIT_FILE = ""
) (
  input  logic [ADDR_W-1:0]       adresa,
  output image_pkg::pixel_t       date
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  image_pkg::pixel_t mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      mem[a] = image_pkg::pixel_t'(a) ^ image_pkg::pixel_t'(a >> 8);
    end
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign date = mem[adresa[IDX_W-1:0]];

endmodule
