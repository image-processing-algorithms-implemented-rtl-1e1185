// pseudocolor_system_tb: runs the pseudo-coloring pipeline over a full frame.
//
// The image memory is loaded with the first eight pixels of the test
// photograph (lena_first8.hex); the rest of the frame is the built-in
// x XOR y test image. After reset, every clock period must present the next
// address, the pixel stored there, and - after the falling edge - that
// pixel's colour. The first eight colours are also checked against the
// printed waveform: (102,31,73), (104,22,70), (104,22,70), (102,31,73),
// (104,22,70), (102,31,73), (104,22,70), (152,83,102). The frame must take
// exactly 65536 clock periods (one pixel per clock), after which the address
// wraps to 0 and the frame repeats.
module pseudocolor_system_tb;
  localparam int unsigned ADDR_W = 17;
  localparam int unsigned DEPTH  = 65536;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [ADDR_W-1:0] adresa;
  logic [7:0]        date;
  logic [7:0]        iesire_r, iesire_g, iesire_b;
  logic              frame_end;
  int checks = 0, failures = 0;

  int unsigned ref_tbl [16][3] = '{
    '{ 43,   0,   0}, '{ 77,  11,  57}, '{102,  31,  73}, '{104,  22,  70},
    '{213,   0,   0}, '{255,   0,   0}, '{152,  83, 102}, '{255,  85,   0},
    '{255, 128,   0}, '{255, 170,   0}, '{255, 213,   0}, '{255, 255,   0},
    '{255, 255,  64}, '{255, 255, 128}, '{255, 255, 191}, '{255, 255, 255}
  };
  int unsigned first8 [8] = '{42, 49, 52, 47, 50, 47, 60, 106};
  logic [23:0] printed [8] = '{
    {8'd102, 8'd31, 8'd73}, {8'd104, 8'd22, 8'd70}, {8'd104, 8'd22, 8'd70},
    {8'd102, 8'd31, 8'd73}, {8'd104, 8'd22, 8'd70}, {8'd102, 8'd31, 8'd73},
    {8'd104, 8'd22, 8'd70}, {8'd152, 8'd83, 8'd102}
  };

  pseudocolor_system #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .INIT_FILE("tb/lena_first8.hex")) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int region_ref(int unsigned p);
    if (p <= 16) return 0;
    for (int k = 1; k < 16; k++)
      if (p >= 16 * k + 1 && p <= 16 * k + 16) return k;
    return 15;
  endfunction

  function automatic int unsigned pixel_ref(int unsigned a);
    return (a < 8) ? first8[a] : ((a % 256) ^ (a / 256));
  endfunction

  initial begin : watchdog
    repeat (2 * DEPTH + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a, p;
    int k, frames, start_cycle;
    logic [23:0] exp_rgb, got;
    frames = 0;
    start_cycle = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int cyc = 0; cyc < DEPTH + 16; cyc++) begin
      #1;
      a = cyc % DEPTH;
      p = pixel_ref(a);
      check(adresa == ADDR_W'(a), $sformatf("cycle %0d: address %0d", cyc, adresa));
      check(date == 8'(p), $sformatf("cycle %0d: pixel %0d, expected %0d", cyc, date, p));
      @(negedge clk);
      #1;
      k = region_ref(p);
      exp_rgb = {8'(ref_tbl[k][0]), 8'(ref_tbl[k][1]), 8'(ref_tbl[k][2])};
      got = {iesire_r, iesire_g, iesire_b};
      check(got == exp_rgb, $sformatf("cycle %0d: pixel %0d coloured %h, expected %h",
                                      cyc, p, got, exp_rgb));
      if (cyc < 8)
        check(got == printed[cyc], $sformatf("pixel %0d differs from the printed waveform", cyc));
      if (frame_end) begin
        frames++;
        check(cyc - start_cycle + 1 == DEPTH,
              $sformatf("frame took %0d clocks, expected %0d", cyc - start_cycle + 1, DEPTH));
        start_cycle = cyc + 1;
      end
      @(posedge clk);
    end
    check(frames == 1, $sformatf("%0d frame ends seen, expected 1", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
