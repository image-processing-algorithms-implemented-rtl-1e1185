// negative_system_tb: runs the negative-image pipeline over a full frame.
//
// The image memory is loaded with the first eight pixels of the test
// photograph (lena_first8.hex); the rest of the frame is the built-in
// x XOR y test image. After reset, every clock period must present the next
// address, the pixel stored there and - after the falling edge - 255 minus
// it. The first eight results are also checked against the printed
// waveform: 213, 206, 203, 208, 205, 208, 195, 149. The frame must take
// exactly 65536 clock periods, after which the address wraps to 0.
module negative_system_tb;
  localparam int unsigned ADDR_W = 17;
  localparam int unsigned DEPTH  = 65536;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [ADDR_W-1:0] adresa;
  logic [7:0]        date;
  logic [7:0]        iesire;
  logic              frame_end;
  int checks = 0, failures = 0;

  int unsigned first8 [8] = '{42, 49, 52, 47, 50, 47, 60, 106};
  int unsigned printed [8] = '{213, 206, 203, 208, 205, 208, 195, 149};

  negative_system #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .INIT_FILE("tb/lena_first8.hex")) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

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
    int frames, start_cycle;
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
      check(int'(iesire) == 255 - int'(p),
            $sformatf("cycle %0d: pixel %0d gave %0d", cyc, p, iesire));
      if (cyc < 8)
        check(int'(iesire) == printed[cyc], $sformatf("pixel %0d differs from the printed waveform", cyc));
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
