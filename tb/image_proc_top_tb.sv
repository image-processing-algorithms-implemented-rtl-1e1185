// image_proc_top_tb: end-to-end run of both pipelines at full size.
//
// The top is used with its default parameters: 256 x 256 frame, 17 address
// lines, built-in x XOR y test image. After reset both pipelines stream
// pixels, one per clock. Every clock the testbench recomputes, on its own,
// the address, the stored pixel, its colour and its negative, and compares
// them with both pipelines' outputs. It runs a little over two frames, then
// applies a reset in the middle of the third frame and checks that both
// pipelines restart at address 0.
//
// Mechanisms counted (each must occur at least once): a frame wrap in each
// pipeline (with the 65536-clock frame time checked), every one of the 16
// colour regions, and a mid-frame reset.
module image_proc_top_tb;
  localparam int unsigned ADDR_W = 17;
  localparam int unsigned DEPTH  = 65536;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [ADDR_W-1:0] pc_adresa, ng_adresa;
  logic [7:0]        pc_date, ng_date;
  logic [7:0]        pc_iesire_r, pc_iesire_g, pc_iesire_b;
  logic              pc_frame_end, ng_frame_end;
  logic [7:0]        ng_iesire;
  int checks = 0, failures = 0;

  int unsigned ref_tbl [16][3] = '{
    '{ 43,   0,   0}, '{ 77,  11,  57}, '{102,  31,  73}, '{104,  22,  70},
    '{213,   0,   0}, '{255,   0,   0}, '{152,  83, 102}, '{255,  85,   0},
    '{255, 128,   0}, '{255, 170,   0}, '{255, 213,   0}, '{255, 255,   0},
    '{255, 255,  64}, '{255, 255, 128}, '{255, 255, 191}, '{255, 255, 255}
  };
  int region_hits [16];
  int pc_wraps = 0, ng_wraps = 0, mid_resets = 0;

  image_proc_top dut (.*);

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

  initial begin : watchdog
    repeat (3 * DEPTH + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock period of both pipelines at count a
  task automatic step(input int cyc, input int unsigned a, inout int start_cycle);
    int unsigned p;
    int k;
    #1;
    p = (a % 256) ^ (a / 256);
    check(pc_adresa == ADDR_W'(a) && ng_adresa == ADDR_W'(a),
          $sformatf("cycle %0d: addresses %0d/%0d, expected %0d", cyc, pc_adresa, ng_adresa, a));
    check(pc_date == 8'(p) && ng_date == 8'(p),
          $sformatf("cycle %0d: pixels %0d/%0d, expected %0d", cyc, pc_date, ng_date, p));
    @(negedge clk);
    #1;
    k = region_ref(p);
    region_hits[k]++;
    check({pc_iesire_r, pc_iesire_g, pc_iesire_b} ==
          {8'(ref_tbl[k][0]), 8'(ref_tbl[k][1]), 8'(ref_tbl[k][2])},
          $sformatf("cycle %0d: colour of pixel %0d", cyc, p));
    check(int'(ng_iesire) == 255 - int'(p),
          $sformatf("cycle %0d: negative of pixel %0d is %0d", cyc, p, ng_iesire));
    check(pc_frame_end == (a == DEPTH - 1) && ng_frame_end == (a == DEPTH - 1),
          $sformatf("cycle %0d: frame_end at address %0d", cyc, a));
    if (pc_frame_end) pc_wraps++;
    if (ng_frame_end) ng_wraps++;
    if (pc_frame_end) begin
      check(cyc - start_cycle + 1 == DEPTH,
            $sformatf("frame took %0d clocks, expected %0d", cyc - start_cycle + 1, DEPTH));
      start_cycle = cyc + 1;
    end
    @(posedge clk);
  endtask

  initial begin
    int start_cycle;
    int cyc;
    start_cycle = 0;
    cyc = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (; cyc < 2 * DEPTH + 1000; cyc++) step(cyc, cyc % DEPTH, start_cycle);
    // reset in the middle of the third frame
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    mid_resets++;
    for (int i = 0; i < 300; i++) begin
      step(cyc, i, start_cycle);
      cyc++;
    end

    check(pc_wraps == 2, $sformatf("pseudo-colour frame wraps: %0d, expected 2", pc_wraps));
    check(ng_wraps == 2, $sformatf("negative frame wraps: %0d, expected 2", ng_wraps));
    check(mid_resets >= 1, "mid-frame reset applied");
    foreach (region_hits[k])
      check(region_hits[k] > 0, $sformatf("colour region %0d never used", k));
    $display("mechanisms: pc_wraps=%0d ng_wraps=%0d mid_resets=%0d", pc_wraps, ng_wraps, mid_resets);
    foreach (region_hits[k]) $display("  region %0d: %0d pixels", k, region_hits[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
