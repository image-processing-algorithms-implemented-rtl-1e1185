// color_tb: checks the pseudo-coloring unit.
//
// Every grey level 0..255 is applied in turn, one per clock. The expected
// colour comes from this testbench's own copy of the 16-entry table and
// its own region search (region k >= 1 spans 16k+1 .. 16k+16, region 0
// spans 0..16). The levels and colours printed for the first pixels of the
// test photograph are checked by value as well: 42 -> (102, 31, 73),
// 49 -> (104, 22, 70), 106 -> (152, 83, 102). The outputs must change only
// at the falling clock edge: the input is changed after a rising edge and
// the outputs are sampled both before and after the next falling edge.
module color_tb;
  logic       clk = 1'b0;
  logic [7:0] intrare;
  logic [7:0] iesire_r, iesire_g, iesire_b;
  int checks = 0, failures = 0;

  // r, g, b per region
  int unsigned ref_tbl [16][3] = '{
    '{ 43,   0,   0}, '{ 77,  11,  57}, '{102,  31,  73}, '{104,  22,  70},
    '{213,   0,   0}, '{255,   0,   0}, '{152,  83, 102}, '{255,  85,   0},
    '{255, 128,   0}, '{255, 170,   0}, '{255, 213,   0}, '{255, 255,   0},
    '{255, 255,  64}, '{255, 255, 128}, '{255, 255, 191}, '{255, 255, 255}
  };

  color dut (.*);

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

  task automatic apply(input int unsigned p, output logic [23:0] rgb);
    logic [23:0] prev;
    @(posedge clk);
    #1 intrare = 8'(p);
    prev = {iesire_r, iesire_g, iesire_b};
    #2;   // still before the falling edge at +5
    check({iesire_r, iesire_g, iesire_b} == prev,
          $sformatf("pixel %0d: output changed before the falling edge", p));
    @(negedge clk);
    #1 rgb = {iesire_r, iesire_g, iesire_b};
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] got;
    int k;
    int unsigned seq [8] = '{42, 49, 52, 47, 50, 47, 60, 106};
    intrare = 8'd0;
    for (int unsigned p = 0; p < 256; p++) begin
      apply(p, got);
      k = region_ref(p);
      check(got == {8'(ref_tbl[k][0]), 8'(ref_tbl[k][1]), 8'(ref_tbl[k][2])},
            $sformatf("pixel %0d: rgb (%0d,%0d,%0d), expected region %0d (%0d,%0d,%0d)",
                      p, got[23:16], got[15:8], got[7:0], k,
                      ref_tbl[k][0], ref_tbl[k][1], ref_tbl[k][2]));
    end
    // first pixels of the photograph, values as printed
    foreach (seq[i]) begin
      apply(seq[i], got);
      case (seq[i])
        42, 47:         check(got == {8'd102, 8'd31, 8'd73},  $sformatf("pixel %0d printed colour", seq[i]));
        49, 50, 52, 60: check(got == {8'd104, 8'd22, 8'd70},  $sformatf("pixel %0d printed colour", seq[i]));
        106:            check(got == {8'd152, 8'd83, 8'd102}, $sformatf("pixel %0d printed colour", seq[i]));
        default: ;
      endcase
    end
    // region boundaries of the original comparisons
    apply(16, got);  check(got == {8'd43, 8'd0, 8'd0},   "16 is in region 0");
    apply(17, got);  check(got == {8'd77, 8'd11, 8'd57}, "17 is in region 1");
    apply(32, got);  check(got == {8'd77, 8'd11, 8'd57}, "32 is in region 1");
    apply(33, got);  check(got == {8'd102, 8'd31, 8'd73}, "33 is in region 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
