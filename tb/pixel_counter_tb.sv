// pixel_counter_tb: checks the address counter.
//
// A small counter (DEPTH = 37, 6 address bits) is reset, then must step
// 0, 1, ..., 36, 0, ... one address per rising edge, with `wrap` high
// exactly while address 36 is presented, i.e. once every 37 clocks.
// A reset in the middle of a frame must bring the count back to 0.
module pixel_counter_tb;
  localparam int unsigned ADDR_W = 6;
  localparam int unsigned DEPTH  = 37;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [ADDR_W-1:0] adresa;
  logic              wrap;
  int checks = 0, failures = 0;

  pixel_counter #(.ADDR_W(ADDR_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expect_a;
    int          wraps;
    int          last_wrap_cycle;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    #1;
    check(adresa == 0, "address 0 after reset");
    expect_a = 0;
    wraps = 0;
    last_wrap_cycle = -1;
    for (int cyc = 0; cyc < 3 * DEPTH + 5; cyc++) begin
      #1;
      check(adresa == ADDR_W'(expect_a),
            $sformatf("cycle %0d: address %0d, expected %0d", cyc, adresa, expect_a));
      check(wrap == (expect_a == DEPTH - 1),
            $sformatf("cycle %0d: wrap %0b at address %0d", cyc, wrap, adresa));
      if (wrap) begin
        if (last_wrap_cycle >= 0)
          check(cyc - last_wrap_cycle == DEPTH,
                $sformatf("frame took %0d clocks, expected %0d", cyc - last_wrap_cycle, DEPTH));
        last_wrap_cycle = cyc;
        wraps++;
      end
      @(posedge clk);
      expect_a = (expect_a + 1) % DEPTH;
    end
    check(wraps == 3, $sformatf("%0d wraps seen, expected 3", wraps));
    // reset in mid-frame
    @(negedge clk);
    check(adresa != 0, "counter is mid-frame before reset");
    rst = 1'b1;
    @(posedge clk);
    #1;
    check(adresa == 0, "synchronous reset clears the count");
    rst = 1'b0;
    @(posedge clk);
    #1;
    check(adresa == 1, "counting resumes after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
