// negative_tb: checks the negative-image unit.
//
// Every grey level 0..255 is applied, one per clock; the output must be
// 255 minus the level, and must change only at the falling clock edge.
// The two values printed for the test photograph are checked by value:
// 42 (00101010) -> 213 (11010101) and 49 (00110001) -> 206 (11001110).
module negative_tb;
  logic       clk = 1'b0;
  logic [7:0] intrare;
  logic [7:0] iesire;
  int checks = 0, failures = 0;

  negative dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input int unsigned p, output logic [7:0] q);
    logic [7:0] prev;
    @(posedge clk);
    #1 intrare = 8'(p);
    prev = iesire;
    #2;
    check(iesire == prev, $sformatf("pixel %0d: output changed before the falling edge", p));
    @(negedge clk);
    #1 q = iesire;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got;
    intrare = 8'd0;
    for (int unsigned p = 0; p < 256; p++) begin
      apply(p, got);
      check(int'(got) == 255 - int'(p), $sformatf("pixel %0d: got %0d", p, got));
    end
    apply(42, got); check(got == 8'b11010101, "42 -> 213");
    apply(49, got); check(got == 8'b11001110, "49 -> 206");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
