// image_memory_tb: checks the image memory at its full size.
//
// The memory is loaded from lena_first8.hex, the first eight pixels of the
// test photograph (42, 49, 52, 47, 50, 47, 60, 106). Those eight words must
// hold the file's values; every other word must hold the built-in test
// image x XOR y. The read is combinational: data must follow the address
// without a clock. Address line 16 must not change which word is read.
module image_memory_tb;
  localparam int unsigned ADDR_W = 17;
  localparam int unsigned DEPTH  = 65536;

  logic [ADDR_W-1:0] adresa;
  logic [7:0]        date;
  int checks = 0, failures = 0;
  byte unsigned first8 [8] = '{42, 49, 52, 47, 50, 47, 60, 106};

  image_memory #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .INIT_FILE("tb/lena_first8.hex")) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned x, y, expect_p;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      adresa = ADDR_W'(a);
      #1;
      x = a % 256;
      y = a / 256;
      expect_p = (a < 8) ? first8[a] : (x ^ y);
      check(date == 8'(expect_p),
            $sformatf("word %0d: read %0d, expected %0d", a, date, expect_p));
    end
    // address line 16 is above the 65536-word image
    adresa = 17'h1_0005;
    #1;
    check(date == 8'd47, "address line 16 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
