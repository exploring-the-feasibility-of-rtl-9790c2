// Self-checking testbench of the display converter.
//
// Applies edge codes and random 20-bit temperature codes and compares the
// four digits, one clock later, with the AHT10 formula
// T = S / 2^20 * 200 - 50 evaluated in floating point, truncated to
// hundredths and limited to 00.00 .. 99.99.
module tb_display_converter;

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic [19:0] temp = '0;
  logic [3:0]  dd1, dd2, dd3, dd4;

  display_converter dut (.clk, .temp, .dd1, .dd2, .dd3, .dd4);

  int checks = 0, failures = 0;

  task automatic apply(input logic [19:0] s);
    real t;
    int  c;
    @(negedge clk);
    temp = s;
    @(negedge clk);
    t = real'(s) / 1048576.0 * 200.0 - 50.0;
    c = int'($floor(t * 100.0 + 1e-9));
    if (c < 0) c = 0;
    if (c > 9999) c = 9999;
    checks++;
    if ({dd1, dd2, dd3, dd4} != {4'(c / 1000), 4'((c / 100) % 10), 4'((c / 10) % 10), 4'(c % 10)}) begin
      failures++;
      $display("FAIL: code %h (%.3f C) shows %0d%0d.%0d%0d, expected %0d", s, t, dd1, dd2, dd3, dd4, c);
    end
  endtask

  initial begin
    apply(20'h00000);   // -50 C, clamped to 00.00
    apply(20'h40000);   //   0 C
    apply(20'h40001);
    apply(20'h5F287);   //  24.4 C
    apply(20'h7FFFF);   //  50 C
    apply(20'hC0000);   // 100 C, clamped to 99.99
    apply(20'hBFFFF);
    apply(20'hFFFFF);
    for (int i = 0; i < 2000; i++) apply(20'($urandom));
    for (int i = 0; i < 500; i++) apply(20'h40000 + 20'($urandom_range(0, 20'h7FFFF)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
