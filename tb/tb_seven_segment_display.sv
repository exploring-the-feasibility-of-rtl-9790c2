// Self-checking testbench of the seven-segment driver.
//
// Runs the driver with four clocks per digit and, every clock, checks that
// exactly one anode is active, that the segments show the digit belonging
// to that anode (decoded back with the standard a-g pattern table), and
// that each anode stays on for exactly four clocks in the order
// an[3], an[2], an[1], an[0].
module tb_seven_segment_display;

  localparam int unsigned DIGIT_LOG2 = 2;
  localparam int unsigned HOLD = 1 << DIGIT_LOG2;

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic [3:0] dd1 = 4'd1, dd2 = 4'd2, dd3 = 4'd3, dd4 = 4'd4;
  logic [3:0] an;
  logic CA, CB, CC, CD, CE, CF, CG;

  seven_segment_display #(.DIGIT_LOG2(DIGIT_LOG2)) dut (
    .clk, .dd1, .dd2, .dd3, .dd4, .an, .CA, .CB, .CC, .CD, .CE, .CF, .CG
  );

  int checks = 0, failures = 0;

  // segments lit {a,b,c,d,e,f,g} for 0-9 and A-F
  function automatic int decode(input logic [6:0] abcdefg);
    logic [6:0] tbl [16] = '{7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
                             7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
                             7'b1111111, 7'b1111011, 7'b1110111, 7'b0011111,
                             7'b1001110, 7'b0111101, 7'b1001111, 7'b1000111};
    for (int i = 0; i < 16; i++) if (tbl[i] == abcdefg) return i;
    return -1;
  endfunction

  function automatic int expected(input logic [3:0] a);
    case (a)
      4'b0111: return int'(dd1);
      4'b1011: return int'(dd2);
      4'b1101: return int'(dd3);
      4'b1110: return int'(dd4);
      default: return -2;
    endcase
  endfunction

  logic [3:0] prev_an = '0;
  int run = 0;
  int changes = 0;
  bit order_ok = 1;

  initial begin
    repeat (HOLD * 8) @(negedge clk);     // let the scan settle
    for (int n = 0; n < 400; n++) begin
      if (n % 64 == 0) begin
        dd1 = 4'($urandom); dd2 = 4'($urandom); dd3 = 4'($urandom); dd4 = 4'($urandom);
      end
      @(negedge clk);
      checks++;
      if ($countones(~an) != 1) begin
        failures++; $display("FAIL: anodes %b", an);
      end else if (decode(~{CA, CB, CC, CD, CE, CF, CG}) != expected(an)) begin
        failures++;
        $display("FAIL: anodes %b show %0d, expected %0d", an,
                 decode(~{CA, CB, CC, CD, CE, CF, CG}), expected(an));
      end
      if (an == prev_an) run++;
      else begin
        if (changes > 1 && run != HOLD) order_ok = 0;
        if (prev_an != '0 && an != {prev_an[0], prev_an[3:1]}) order_ok = 0;
        changes++;
        run = 1;
      end
      prev_an = an;
    end
    checks++;
    if (!order_ok || changes < 50) begin
      failures++; $display("FAIL: scan order/duration (%0d changes)", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
