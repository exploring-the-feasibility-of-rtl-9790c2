// Four-digit seven-segment display driver for the Basys 3 board.
//
// The board's four digits share the cathode lines CA..CG and each digit has
// its own anode enable an[3:0]; all of them are active low. The driver shows
// one digit at a time and steps to the next every 2^DIGIT_LOG2 clocks, fast
// enough that all four appear lit. With the default DIGIT_LOG2 = 16 and a
// 100 MHz clock each digit is on for 0.66 ms and the whole display is
// refreshed every 2.6 ms, inside the 1-16 ms the board documentation asks
// for. dd1 is shown on the leftmost digit (an[3]), dd4 on the rightmost
// (an[0]). Digit values 0-9 show as decimal numerals and 10-15 as the hex
// letters A-F. an and the segments are registered and change together.
// The original design names the block and its ports (clk, dd1..dd4, an[3:0],
// CA..CG); the scan rate, digit order and segment code are this design's.
module seven_segment_display #(
  parameter int unsigned DIGIT_LOG2 = 16
) (
  input  logic       clk,
  input  logic [3:0] dd1,
  input  logic [3:0] dd2,
  input  logic [3:0] dd3,
  input  logic [3:0] dd4,
  output logic [3:0] an,
  output logic       CA,
  output logic       CB,
  output logic       CC,
  output logic       CD,
  output logic       CE,
  output logic       CF,
  output logic       CG
);

  logic [DIGIT_LOG2+1:0] scan;
  logic [1:0]            sel;
  logic [3:0]            digit;
  logic [6:0]            seg;     // {g,f,e,d,c,b,a}, 1 = segment lit

  assign sel = scan[DIGIT_LOG2+1:DIGIT_LOG2];

  always_comb begin
    unique case (sel)
      2'd0:    digit = dd1;
      2'd1:    digit = dd2;
      2'd2:    digit = dd3;
      default: digit = dd4;
    endcase
    unique case (digit)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;  // F
    endcase
  end

  always_ff @(posedge clk) begin
    scan <= scan + 1'b1;
    an   <= ~(4'b1000 >> sel);
    {CG, CF, CE, CD, CC, CB, CA} <= ~seg;
  end

endmodule
