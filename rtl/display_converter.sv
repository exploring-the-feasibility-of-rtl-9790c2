// Display converter: raw AHT10 temperature code to four decimal digits.
//
// The AHT10 reports temperature as a 20-bit code S with
//   T [degC] = S / 2^20 * 200 - 50.
// This block forms T in hundredths of a degree with integer arithmetic,
//   tc = floor(S * 20000 / 2^20) - 5000,
// limits it to 0 .. 9999 (0.00 to 99.99 degC; colder readings show 00.00,
// hotter ones 99.99) and splits it into BCD digits by the shift-and-add-3
// method. dd1 is the tens of degrees, dd2 the units, dd3 the tenths and dd4
// the hundredths. The digits are registered: they follow temp one clock
// later. The original design names the block and its ports (clk, temp[19:0],
// dd1..dd4); the scaling, the clamping and the digit order are this design's
// own choice, the conversion formula is the sensor datasheet's.
module display_converter (
  input  logic        clk,
  input  logic [19:0] temp,
  output logic [3:0]  dd1,
  output logic [3:0]  dd2,
  output logic [3:0]  dd3,
  output logic [3:0]  dd4
);

  logic [35:0] scaled;
  logic signed [16:0] tc;
  logic [13:0] tc_clamped;
  logic [15:0] bcd;

  always_comb begin
    scaled = 36'(temp) * 36'd20000;
    tc     = 17'(scaled[35:20]) - 17'sd5000;
    if (tc < 0)              tc_clamped = 14'd0;
    else if (tc > 17'sd9999) tc_clamped = 14'd9999;
    else                     tc_clamped = 14'(tc);
  end

  // Binary to BCD (double dabble) on the 14-bit value.
  always_comb begin
    bcd = '0;
    for (int i = 13; i >= 0; i--) begin
      for (int d = 0; d < 4; d++) begin
        if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      end
      bcd = {bcd[14:0], tc_clamped[i]};
    end
  end

  always_ff @(posedge clk) begin
    dd1 <= bcd[15:12];
    dd2 <= bcd[11:8];
    dd3 <= bcd[7:4];
    dd4 <= bcd[3:0];
  end

endmodule
