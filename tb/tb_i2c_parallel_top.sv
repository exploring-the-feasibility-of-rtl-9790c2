// End-to-end testbench of the parallel two-sensor reader.
//
// The whole design runs from a 4 MHz clock with the AHT10 bus at 100 kHz and
// the SGP30 bus at 200 kHz, shortened pauses and four clocks per display
// digit. Two behavioural sensors sit on the buses. The test checks the
// readings that come out (temperature on the seven-segment display,
// humidity, CO2eq, TVOC) and counts each mechanism of the design, failing
// if one never happens:
//   both buses active in the same clock (parallel transfer), the two SCL
//   periods (40 and 20 clocks), START and STOP on both buses, ACKs and the
//   final NACK sent by the masters, the conversion pause, an address NACK
//   from the AHT10 both on a read command and on a trigger, the return to
//   ready after it, the display scan over
//   all four digits, and reset_m stopping the SGP30 half alone.
module tb_i2c_parallel_top;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 4_000_000;
  localparam int unsigned BUS1    = 100_000;
  localparam int unsigned BUS2    = 200_000;
  localparam int unsigned AHT_ACQ = 600;
  localparam int unsigned SGP_ACQ = 12000;
  localparam int unsigned REP     = 1500;

  logic clk = 1'b0;
  logic reset = 1'b0, reset_m = 1'b0;
  always #5 clk = !clk;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic sda_oe, scl_oe, sda2_oe, scl2_oe, s1_oe, s2_oe;
  logic scl1, sda1, scl2, sda2;
  assign scl1 = !scl_oe;
  assign sda1 = !(sda_oe || s1_oe);
  assign scl2 = !scl2_oe;
  assign sda2 = !(sda2_oe || s2_oe);

  logic [3:0] an;
  logic CA, CB, CC, CD, CE, CF, CG;
  logic [19:0] humidity;
  logic [15:0] co2eq, tvoc;
  logic aht_valid, sgp_valid;

  i2c_parallel_top #(
    .CLK_HZ(CLK_HZ), .BUS_HZ1(BUS1), .BUS_HZ2(BUS2),
    .AHT_ACQ_CYCLES(AHT_ACQ), .SGP_ACQ_CYCLES(SGP_ACQ), .REP_CYCLES(REP),
    .DIGIT_LOG2(2)
  ) dut (
    .clk, .reset, .reset_m,
    .sda_i(sda1), .sda_oe, .scl_oe,
    .sda2_i(sda2), .sda2_oe, .scl2_oe,
    .an_0(an), .CA_0(CA), .CB_0(CB), .CC_0(CC), .CD_0(CD), .CE_0(CE), .CF_0(CF), .CG_0(CG),
    .humidity, .aht_valid, .co2eq, .tvoc, .sgp_valid
  );

  logic nack1 = 1'b0;
  // T code 0x5F287 -> 24.34 C; RH code 0x6B35A
  localparam logic [63:0] AHT_BYTES = 64'h1C_6B_35_A5_F2_87_00_00;
  localparam logic [63:0] SGP_BYTES = 64'h01_A2_5C_00_33_7E_00_00;

  int a_anack_rd;
  int a_start, a_stop, a_aack, a_anack, a_wr, a_rd, a_mack, a_mnack;
  int b_start, b_stop, b_aack, b_anack, b_wr, b_rd, b_mack, b_mnack;
  logic [31:0] a_log, b_log;

  i2c_sensor_model #(.ADDR(AHT10_ADDR)) aht (
    .scl(scl1), .sda(sda1), .nack_addr(nack1), .rd_bytes(AHT_BYTES), .sda_oe(s1_oe),
    .n_start(a_start), .n_stop(a_stop), .n_addr_ack(a_aack), .n_addr_nack(a_anack),
    .n_addr_nack_rd(a_anack_rd),
    .n_wr(a_wr), .n_rd(a_rd), .n_mack(a_mack), .n_mnack(a_mnack), .wr_log(a_log)
  );
  i2c_sensor_model #(.ADDR(SGP30_ADDR)) sgp (
    .scl(scl2), .sda(sda2), .nack_addr(1'b0), .rd_bytes(SGP_BYTES), .sda_oe(s2_oe),
    .n_start(b_start), .n_stop(b_stop), .n_addr_ack(b_aack), .n_addr_nack(b_anack),
    .n_wr(b_wr), .n_rd(b_rd), .n_mack(b_mack), .n_mnack(b_mnack), .wr_log(b_log)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // --- mechanism counters ---------------------------------------------
  int n_parallel = 0;         // clocks with both SCLs low at once
  int n_aht = 0, n_sgp = 0;
  int n_per1 = 0, n_per1_bad = 0, n_per2 = 0, n_per2_bad = 0;
  int n_pause = 0;            // conversion pauses of the right length
  int n_digits_seen[4] = '{0, 0, 0, 0};
  int n_digit_ok = 0, n_digit_bad = 0;
  int n_reset_m = 0;
  int n_recover = 0;

  always @(negedge clk) begin
    if (scl_oe && scl2_oe) n_parallel++;
    if (aht_valid) n_aht++;
    if (sgp_valid) n_sgp++;
  end

  longint unsigned r1 = 0, r2 = 0;
  always @(posedge scl1) begin
    if (r1 != 0 && cycle - r1 < 2 * (CLK_HZ / BUS1)) begin
      if (cycle - r1 == CLK_HZ / BUS1) n_per1++; else n_per1_bad++;
    end
    r1 = (cycle < 10) ? 0 : cycle;   // ignore the release at reset
  end
  always @(posedge scl2) begin
    if (!reset_m) r2 = 0;
    if (r2 != 0 && cycle - r2 < 2 * (CLK_HZ / BUS2)) begin
      if (cycle - r2 == CLK_HZ / BUS2) n_per2++;
      else begin n_per2_bad++; $display("bus 2 period %0d at %0d", cycle - r2, cycle); end
    end
    r2 = (cycle < 10) ? 0 : cycle;
  end

  // conversion pause on the SGP30 bus: STOP after a write to the next START
  longint unsigned b_stop_at = 0;
  int b_wr_seen = 0;
  bit b_after_wr = 0;
  always @(posedge sda2) if (scl2) begin
    b_after_wr = (b_wr != b_wr_seen) && reset_m; b_wr_seen = b_wr; b_stop_at = cycle;
  end
  always @(negedge reset_m) b_after_wr = 0;
  always @(negedge sda2) if (scl2 && b_after_wr) begin
    if (cycle - b_stop_at >= SGP_ACQ - CLK_HZ / BUS2 && cycle - b_stop_at < SGP_ACQ + 40) n_pause++;
    else begin failures++; $display("FAIL: SGP30 pause %0d clocks", cycle - b_stop_at); end
    b_after_wr = 0;
  end

  // display: digit shown on the active anode, decoded from the segments
  function automatic int decode(input logic [6:0] abcdefg);
    logic [6:0] tbl [10] = '{7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001, 7'b0110011,
                             7'b1011011, 7'b1011111, 7'b1110000, 7'b1111111, 7'b1111011};
    for (int i = 0; i < 10; i++) if (tbl[i] == abcdefg) return i;
    return -1;
  endfunction

  // expected digits of the AHT10 temperature, from the sensor's formula
  int exp_tc;
  int exp_digit[4];
  initial begin
    exp_tc = int'($floor(real'(AHT_BYTES[35:16]) / 1048576.0 * 20000.0)) - 5000;
    exp_digit = '{exp_tc / 1000, (exp_tc / 100) % 10, (exp_tc / 10) % 10, exp_tc % 10};
  end

  bit disp_watch = 0;
  always @(negedge clk) if (disp_watch) begin
    int pos;
    case (an)
      4'b0111: pos = 0;
      4'b1011: pos = 1;
      4'b1101: pos = 2;
      4'b1110: pos = 3;
      default: pos = -1;
    endcase
    if (pos < 0) n_digit_bad++;
    else begin
      n_digits_seen[pos]++;
      if (decode(~{CA, CB, CC, CD, CE, CF, CG}) == exp_digit[pos]) n_digit_ok++;
      else n_digit_bad++;
    end
  end

  int k, s0, st0;

  initial begin
    repeat (5) @(posedge clk);
    reset = 1'b1; reset_m = 1'b1;

    // first complete SGP30 measurement
    wait (n_sgp >= 1);
    repeat (100) @(posedge clk);
    check(co2eq == 16'h01A2 && tvoc == 16'h0033, $sformatf("co2eq %h tvoc %h", co2eq, tvoc));
    check(humidity == 20'h6B35A, $sformatf("humidity %h", humidity));
    check(a_log[7:0] == AHT10_TRIGGER && b_log[15:0] == SGP30_MEAS_IAQ,
          $sformatf("commands %h / %h", a_log[7:0], b_log[15:0]));
    check(n_aht >= 2, $sformatf("AHT10 results before the first SGP30 result: %0d", n_aht));

    // display shows the temperature
    disp_watch = 1;
    repeat (64) @(negedge clk);
    disp_watch = 0;
    check(n_digit_bad == 0 && n_digit_ok >= 60,
          $sformatf("display digits ok %0d bad %0d (expected %0d)", n_digit_ok, n_digit_bad, exp_tc));

    // AHT10 refuses its address right after a trigger: first the read
    // command is NACKed, then the retried trigger; then it answers again
    k = a_wr;
    wait (a_wr > k);
    nack1 = 1'b1;
    wait (a_anack >= 2);
    nack1 = 1'b0;
    k = n_aht;
    wait (n_aht > k);
    n_recover++;

    // SGP30 half held in reset
    reset_m = 1'b0;
    repeat (10) @(posedge clk);
    s0 = n_sgp; st0 = b_start; k = n_aht;
    repeat (8000) @(posedge clk);
    if (n_sgp == s0 && b_start == st0 && n_aht > k && co2eq == 0) n_reset_m++;
    reset_m = 1'b1;
    k = n_sgp;
    wait (n_sgp > k);
    repeat (100) @(posedge clk);
    check(co2eq == 16'h01A2, "SGP30 back after reset_m");

    // --- every mechanism happened ---
    check(n_parallel > 100, $sformatf("parallel bus activity: %0d clocks", n_parallel));
    check(n_per1 > 50 && n_per1_bad == 0, $sformatf("bus 1 SCL periods ok %0d bad %0d", n_per1, n_per1_bad));
    check(n_per2 > 50 && n_per2_bad == 0, $sformatf("bus 2 SCL periods ok %0d bad %0d", n_per2, n_per2_bad));
    check(a_start > 0 && a_stop > 0 && b_start > 0 && b_stop > 0, "START/STOP on both buses");
    // (a read may be under way at this point: up to five ACKs ahead)
    check(a_mack >= 5 * a_mnack && a_mack <= 5 * a_mnack + 5 && a_mnack > 0 &&
          b_mack >= 5 * b_mnack && b_mack <= 5 * b_mnack + 5 && b_mnack > 0,
          $sformatf("master ACK/NACK: %0d/%0d, %0d/%0d", a_mack, a_mnack, b_mack, b_mnack));
    check(n_pause >= 2, $sformatf("conversion pauses %0d", n_pause));
    check(a_anack_rd >= 1 && a_anack - a_anack_rd >= 1,
          $sformatf("address NACKs: %0d on read commands, %0d on triggers", a_anack_rd, a_anack - a_anack_rd));
    check(n_recover == 1, "recovery after NACK");
    check(n_digits_seen[0] > 0 && n_digits_seen[1] > 0 && n_digits_seen[2] > 0 && n_digits_seen[3] > 0,
          "display scanned all four digits");
    check(n_reset_m == 1, "reset_m stops the SGP30 half only");

    $display("mechanisms: parallel=%0d per1=%0d per2=%0d aht=%0d sgp=%0d pauses=%0d addr_nacks=%0d(rd %0d) recover=%0d reset_m=%0d",
             n_parallel, n_per1, n_per2, n_aht, n_sgp, n_pause, a_anack, a_anack_rd, n_recover, n_reset_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
