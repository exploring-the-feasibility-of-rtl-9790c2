// The parallel reader at the two faster bus rates.
//
// Same as the full-size test (100 MHz clock, 1 ms and 12 ms conversion
// pauses, full display scan) but with the AHT10 bus set to 400 kHz and the
// SGP30 bus to 700 kHz, the two higher rates the design was evaluated at,
// showing that each bus runs at its own rate. The quarter-bit divider is
// rounded up, so the SCL periods are 4 * ceil(100e6 / (4 * rate)) clocks:
// 252 clocks (396.8 kHz) and 144 clocks (694.4 kHz).
module tb_i2c_bus_rates;
  import i2c_pkg::*;

  localparam int unsigned BIT_CLKS1 = 252;
  localparam int unsigned BIT_CLKS2 = 144;
  localparam int unsigned BIT_CLKS  = BIT_CLKS1;
  localparam int unsigned AHT_ACQ  = SYS_CLK_HZ / 1000;
  localparam int unsigned SGP_ACQ  = SYS_CLK_HZ / 1000 * 12;

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

  i2c_parallel_top #(.BUS_HZ1(BUS_400K), .BUS_HZ2(BUS_700K)) dut (
    .clk, .reset, .reset_m,
    .sda_i(sda1), .sda_oe, .scl_oe,
    .sda2_i(sda2), .sda2_oe, .scl2_oe,
    .an_0(an), .CA_0(CA), .CB_0(CB), .CC_0(CC), .CD_0(CD), .CE_0(CE), .CF_0(CF), .CG_0(CG),
    .humidity, .aht_valid, .co2eq, .tvoc, .sgp_valid
  );

  // T code 0x66666 -> 30.00 C; RH code 0x80000 -> 50 %
  localparam logic [63:0] AHT_BYTES = 64'h1C_80_00_06_66_66_00_00;
  localparam logic [63:0] SGP_BYTES = 64'h01_F4_00_00_0A_00_00_00;

  int a_start, a_stop, a_aack, a_anack, a_wr, a_rd, a_mack, a_mnack;
  int b_start, b_stop, b_aack, b_anack, b_wr, b_rd, b_mack, b_mnack;
  logic [31:0] a_log, b_log;

  i2c_sensor_model #(.ADDR(AHT10_ADDR)) aht (
    .scl(scl1), .sda(sda1), .nack_addr(1'b0), .rd_bytes(AHT_BYTES), .sda_oe(s1_oe),
    .n_start(a_start), .n_stop(a_stop), .n_addr_ack(a_aack), .n_addr_nack(a_anack),
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

  // SCL periods inside bytes
  longint unsigned r1 = 0, r2 = 0;
  int per_ok = 0, per_bad = 0;
  always @(posedge scl1) begin
    if (r1 != 0 && cycle - r1 < 2 * BIT_CLKS1) begin
      if (cycle - r1 == BIT_CLKS1) per_ok++; else per_bad++;
    end
    r1 = (cycle < 10) ? 0 : cycle;
  end
  always @(posedge scl2) begin
    if (r2 != 0 && cycle - r2 < 2 * BIT_CLKS2) begin
      if (cycle - r2 == BIT_CLKS2) per_ok++; else per_bad++;
    end
    r2 = (cycle < 10) ? 0 : cycle;
  end

  // conversion pauses: STOP after the trigger write to the read START
  longint unsigned a_stop_at = 0, b_stop_at = 0, a_gap = 0, b_gap = 0;
  int a_wr_seen = 0, b_wr_seen = 0;
  bit a_after_wr = 0, b_after_wr = 0;
  always @(posedge sda1) if (scl1) begin
    a_after_wr = (a_wr != a_wr_seen); a_wr_seen = a_wr; a_stop_at = cycle;
  end
  always @(negedge sda1) if (scl1 && a_after_wr) begin a_gap = cycle - a_stop_at; a_after_wr = 0; end
  always @(posedge sda2) if (scl2) begin
    b_after_wr = (b_wr != b_wr_seen); b_wr_seen = b_wr; b_stop_at = cycle;
  end
  always @(negedge sda2) if (scl2 && b_after_wr) begin b_gap = cycle - b_stop_at; b_after_wr = 0; end

  function automatic int decode(input logic [6:0] abcdefg);
    logic [6:0] tbl [10] = '{7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001, 7'b0110011,
                             7'b1011011, 7'b1011111, 7'b1110000, 7'b1111111, 7'b1111011};
    for (int i = 0; i < 10; i++) if (tbl[i] == abcdefg) return i;
    return -1;
  endfunction

  int exp_tc;
  int exp_digit[4];
  int seen[4] = '{0, 0, 0, 0};
  int dig_ok = 0, dig_bad = 0;
  longint unsigned t_aht = 0, t_sgp = 0;
  bit disp_watch = 0;

  always @(negedge clk) begin
    if (aht_valid && t_aht == 0) t_aht = cycle;
    if (sgp_valid && t_sgp == 0) t_sgp = cycle;
    if (disp_watch) begin
      int pos;
      case (an)
        4'b0111: pos = 0;
        4'b1011: pos = 1;
        4'b1101: pos = 2;
        4'b1110: pos = 3;
        default: pos = -1;
      endcase
      if (pos >= 0 && decode(~{CA, CB, CC, CD, CE, CF, CG}) == exp_digit[pos]) begin
        dig_ok++; seen[pos]++;
      end else dig_bad++;
    end
  end

  initial begin
    exp_tc = int'($floor(real'(AHT_BYTES[35:16]) / 1048576.0 * 20000.0)) - 5000;
    exp_digit = '{exp_tc / 1000, (exp_tc / 100) % 10, (exp_tc / 10) % 10, exp_tc % 10};
    repeat (5) @(posedge clk);
    reset = 1'b1; reset_m = 1'b1;

    wait (t_sgp != 0);
    repeat (2000) @(posedge clk);
    $display("AHT10 result after %0d clocks, SGP30 result after %0d clocks", t_aht, t_sgp);
    check(a_log[7:0] == AHT10_TRIGGER, $sformatf("AHT10 command %h", a_log[7:0]));
    check(b_log[15:0] == SGP30_MEAS_IAQ, $sformatf("SGP30 command %h", b_log[15:0]));
    check(per_ok > 100 && per_bad == 0, $sformatf("SCL periods ok %0d bad %0d", per_ok, per_bad));
    check(a_gap >= AHT_ACQ - BIT_CLKS && a_gap < AHT_ACQ + BIT_CLKS,
          $sformatf("AHT10 pause %0d clocks", a_gap));
    check(b_gap >= SGP_ACQ - BIT_CLKS && b_gap < SGP_ACQ + BIT_CLKS,
          $sformatf("SGP30 pause %0d clocks", b_gap));
    check(t_aht < t_sgp, "AHT10 finishes first (parallel buses)");
    check(humidity == 20'h80000, $sformatf("humidity %h", humidity));
    check(co2eq == 16'h01F4 && tvoc == 16'h000A, $sformatf("co2eq %h tvoc %h", co2eq, tvoc));
    check(a_mack == 5 && a_mnack == 1 && b_mack == 5 && b_mnack == 1,
          $sformatf("ACK/NACK %0d/%0d %0d/%0d", a_mack, a_mnack, b_mack, b_mnack));

    // one full display scan: 4 digits of 2^16 clocks
    disp_watch = 1;
    repeat (4 * 65536) @(negedge clk);
    disp_watch = 0;
    check(dig_bad == 0 && seen[0] > 60000 && seen[1] > 60000 && seen[2] > 60000 && seen[3] > 60000,
          $sformatf("display %0d%0d.%0d%0d: ok %0d bad %0d", exp_digit[0], exp_digit[1],
                    exp_digit[2], exp_digit[3], dig_ok, dig_bad));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
