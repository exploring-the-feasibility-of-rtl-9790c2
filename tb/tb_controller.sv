// Self-checking testbench of the controller.
//
// The controller drives two real I2C masters (4 MHz clock; 100 kHz for the
// AHT10 bus, 200 kHz for the SGP30 bus) which talk to two behavioural
// sensors. Pauses are shortened to 500 clocks (AHT10 conversion), 6000
// clocks (SGP30 conversion) and 2000 clocks (gap between measurements).
// Checks: the command bytes each sensor receives, the unpacked readings,
// six bytes per read with a NACK on the last, the conversion pause between
// trigger STOP and read START on both buses, that the AHT10 channel
// completes measurements while the SGP30 one is still waiting (the two run
// in parallel), recovery after the AHT10 refuses its address, and that
// holding reset_m stops only the SGP30 channel.
module tb_controller;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ = 4_000_000;
  localparam int unsigned AHT_ACQ = 500;
  localparam int unsigned SGP_ACQ = 6000;
  localparam int unsigned REP     = 2000;

  logic clk = 1'b0;
  logic reset_n = 1'b0, reset_m = 1'b0;
  always #5 clk = !clk;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // controller <-> masters
  logic       ena1, rw1, busy1, err1, ena2, rw2, busy2, err2;
  logic [6:0] addr1, addr2;
  logic [7:0] wr1, rd1, wr2, rd2;
  logic [19:0] temperature2, humidity;
  logic [15:0] co2eq, tvoc;
  logic aht_valid, sgp_valid;
  // buses
  logic m1_sda_oe, m1_scl_oe, s1_oe, m2_sda_oe, m2_scl_oe, s2_oe;
  logic scl1, sda1, scl2, sda2;
  assign scl1 = !m1_scl_oe;
  assign sda1 = !(m1_sda_oe || s1_oe);
  assign scl2 = !m2_scl_oe;
  assign sda2 = !(m2_sda_oe || s2_oe);

  logic nack1 = 1'b0;
  // AHT10: status, RH = 0x6B35A (about 41.9 %), T = 0x5F287 (about 24.4 C)
  localparam logic [63:0] AHT_BYTES = 64'h1C_6B_35_A5_F2_87_00_00;
  // SGP30: CO2eq 0x01A2, CRC, TVOC 0x0033, CRC
  localparam logic [63:0] SGP_BYTES = 64'h01_A2_5C_00_33_7E_00_00;

  int a_start, a_stop, a_aack, a_anack, a_wr, a_rd, a_mack, a_mnack;
  int b_start, b_stop, b_aack, b_anack, b_wr, b_rd, b_mack, b_mnack;
  logic [31:0] a_log, b_log;

  controller #(.AHT_ACQ_CYCLES(AHT_ACQ), .SGP_ACQ_CYCLES(SGP_ACQ), .REP_CYCLES(REP)) dut (
    .clk, .reset_n, .reset_m,
    .i2c_ack_err(err1), .i2c_data_rd(rd1), .i2c_busy(busy1),
    .i2c_ena(ena1), .i2c_addr(addr1), .i2c_rw(rw1), .i2c_data_wr(wr1),
    .i2c_ack_err2(err2), .i2c_data_rd2(rd2), .i2c_busy2(busy2),
    .i2c_ena2(ena2), .i2c_addr2(addr2), .i2c_rw2(rw2), .i2c_data_wr2(wr2),
    .temperature2, .humidity, .aht_valid, .co2eq, .tvoc, .sgp_valid
  );

  i2c_master #(.CLK_HZ(CLK_HZ), .BUS_HZ(100_000)) m1 (
    .clk, .reset_n, .ena(ena1), .addr(addr1), .rw(rw1), .data_wr(wr1),
    .busy(busy1), .data_rd(rd1), .ack_error(err1),
    .sda_i(sda1), .sda_oe(m1_sda_oe), .scl_oe(m1_scl_oe)
  );
  i2c_master #(.CLK_HZ(CLK_HZ), .BUS_HZ(200_000)) m2 (
    .clk, .reset_n(reset_m), .ena(ena2), .addr(addr2), .rw(rw2), .data_wr(wr2),
    .busy(busy2), .data_rd(rd2), .ack_error(err2),
    .sda_i(sda2), .sda_oe(m2_sda_oe), .scl_oe(m2_scl_oe)
  );

  i2c_sensor_model #(.ADDR(AHT10_ADDR)) aht (
    .scl(scl1), .sda(sda1), .nack_addr(nack1), .rd_bytes(AHT_BYTES), .sda_oe(s1_oe),
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

  // Conversion pause: from the STOP that ends a write (the trigger) to the
  // next START on the same bus.
  longint unsigned a_stop_at = 0, b_stop_at = 0;
  longint unsigned a_gap_min = '1, a_gap_max = 0, b_gap_min = '1, b_gap_max = 0;
  int a_wr_seen = 0, b_wr_seen = 0;
  bit a_after_wr = 0, b_after_wr = 0;
  always @(posedge sda1) if (scl1) begin
    a_after_wr = (a_wr != a_wr_seen); a_wr_seen = a_wr; a_stop_at = cycle;
  end
  always @(negedge sda1) if (scl1 && a_after_wr) begin
    if (cycle - a_stop_at > a_gap_max) a_gap_max = cycle - a_stop_at;
    if (cycle - a_stop_at < a_gap_min) a_gap_min = cycle - a_stop_at;
    a_after_wr = 0;
  end
  always @(posedge sda2) if (scl2) begin
    b_after_wr = (b_wr != b_wr_seen); b_wr_seen = b_wr; b_stop_at = cycle;
  end
  always @(negedge sda2) if (scl2 && b_after_wr) begin
    if (cycle - b_stop_at > b_gap_max) b_gap_max = cycle - b_stop_at;
    if (cycle - b_stop_at < b_gap_min) b_gap_min = cycle - b_stop_at;
    b_after_wr = 0;
  end

  // After every AHT10 result, once its STOP is on the bus: every read so far
  // was six bytes ending in one NACK.
  initial forever begin
    @(posedge aht_valid);
    repeat (100) @(posedge clk);
    check(a_rd == 6 * a_mnack && a_mack == 5 * a_mnack && a_mnack == n_aht,
          $sformatf("AHT10 reads %0d bytes %0d nacks %0d", n_aht, a_rd, a_mnack));
  end

  int n_aht = 0, n_sgp = 0;
  always @(negedge clk) begin
    if (aht_valid) n_aht++;
    if (sgp_valid) n_sgp++;
  end

  int aht_before_sgp;
  int sgp_seen, start_seen;
  int k;

  initial begin
    repeat (5) @(posedge clk);
    reset_n = 1'b1; reset_m = 1'b1;

    // first SGP30 result; the AHT10 channel has been running meanwhile
    @(posedge sgp_valid);
    aht_before_sgp = n_aht;
    repeat (100) @(posedge clk);
    check(co2eq == 16'h01A2 && tvoc == 16'h0033,
          $sformatf("SGP30 reading co2eq %h tvoc %h", co2eq, tvoc));
    check(b_log[15:0] == SGP30_MEAS_IAQ, $sformatf("SGP30 command %h", b_log[15:0]));
    check(b_wr == 2 && b_rd == 6 && b_mack == 5 && b_mnack == 1,
          $sformatf("SGP30 bytes wr %0d rd %0d ack %0d nack %0d", b_wr, b_rd, b_mack, b_mnack));
    // the pause runs from the end of the last command byte, so the STOP
    // (one bit: 20 clocks) lies inside it
    check(b_gap_min >= SGP_ACQ - 20 && b_gap_max < SGP_ACQ + 40,
          $sformatf("SGP30 conversion pause %0d..%0d clocks", b_gap_min, b_gap_max));
    check(aht_before_sgp >= 1, $sformatf("parallel: %0d AHT10 reads before the first SGP30 read", aht_before_sgp));

    check(temperature2 == 20'h5F287, $sformatf("temperature %h", temperature2));
    check(humidity == 20'h6B35A, $sformatf("humidity %h", humidity));
    check(a_log[7:0] == AHT10_TRIGGER, $sformatf("AHT10 command %h", a_log[7:0]));
    check(a_gap_min >= AHT_ACQ - 40 && a_gap_max < AHT_ACQ + 80,
          $sformatf("AHT10 conversion pause %0d..%0d clocks", a_gap_min, a_gap_max));

    // AHT10 refuses its address for a while, then answers again
    nack1 = 1'b1;
    repeat (8000) @(posedge clk);
    k = n_aht;
    check(a_anack >= 2, $sformatf("NACK seen %0d times", a_anack));
    check(err1 || a_anack > 0, "ack_error reached controller");
    nack1 = 1'b0;
    wait (n_aht > k);
    check(1'b1, "AHT10 recovered after NACK");

    // hold the SGP30 half in reset: AHT10 goes on, SGP30 stops
    reset_m = 1'b0;
    repeat (10) @(posedge clk);
    k = n_aht;
    begin
      sgp_seen   = n_sgp;
      start_seen = b_start;
      repeat (20000) @(posedge clk);
      check(n_aht > k, "AHT10 runs while SGP30 is in reset");
      check(n_sgp == sgp_seen && b_start == start_seen,
            $sformatf("SGP30 silent in reset: results %0d starts %0d", n_sgp - sgp_seen, b_start - start_seen));
      check(co2eq == 0 && tvoc == 0, "SGP30 outputs cleared by reset_m");
    end
    reset_m = 1'b1;
    k = n_sgp;
    wait (n_sgp > k);
    check(co2eq == 16'h01A2, "SGP30 resumes after reset_m");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
