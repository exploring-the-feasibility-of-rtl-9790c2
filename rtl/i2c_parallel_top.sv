// Parallel two-sensor I2C reader for the Basys 3 board.
//
// Reads an AHT10 temperature/humidity sensor and an SGP30 air-quality sensor
// at the same time over two separate I2C buses (SDA/SCL and SDA2/SCL2), so
// that the SGP30's 12 ms conversion never holds up the AHT10 and each bus
// can run at its own rate. Blocks, left to right as in the block diagram:
// master 1 and master 2 (one I2C master per bus), the controller that runs
// the measurement sequence of both sensors, the display converter that
// turns the raw temperature into four decimal digits, and the seven-segment
// driver that shows them on the board.
//
// Ports: clk is the 100 MHz board clock. reset resets master 1 and the AHT10
// half of the controller, reset_m master 2 and the SGP30 half; both are
// active low (the block diagram draws them into active-low inputs). The I2C
// pins are open drain: each line is brought out as its sampled level
// (sda_i, sda2_i) and a drive-low enable (sda_oe, scl_oe, sda2_oe,
// scl2_oe) for the board's tri-state pad buffers, which pull the line low
// when the enable is 1 and release it otherwise. an_0 and CA_0..CG_0 drive
// the display (active low). humidity, co2eq and tvoc with their valid
// pulses carry the readings that the display does not show.
// BUS_HZ1 and BUS_HZ2 set the two bus rates independently (100, 400 or
// 700 kHz were evaluated); the other parameters are the sensors' conversion
// pauses and the gap between measurements, in clock cycles.
module i2c_parallel_top
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ         = SYS_CLK_HZ,
  parameter int unsigned BUS_HZ1        = BUS_100K,
  parameter int unsigned BUS_HZ2        = BUS_100K,
  parameter int unsigned AHT_ACQ_CYCLES = SYS_CLK_HZ / 1000,
  parameter int unsigned SGP_ACQ_CYCLES = SYS_CLK_HZ / 1000 * 12,
  parameter int unsigned REP_CYCLES     = SYS_CLK_HZ / 10,
  parameter int unsigned DIGIT_LOG2     = 16
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        reset_m,
  // bus 1 (AHT10)
  input  logic        sda_i,
  output logic        sda_oe,
  output logic        scl_oe,
  // bus 2 (SGP30)
  input  logic        sda2_i,
  output logic        sda2_oe,
  output logic        scl2_oe,
  // seven-segment display
  output logic [3:0]  an_0,
  output logic        CA_0,
  output logic        CB_0,
  output logic        CC_0,
  output logic        CD_0,
  output logic        CE_0,
  output logic        CF_0,
  output logic        CG_0,
  // readings not shown on the display
  output logic [19:0] humidity,
  output logic        aht_valid,
  output logic [15:0] co2eq,
  output logic [15:0] tvoc,
  output logic        sgp_valid
);

  // master 1 <-> controller
  logic       ena1, rw1, busy1, ack_err1;
  logic [6:0] addr1;
  logic [7:0] data_wr1, data_rd1;
  // master 2 <-> controller
  logic       ena2, rw2, busy2, ack_err2;
  logic [6:0] addr2;
  logic [7:0] data_wr2, data_rd2;

  logic [19:0] temperature2;
  logic [3:0]  dd1, dd2, dd3, dd4;

  i2c_master #(.CLK_HZ(CLK_HZ), .BUS_HZ(BUS_HZ1)) master1 (
    .clk, .reset_n(reset),
    .ena(ena1), .addr(addr1), .rw(rw1), .data_wr(data_wr1),
    .busy(busy1), .data_rd(data_rd1), .ack_error(ack_err1),
    .sda_i, .sda_oe, .scl_oe
  );

  i2c_master #(.CLK_HZ(CLK_HZ), .BUS_HZ(BUS_HZ2)) master2 (
    .clk, .reset_n(reset_m),
    .ena(ena2), .addr(addr2), .rw(rw2), .data_wr(data_wr2),
    .busy(busy2), .data_rd(data_rd2), .ack_error(ack_err2),
    .sda_i(sda2_i), .sda_oe(sda2_oe), .scl_oe(scl2_oe)
  );

  controller #(
    .AHT_ACQ_CYCLES(AHT_ACQ_CYCLES),
    .SGP_ACQ_CYCLES(SGP_ACQ_CYCLES),
    .REP_CYCLES    (REP_CYCLES)
  ) u_controller (
    .clk, .reset_n(reset), .reset_m,
    .i2c_ack_err (ack_err1), .i2c_data_rd (data_rd1), .i2c_busy (busy1),
    .i2c_ena     (ena1),     .i2c_addr    (addr1),    .i2c_rw   (rw1),
    .i2c_data_wr (data_wr1),
    .i2c_ack_err2(ack_err2), .i2c_data_rd2(data_rd2), .i2c_busy2(busy2),
    .i2c_ena2    (ena2),     .i2c_addr2   (addr2),    .i2c_rw2  (rw2),
    .i2c_data_wr2(data_wr2),
    .temperature2,
    .humidity, .aht_valid, .co2eq, .tvoc, .sgp_valid
  );

  display_converter u_converter (
    .clk, .temp(temperature2), .dd1, .dd2, .dd3, .dd4
  );

  seven_segment_display #(.DIGIT_LOG2(DIGIT_LOG2)) u_display (
    .clk, .dd1, .dd2, .dd3, .dd4,
    .an(an_0), .CA(CA_0), .CB(CB_0), .CC(CC_0), .CD(CD_0),
    .CE(CE_0), .CF(CF_0), .CG(CG_0)
  );

endmodule
