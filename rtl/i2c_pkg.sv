// Shared constants and types of the parallel two-sensor I2C reader.
//
// Holds the system clock rate, the default bus rates, the sensor addresses
// and command codes, and the state type of the per-sensor measurement
// sequencer. The AHT10 address 0x38 and trigger command 0xAC, the 100 MHz
// board clock, the 100/400/700 kHz bus rates and the 12 ms SGP30 / under 1 ms
// AHT10 conversion pauses come from the original design. The SGP30 address
// 0x58 and its "measure air quality" command 0x2008 are taken from the sensor
// vendor's datasheet, since the original design does not give them.
package i2c_pkg;

  // Board clock (Basys 3).
  localparam int unsigned SYS_CLK_HZ = 100_000_000;

  // Bus rates evaluated for the design.
  localparam int unsigned BUS_100K = 100_000;
  localparam int unsigned BUS_400K = 400_000;
  localparam int unsigned BUS_700K = 700_000;

  // AHT10 temperature / humidity sensor.
  localparam logic [6:0]  AHT10_ADDR     = 7'h38;
  localparam logic [7:0]  AHT10_TRIGGER  = 8'hAC;
  localparam int unsigned AHT10_RD_BYTES = 6;       // status, 20b RH, 20b T

  // SGP30 air quality sensor.
  localparam logic [6:0]  SGP30_ADDR     = 7'h58;
  localparam logic [15:0] SGP30_MEAS_IAQ = 16'h2008;
  localparam int unsigned SGP30_RD_BYTES = 6;       // CO2eq, CRC, TVOC, CRC

  // Longest read handled by the sequencer, in bytes.
  localparam int unsigned RD_MAX = 6;

  // R/W bit of the address byte.
  localparam logic I2C_WRITE = 1'b0;
  localparam logic I2C_READ  = 1'b1;

  // States of the measurement sequence (one per oval of the flow chart).
  typedef enum logic [3:0] {
    SEQ_READY,      // wait for the start condition
    SEQ_START,      // hand the write request to the master
    SEQ_TRIGGER,    // address + write bit, then the command bytes
    SEQ_PAUSE_ACQ,  // sensor conversion time
    SEQ_READ_CMD,   // address + read bit
    SEQ_READ_DATA,  // receive bytes, ACK all but the last, NACK the last
    SEQ_AFFICHAGE,  // publish the new reading
    SEQ_STOP,       // wait for the master to finish the STOP condition
    SEQ_PAUSE_REP   // gap before the next measurement
  } seq_state_e;

endpackage
