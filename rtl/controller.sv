// Controller of the parallel two-sensor design.
//
// Runs the measurement sequence of the flow chart for both sensors at the
// same time, each through its own I2C master: channel 1 drives the AHT10
// temperature/humidity sensor (address 0x38, trigger command 0xAC, pause
// AHT_ACQ_CYCLES, six bytes read), channel 2 the SGP30 air-quality sensor
// (address 0x58, command 0x20 0x08, pause SGP_ACQ_CYCLES = 12 ms, six bytes
// read). The two channels share nothing but the clock, so a slow sensor
// never delays the other one. Channel 1 is reset by reset_n, channel 2 by
// reset_m, as in the block diagram.
//
// After each complete read the controller unpacks the bytes:
//   AHT10: byte 0 status, humidity = {b1, b2, b3[7:4]},
//          temperature = {b3[3:0], b4, b5} (20-bit raw codes);
//   SGP30: co2eq = {b0, b1}, tvoc = {b3, b4}; bytes 2 and 5 are the
//          sensor's CRCs and are not checked.
// temperature2 feeds the display path; humidity, co2eq and tvoc are brought
// out so that the second sensor's reading is usable. The byte layouts, the
// SGP30 address and command and the extra outputs come from the sensors'
// datasheets and are this design's choice; the sequence, the AHT10 address
// and command, and the 12 ms / under 1 ms pauses follow the original design.
// Outputs change one clock after the last byte of a read has arrived.
module controller
  import i2c_pkg::*;
#(
  parameter int unsigned AHT_ACQ_CYCLES = SYS_CLK_HZ / 1000,       // 1 ms
  parameter int unsigned SGP_ACQ_CYCLES = SYS_CLK_HZ / 1000 * 12,  // 12 ms
  parameter int unsigned REP_CYCLES     = SYS_CLK_HZ / 10          // 100 ms
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        reset_m,
  // master 1 (AHT10)
  input  logic        i2c_ack_err,
  input  logic [7:0]  i2c_data_rd,
  input  logic        i2c_busy,
  output logic        i2c_ena,
  output logic [6:0]  i2c_addr,
  output logic        i2c_rw,
  output logic [7:0]  i2c_data_wr,
  // master 2 (SGP30)
  input  logic        i2c_ack_err2,
  input  logic [7:0]  i2c_data_rd2,
  input  logic        i2c_busy2,
  output logic        i2c_ena2,
  output logic [6:0]  i2c_addr2,
  output logic        i2c_rw2,
  output logic [7:0]  i2c_data_wr2,
  // readings
  output logic [19:0] temperature2,
  output logic [19:0] humidity,
  output logic        aht_valid,
  output logic [15:0] co2eq,
  output logic [15:0] tvoc,
  output logic        sgp_valid
);

  logic [8*RD_MAX-1:0] aht_bytes, sgp_bytes;
  logic                aht_new, sgp_new;
  seq_state_e          aht_state, sgp_state;

  sensor_sequencer #(
    .ADDR       (AHT10_ADDR),
    .CMD_LEN    (1),
    .CMD        ({AHT10_TRIGGER, 16'h0000}),
    .RD_LEN     (AHT10_RD_BYTES),
    .ACQ_CYCLES (AHT_ACQ_CYCLES),
    .REP_CYCLES (REP_CYCLES)
  ) u_aht (
    .clk, .reset_n,
    .i2c_ena, .i2c_addr, .i2c_rw, .i2c_data_wr,
    .i2c_busy, .i2c_data_rd, .i2c_ack_err,
    .rd_data (aht_bytes),
    .rd_valid(aht_new),
    .state   (aht_state)
  );

  sensor_sequencer #(
    .ADDR       (SGP30_ADDR),
    .CMD_LEN    (2),
    .CMD        ({SGP30_MEAS_IAQ, 8'h00}),
    .RD_LEN     (SGP30_RD_BYTES),
    .ACQ_CYCLES (SGP_ACQ_CYCLES),
    .REP_CYCLES (REP_CYCLES)
  ) u_sgp (
    .clk,
    .reset_n     (reset_m),
    .i2c_ena     (i2c_ena2),
    .i2c_addr    (i2c_addr2),
    .i2c_rw      (i2c_rw2),
    .i2c_data_wr (i2c_data_wr2),
    .i2c_busy    (i2c_busy2),
    .i2c_data_rd (i2c_data_rd2),
    .i2c_ack_err (i2c_ack_err2),
    .rd_data     (sgp_bytes),
    .rd_valid    (sgp_new),
    .state       (sgp_state)
  );

  // Byte k of a six-byte read sits in bits 47-8k .. 40-8k.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      temperature2 <= '0;
      humidity     <= '0;
      aht_valid    <= 1'b0;
    end else begin
      aht_valid <= aht_new;
      if (aht_new) begin
        humidity     <= {aht_bytes[39:32], aht_bytes[31:24], aht_bytes[23:20]};
        temperature2 <= {aht_bytes[19:16], aht_bytes[15:8], aht_bytes[7:0]};
      end
    end
  end

  always_ff @(posedge clk or negedge reset_m) begin
    if (!reset_m) begin
      co2eq     <= '0;
      tvoc      <= '0;
      sgp_valid <= 1'b0;
    end else begin
      sgp_valid <= sgp_new;
      if (sgp_new) begin
        co2eq <= sgp_bytes[47:32];
        tvoc  <= sgp_bytes[23:8];
      end
    end
  end

endmodule
