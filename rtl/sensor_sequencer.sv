// Measurement sequencer for one I2C sensor (one half of the controller).
//
// Walks the flow chart of the design: ready -> start -> trigger (address +
// write bit, then the command bytes) -> pause for the sensor's conversion
// -> read command (address + read bit) -> read data (ACK every byte except
// the last, NACK the last, then STOP) -> affichage (publish the bytes) ->
// stop -> pause -> ready. A NACK from the sensor during the trigger or the
// read command ends the transaction and returns to ready, as does reset.
//
// The "START condition" of the chart is taken to be: out of reset and the
// master idle (busy low). Measurements therefore repeat on their own, one
// every trigger + conversion + read + REP_CYCLES.
//
// Interface to the master: i2c_ena/addr/rw/data_wr out, i2c_busy, data_rd
// and ack_err in, using the master's handshake (next byte set up on the
// rising edge of busy, result taken on its falling edge; ena dropped on the
// rising edge of busy of the last byte). The bytes of one read come out on
// rd_data, last byte in bits 7:0, with a one-clock rd_valid pulse.
// The read length counter follows the chart: it counts the bytes still to
// come and the byte read while it is zero is the one that gets the NACK.
module sensor_sequencer
  import i2c_pkg::*;
#(
  parameter logic [6:0]  ADDR       = AHT10_ADDR,
  parameter int unsigned CMD_LEN    = 1,              // 1 to 3 command bytes
  parameter logic [23:0] CMD        = {AHT10_TRIGGER, 16'h0000},  // first byte in 23:16
  parameter int unsigned RD_LEN     = AHT10_RD_BYTES, // 1 to RD_MAX
  parameter int unsigned ACQ_CYCLES = SYS_CLK_HZ / 1000,
  parameter int unsigned REP_CYCLES = SYS_CLK_HZ / 10
) (
  input  logic                  clk,
  input  logic                  reset_n,
  // master request / status
  output logic                  i2c_ena,
  output logic [6:0]            i2c_addr,
  output logic                  i2c_rw,
  output logic [7:0]            i2c_data_wr,
  input  logic                  i2c_busy,
  input  logic [7:0]            i2c_data_rd,
  input  logic                  i2c_ack_err,
  // result
  output logic [8*RD_MAX-1:0]   rd_data,
  output logic                  rd_valid,
  output seq_state_e            state
);

  localparam int unsigned TW = 32;

  logic          busy_q, busy_rise, busy_fall;
  logic [1:0]    cmd_idx;
  logic [2:0]    counter;     // bytes still to read after the current one
  logic          last_byte;   // the byte in flight is the last one
  logic [TW-1:0] timer;
  logic [8*RD_MAX-1:0] buffer;

  assign busy_rise = i2c_busy && !busy_q;
  assign busy_fall = !i2c_busy && busy_q;

  function automatic logic [7:0] cmd_byte(input logic [1:0] i);
    return CMD[23 - 8*i -: 8];
  endfunction

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state       <= SEQ_READY;
      busy_q      <= 1'b0;
      i2c_ena     <= 1'b0;
      i2c_addr    <= ADDR;
      i2c_rw      <= I2C_WRITE;
      i2c_data_wr <= '0;
      cmd_idx     <= '0;
      counter     <= '0;
      last_byte   <= 1'b0;
      timer       <= '0;
      buffer      <= '0;
      rd_data     <= '0;
      rd_valid    <= 1'b0;
    end else begin
      busy_q   <= i2c_busy;
      rd_valid <= 1'b0;
      unique case (state)
        SEQ_READY: begin
          if (!i2c_busy) state <= SEQ_START;
        end
        SEQ_START: begin
          i2c_ena     <= 1'b1;
          i2c_addr    <= ADDR;
          i2c_rw      <= I2C_WRITE;
          i2c_data_wr <= cmd_byte(2'd0);
          cmd_idx     <= '0;
          state       <= SEQ_TRIGGER;
        end
        SEQ_TRIGGER: begin
          if (busy_rise) begin
            if (32'(cmd_idx) == CMD_LEN - 1) i2c_ena <= 1'b0;
            else i2c_data_wr <= cmd_byte(cmd_idx + 2'd1);
            cmd_idx <= cmd_idx + 2'd1;
          end
          if (busy_fall) begin
            if (i2c_ack_err) begin
              i2c_ena <= 1'b0;
              state   <= SEQ_STOP;
            end else if (!i2c_ena) begin
              timer <= TW'(ACQ_CYCLES);
              state <= SEQ_PAUSE_ACQ;
            end
          end
        end
        SEQ_PAUSE_ACQ: begin
          if (timer == '0) state <= SEQ_READ_CMD;
          else timer <= timer - 1'b1;
        end
        SEQ_READ_CMD: begin
          i2c_ena   <= 1'b1;
          i2c_addr  <= ADDR;
          i2c_rw    <= I2C_READ;
          counter   <= 3'(RD_LEN - 1);
          last_byte <= 1'b0;
          state     <= SEQ_READ_DATA;
        end
        SEQ_READ_DATA: begin
          if (busy_rise) begin
            if (counter == '0) begin
              i2c_ena   <= 1'b0;      // master answers this byte with NACK
              last_byte <= 1'b1;
            end else begin
              counter <= counter - 3'd1;
            end
          end
          if (busy_fall) begin
            if (i2c_ack_err) begin
              i2c_ena   <= 1'b0;
              last_byte <= 1'b0;
              state     <= SEQ_STOP;
            end else begin
              buffer <= {buffer[8*RD_MAX-9:0], i2c_data_rd};
              if (last_byte) state <= SEQ_AFFICHAGE;
            end
          end
        end
        SEQ_AFFICHAGE: begin
          rd_data  <= buffer;
          rd_valid <= 1'b1;
          timer    <= TW'(REP_CYCLES);
          state    <= SEQ_STOP;
        end
        SEQ_STOP: begin
          // after a NACK back to ready, after a good read on to the pause
          state <= last_byte ? SEQ_PAUSE_REP : SEQ_READY;
          last_byte <= 1'b0;
        end
        SEQ_PAUSE_REP: begin
          if (timer == '0) state <= SEQ_READY;
          else timer <= timer - 1'b1;
        end
        default: state <= SEQ_READY;
      endcase
    end
  end

  // The master is never asked for the bus while the sequencer waits.
  a_no_req_in_pause: assert property (@(posedge clk) disable iff (!reset_n)
                                      (state inside {SEQ_READY, SEQ_PAUSE_ACQ, SEQ_PAUSE_REP})
                                      |-> !i2c_ena);

endmodule
