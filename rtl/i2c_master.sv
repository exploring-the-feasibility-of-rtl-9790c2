// I2C bus master for one sensor bus.
//
// The master turns byte requests from the controller into I2C bus traffic:
// START, the 7-bit address with the R/W bit, write bytes or read bytes, the
// acknowledge bits and STOP (START: SDA falls while SCL is high; STOP: SDA
// rises while SCL is high). The parallel design uses
// two copies, one per sensor, each with its own bus rate.
//
// How it works: a prescaler splits every bus bit into four quarter periods.
// SCL is low in quarters 0-1 and high in quarters 2-3. SDA keeps its level in
// quarter 0, so it never changes in the clock in which SCL falls, and takes
// the new bit at the start of quarter 1. SDA is read through a two-flop
// synchroniser at the end of quarter 2, in the middle of the SCL high time.
// The bus rate is therefore CLK_HZ / (4 * ceil(CLK_HZ / (4*BUS_HZ))), never
// above BUS_HZ: from a 100 MHz clock 100 kHz exactly, 396.8 kHz for 400 kHz
// and 694.4 kHz for 700 kHz. A START
// from idle holds SDA low for two quarters before SCL falls; a repeated
// START only for one.
// Both lines are open drain: the master only ever pulls a line low
// (sda_oe / scl_oe = 1) or releases it; the pads and pull-ups are outside.
// Clock stretching by the slave is not supported.
//
// Request handshake (port names follow the block diagram):
//  * While idle, ena = 1 starts a transaction with addr, rw and data_wr;
//    busy rises on the next clock.
//  * busy falls at the end of every data byte (a write byte with its ACK
//    bit, or the 8 bits of a read byte). data_rd is valid from then on.
//    At that same clock the master samples ena, addr and rw: ena = 0 ends the
//    transaction with STOP (after a NACK for a read); ena = 1 with the same
//    addr and rw continues with another byte (read bytes are then ACKed);
//    ena = 1 with another addr or rw gives a repeated START. When the
//    transaction continues, busy rises again one clock later.
//  * The controller therefore sets up the next byte, or drops ena before the
//    last byte, as soon as it sees busy rise.
//  * A NACK to the address or to a write byte sets ack_error, ends the
//    transaction with STOP and drops busy. ack_error stays set until the
//    next transaction starts.
// The handshake and the four-quarter bit timing are this
// design's own choices; the original design gives the ports and the function.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ = SYS_CLK_HZ,
  parameter int unsigned BUS_HZ = BUS_100K
) (
  input  logic       clk,
  input  logic       reset_n,
  // request from the controller
  input  logic       ena,
  input  logic [6:0] addr,
  input  logic       rw,
  input  logic [7:0] data_wr,
  // status to the controller
  output logic       busy,
  output logic [7:0] data_rd,
  output logic       ack_error,
  // open-drain bus lines
  input  logic       sda_i,
  output logic       sda_oe,
  output logic       scl_oe
);

  // quarter period in clocks, rounded up so the bus never runs too fast
  localparam int unsigned QDIV  = (CLK_HZ + 4 * BUS_HZ - 1) / (4 * BUS_HZ);
  localparam int unsigned QW    = $clog2(QDIV + 1);

  typedef enum logic [3:0] {
    M_IDLE, M_START, M_ADDR, M_ADDR_ACK, M_WR, M_WR_ACK, M_RD, M_MACK, M_STOP
  } mstate_e;

  mstate_e        state;
  logic [QW-1:0]  qcnt;
  logic [1:0]     ph;
  logic [2:0]     bcnt;
  logic [7:0]     sh;
  logic [6:0]     addr_l;
  logic           rw_l;
  logic [7:0]     data_l;
  logic           restart;    // START entered with SCL already driven
  logic           mack_ack;   // ACK (1) or NACK (0) after a read byte
  logic           rd_more;    // another read byte follows the MACK bit
  logic           go_next;    // a latched request follows the current byte
  logic           rebusy;     // raise busy on the next clock
  logic           nack_s;     // sampled acknowledge bit
  logic           tick, bit_end, sample;
  logic           scl_lvl, sda_lvl;
  logic           same_req;
  logic [1:0]     sda_sync;   // two-flop synchroniser of the SDA input

  assign tick     = (qcnt == QW'(QDIV - 1));
  assign bit_end  = tick && (ph == 2'd3);
  assign sample   = tick && (ph == 2'd2);
  assign same_req = (addr == addr_l) && (rw == rw_l);

  // Line levels for the current state and quarter.
  always_comb begin
    scl_lvl = 1'b1;
    sda_lvl = 1'b1;
    unique case (state)
      M_IDLE: begin
        scl_lvl = 1'b1;
        sda_lvl = 1'b1;
      end
      M_START: begin
        // from idle: SDA falls half way through with SCL high;
        // repeated START: release SDA while SCL is low, raise SCL, drop SDA
        scl_lvl = restart ? ph[1] : 1'b1;
        sda_lvl = restart ? (ph != 2'd3) : (ph < 2'd2);
      end
      M_STOP: begin
        scl_lvl = ph[1];
        sda_lvl = (ph == 2'd3);
      end
      M_ADDR, M_WR: begin
        scl_lvl = ph[1];
        sda_lvl = sh[7];
      end
      M_MACK: begin
        scl_lvl = ph[1];
        sda_lvl = !mack_ack;
      end
      default: begin  // M_ADDR_ACK, M_WR_ACK, M_RD: SDA released
        scl_lvl = ph[1];
        sda_lvl = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
    end else begin
      scl_oe <= !scl_lvl;
      // SDA keeps its level for the first quarter after SCL has gone low
      if (state == M_IDLE || ph != 2'd0) sda_oe <= !sda_lvl;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) sda_sync <= 2'b11;
    else          sda_sync <= {sda_sync[0], sda_i};
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= M_IDLE;
      qcnt      <= '0;
      ph        <= '0;
      bcnt      <= '0;
      sh        <= '0;
      addr_l    <= '0;
      rw_l      <= 1'b0;
      data_l    <= '0;
      restart   <= 1'b0;
      mack_ack  <= 1'b0;
      rd_more   <= 1'b0;
      go_next   <= 1'b0;
      rebusy    <= 1'b0;
      nack_s    <= 1'b0;
      busy      <= 1'b0;
      data_rd   <= '0;
      ack_error <= 1'b0;
    end else begin
      if (rebusy) begin
        busy   <= 1'b1;
        rebusy <= 1'b0;
      end

      if (state == M_IDLE) begin
        qcnt <= '0;
        ph   <= '0;
        if (ena) begin
          addr_l    <= addr;
          rw_l      <= rw;
          data_l    <= data_wr;
          busy      <= 1'b1;
          ack_error <= 1'b0;
          restart   <= 1'b0;
          state     <= M_START;
        end
      end else begin
        qcnt <= tick ? '0 : qcnt + 1'b1;
        if (tick) ph <= ph + 2'd1;

        if (sample) begin
          if (state == M_RD) sh <= {sh[6:0], sda_sync[1]};
          if (state == M_ADDR_ACK || state == M_WR_ACK) nack_s <= sda_sync[1];
        end

        if (bit_end) begin
          unique case (state)
            M_START: begin
              sh    <= {addr_l, rw_l};
              bcnt  <= '0;
              state <= M_ADDR;
            end
            M_ADDR: begin
              bcnt <= bcnt + 3'd1;
              sh   <= {sh[6:0], 1'b0};
              if (bcnt == 3'd7) state <= M_ADDR_ACK;
            end
            M_ADDR_ACK: begin
              bcnt <= '0;
              if (nack_s) begin
                ack_error <= 1'b1;
                busy      <= 1'b0;
                state     <= M_STOP;
              end else if (rw_l == I2C_WRITE) begin
                sh    <= data_l;
                state <= M_WR;
              end else begin
                state <= M_RD;
              end
            end
            M_WR: begin
              bcnt <= bcnt + 3'd1;
              sh   <= {sh[6:0], 1'b0};
              if (bcnt == 3'd7) state <= M_WR_ACK;
            end
            M_WR_ACK: begin
              // byte boundary
              busy <= 1'b0;
              bcnt <= '0;
              if (nack_s) begin
                ack_error <= 1'b1;
                state     <= M_STOP;
              end else if (ena) begin
                addr_l  <= addr;
                rw_l    <= rw;
                data_l  <= data_wr;
                rebusy  <= 1'b1;
                if (same_req && rw == I2C_WRITE) begin
                  sh    <= data_wr;
                  state <= M_WR;
                end else begin
                  restart <= 1'b1;
                  state   <= M_START;
                end
              end else begin
                state <= M_STOP;
              end
            end
            M_RD: begin
              bcnt <= bcnt + 3'd1;
              if (bcnt == 3'd7) begin
                // byte boundary: sh holds the complete byte
                data_rd  <= sh;
                busy     <= 1'b0;
                mack_ack <= ena && same_req;
                rd_more  <= ena && same_req;
                go_next  <= ena;
                if (ena) begin
                  addr_l <= addr;
                  rw_l   <= rw;
                  data_l <= data_wr;
                  rebusy <= 1'b1;
                end
                state <= M_MACK;
              end
            end
            M_MACK: begin
              bcnt <= '0;
              if (rd_more) begin
                state <= M_RD;
              end else if (go_next) begin
                restart <= 1'b1;
                state   <= M_START;
              end else begin
                state <= M_STOP;
              end
            end
            M_STOP: begin
              state <= M_IDLE;
            end
            default: state <= M_IDLE;
          endcase
        end
      end
    end
  end

  // I2C rule: while SCL stays high, SDA changes only as a START or a STOP.
  a_sda_stable: assert property (@(posedge clk) disable iff (!reset_n)
                                 (!$past(scl_oe) && !scl_oe && sda_oe != $past(sda_oe))
                                 |-> ($past(state) inside {M_START, M_STOP}));

  // The master never reports busy while idle.
  a_idle_not_busy: assert property (@(posedge clk) disable iff (!reset_n)
                                    (state == M_IDLE && !ena) |=> (state != M_IDLE) || !busy);

endmodule
