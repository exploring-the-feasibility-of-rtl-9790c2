// Behavioural model of an I2C sensor (slave) for simulation only.
//
// Watches the bus levels scl and sda and answers like an AHT10 or SGP30:
// it acknowledges its own address (unless nack_addr is set), acknowledges
// and records every byte written to it, and on a read shifts out
// rd_bytes, first byte from bits 63:56, for as long as the master
// acknowledges. sda_oe = 1 pulls SDA low. It also counts START and STOP
// conditions, the addresses it acknowledged or refused, the bytes written
// and read, and the master's ACKs and NACKs. It makes no timing checks.
module i2c_sensor_model #(
  parameter logic [6:0] ADDR = 7'h38
) (
  input  logic        scl,
  input  logic        sda,
  input  logic        nack_addr,
  input  logic [63:0] rd_bytes,
  output logic        sda_oe,
  output int          n_start,
  output int          n_stop,
  output int          n_addr_ack,
  output int          n_addr_nack,
  output int          n_addr_nack_rd, // of those, with the read bit set
  output int          n_wr,
  output int          n_rd,
  output int          n_mack,
  output int          n_mnack,
  output logic [31:0] wr_log      // last four bytes written, newest in 7:0
);

  typedef enum {S_IDLE, S_ADDR, S_AACK, S_WRITE, S_WACK, S_READ, S_MACK} sstate_e;
  sstate_e state = S_IDLE;
  int      bits = 0;
  int      idx  = 0;
  logic [7:0] sh = '0;
  logic       rw = 1'b0;
  logic       m_ack = 1'b0;

  initial begin
    sda_oe = 1'b0; n_start = 0; n_stop = 0; n_addr_ack = 0; n_addr_nack = 0; n_addr_nack_rd = 0;
    n_wr = 0; n_rd = 0; n_mack = 0; n_mnack = 0; wr_log = '0;
  end

  function automatic logic [7:0] byte_at(int k);
    return (k < 8) ? rd_bytes[63-8*k -: 8] : 8'hFF;
  endfunction

  always @(negedge sda) if (scl) begin
    n_start = n_start + 1;
    state = S_ADDR; bits = 0; sda_oe = 1'b0;
  end

  always @(posedge sda) if (scl) begin
    n_stop = n_stop + 1;
    state = S_IDLE; sda_oe = 1'b0;
  end

  always @(posedge scl) begin
    case (state)
      S_ADDR, S_WRITE: begin sh = {sh[6:0], sda}; bits = bits + 1; end
      S_MACK:          m_ack = !sda;
      default: ;
    endcase
  end

  always @(negedge scl) begin
    case (state)
      S_ADDR: if (bits == 8) begin
        if (sh[7:1] == ADDR && !nack_addr) begin
          n_addr_ack = n_addr_ack + 1;
          rw = sh[0]; sda_oe = 1'b1; state = S_AACK;
        end else begin
          if (sh[7:1] == ADDR) n_addr_nack = n_addr_nack + 1;
          if (sh[7:1] == ADDR && sh[0]) n_addr_nack_rd = n_addr_nack_rd + 1;
          state = S_IDLE;
        end
      end
      S_AACK: begin
        if (rw) begin
          idx = 0; sh = byte_at(0); sda_oe = !sh[7]; bits = 1; state = S_READ;
        end else begin
          sda_oe = 1'b0; bits = 0; state = S_WRITE;
        end
      end
      S_WRITE: if (bits == 8) begin
        n_wr = n_wr + 1; wr_log = {wr_log[23:0], sh};
        sda_oe = 1'b1; state = S_WACK;
      end
      S_WACK: begin sda_oe = 1'b0; bits = 0; state = S_WRITE; end
      S_READ: begin
        if (bits == 8) begin
          n_rd = n_rd + 1; sda_oe = 1'b0; state = S_MACK;
        end else begin
          sda_oe = !sh[7 - bits]; bits = bits + 1;
        end
      end
      S_MACK: begin
        if (m_ack) begin
          n_mack = n_mack + 1;
          idx = idx + 1; sh = byte_at(idx); sda_oe = !sh[7]; bits = 1; state = S_READ;
        end else begin
          n_mnack = n_mnack + 1; sda_oe = 1'b0; state = S_IDLE;
        end
      end
      default: ;
    endcase
  end

endmodule
