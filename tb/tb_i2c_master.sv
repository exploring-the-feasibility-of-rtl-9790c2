// Self-checking testbench of the I2C master.
//
// Runs the master at 100 kHz from a 4 MHz clock (ten clocks per quarter
// bit) against a behavioural sensor at address 0x38 and checks: a two-byte
// write (bytes seen by the sensor, one START, one STOP, no error), a
// six-byte read (data, five ACKs and a final NACK), a NACK to a wrong
// address (ack_error, STOP, busy released), a write followed by a read with
// a repeated START, and the SCL period (40 clocks).
module tb_i2c_master;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ = 4_000_000;
  localparam int unsigned BUS_HZ = 100_000;
  localparam int unsigned BIT_CLKS = CLK_HZ / BUS_HZ;

  logic clk = 1'b0;
  logic reset_n = 1'b0;
  logic ena = 1'b0;
  logic [6:0] addr = '0;
  logic rw = 1'b0;
  logic [7:0] data_wr = '0;
  logic busy, ack_error;
  logic [7:0] data_rd;
  logic sda_oe, scl_oe, s_oe;
  logic scl, sda;
  logic nack_addr = 1'b0;
  logic [63:0] rd_bytes = 64'h1C_6B_35_A5_F2_87_00_00;
  int n_start, n_stop, n_addr_ack, n_addr_nack, n_wr, n_rd, n_mack, n_mnack;
  logic [31:0] wr_log;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || s_oe);

  always #5 clk = !clk;
  always @(posedge clk) cycle <= cycle + 1;

  i2c_master #(.CLK_HZ(CLK_HZ), .BUS_HZ(BUS_HZ)) dut (
    .clk, .reset_n, .ena, .addr, .rw, .data_wr,
    .busy, .data_rd, .ack_error, .sda_i(sda), .sda_oe, .scl_oe
  );

  i2c_sensor_model #(.ADDR(7'h38)) sensor (
    .scl, .sda, .nack_addr, .rd_bytes, .sda_oe(s_oe),
    .n_start, .n_stop, .n_addr_ack, .n_addr_nack, .n_wr, .n_rd,
    .n_mack, .n_mnack, .wr_log
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One transaction of n bytes. For a write wb holds the bytes, first in
  // 31:24. For a read the bytes come back in rb, first in 63:56. When
  // then_rw differs from rw, ena stays high after the last byte and the
  // master goes on with a repeated START to a read of then_n bytes.
  task automatic xfer(input logic [6:0] a, input logic r, input int n,
                      input logic [31:0] wb, output logic [63:0] rb);
    rb = '0;
    @(negedge clk);
    addr = a; rw = r; data_wr = wb[31:24]; ena = 1'b1;
    for (int k = 0; k < n; k++) begin
      @(posedge busy);
      @(negedge clk);
      if (k == n - 1) ena = 1'b0;
      else data_wr = wb[31 - 8*(k+1) -: 8];
      @(negedge busy);
      @(negedge clk);
      rb[63 - 8*k -: 8] = data_rd;
      if (ack_error) break;
    end
  endtask

  // Bus released and master not busy for two bit times.
  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 2 * BIT_CLKS) begin
      @(posedge clk);
      quiet = (busy || scl_oe || sda_oe) ? 0 : quiet + 1;
    end
  endtask

  // SCL period measured on consecutive rising edges inside a byte
  longint unsigned last_rise = 0;
  int period_ok = 0, period_bad = 0;
  always @(posedge scl) begin
    if (busy && last_rise != 0 && cycle - last_rise < 2 * BIT_CLKS) begin
      if (cycle - last_rise == BIT_CLKS) period_ok++;
      else begin period_bad++; $display("bad period %0d at %0d", cycle - last_rise, cycle); end
    end
    last_rise = busy ? cycle : 0;
  end

  logic [63:0] rb;
  int s0, p0;

  initial begin
    repeat (5) @(posedge clk);
    reset_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. two-byte write
    xfer(7'h38, I2C_WRITE, 2, 32'hAC33_0000, rb);
    wait_idle();
    check(!ack_error, "write: no ack_error");
    check(wr_log[15:0] == 16'hAC33, $sformatf("write: bytes %h", wr_log[15:0]));
    check(n_wr == 2, "write: two bytes");
    check(n_start == 1 && n_stop == 1, $sformatf("write: start %0d stop %0d", n_start, n_stop));

    // 2. six-byte read
    xfer(7'h38, I2C_READ, 6, '0, rb);
    wait_idle();
    check(!ack_error, "read: no ack_error");
    check(rb[63:16] == rd_bytes[63:16], $sformatf("read: data %h", rb[63:16]));
    check(n_mack == 5 && n_mnack == 1, $sformatf("read: acks %0d nacks %0d", n_mack, n_mnack));
    check(n_start == 2 && n_stop == 2, "read: start/stop");

    // 3. wrong address: NACK
    xfer(7'h22, I2C_WRITE, 1, 32'h5500_0000, rb);
    wait_idle();
    check(ack_error, "nack: ack_error set");
    check(n_stop == 3, "nack: STOP sent");
    check(!busy, "nack: busy released");

    // 4. write then read with a repeated START
    s0 = n_start; p0 = n_stop;
    @(negedge clk);
    addr = 7'h38; rw = I2C_WRITE; data_wr = 8'h71; ena = 1'b1;
    @(posedge busy); @(negedge clk);
    rw = I2C_READ;                    // next request differs: repeated START
    @(posedge busy); @(negedge clk);  // read byte 0 accepted
    @(posedge busy); @(negedge clk);  // read byte 1 accepted, last
    ena = 1'b0;
    @(negedge busy); @(negedge clk);
    wait_idle();
    check(n_start - s0 == 2 && n_stop - p0 == 1,
          $sformatf("restart: starts %0d stops %0d", n_start - s0, n_stop - p0));
    check(wr_log[7:0] == 8'h71, "restart: written byte");
    check(data_rd == rd_bytes[55:48], $sformatf("restart: second read byte %h", data_rd));
    check(!ack_error, "restart: no error");

    // 5. bus timing
    check(period_ok > 50 && period_bad == 0,
          $sformatf("SCL period: %0d ok, %0d wrong", period_ok, period_bad));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
