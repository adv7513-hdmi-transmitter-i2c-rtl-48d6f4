// Self-checking testbench for i2c_master at its default 50 MHz / 400 kHz.
//
// The master drives an open-drain bus shared with a behavioural ADV7513
// slave (adv7513_model).  A bus monitor checks the I2C rules: SDA moves
// only while SCL is low, except for START and STOP, and the SCL period
// inside a byte is 125 cycles.  The test writes registers and reads them
// back, also with random addresses and data, and checks per transfer the
// response, the number of START/STOP conditions and SCL pulses, and the
// duration: 29 SCL periods for a write and 39 for a read, less the part of
// the last period after the STOP.  With the slave strapped to the other
// address (0x7A) the address byte is not acknowledged: the master must
// report nack and stop after 11 periods without touching a register.
module tb_i2c_master;
  import adv7513_pkg::*;
  localparam int P = 125;   // SCL period in cycles

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, rsp_valid;
  i2c_cmd_t cmd = '0;
  i2c_rsp_t rsp;
  logic scl_oe, sda_oe, s_sda_oe, int_n;
  logic hpd = 1'b1, pd_high = 1'b0;
  wire scl = ~scl_oe;
  wire sda = ~(sda_oe | s_sda_oe);
  int checks = 0, failures = 0;
  int cyc = 0;

  i2c_master dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp,
                  .scl_oe, .sda_i(sda), .sda_oe);
  adv7513_model slave (.scl, .sda, .sda_oe(s_sda_oe), .int_n, .hpd, .pd_high);

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bus monitor ----
  int n_start = 0, n_stop = 0, n_rise = 0, last_rise = -1, bad_period = 0, bad_sda = 0;
  logic scl_q = 1'b1, sda_q = 1'b1, m_sda_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (scl && scl_q && sda != sda_q) begin
      if (!sda) n_start++; else n_stop++;
    end
    if (!scl_q && scl) begin
      // consecutive rising edges within a transfer are one period apart
      if (last_rise >= 0 && cyc - last_rise != P && cyc - last_rise < 2 * P) bad_period++;
      last_rise = cyc;
      n_rise++;
    end
    // the master moves SDA only away from SCL edges, and while SCL is high
    // only to make a START or STOP
    if (sda_oe != m_sda_q) begin
      if (scl != scl_q) bad_sda++;
      if (scl && scl_q && (sda_oe ? !sda_q : sda_q)) bad_sda++;
    end
    scl_q   <= scl;
    sda_q   <= sda;
    m_sda_q <= sda_oe;
  end

  // ---- one transfer ----
  task automatic xfer(input bit rd, input logic [6:0] dev, input logic [7:0] ra,
                      input logic [7:0] wd, output i2c_rsp_t r, output int dur,
                      output int starts, output int stops, output int rises);
    int t0, s0, p0, r0;
    s0 = n_start; p0 = n_stop; r0 = n_rise;
    @(negedge clk);
    cmd = '{rd: rd, dev: dev, reg_addr: ra, wdata: wd};
    cmd_valid = 1'b1;
    check(cmd_ready, "ready before command");
    @(posedge clk); t0 = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    check(!cmd_ready, "busy after command");
    while (!rsp_valid) @(negedge clk);
    dur = cyc - t0;
    r = rsp;
    @(negedge clk);
    check(!rsp_valid, "rsp_valid is a one-cycle pulse");
    repeat (P) @(negedge clk);    // bus free time
    starts = n_start - s0; stops = n_stop - p0; rises = n_rise - r0;
  endtask

  // expected durations: N periods, of which the last ends at its SDA move
  // (count 95) and the response is registered one cycle later
  function automatic int exp_dur(input int periods);
    return (periods - 1) * P + 95 + 1;
  endfunction

  task automatic do_write(input logic [7:0] ra, input logic [7:0] wd);
    i2c_rsp_t r; int d, s, p, k;
    xfer(1'b0, 7'h39, ra, wd, r, d, s, p, k);
    check(!r.nack, $sformatf("write %02h acknowledged", ra));
    check(d >= exp_dur(29) - 1 && d <= exp_dur(29) + 2,
          $sformatf("write lasts 29 SCL periods (%0d cycles)", d));
    check(s == 1 && p == 1, $sformatf("write: %0d START %0d STOP", s, p));
    check(k == 28, $sformatf("write: %0d SCL pulses", k));
  endtask

  task automatic do_read(input logic [7:0] ra, output logic [7:0] rd);
    i2c_rsp_t r; int d, s, p, k;
    xfer(1'b1, 7'h39, ra, 8'h00, r, d, s, p, k);
    check(!r.nack, $sformatf("read %02h acknowledged", ra));
    check(d >= exp_dur(39) - 1 && d <= exp_dur(39) + 2,
          $sformatf("read lasts 39 SCL periods (%0d cycles)", d));
    check(s == 2 && p == 1, $sformatf("read: %0d START (incl. repeated) %0d STOP", s, p));
    check(k == 38, $sformatf("read: %0d SCL pulses", k));
    rd = r.rdata;
  endtask

  initial begin
    logic [7:0] v, a, d;
    i2c_rsp_t r; int dur, s, p, k, w0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(scl && sda, "bus idle after reset");

    do_write(8'h41, 8'h10);
    check(slave.regs[8'h41] == 8'h10, "0x41 written");
    do_read(8'h41, v);
    check(v == 8'h10, $sformatf("0x41 reads %02h", v));
    do_write(8'h55, 8'hA5);
    do_read(8'h55, v);
    check(v == 8'hA5, $sformatf("0x55 reads %02h", v));
    do_read(8'h42, v);
    check(v == 8'h40, $sformatf("HPD state 0x42 reads %02h", v));

    for (int i = 0; i < 12; i++) begin
      a = 8'($urandom_range(8'h00, 8'h3F));   // plain registers
      d = 8'($urandom);
      do_write(a, d);
      check(slave.regs[a] == d, $sformatf("random write %02h=%02h", a, d));
      do_read(a, v);
      check(v == d, $sformatf("random read %02h = %02h, expected %02h", a, v, d));
    end

    // device strapped to 0x7A: no acknowledge
    pd_high = 1'b1;
    w0 = slave.writes;
    xfer(1'b0, 7'h39, 8'h41, 8'h00, r, dur, s, p, k);
    check(r.nack, "NACK reported for absent address");
    check(dur >= exp_dur(11) - 1 && dur <= exp_dur(11) + 2,
          $sformatf("aborted write lasts 11 periods (%0d cycles)", dur));
    check(s == 1 && p == 1, "aborted write ends with STOP");
    check(slave.writes == w0 && slave.regs[8'h41] == 8'h10, "no register touched");
    // reaching it at its other address works
    xfer(1'b0, 7'h3D, 8'h41, 8'h30, r, dur, s, p, k);
    check(!r.nack && slave.regs[8'h41] == 8'h30, "write at 0x7A");
    pd_high = 1'b0;

    check(bad_period == 0, $sformatf("%0d SCL periods not 125 cycles", bad_period));
    check(bad_sda == 0, $sformatf("%0d SDA moves on an SCL edge", bad_sda));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
