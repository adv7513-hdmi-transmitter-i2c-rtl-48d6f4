// Self-checking testbench for i2c_scl_gen at its default 50 MHz / 400 kHz.
//
// Runs the generator for several SCL periods and checks that each strobe
// fires exactly once per period, at the expected count (p_low 0, p_data
// 32, p_rise 65, p_mid 95), and that the period is 125 cycles (2.5 us,
// i.e. 400 kHz).  With run low no strobe may fire, and a new run must
// start with p_low on its first cycle.  A second instance set to 20 kHz
// must have a period of 2500 cycles, one set to 100 kHz a period of 500.
module tb_i2c_scl_gen;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic p_low, p_data, p_rise, p_mid;
  int checks = 0, failures = 0;
  int cyc = 0;

  i2c_scl_gen dut (.*);

  // the board's demo runs the bus at 20 kHz: 2500 cycles per period
  logic q_low, q_data, q_rise, q_mid;
  i2c_scl_gen #(.SCL_HZ(20_000)) dut20 (.clk, .rst_n, .run,
    .p_low(q_low), .p_data(q_data), .p_rise(q_rise), .p_mid(q_mid));
  // the transmitter also supports standard mode, 100 kHz: 500 cycles
  logic h_low, h_data, h_rise, h_mid;
  i2c_scl_gen #(.SCL_HZ(100_000)) dut100 (.clk, .rst_n, .run,
    .p_low(h_low), .p_data(h_data), .p_rise(h_rise), .p_mid(h_mid));
  int h_last = -1, h_periods = 0, h_t0 = 0;
  always @(posedge clk) begin
    if (h_low) begin
      if (h_last >= 0 && cyc - h_last < 600) begin
        checks++;
        h_periods++;
        if (cyc - h_last != 500) begin
          failures++; $display("FAIL: 100 kHz period %0d", cyc - h_last);
        end
      end
      h_last = cyc;
      h_t0   = cyc;
    end
    // rise at 13/25 of the period: 260 cycles, 2.6 us low
    if (h_rise && h_last >= 0) begin
      checks++;
      if (cyc - h_t0 != 260) begin failures++; $display("FAIL: 100 kHz rise at %0d", cyc - h_t0); end
    end
  end
  int q_last = -1, q_periods = 0;
  always @(posedge clk) if (q_low) begin
    if (q_last >= 0 && cyc - q_last < 3000) begin
      checks++;
      q_periods++;
      if (cyc - q_last != 2500) begin
        failures++; $display("FAIL: 20 kHz period %0d", cyc - q_last);
      end
    end
    q_last = cyc;
  end

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, n_low, n_data, n_rise, n_mid, last_low;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // idle: no strobes
    repeat (300) begin
      @(negedge clk);
      check(!(p_low || p_data || p_rise || p_mid), "strobe while idle");
    end
    // run for 8 periods
    run = 1'b1;
    #1;
    check(p_low, "p_low on first cycle of run");
    t0 = cyc; last_low = -1;
    n_low = 0; n_data = 0; n_rise = 0; n_mid = 0;
    repeat (8 * 125) begin
      int ph;
      ph = (cyc - t0) % 125;
      if (p_low)  begin n_low++;  check(ph == 0,  $sformatf("p_low at %0d", ph));
                    if (last_low >= 0) check(cyc - last_low == 125, "period 125 cycles");
                    last_low = cyc; end
      if (p_data) begin n_data++; check(ph == 32, $sformatf("p_data at %0d", ph)); end
      if (p_rise) begin n_rise++; check(ph == 65, $sformatf("p_rise at %0d", ph)); end
      if (p_mid)  begin n_mid++;  check(ph == 95, $sformatf("p_mid at %0d", ph)); end
      @(negedge clk);
    end
    check(n_low == 8 && n_data == 8 && n_rise == 8 && n_mid == 8, "one strobe each per period");
    // keep running until the 20 kHz instance has completed two periods
    repeat (3 * 2500) @(negedge clk);
    check(q_periods >= 2, "20 kHz instance ran");
    check(h_periods >= 10, "100 kHz instance ran");
    // stop mid-period and restart
    repeat (40) @(negedge clk);
    run = 1'b0;
    @(negedge clk);
    check(!(p_low || p_data || p_rise || p_mid), "no strobe after run drops");
    run = 1'b1;
    #1;
    check(p_low, "restart begins with p_low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
