// End-to-end testbench for adv7513_hdmi_cfg with every parameter at its
// default (50 MHz clock, 400 kHz SCL, device 0x72, active-low interrupt).
//
// The configurator drives a behavioural ADV7513 (adv7513_model) over an
// open-drain I2C bus.  The test counts each mechanism of the design and
// fails if one never happens:
//   config     - the table is written after reset: afterwards every table
//                register holds its value and was written exactly once;
//                the walk takes 24 writes of 29 SCL periods (2.5 us each);
//   hpd_low    - unplugging raises the hot-plug interrupt; the controller
//                reads and clears 0x96, reads 0x42, finds no sink and
//                writes nothing more; the interrupt line returns high;
//   hpd_high   - plugging back in makes the controller re-run the table,
//                restoring the registers the transmitter lost on power-down;
//   other_irq  - a non-hot-plug flag is read and cleared only;
//   nack       - with the transmitter strapped to the other address the
//                first write is not acknowledged and cfg_error is raised;
//   restart    - cfg_start runs the table again once the address matches.
module tb_adv7513_hdmi_cfg;
  import adv7513_pkg::*;
  localparam int P = 125;

  logic clk = 1'b0, rst_n = 1'b0, cfg_start = 1'b0;
  logic scl_oe, sda_oe, s_sda_oe, int_n;
  logic hpd = 1'b1, pd_high = 1'b0;
  logic cfg_done, cfg_error, hpd_state, busy;
  wire scl = ~scl_oe;
  wire sda = ~(sda_oe | s_sda_oe);
  int checks = 0, failures = 0;
  int cyc = 0;

  adv7513_hdmi_cfg dut (
    .clk, .rst_n, .cfg_start,
    .hdmi_i2c_scl_oe (scl_oe),
    .hdmi_i2c_sda_i  (sda),
    .hdmi_i2c_sda_oe (sda_oe),
    .hdmi_tx_int     (int_n),
    .cfg_done, .cfg_error, .hpd_state, .busy
  );
  adv7513_model adv (.scl, .sda, .sda_oe(s_sda_oe), .int_n, .hpd, .pd_high);

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp_addr [24];
  logic [7:0] exp_data [24];
  initial begin
    exp_addr = '{8'h41, 8'h98, 8'h9A, 8'h9C, 8'h9D, 8'hA2, 8'hA3, 8'hE0, 8'hF9,
                 8'h01, 8'h02, 8'h03, 8'h07, 8'h08, 8'h09, 8'h0C, 8'h15, 8'h73,
                 8'h16, 8'hAF, 8'h55, 8'h56, 8'hBA, 8'h96};
    exp_data = '{8'h10, 8'h03, 8'hE0, 8'h30, 8'h61, 8'hA4, 8'hA4, 8'hD0, 8'h00,
                 8'h00, 8'h11, 8'hE0, 8'h00, 8'h6D, 8'hDD, 8'h84, 8'h30, 8'h01,
                 8'h30, 8'h16, 8'h10, 8'h18, 8'h60, 8'hF6};
  end

  // every table register holds its value (0x96 is write-1-to-clear and
  // reads 0 once the flags are cleared) and was written `times` times
  task automatic check_regs(input int times, input string tag);
    for (int i = 0; i < 24; i++) begin
      if (exp_addr[i] == 8'h96)
        check(adv.regs[8'h96] == 8'h00, {tag, ": interrupt flags cleared"});
      else
        check(adv.regs[exp_addr[i]] == exp_data[i],
              $sformatf("%s: reg %02h = %02h, expected %02h", tag, exp_addr[i],
                        adv.regs[exp_addr[i]], exp_data[i]));
      check(adv.wr_count[exp_addr[i]] == times,
            $sformatf("%s: reg %02h written %0d times, expected %0d", tag, exp_addr[i],
                      adv.wr_count[exp_addr[i]], times));
    end
  endtask

  task automatic wait_idle();
    repeat (5 * P) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (P) @(posedge clk);
  endtask

  int n_config = 0, n_hpd_low = 0, n_hpd_high = 0, n_other_irq = 0, n_nack = 0, n_restart = 0;

  initial begin
    int t0, t1, w0, r0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    t0 = cyc;

    // ---- configuration after reset ----
    while (!cfg_done && !cfg_error) @(posedge clk);
    t1 = cyc;
    check(cfg_done && !cfg_error, "configured after reset");
    // 24 writes of 29 SCL periods each, plus a few cycles per write
    check(t1 - t0 >= 24 * 29 * P - 24 * 40 && t1 - t0 <= 24 * 29 * P + 24 * 10,
          $sformatf("configuration took %0d cycles (%0d us)", t1 - t0, (t1 - t0) / 50));
    $display("configuration after reset: %0d cycles (%0d us)", t1 - t0, (t1 - t0) / 50);
    check_regs(1, "reset");
    check(adv.writes == 24 && adv.reads == 0, "only the 24 table writes");
    if (cfg_done && adv.regs[8'h41] == 8'h10) n_config++;
    wait_idle();
    check(int_n && !busy, "interrupt line idle after configuration");

    // ---- unplug ----
    w0 = adv.writes; r0 = adv.reads;
    hpd = 1'b0;
    wait_idle();
    check(int_n, "hot-plug interrupt cleared");
    check(!hpd_state, "hpd_state low");
    check(adv.reads == r0 + 2, $sformatf("two registers read (%0d)", adv.reads - r0));
    check(adv.writes == w0 + 1 && adv.wr_count[8'h96] == 2, "only 0x96 written (flag clear)");
    check(adv.regs[8'h98] == 8'hEE && adv.regs[8'h41][6], "transmitter left powered down");
    if (adv.writes == w0 + 1 && !hpd_state) n_hpd_low++;

    // ---- plug in ----
    w0 = adv.writes;
    hpd = 1'b1;
    wait_idle();
    check(hpd_state && cfg_done && !cfg_error, "re-configured after plug-in");
    check(adv.writes == w0 + 25, $sformatf("flag clear + 24 writes (%0d)", adv.writes - w0));
    check(adv.regs[8'h98] == 8'h03 && adv.regs[8'hF9] == 8'h00 && adv.regs[8'h41] == 8'h10,
          "fixed registers reloaded, powered up");
    check(int_n, "interrupt line idle");
    if (adv.writes == w0 + 25) n_hpd_high++;

    // ---- another interrupt source (Vsync) ----
    w0 = adv.writes; r0 = adv.reads;
    adv.regs[8'h96] = 8'h20;
    wait_idle();
    check(int_n && adv.reads == r0 + 1 && adv.writes == w0 + 1,
          "Vsync flag read and cleared, nothing else");
    if (int_n && adv.reads == r0 + 1) n_other_irq++;

    // ---- wrong strap: NACK ----
    pd_high = 1'b1;
    w0 = adv.writes;
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    wait_idle();
    check(cfg_error && !cfg_done, "cfg_error when the address is not acknowledged");
    check(adv.writes == w0, "nothing written at the wrong address");
    if (cfg_error) n_nack++;

    // ---- restart ----
    pd_high = 1'b0;
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    wait_idle();
    check(cfg_done && !cfg_error, "restart completes");
    check(adv.writes == w0 + 24, "24 writes on restart");
    for (int i = 0; i < 24; i++)
      if (exp_addr[i] != 8'h96)
        check(adv.regs[exp_addr[i]] == exp_data[i],
              $sformatf("restart: reg %02h = %02h", exp_addr[i], adv.regs[exp_addr[i]]));
    if (cfg_done) n_restart++;

    $display("mechanisms: config=%0d hpd_low=%0d hpd_high=%0d other_irq=%0d nack=%0d restart=%0d",
             n_config, n_hpd_low, n_hpd_high, n_other_irq, n_nack, n_restart);
    check(n_config > 0, "configuration after reset happened");
    check(n_hpd_low > 0, "hot-plug with no sink happened");
    check(n_hpd_high > 0, "hot-plug re-configuration happened");
    check(n_other_irq > 0, "non-HPD interrupt happened");
    check(n_nack > 0, "NACK abort happened");
    check(n_restart > 0, "cfg_start restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
