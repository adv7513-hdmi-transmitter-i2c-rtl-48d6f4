// Self-checking testbench for adv7513_ctrl.
//
// The I2C master is replaced by a responder that takes each command after
// a random delay, answers it a few cycles later and keeps a register map,
// so every command the controller issues can be logged and checked.
//   1. After reset: the 24 table writes, in order, to device 0x39, then
//      cfg_done.
//   2. Hot-plug interrupt with the sink present: read 0x96, write the flags
//      back, read 0x42, then the whole table again.
//   3. Hot-plug interrupt with the sink gone: read, clear, read 0x42, no
//      writes after that; hpd_state drops.
//   4. Another interrupt (Vsync flag only): read and clear, no 0x42 read.
//   5. A NACK on the sixth write: the walk stops, cfg_error is raised;
//      cfg_start then runs the full table again and clears the error.
module tb_adv7513_ctrl;
  import adv7513_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, cfg_start = 1'b0, irq_n = 1'b1;
  logic cmd_valid, cmd_ready, rsp_valid;
  i2c_cmd_t cmd;
  i2c_rsp_t rsp;
  logic cfg_done, cfg_error, hpd_state, busy;
  int checks = 0, failures = 0;

  adv7513_ctrl dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (%0d commands logged)", log_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- responder ----
  logic [7:0] regs [256];
  i2c_cmd_t   log_q [$];
  int         nack_at = -1;    // index in log_q of a command to refuse
  logic       busy_r = 1'b0;
  assign cmd_ready = !busy_r;

  initial begin
    rsp_valid = 1'b0;
    rsp = '0;
    foreach (regs[i]) regs[i] = 8'h00;
    forever begin
      @(posedge clk);
      if (rst_n && cmd_valid && cmd_ready) begin
        i2c_cmd_t c;
        bit refuse;
        c = cmd;
        refuse = (log_q.size() == nack_at);
        log_q.push_back(c);
        busy_r <= 1'b1;
        repeat ($urandom_range(3, 12)) @(posedge clk);
        rsp_valid <= 1'b1;
        rsp.nack  <= refuse;
        rsp.rdata <= regs[c.reg_addr];
        if (!refuse && !c.rd) begin
          if (c.reg_addr == 8'h96) regs[8'h96] = regs[8'h96] & ~c.wdata;
          else                     regs[c.reg_addr] = c.wdata;
        end
        @(posedge clk);
        rsp_valid <= 1'b0;
        busy_r    <= 1'b0;
      end
    end
  end
  always_comb irq_n = (regs[8'h96] == 8'h00);

  // ---- expected table ----
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

  // checks that log_q[from +: 24] is the table
  task automatic check_table(input int from, input string tag);
    check(log_q.size() >= from + 24, $sformatf("%s: %0d commands", tag, log_q.size() - from));
    for (int i = 0; i < 24 && from + i < log_q.size(); i++) begin
      i2c_cmd_t c;
      c = log_q[from + i];
      check(!c.rd && c.dev == 7'h39 && c.reg_addr == exp_addr[i] && c.wdata == exp_data[i],
            $sformatf("%s entry %0d: rd=%0d dev=%02h %02h=%02h", tag, i, c.rd, c.dev,
                      c.reg_addr, c.wdata));
    end
  endtask

  task automatic check_cmd(input int i, input bit rd, input logic [7:0] ra,
                           input logic [7:0] wd, input string tag);
    check(i < log_q.size(), {tag, ": command issued"});
    if (i < log_q.size())
      check(log_q[i].rd == rd && log_q[i].dev == 7'h39 && log_q[i].reg_addr == ra &&
            (rd || log_q[i].wdata == wd),
            $sformatf("%s: rd=%0d %02h=%02h", tag, log_q[i].rd, log_q[i].reg_addr, log_q[i].wdata));
  endtask

  task automatic wait_idle();
    repeat (5) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int base;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 1. configuration after reset
    wait_idle();
    check(cfg_done && !cfg_error, "cfg_done after reset");
    check(log_q.size() == 24, $sformatf("24 writes after reset, got %0d", log_q.size()));
    check_table(0, "reset");

    // 2. hot-plug, sink present
    base = log_q.size();
    regs[8'h42] = 8'h40;
    regs[8'h96] = 8'h80;
    wait_idle();
    check_cmd(base + 0, 1'b1, 8'h96, 8'h00, "hpd-high read flags");
    check_cmd(base + 1, 1'b0, 8'h96, 8'h80, "hpd-high clear flags");
    check_cmd(base + 2, 1'b1, 8'h42, 8'h00, "hpd-high read state");
    check_table(base + 3, "hot-plug");
    check(log_q.size() == base + 27, "nothing else after re-configuration");
    check(hpd_state && cfg_done, "hpd_state and cfg_done high");

    // 3. hot-plug, sink removed
    base = log_q.size();
    regs[8'h42] = 8'h00;
    regs[8'h96] = 8'h80;
    wait_idle();
    check_cmd(base + 0, 1'b1, 8'h96, 8'h00, "hpd-low read flags");
    check_cmd(base + 1, 1'b0, 8'h96, 8'h80, "hpd-low clear flags");
    check_cmd(base + 2, 1'b1, 8'h42, 8'h00, "hpd-low read state");
    check(log_q.size() == base + 3, "no re-configuration without a sink");
    check(!hpd_state, "hpd_state low");

    // 4. other interrupt
    base = log_q.size();
    regs[8'h96] = 8'h20;
    wait_idle();
    check_cmd(base + 0, 1'b1, 8'h96, 8'h00, "vsync read flags");
    check_cmd(base + 1, 1'b0, 8'h96, 8'h20, "vsync clear flags");
    check(log_q.size() == base + 2, "no HPD read for a non-HPD interrupt");

    // 5. NACK during configuration, then restart
    base = log_q.size();
    nack_at = base + 5;
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    wait_idle();
    check(cfg_error && !cfg_done, "cfg_error after NACK");
    check(log_q.size() == base + 6, $sformatf("walk stops at the refused write (%0d)",
                                              log_q.size() - base));
    base = log_q.size();
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    wait_idle();
    check(cfg_done && !cfg_error, "restart completes");
    check_table(base, "restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
