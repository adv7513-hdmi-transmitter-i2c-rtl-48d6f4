// Self-checking testbench for adv7513_cfg_rom with its default parameters.
//
// Compares all 24 entries with the register/value list of the board notes,
// written out here independently: the power-up sequence, the audio and
// video summary tables and the interrupt register.  The audio clock
// regeneration bytes are recomputed from N = 4576 and CTS = 28125
// (decimal), the 32 kHz values for a 25.2/1.001 MHz pixel clock.  Also
// checks that every register appears once only and that a second instance
// with other N / CTS places their bytes in 0x01-0x03 and 0x07-0x09.
module tb_adv7513_cfg_rom;
  import adv7513_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] idx;
  reg_write_t entry, entry2;

  adv7513_cfg_rom dut (.idx, .entry);
  adv7513_cfg_rom #(.N_VALUE(20'hABCDE), .CTS_VALUE(20'h12345)) dut2 (.idx, .entry(entry2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp_addr [24];
  logic [7:0] exp_data [24];
  logic [19:0] n, cts;
  int seen [256];

  initial begin
    n   = 20'd4576;
    cts = 20'd28125;
    exp_addr = '{8'h41, 8'h98, 8'h9A, 8'h9C, 8'h9D, 8'hA2, 8'hA3, 8'hE0, 8'hF9,
                 8'h01, 8'h02, 8'h03, 8'h07, 8'h08, 8'h09, 8'h0C, 8'h15, 8'h73,
                 8'h16, 8'hAF, 8'h55, 8'h56, 8'hBA, 8'h96};
    exp_data = '{8'h10, 8'h03, 8'hE0, 8'h30, 8'h61, 8'hA4, 8'hA4, 8'hD0, 8'h00,
                 8'(n >> 16), 8'(n >> 8), 8'(n), 8'(cts >> 16), 8'(cts >> 8), 8'(cts),
                 8'h84, 8'h30, 8'h01,
                 8'h30, 8'h16, 8'h10, 8'h18, 8'h60, 8'hF6};
    check(exp_data[9] == 8'h00 && exp_data[10] == 8'h11 && exp_data[11] == 8'hE0,
          "N bytes agree with the summary table");
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 24; i++) begin
      idx = 5'(i);
      #1;
      check(entry.addr == exp_addr[i],
            $sformatf("entry %0d addr %02h expected %02h", i, entry.addr, exp_addr[i]));
      check(entry.data == exp_data[i],
            $sformatf("entry %0d data %02h expected %02h", i, entry.data, exp_data[i]));
      seen[entry.addr]++;
    end
    foreach (seen[a]) if (seen[a] > 1) check(0, $sformatf("register %02h written twice", a));
    check(seen[8'h15] == 1, "0x15 written exactly once");
    // parameterised N / CTS
    idx = 5'd9;  #1 check(entry2.data == 8'h0A, "N[19:16]");
    idx = 5'd10; #1 check(entry2.data == 8'hBC, "N[15:8]");
    idx = 5'd11; #1 check(entry2.data == 8'hDE, "N[7:0]");
    idx = 5'd12; #1 check(entry2.data == 8'h01, "CTS[19:16]");
    idx = 5'd13; #1 check(entry2.data == 8'h23, "CTS[15:8]");
    idx = 5'd14; #1 check(entry2.data == 8'h45, "CTS[7:0]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
