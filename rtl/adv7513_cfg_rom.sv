// Configuration table of the ADV7513: which value goes into which
// register, in the order the sequencer writes them.
//
// Entries 0-8 are the mandatory power-up writes (power on through 0x41,
// then the fixed values the transmitter needs in 0x98, 0x9A, 0x9C, 0x9D,
// 0xA2, 0xA3, 0xE0 and 0xF9).  Entries 9-17 set up 32 kHz stereo I2S
// audio: the 20-bit audio clock regeneration values N (0x01-0x03) and CTS
// (0x07-0x09), I2S0 as the only enabled input (0x0C), the sampling
// frequency and input video format (0x15, shared by both) and the
// two-channel audio InfoFrame (0x73).  Entries 18-22 set up 24-bit RGB
// 4:4:4 video in HDMI mode (0x16, 0xAF, the AVI InfoFrame in 0x55/0x56,
// and the input clock delay 0xBA).  Entry 23 writes 0xF6 to the interrupt
// register 0x96 (hot-plug, monitor sense, Vsync, audio FIFO full, EDID
// ready and HDCP).  Register 0x15 is written once only.
//
// N and CTS are parameters and split into bytes here: the defaults are
// the recommended pair for 32 kHz audio at a 25.2/1.001 MHz pixel clock
// (N = 4576, CTS = 28125, both decimal).  The order of the writes within
// each group, and putting the interrupt write last, are this design's
// choice; all values are the board notes'.
//
// Purely combinational: entry = table[idx]; an index past the end reads
// as register 0xFF <- 0x00 and never occurs in use.
module adv7513_cfg_rom
  import adv7513_pkg::*;
#(
  parameter logic [19:0] N_VALUE     = 20'd4576,   // audio clock regeneration N
  parameter logic [19:0] CTS_VALUE   = 20'd28125,  // audio clock regeneration CTS
  parameter logic [3:0]  I2S_FS      = 4'b0011,    // 0x15[7:4]: 32.0 kHz
  parameter logic [3:0]  INPUT_ID    = 4'b0000,    // 0x15[3:0]: 24-bit RGB 4:4:4, separate syncs
  parameter logic [7:0]  VID_CLK_DLY = 8'h60       // 0xBA: input clock delay 0
) (
  input  logic [4:0] idx,
  output reg_write_t entry
);

  always_comb begin
    unique case (idx)
      // mandatory power-up sequence
      5'd0:  entry = '{8'h41, 8'h10};
      5'd1:  entry = '{8'h98, 8'h03};
      5'd2:  entry = '{8'h9A, 8'hE0};
      5'd3:  entry = '{8'h9C, 8'h30};
      5'd4:  entry = '{8'h9D, 8'h61};
      5'd5:  entry = '{8'hA2, 8'hA4};
      5'd6:  entry = '{8'hA3, 8'hA4};
      5'd7:  entry = '{8'hE0, 8'hD0};
      5'd8:  entry = '{8'hF9, 8'h00};
      // audio: N, CTS, I2S0 only, sampling frequency / input ID, channels
      5'd9:  entry = '{8'h01, {4'h0, N_VALUE[19:16]}};
      5'd10: entry = '{8'h02, N_VALUE[15:8]};
      5'd11: entry = '{8'h03, N_VALUE[7:0]};
      5'd12: entry = '{8'h07, {4'h0, CTS_VALUE[19:16]}};
      5'd13: entry = '{8'h08, CTS_VALUE[15:8]};
      5'd14: entry = '{8'h09, CTS_VALUE[7:0]};
      5'd15: entry = '{8'h0C, 8'h84};
      5'd16: entry = '{8'h15, {I2S_FS, INPUT_ID}};
      5'd17: entry = '{8'h73, 8'h01};
      // video: RGB 4:4:4 input, HDMI mode, AVI InfoFrame, clock delay
      5'd18: entry = '{8'h16, 8'h30};
      5'd19: entry = '{8'hAF, 8'h16};
      5'd20: entry = '{8'h55, 8'h10};
      5'd21: entry = '{8'h56, 8'h18};
      5'd22: entry = '{8'hBA, VID_CLK_DLY};
      // interrupts
      5'd23: entry = '{REG_INT_STATUS, INT_MASK_ALL};
      default: entry = '{8'hFF, 8'h00};
    endcase
  end

endmodule
