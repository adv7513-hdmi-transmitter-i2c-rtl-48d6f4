// ADV7513 HDMI transmitter configurator for the DE10-Nano board.
//
// The HDMI transmitter on the board powers up unconfigured: before it
// sends video and audio, its register map must be written over I2C.  This
// top connects the configuration sequencer / interrupt handler
// (adv7513_ctrl) to a single-register I2C master (i2c_master) whose SCL
// runs at CLK_HZ / SCL_HZ = 50 MHz / 125 = 400 kHz.  After reset it writes
// the 24-entry table (power-up, 32 kHz I2S audio, 24-bit RGB HDMI video,
// interrupt register), then waits on the transmitter's interrupt pin and
// re-runs the table whenever a hot-plug interrupt finds a sink attached.
//
// Pins: the two I2C lines are open-drain.  *_oe = 1 pulls the line low;
// at the FPGA pad, line = oe ? 0 : 'z, and *_i is the pad's input.  irq_n
// is the transmitter's INT pin.  cfg_done, cfg_error, hpd_state and busy
// are status for the rest of the FPGA design or for LEDs.
//
// The bus address 0x72 (pull-down on the PD/AD strap), the register table,
// the 400 kHz rate and the hot-plug re-configuration follow the board
// notes.  The status outputs and cfg_start are this design's additions.
module adv7513_hdmi_cfg
  import adv7513_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 50_000_000,
  parameter int unsigned SCL_HZ         = 400_000,
  parameter logic [6:0]  DEV_ADDR       = ADV7513_MAIN_ADDR,
  parameter bit          INT_ACTIVE_LOW = 1'b1,
  parameter logic [19:0] N_VALUE        = 20'd4576,
  parameter logic [19:0] CTS_VALUE      = 20'd28125
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_start,
  // ADV7513 I2C bus (open-drain)
  output logic hdmi_i2c_scl_oe,
  input  logic hdmi_i2c_sda_i,
  output logic hdmi_i2c_sda_oe,
  // ADV7513 interrupt pin
  input  logic hdmi_tx_int,
  // status
  output logic cfg_done,
  output logic cfg_error,
  output logic hpd_state,
  output logic busy
);

  logic     cmd_valid, cmd_ready, rsp_valid;
  i2c_cmd_t cmd;
  i2c_rsp_t rsp;

  adv7513_ctrl #(
    .DEV_ADDR(DEV_ADDR), .INT_ACTIVE_LOW(INT_ACTIVE_LOW),
    .N_VALUE(N_VALUE), .CTS_VALUE(CTS_VALUE)
  ) u_ctrl (
    .clk, .rst_n, .cfg_start,
    .irq_n (hdmi_tx_int),
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp,
    .cfg_done, .cfg_error, .hpd_state, .busy
  );

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_i2c (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp,
    .scl_oe (hdmi_i2c_scl_oe),
    .sda_i  (hdmi_i2c_sda_i),
    .sda_oe (hdmi_i2c_sda_oe)
  );

endmodule
