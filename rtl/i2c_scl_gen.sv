// SCL timing generator for the I2C bus engine.
//
// A free-running counter divides the system clock by DIV, so one SCL
// period lasts DIV clock cycles: 50 MHz / 125 = 400 kHz by default.  The
// counter is held at zero while `run` is low and starts a period on the
// first cycle `run` is high.  Within a period it raises four one-cycle
// strobes that the bus engine uses to move SCL and SDA:
//
//   p_low  at count 0         SCL is pulled low (start of the bit slot)
//   p_data at count RISE/2    SDA may change (middle of the low phase)
//   p_rise at count RISE      SCL is released
//   p_mid  at count RISE+(DIV-RISE)/2   SDA is sampled, or moved while SCL
//                             is high to form a START or STOP condition
//
// The low phase is RISE = 13*DIV/25 cycles and the high phase the rest.
// At DIV = 125 that is 65 and 60 cycles (1.3 us and 1.2 us), and the
// SDA move in the high phase falls 30 cycles (0.6 us) from either SCL
// edge, which meets the fast-mode minimum low time, high time and START
// setup/hold times.  The division by 125 is the board notes' figure; the
// phase split is this design's choice.
module i2c_scl_gen #(
  parameter int unsigned CLK_HZ = 50_000_000,  // system clock
  parameter int unsigned SCL_HZ = 400_000,     // SCL frequency
  parameter int unsigned DIV    = CLK_HZ / SCL_HZ
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic p_low,
  output logic p_data,
  output logic p_rise,
  output logic p_mid
);

  localparam int unsigned RISE = (DIV * 13) / 25;
  localparam int unsigned DATA = RISE / 2;
  localparam int unsigned MID  = RISE + (DIV - RISE) / 2;
  localparam int unsigned CW   = $clog2(DIV);

  initial begin
    assert (DIV >= 8) else $error("i2c_scl_gen: DIV must be at least 8");
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cnt <= '0;
    else if (!run)                       cnt <= '0;
    else if (cnt == CW'(DIV - 1))        cnt <= '0;
    else                                 cnt <= cnt + 1'b1;
  end

  always_comb begin
    p_low  = run && (cnt == CW'(0));
    p_data = run && (cnt == CW'(DATA));
    p_rise = run && (cnt == CW'(RISE));
    p_mid  = run && (cnt == CW'(MID));
  end

endmodule
