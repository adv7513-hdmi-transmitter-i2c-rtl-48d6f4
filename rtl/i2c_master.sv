// Single-register I2C master for the ADV7513 register map.
//
// One command moves one register.  A write is
//   START, dev+W, ACK, reg, ACK, data, ACK, STOP
// and a read uses the combined format with a repeated START:
//   START, dev+W, ACK, reg, ACK, Sr, dev+R, ACK, data, NACK, STOP.
// If the device does not acknowledge a byte the transfer ends with a
// STOP at once and the response carries nack = 1.
//
// The bus is open-drain: scl_oe / sda_oe = 1 pull the line low and 0
// releases it to the pull-up.  SDA is read back through a two-flop
// synchronizer.  Every bit, START, repeated START and STOP takes one SCL
// period from i2c_scl_gen (DIV clock cycles, 2.5 us at the default
// 400 kHz).  A write therefore lasts 29 periods and a read 39 periods,
// plus a few cycles.  A START from an idle bus keeps SCL high for its
// whole slot; the other slots pull SCL low first.
//
// Interface: cmd is taken when cmd_valid and cmd_ready are both high;
// cmd_ready is high only while the bus is idle.  rsp_valid pulses for one
// cycle when the STOP has been sent.
//
// The message formats and the device address follow the board notes;
// the slot timing and the abort-on-NACK rule are this design's own.  SCL
// clock stretching is not supported (the notes do not mention it).
module i2c_master
  import adv7513_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 400_000
) (
  input  logic     clk,
  input  logic     rst_n,
  // command / response
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  i2c_cmd_t cmd,
  output logic     rsp_valid,
  output i2c_rsp_t rsp,
  // open-drain bus
  output logic     scl_oe,
  input  logic     sda_i,
  output logic     sda_oe
);

  typedef enum logic [3:0] {
    PH_IDLE, PH_START, PH_DEVW, PH_REG, PH_WDATA,
    PH_RSTART, PH_DEVR, PH_RDATA, PH_STOP
  } phase_e;

  phase_e     phase;
  i2c_cmd_t   cur;
  logic [3:0] bitn;      // 0..7 data bits (MSB first), 8 = acknowledge bit
  logic [7:0] shreg;     // byte being sent or received
  logic       nack;
  logic       from_idle; // current START slot began on an idle bus
  logic [1:0] sda_sync;
  logic       p_low, p_data, p_rise, p_mid;

  i2c_scl_gen #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_scl (
    .clk, .rst_n,
    .run   (phase != PH_IDLE),
    .p_low, .p_data, .p_rise, .p_mid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sda_sync <= 2'b11;
    else        sda_sync <= {sda_sync[0], sda_i};
  end

  wire sda_in = sda_sync[1];
  wire tx_phase = (phase == PH_DEVW) || (phase == PH_REG) ||
                  (phase == PH_WDATA) || (phase == PH_DEVR);

  assign cmd_ready = (phase == PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      cur       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      nack      <= 1'b0;
      from_idle <= 1'b0;
      scl_oe    <= 1'b0;
      sda_oe    <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          scl_oe <= 1'b0;
          sda_oe <= 1'b0;
          if (cmd_valid) begin
            cur       <= cmd;
            nack      <= 1'b0;
            from_idle <= 1'b1;
            phase     <= PH_START;
          end
        end

        PH_START, PH_RSTART: begin
          if (p_low && !from_idle) scl_oe <= 1'b1;
          if (p_data)              sda_oe <= 1'b0;
          if (p_rise)              scl_oe <= 1'b0;
          if (p_mid) begin
            sda_oe    <= 1'b1;                 // SDA falls while SCL high
            from_idle <= 1'b0;
            bitn      <= '0;
            if (phase == PH_START) begin
              shreg <= {cur.dev, 1'b0};
              phase <= PH_DEVW;
            end else begin
              shreg <= {cur.dev, 1'b1};
              phase <= PH_DEVR;
            end
          end
        end

        PH_DEVW, PH_REG, PH_WDATA, PH_DEVR, PH_RDATA: begin
          if (p_low) scl_oe <= 1'b1;
          if (p_data) begin
            if (tx_phase && bitn < 4'd8) sda_oe <= ~shreg[7];
            else                         sda_oe <= 1'b0;  // receive, or master NACK
          end
          if (p_rise) scl_oe <= 1'b0;
          if (p_mid) begin
            if (bitn < 4'd8) begin
              bitn  <= bitn + 1'b1;
              shreg <= tx_phase ? {shreg[6:0], 1'b0} : {shreg[6:0], sda_in};
            end else begin
              bitn <= '0;
              if (tx_phase && sda_in) begin
                nack  <= 1'b1;
                phase <= PH_STOP;
              end else begin
                unique case (phase)
                  PH_DEVW:  begin shreg <= cur.reg_addr; phase <= PH_REG; end
                  PH_REG:   if (cur.rd) phase <= PH_RSTART;
                            else begin shreg <= cur.wdata; phase <= PH_WDATA; end
                  PH_DEVR:  phase <= PH_RDATA;
                  default:  phase <= PH_STOP;  // PH_WDATA, PH_RDATA
                endcase
              end
            end
          end
        end

        PH_STOP: begin
          if (p_low)  scl_oe <= 1'b1;
          if (p_data) sda_oe <= 1'b1;
          if (p_rise) scl_oe <= 1'b0;
          if (p_mid) begin
            sda_oe     <= 1'b0;                // SDA rises while SCL high
            phase      <= PH_IDLE;
            rsp_valid  <= 1'b1;
            rsp.nack   <= nack;
            rsp.rdata  <= shreg;
          end
        end

        default: phase <= PH_IDLE;
      endcase
    end
  end

  // A command is only taken on an idle bus and always begins with a START.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cmd_valid && cmd_ready) |=> (phase == PH_START));

endmodule
