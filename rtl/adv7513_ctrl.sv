// Configuration sequencer and interrupt handler for the ADV7513.
//
// After reset, and again whenever cfg_start pulses, the controller walks
// the configuration table (adv7513_cfg_rom) from the first entry to the
// last and issues one I2C register write per entry.  When the last write
// is acknowledged cfg_done goes high.  A write that is not acknowledged
// stops the walk and raises cfg_error until the next walk begins.
//
// While idle it watches the transmitter's interrupt pin.  When the pin is
// active it handles the interrupt the way the transmitter's programming
// guide suggests for a hot-plug event:
//   1. read the interrupt register 0x96,
//   2. write the value back, which clears the flags that were set,
//   3. if the hot-plug flag (bit 7) was set, read the HPD state (0x42
//      bit 6) and, if the sink is present, walk the whole table again,
//      which powers the transmitter up and reloads the fixed registers.
// The other flags are cleared and otherwise ignored: EDID reading and
// HDCP are not part of this design.
//
// Interface: drives an i2c_master through cmd/rsp (see adv7513_pkg).
// irq_n is asynchronous and passes a two-flop synchronizer; INT_ACTIVE_LOW
// selects its polarity.  hpd_state is the last HPD bit read.
//
// The table, the bus address and the re-configuration on hot-plug follow
// the board notes; the abort-on-NACK rule, the cfg_start input and the
// interrupt polarity are this design's choices.
module adv7513_ctrl
  import adv7513_pkg::*;
#(
  parameter logic [6:0]  DEV_ADDR       = ADV7513_MAIN_ADDR,
  parameter bit          INT_ACTIVE_LOW = 1'b1,
  parameter logic [19:0] N_VALUE        = 20'd4576,
  parameter logic [19:0] CTS_VALUE      = 20'd28125
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_start,   // re-run the configuration table
  input  logic     irq_n,       // transmitter interrupt pin
  // to / from the I2C master
  output logic     cmd_valid,
  input  logic     cmd_ready,
  output i2c_cmd_t cmd,
  input  logic     rsp_valid,
  input  i2c_rsp_t rsp,
  // status
  output logic     cfg_done,
  output logic     cfg_error,
  output logic     hpd_state,
  output logic     busy
);

  typedef enum logic [3:0] {
    ST_CFG_REQ, ST_CFG_WAIT,
    ST_IDLE,
    ST_IRQ_RD_REQ,  ST_IRQ_RD_WAIT,
    ST_IRQ_CLR_REQ, ST_IRQ_CLR_WAIT,
    ST_HPD_RD_REQ,  ST_HPD_RD_WAIT
  } state_e;

  state_e     state;
  logic [4:0] idx;
  logic [7:0] int_flags;
  reg_write_t entry;
  logic [1:0] irq_sync;

  adv7513_cfg_rom #(.N_VALUE(N_VALUE), .CTS_VALUE(CTS_VALUE)) u_rom (
    .idx, .entry
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq_sync <= {2{INT_ACTIVE_LOW}};
    else        irq_sync <= {irq_sync[0], irq_n};
  end

  wire irq_active = INT_ACTIVE_LOW ? !irq_sync[1] : irq_sync[1];

  // Command for the current state; held steady until accepted.
  always_comb begin
    cmd       = '0;
    cmd.dev   = DEV_ADDR;
    cmd_valid = 1'b0;
    unique case (state)
      ST_CFG_REQ: begin
        cmd_valid    = 1'b1;
        cmd.reg_addr = entry.addr;
        cmd.wdata    = entry.data;
      end
      ST_IRQ_RD_REQ: begin
        cmd_valid    = 1'b1;
        cmd.rd       = 1'b1;
        cmd.reg_addr = REG_INT_STATUS;
      end
      ST_IRQ_CLR_REQ: begin
        cmd_valid    = 1'b1;
        cmd.reg_addr = REG_INT_STATUS;
        cmd.wdata    = int_flags;
      end
      ST_HPD_RD_REQ: begin
        cmd_valid    = 1'b1;
        cmd.rd       = 1'b1;
        cmd.reg_addr = REG_HPD_STATE;
      end
      default: ;
    endcase
  end

  assign busy = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_CFG_REQ;
      idx       <= '0;
      int_flags <= '0;
      cfg_done  <= 1'b0;
      cfg_error <= 1'b0;
      hpd_state <= 1'b0;
    end else begin
      unique case (state)
        ST_CFG_REQ:
          if (cmd_ready) state <= ST_CFG_WAIT;
        ST_CFG_WAIT:
          if (rsp_valid) begin
            if (rsp.nack) begin
              cfg_error <= 1'b1;
              state     <= ST_IDLE;
            end else if (idx == 5'(CFG_ENTRIES - 1)) begin
              cfg_done <= 1'b1;
              state    <= ST_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              state <= ST_CFG_REQ;
            end
          end
        ST_IDLE:
          if (cfg_start) begin
            idx       <= '0;
            cfg_done  <= 1'b0;
            cfg_error <= 1'b0;
            state     <= ST_CFG_REQ;
          end else if (irq_active) begin
            state <= ST_IRQ_RD_REQ;
          end
        ST_IRQ_RD_REQ:
          if (cmd_ready) state <= ST_IRQ_RD_WAIT;
        ST_IRQ_RD_WAIT:
          if (rsp_valid) begin
            int_flags <= rsp.rdata;
            state     <= rsp.nack ? ST_IDLE : ST_IRQ_CLR_REQ;
            if (rsp.nack) cfg_error <= 1'b1;
          end
        ST_IRQ_CLR_REQ:
          if (cmd_ready) state <= ST_IRQ_CLR_WAIT;
        ST_IRQ_CLR_WAIT:
          if (rsp_valid) begin
            if (rsp.nack) begin
              cfg_error <= 1'b1;
              state     <= ST_IDLE;
            end else if (int_flags[INT_HPD_BIT]) begin
              state <= ST_HPD_RD_REQ;
            end else begin
              state <= ST_IDLE;
            end
          end
        ST_HPD_RD_REQ:
          if (cmd_ready) state <= ST_HPD_RD_WAIT;
        ST_HPD_RD_WAIT:
          if (rsp_valid) begin
            if (rsp.nack) begin
              cfg_error <= 1'b1;
              state     <= ST_IDLE;
            end else begin
              hpd_state <= rsp.rdata[HPD_STATE_BIT];
              if (rsp.rdata[HPD_STATE_BIT]) begin
                idx       <= '0;
                cfg_done  <= 1'b0;
                cfg_error <= 1'b0;
                state     <= ST_CFG_REQ;
              end else begin
                state <= ST_IDLE;
              end
            end
          end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A request stays valid, with the same contents, until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cmd_valid && !cmd_ready) |=> (cmd_valid && $stable(cmd)));

endmodule
