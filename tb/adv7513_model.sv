// Behavioural model of the ADV7513 HDMI transmitter's I2C side, for
// simulation only (not synthesizable).
//
// An I2C slave with a 256-byte register map.  It answers at 7-bit address
// 0x39 (0x72/0x73) when pd_high is 0 and at 0x3D (0x7A/0x7B) when it is 1,
// as the PD/AD strap selects on the real part.  Writes auto-increment the
// register pointer; a read returns the register the pointer names.
//
// Side effects modelled:
//   - register 0x42 bit 6 follows the hpd pin;
//   - every change of hpd sets the hot-plug flag, 0x96 bit 7;
//   - writing 0x96 clears the flags written as 1;
//   - int_n is low while any 0x96 flag is set;
//   - when hpd falls the part powers down: 0x41 bit 6 is set and the
//     fixed-value registers lose their contents (read as 0xEE here).
// Reset values other than these are this model's own.
module adv7513_model (
  input  logic scl,
  input  logic sda,
  output logic sda_oe,      // 1 pulls SDA low
  output logic int_n,
  input  logic hpd,
  input  logic pd_high
);

  typedef enum {S_IDLE, S_ADDR, S_ACK_ADDR, S_REG, S_ACK_REG, S_WDATA,
                S_ACK_WDATA, S_RDATA, S_RACK} sstate_e;

  logic [7:0] regs [256];
  int         wr_count [256];
  int         starts, stops, writes, reads;
  sstate_e    st;
  int         bitcnt;
  logic [7:0] shreg, ptr, rbyte;
  logic       is_read;

  localparam logic [7:0] FIXED [8] = '{8'h98, 8'h9A, 8'h9C, 8'h9D,
                                       8'hA2, 8'hA3, 8'hE0, 8'hF9};

  function automatic logic [6:0] my_addr();
    return pd_high ? 7'h3D : 7'h39;
  endfunction

  task automatic power_down();
    regs[8'h41] = regs[8'h41] | 8'h40;
    foreach (FIXED[i]) regs[FIXED[i]] = 8'hEE;
  endtask

  task automatic reg_write(input logic [7:0] a, input logic [7:0] d);
    wr_count[a]++;
    writes++;
    if (a == 8'h96)      regs[a] = regs[a] & ~d;
    else if (a != 8'h42) regs[a] = d;
  endtask

  initial begin
    foreach (regs[i]) regs[i] = 8'h00;
    foreach (wr_count[i]) wr_count[i] = 0;
    starts = 0; stops = 0; writes = 0; reads = 0;
    st = S_IDLE; bitcnt = 0; shreg = 0; ptr = 0; rbyte = 0; is_read = 0;
    sda_oe = 1'b0;
    regs[8'h41] = 8'h50;
    power_down();
    regs[8'h42] = {1'b0, hpd, 6'h0};
  end

  // hot-plug pin
  always @(posedge hpd) begin
    regs[8'h42][6] = 1'b1;
    regs[8'h96][7] = 1'b1;
  end
  always @(negedge hpd) begin
    regs[8'h42][6] = 1'b0;
    regs[8'h96][7] = 1'b1;
    power_down();
  end

  always_comb int_n = (regs[8'h96] == 8'h00);

  // START / STOP
  always @(negedge sda) if (scl) begin
    starts++;
    st = S_ADDR; bitcnt = 0; sda_oe = 1'b0;
  end
  always @(posedge sda) if (scl) begin
    stops++;
    st = S_IDLE; sda_oe = 1'b0;
  end

  always @(posedge scl) begin
    unique case (st)
      S_ADDR, S_REG, S_WDATA: begin shreg = {shreg[6:0], sda}; bitcnt++; end
      S_RDATA: bitcnt++;
      S_RACK:  if (sda) st = S_IDLE;   // master NACK: wait for STOP
      default: ;
    endcase
  end

  always @(negedge scl) begin
    unique case (st)
      S_ADDR: if (bitcnt == 8) begin
        if (shreg[7:1] == my_addr()) begin
          is_read = shreg[0];
          sda_oe  = 1'b1;
          st      = S_ACK_ADDR;
        end else st = S_IDLE;
      end
      S_ACK_ADDR: begin
        bitcnt = 0;
        if (is_read) begin
          rbyte  = regs[ptr];
          reads++;
          sda_oe = ~rbyte[7];
          st     = S_RDATA;
        end else begin
          sda_oe = 1'b0;
          st     = S_REG;
        end
      end
      S_REG: if (bitcnt == 8) begin
        ptr = shreg; sda_oe = 1'b1; st = S_ACK_REG;
      end
      S_ACK_REG: begin sda_oe = 1'b0; bitcnt = 0; st = S_WDATA; end
      S_WDATA: if (bitcnt == 8) begin
        reg_write(ptr, shreg);
        ptr++;
        sda_oe = 1'b1; st = S_ACK_WDATA;
      end
      S_ACK_WDATA: begin sda_oe = 1'b0; bitcnt = 0; st = S_WDATA; end
      S_RDATA: begin
        if (bitcnt == 8) begin sda_oe = 1'b0; st = S_RACK; end
        else sda_oe = ~rbyte[7 - bitcnt];
      end
      S_RACK: begin
        ptr++;
        rbyte  = regs[ptr];
        reads++;
        bitcnt = 0;
        sda_oe = ~rbyte[7];
        st     = S_RDATA;
      end
      default: ;
    endcase
  end

endmodule
