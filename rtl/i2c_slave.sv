// i2c_slave: the slow-control port, an I2C-like slave giving byte access to
// the register file.
//
// The bus has two open-drain lines pulled up off chip, SCL and SDA. The pad
// gives the line levels (scl_i, sda_i) and the slave only ever pulls SDA low
// (sda_oe=1). Both inputs are synchronised to clk and edge-detected, so clk
// must be several times faster than SCL. Several chips share one bus; each
// answers to the 7-bit device address {DEV_PREFIX, chip_addr}, chip_addr
// being 3 hard-wired pins.
//
// Transactions (bytes MSB first, every byte acknowledged by the receiver):
//   write: START, {dev, 0}, pointer high, pointer low, data, data, ... STOP
//          each data byte is written at the pointer, which then increments;
//   read:  START, {dev, 0}, pointer high, pointer low, repeated START,
//          {dev, 1}, then the slave sends the byte at the pointer and
//          increments it while the master acknowledges; a master NACK ends
//          the read.
// Register bus: reg_addr is the pointer, reg_wr pulses for one clk cycle with
// reg_wdata; reg_rdata is sampled when a byte to send is loaded.
//
// Follows the document: I2C-like bus with open-drain SDA/SCL, hard-wired
// 3-bit slave addresses, register read/write access. Own choices: the
// 4-bit address prefix, the 16-bit register pointer and oversampling on the
// chip clock. Clock stretching and general call are not supported.
module i2c_slave #(
  parameter logic [3:0] DEV_PREFIX = 4'b0100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  chip_addr,
  input  logic        scl_i,
  input  logic        sda_i,
  output logic        sda_oe,
  output logic [15:0] reg_addr,
  output logic        reg_wr,
  output logic [7:0]  reg_wdata,
  input  logic [7:0]  reg_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_ACK_ADDR, S_WR, S_ACK_WR, S_RD, S_ACK_RD
  } state_t;

  logic [2:0] scl_s, sda_s;   // synchronisers, [2] is the previous sample
  logic       scl_rise, scl_fall, start, stop, sda;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl_i};
      sda_s <= {sda_s[1:0], sda_i};
    end
  end

  assign sda      = sda_s[1];
  assign scl_rise =  scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] &&  scl_s[2];
  assign start    = scl_s[1] && scl_s[2] && !sda_s[1] &&  sda_s[2];
  assign stop     = scl_s[1] && scl_s[2] &&  sda_s[1] && !sda_s[2];

  state_t      state;
  logic [3:0]  bitcnt;
  logic [7:0]  shreg;
  logic [7:0]  tx;
  logic        rw;
  logic [1:0]  byte_idx;      // bytes received in this write, saturating at 2
  logic        m_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bitcnt    <= '0;
      shreg     <= '0;
      tx        <= '0;
      rw        <= 1'b0;
      byte_idx  <= '0;
      m_ack     <= 1'b0;
      sda_oe    <= 1'b0;
      reg_addr  <= '0;
      reg_wr    <= 1'b0;
      reg_wdata <= '0;
    end else begin
      reg_wr <= 1'b0;
      if (start) begin
        state    <= S_ADDR;
        bitcnt   <= '0;
        byte_idx <= '0;
        sda_oe   <= 1'b0;
      end else if (stop) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        case (state)
          S_IDLE: ;
          S_ADDR: begin
            if (scl_rise) begin
              shreg  <= {shreg[6:0], sda};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              if (shreg[7:1] == {DEV_PREFIX, chip_addr}) begin
                sda_oe <= 1'b1;
                rw     <= shreg[0];
                state  <= S_ACK_ADDR;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          S_ACK_ADDR: if (scl_fall) begin
            bitcnt <= '0;
            if (rw) begin
              tx       <= reg_rdata;
              sda_oe   <= !reg_rdata[7];
              reg_addr <= reg_addr + 1'b1;
              state    <= S_RD;
            end else begin
              sda_oe <= 1'b0;
              state  <= S_WR;
            end
          end
          S_WR: begin
            if (scl_rise) begin
              shreg  <= {shreg[6:0], sda};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              sda_oe <= 1'b1;
              state  <= S_ACK_WR;
              case (byte_idx)
                2'd0: reg_addr[15:8] <= shreg;
                2'd1: reg_addr[7:0]  <= shreg;
                default: begin
                  reg_wr    <= 1'b1;
                  reg_wdata <= shreg;
                end
              endcase
              if (byte_idx != 2'd2) byte_idx <= byte_idx + 1'b1;
            end
          end
          S_ACK_WR: begin
            if (reg_wr) reg_addr <= reg_addr + 1'b1;   // after the write is taken
            if (scl_fall) begin
              sda_oe <= 1'b0;
              bitcnt <= '0;
              state  <= S_WR;
            end
          end
          S_RD: if (scl_fall) begin
            bitcnt <= bitcnt + 1'b1;
            tx     <= {tx[6:0], 1'b0};
            if (bitcnt == 4'd7) begin
              sda_oe <= 1'b0;
              state  <= S_ACK_RD;
            end else begin
              sda_oe <= !tx[6];
            end
          end
          S_ACK_RD: begin
            if (scl_rise) m_ack <= !sda;
            else if (scl_fall) begin
              if (m_ack) begin
                tx       <= reg_rdata;
                sda_oe   <= !reg_rdata[7];
                reg_addr <= reg_addr + 1'b1;
                bitcnt   <= '0;
                state    <= S_RD;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
