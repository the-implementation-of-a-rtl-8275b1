// i2c_slave_rx: I2C slave receiver (write-only) of the function generator.
//
// SCL and SDA are oversampled by the system clock through two-flop
// synchronisers, so the block works in standard (100 kbit/s) and fast
// (400 kbit/s) mode for any system clock well above 4 MHz.  A START (SDA
// falling while SCL is high, repeated START included) opens a transfer and
// a STOP (SDA rising while SCL is high) closes it.  Bits are sampled on SCL
// rising edges, MSB first.  The first byte is the 7-bit slave address plus
// the R/W bit: when the address equals `address` and R/W is 0 (write) the
// slave acknowledges by pulling SDA low (`sda_drive_low`) from the SCL
// falling edge after the 8th bit to the falling edge after the 9th;
// otherwise it ignores the bus until the next START.  The second byte is
// the sub-address of the configuration register and every following byte
// is a data byte: each is acknowledged, presented on `data` with its
// register number on `subaddress`, announced by a one-clock `data_wr`
// pulse, and the sub-address is incremented, so one transfer can load all
// registers.  `slave_ack` pulses once for every acknowledge given and
// `write_read` holds the R/W bit of the current transfer.
//
// `sda_drive_low` must drive an open-drain pad (SDA pulled low when 1).
// `reset` is synchronous and active high.  Protocol, address width and the
// sub-address/auto-increment format follow the generator's description;
// the oversampling implementation is this design's choice.
module i2c_slave_rx (
  input  logic       clk,
  input  logic       reset,
  input  logic       scl,
  input  logic       sda_in,
  input  logic [6:0] address,
  output logic       sda_drive_low,
  output logic [7:0] subaddress,
  output logic [7:0] data,
  output logic       data_wr,
  output logic       write_read,
  output logic       slave_ack
);

  logic scl_meta, scl_sync, scl_prev;
  logic sda_meta, sda_sync, sda_prev;
  logic start_cond, stop_cond, scl_rise, scl_fall;

  always_ff @(posedge clk) begin
    if (reset) begin
      {scl_meta, scl_sync, scl_prev} <= '1;
      {sda_meta, sda_sync, sda_prev} <= '1;
    end else begin
      scl_meta <= scl;    scl_sync <= scl_meta;  scl_prev <= scl_sync;
      sda_meta <= sda_in; sda_sync <= sda_meta;  sda_prev <= sda_sync;
    end
  end

  assign start_cond = scl_sync & scl_prev & sda_prev & ~sda_sync;
  assign stop_cond  = scl_sync & scl_prev & ~sda_prev & sda_sync;
  assign scl_rise   = scl_sync & ~scl_prev;
  assign scl_fall   = ~scl_sync & scl_prev;

  logic       busy, ack_slot;
  logic [3:0] bitcnt;
  logic [1:0] byte_idx;     // 0: address, 1: sub-address, 2: data
  logic [7:0] shreg, sub_cnt;

  always_ff @(posedge clk) begin
    data_wr   <= 1'b0;
    slave_ack <= 1'b0;
    if (reset) begin
      busy          <= 1'b0;
      ack_slot      <= 1'b0;
      bitcnt        <= '0;
      byte_idx      <= '0;
      shreg         <= '0;
      sub_cnt       <= '0;
      sda_drive_low <= 1'b0;
      subaddress    <= '0;
      data          <= '0;
      write_read    <= 1'b0;
    end else if (start_cond) begin
      busy          <= 1'b1;
      ack_slot      <= 1'b0;
      bitcnt        <= '0;
      byte_idx      <= '0;
      sda_drive_low <= 1'b0;
    end else if (stop_cond) begin
      busy          <= 1'b0;
      ack_slot      <= 1'b0;
      sda_drive_low <= 1'b0;
    end else if (busy) begin
      if (scl_rise && bitcnt < 4'd8) begin
        shreg  <= {shreg[6:0], sda_sync};
        bitcnt <= bitcnt + 1'b1;
      end else if (scl_fall && ack_slot) begin
        // End of the acknowledge clock: release SDA, next byte.
        sda_drive_low <= 1'b0;
        ack_slot      <= 1'b0;
        bitcnt        <= '0;
        if (byte_idx != 2'd2) byte_idx <= byte_idx + 1'b1;
      end else if (scl_fall && bitcnt == 4'd8) begin
        unique case (byte_idx)
          2'd0: begin
            write_read <= shreg[0];
            if (shreg[7:1] == address && !shreg[0]) begin
              sda_drive_low <= 1'b1;
              ack_slot      <= 1'b1;
              slave_ack     <= 1'b1;
            end else begin
              busy <= 1'b0;           // not for us: wait for next START
            end
          end
          2'd1: begin
            sub_cnt       <= shreg;
            sda_drive_low <= 1'b1;
            ack_slot      <= 1'b1;
            slave_ack     <= 1'b1;
          end
          default: begin
            subaddress    <= sub_cnt;
            data          <= shreg;
            data_wr       <= 1'b1;
            sub_cnt       <= sub_cnt + 1'b1;
            sda_drive_low <= 1'b1;
            ack_slot      <= 1'b1;
            slave_ack     <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
