// func_gen: DDS function generator with UART and I2C configuration.
//
// Generates sine, square, triangle and ramp samples (12-bit offset binary,
// one per clock) whose frequency, phase offset, amplitude and shape are set
// through either of two serial interfaces, with optional external trigger
// and external-data FSK/PSK modulation of a sine carrier.
//
// Structure:
//   uart_rx + uart_baudgen  receive 8N1 bytes on `uart_sin` at the rate set
//                           by `sel_baud` (1:1200 .. 6:38400 bps); a packet
//                           of header 90 + 14 bytes fills the 113-bit packet
//                           register, bytes 0x98 / 0x99 hold / release the
//                           soft reset.
//   i2c_slave_rx            slave address 1001100 (I2C_ADDR); a write of a
//                           sub-address followed by data bytes loads the
//                           registers one byte at a time.
//   main_ctrl               the register set, the packet load and the
//                           FSK/PSK switching on `fpsk_data`.
//   dds (+ dds_ram)         32-bit phase accumulator, 10-bit phase offset,
//                           quarter-wave sine table, trigger logic.
//   wave_logic              square/triangle/ramp from the table address,
//                           amplitude scaling, waveform mux, DAC clock.
// The D/A converter and the reconstruction filter are outside: connect
// `wave_out` and `sync_clk` (the inverted clock) to a 12-bit DAC.
//
// Resets: `reset` (synchronous, active high) resets everything.  The soft
// reset received over the UART resets the controller, the I2C receiver,
// the DDS and the waveform logic, i.e. it clears the configuration and
// stops the output, but leaves the UART path running so the release
// command can be received.  `sda_drive_low` drives the open-drain SDA pad;
// `sda_in` is the pad's input.  `ram_addr_out` and `max_output` are brought
// out for observation (table address and unscaled sine sample).
//
// Timing: with all registers loaded, the first sample leaves `wave_out` 5
// clocks after the first clock edge that sees `trigger` high (4 clocks to
// the DDS sine output, 1 for amplitude scaling).  CLK_HZ is the reference
// clock used for the baud rates (100 MHz by default).
module func_gen
  import fgen_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter logic [6:0]  I2C_ADDR = 7'b1001100
) (
  input  logic               clk,
  input  logic               reset,
  // UART
  input  logic               uart_sin,
  input  logic [3:0]         sel_baud,
  // I2C
  input  logic               scl,
  input  logic               sda_in,
  output logic               sda_drive_low,
  // trigger and modulation
  input  logic               trigger,
  input  logic               trig_enb,
  input  logic               fpsk_data,
  // to the DAC
  output logic [SAMP_W-1:0]  wave_out,
  output logic               sync_clk,
  // observation
  output logic [PHASE_W-1:0] ram_addr_out,
  output logic [SAMP_W-1:0]  max_output,
  output logic               soft_reset
);

  logic core_reset;
  assign core_reset = reset | soft_reset;

  // ------------------------------------------------------------- UART
  logic                  reset_uclk, uart_clk;
  logic [DATA_ALL_W-1:0] data_all;

  uart_baudgen #(.CLK_HZ(CLK_HZ)) u_baudgen (
    .clk        (clk),
    .sel_baud   (sel_baud),
    .reset_uclk (reset_uclk | reset),
    .uart_clk   (uart_clk)
  );

  uart_rx u_uart_rx (
    .clk        (clk),
    .reset      (reset),
    .uart_sin   (uart_sin),
    .uart_clk   (uart_clk),
    .reset_uclk (reset_uclk),
    .data_all   (data_all),
    .soft_reset (soft_reset)
  );

  // -------------------------------------------------------------- I2C
  logic [6:0] i2c_address;
  logic [7:0] i2c_subaddress, i2c_data;
  logic       i2c_wr, i2c_write_read, i2c_ack;

  i2c_slave_rx u_i2c (
    .clk           (clk),
    .reset         (core_reset),
    .scl           (scl),
    .sda_in        (sda_in),
    .address       (i2c_address),
    .sda_drive_low (sda_drive_low),
    .subaddress    (i2c_subaddress),
    .data          (i2c_data),
    .data_wr       (i2c_wr),
    .write_read    (i2c_write_read),
    .slave_ack     (i2c_ack)
  );

  // ------------------------------------------------------- controller
  logic [FREQ_W-1:0]  freq_reg;
  logic [PHASE_W-1:0] phase_reg;
  logic [AMP_W-1:0]   wave_amp;
  mode_t              work_mode;

  main_ctrl #(.I2C_ADDR(I2C_ADDR)) u_ctrl (
    .clk            (clk),
    .reset          (core_reset),
    .data_all       (data_all),
    .fpsk_data      (fpsk_data),
    .i2c_subaddress (i2c_subaddress),
    .i2c_data       (i2c_data),
    .i2c_wr         (i2c_wr),
    .i2c_address    (i2c_address),
    .freq_reg       (freq_reg),
    .phase_reg      (phase_reg),
    .wave_amp       (wave_amp),
    .work_mode      (work_mode)
  );

  // -------------------------------------------------------------- DDS
  logic sample_valid;

  dds u_dds (
    .clk          (clk),
    .reset        (core_reset),
    .freq_reg     (freq_reg),
    .phase_reg    (phase_reg),
    .trig_enb     (trig_enb),
    .trigger      (trigger),
    .max_output   (max_output),
    .ram_addr_out (ram_addr_out),
    .sample_valid (sample_valid)
  );

  // -------------------------------------------------- waveform logic
  wave_logic u_wave (
    .clk          (clk),
    .reset        (core_reset),
    .ram_addr_out (ram_addr_out),
    .max_output   (max_output),
    .sample_valid (sample_valid),
    .wave_amp     (wave_amp),
    .work_mode    (work_mode),
    .wave_out     (wave_out),
    .sync_clk     (sync_clk)
  );

endmodule
