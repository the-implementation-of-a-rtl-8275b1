// main_ctrl: configuration registers and modulation control.
//
// Holds the generator's configuration: two 32-bit frequency registers, two
// 10-bit phase-offset registers, an 8-bit amplitude register and a 5-bit
// work-mode register, all cleared by `reset` (synchronous, active high; the
// soft reset received over the UART is applied here too).
//
// Writes come from two interfaces:
//  * UART: when the data-ready flag `data_all[112]` rises, the whole
//    register set is loaded from the 113-bit packet register
//    (amplitude 111:104, frequency 1 103:72, frequency 2 71:40, phase 1
//    33:24, phase 2 17:8, work mode 4:0).  Loading on the rising edge means
//    a packet is applied once, and a packet that was already complete
//    before a reset is not re-applied.
//  * I2C: each `i2c_wr` pulse writes `i2c_data` to the register byte named
//    by `i2c_subaddress` (1 amplitude, 2-5 frequency 1 MSB first, 6-9
//    frequency 2, 10-11 phase 1, 12-13 phase 2, 14 work mode); other
//    sub-addresses are ignored.  The slave address handed to the I2C
//    receiver is the parameter I2C_ADDR.
//
// Register selection towards the DDS, per work mode (see fgen_pkg): bit 1
// picks frequency register 2, bit 0 phase register 2.  In FSK mode the
// synchronised external `fpsk_data` input picks the frequency register
// (0: register 1, 1: register 2) with phase register 1; in PSK mode it
// picks the phase register with frequency register 1.  The selected values
// are registered, so they follow `fpsk_data` three clocks later (two
// synchroniser flops and the output register).
//
// Register set, sub-address map, packet layout and modulation switching
// follow the generator's description; loading on the flag's rising edge,
// the synchroniser and the modulation mode codes are this design's choices.
module main_ctrl
  import fgen_pkg::*;
#(
  parameter logic [6:0] I2C_ADDR = 7'b1001100
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [DATA_ALL_W-1:0] data_all,
  input  logic                  fpsk_data,
  input  logic [7:0]            i2c_subaddress,
  input  logic [7:0]            i2c_data,
  input  logic                  i2c_wr,
  output logic [6:0]            i2c_address,
  output logic [FREQ_W-1:0]     freq_reg,
  output logic [PHASE_W-1:0]    phase_reg,
  output logic [AMP_W-1:0]      wave_amp,
  output mode_t                 work_mode
);

  cfg_t cfg;
  logic flag_prev, fpsk_meta, fpsk_sync;

  assign i2c_address = I2C_ADDR;
  assign wave_amp    = cfg.amplitude;
  assign work_mode   = cfg.mode;

  always_ff @(posedge clk) begin
    if (reset) begin
      cfg       <= '0;
      flag_prev <= 1'b1;
    end else begin
      flag_prev <= data_all[DATA_ALL_W-1];
      if (data_all[DATA_ALL_W-1] && !flag_prev) begin
        cfg.amplitude <= data_all[111:104];
        cfg.freq1     <= data_all[103:72];
        cfg.freq2     <= data_all[71:40];
        cfg.phase1    <= data_all[33:24];
        cfg.phase2    <= data_all[17:8];
        cfg.mode      <= data_all[4:0];
      end else if (i2c_wr) begin
        unique case (i2c_subaddress)
          8'd1:  cfg.amplitude    <= i2c_data;
          8'd2:  cfg.freq1[31:24] <= i2c_data;
          8'd3:  cfg.freq1[23:16] <= i2c_data;
          8'd4:  cfg.freq1[15:8]  <= i2c_data;
          8'd5:  cfg.freq1[7:0]   <= i2c_data;
          8'd6:  cfg.freq2[31:24] <= i2c_data;
          8'd7:  cfg.freq2[23:16] <= i2c_data;
          8'd8:  cfg.freq2[15:8]  <= i2c_data;
          8'd9:  cfg.freq2[7:0]   <= i2c_data;
          8'd10: cfg.phase1[9:8]  <= i2c_data[1:0];
          8'd11: cfg.phase1[7:0]  <= i2c_data;
          8'd12: cfg.phase2[9:8]  <= i2c_data[1:0];
          8'd13: cfg.phase2[7:0]  <= i2c_data;
          8'd14: cfg.mode         <= i2c_data[4:0];
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------ register selection
  always_ff @(posedge clk) begin
    if (reset) begin
      fpsk_meta <= 1'b0;
      fpsk_sync <= 1'b0;
      freq_reg  <= '0;
      phase_reg <= '0;
    end else begin
      fpsk_meta <= fpsk_data;
      fpsk_sync <= fpsk_meta;
      if (mode_is_fsk(cfg.mode)) begin
        freq_reg  <= fpsk_sync ? cfg.freq2 : cfg.freq1;
        phase_reg <= cfg.phase1;
      end else if (mode_is_psk(cfg.mode)) begin
        freq_reg  <= cfg.freq1;
        phase_reg <= fpsk_sync ? cfg.phase2 : cfg.phase1;
      end else begin
        freq_reg  <= cfg.mode[1] ? cfg.freq2  : cfg.freq1;
        phase_reg <= cfg.mode[0] ? cfg.phase2 : cfg.phase1;
      end
    end
  end

endmodule
