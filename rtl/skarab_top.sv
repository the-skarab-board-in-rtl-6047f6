// skarab_top: the two spectrometer personalities of the SKARAB board side by side, with the
// noise-calibration driver for the ADC board's general-purpose connector.
//
//   wb_*  full-Stokes wideband spectrometer: 2 x 16 real 12-bit samples per 175 MHz clock
//         (2800 MS/s bypass mode), 2048 channels, XX/YY/Re XY*/Im XY*, four 8192-byte UDP
//         packets per integration.
//   nb_*  narrowband spectrometer: bursts of complex 16-bit DDC samples for two signals at
//         187.5 MHz (decimation 16 or 32), 65536 channels, XX/YY, 64 packets per integration.
//   cal_* noise-injection drive.
// On the board only one personality is loaded at a time, and each sends on one 40 GbE port;
// here both are brought out in full. The ADC chips and their interface, the 40 GbE MAC and
// transceivers, the Hybrid Memory Cube and the control processor are outside this RTL: their
// sides of the connections are the ports below. Both designs share the Ethernet clock
// (156.25 MHz) and the network address registers; each has its own destination port.
module skarab_top #(
  parameter int unsigned WB_NFFT  = skarab_pkg::WB_NFFT,
  parameter int unsigned WB_LANES = skarab_pkg::WB_LANES,
  parameter int unsigned WB_TAPS  = skarab_pkg::WB_TAPS,
  parameter int unsigned NB_NFFT  = skarab_pkg::NB_NFFT,
  parameter int unsigned NB_TAPS  = skarab_pkg::NB_TAPS
) (
  // ---- wideband spectrometer, DSP clock ----
  input  logic                            wb_clk,
  input  logic                            wb_rst,
  input  logic                            wb_arm,
  input  logic                            wb_pps,
  input  logic                            wb_adc_valid,
  input  logic signed [11:0]              wb_adc_x [WB_LANES],
  input  logic signed [11:0]              wb_adc_y [WB_LANES],
  input  logic                            wb_coef_we,
  input  logic [$clog2(WB_TAPS)-1:0]      wb_coef_tap,
  input  logic [$clog2(WB_NFFT)-1:0]      wb_coef_idx,
  input  logic signed [17:0]              wb_coef_data,
  input  logic [$clog2(WB_NFFT)-1:0]      wb_fft_shift,
  input  logic [31:0]                     wb_acc_len,
  input  logic [5:0]                      wb_bs_shift,
  input  logic [$clog2(WB_NFFT/WB_LANES)-1:0] wb_snap_addr,
  output logic [63:0]                     wb_snap_data [WB_LANES/2],
  output logic [31:0]                     wb_snap_count,
  output logic [31:0]                     wb_rms_x,
  output logic [31:0]                     wb_rms_y,
  output logic [31:0]                     wb_int_count,
  output logic [31:0]                     wb_fft_ovf_count,
  output logic [31:0]                     wb_clip_count,
  output logic [31:0]                     wb_drops,
  output logic                            wb_synced,
  // ---- narrowband spectrometer, DSP clock ----
  input  logic                            nb_clk,
  input  logic                            nb_rst,
  input  logic                            nb_arm,
  input  logic                            nb_pps,
  input  logic                            nb_ddc_valid,
  input  logic [2:0]                      nb_ddc_count,
  input  logic signed [15:0]              nb_ddc_re [2][4],
  input  logic signed [15:0]              nb_ddc_im [2][4],
  input  logic                            nb_coef_we,
  input  logic [$clog2(NB_TAPS)-1:0]      nb_coef_tap,
  input  logic [$clog2(NB_NFFT)-1:0]      nb_coef_idx,
  input  logic signed [17:0]              nb_coef_data,
  input  logic [$clog2(NB_NFFT)-1:0]      nb_fft_shift,
  input  logic [31:0]                     nb_acc_len,
  input  logic [5:0]                      nb_bs_shift,
  input  logic [$clog2(NB_NFFT)-1:0]      nb_snap_addr,
  output logic [31:0]                     nb_snap_data [2],
  output logic [31:0]                     nb_snap_count,
  output logic [31:0]                     nb_int_count,
  output logic [31:0]                     nb_fft_ovf_count,
  output logic [31:0]                     nb_clip_count,
  output logic [31:0]                     nb_drops,
  output logic                            nb_ser_overflow,
  output logic                            nb_synced,
  // ---- noise calibration (wideband DSP clock) ----
  input  logic                            cal_enable,
  input  logic                            cal_external,
  input  logic [31:0]                     cal_period,
  input  logic [31:0]                     cal_on_time,
  input  logic                            cal_ext,
  output logic                            cal_out,
  output logic [31:0]                     cal_edges,
  // ---- Ethernet side ----
  input  logic                            eth_clk,
  input  logic                            eth_rst,
  input  logic [31:0]                     wb_pkt_delay,
  input  logic [31:0]                     nb_pkt_delay,
  input  logic [47:0]                     wb_freq_scale,
  input  logic [47:0]                     nb_freq_scale,
  input  logic [47:0]                     timestamp,
  input  logic [47:0]                     src_mac,
  input  logic [47:0]                     dst_mac,
  input  logic [31:0]                     src_ip,
  input  logic [31:0]                     dst_ip,
  input  logic [15:0]                     src_port,
  input  logic [15:0]                     wb_dst_port,
  input  logic [15:0]                     nb_dst_port,
  output logic                            wb_tx_valid,
  output logic [255:0]                    wb_tx_data,
  output logic                            wb_tx_sop,
  output logic                            wb_tx_eop,
  output logic [5:0]                      wb_tx_bytes,
  input  logic                            wb_tx_ready,
  output logic [15:0]                     wb_tx_pkt_count,
  output logic                            nb_tx_valid,
  output logic [255:0]                    nb_tx_data,
  output logic                            nb_tx_sop,
  output logic                            nb_tx_eop,
  output logic [5:0]                      nb_tx_bytes,
  input  logic                            nb_tx_ready,
  output logic [15:0]                     nb_tx_pkt_count
);
  wb_spectrometer #(.NFFT(WB_NFFT), .LANES(WB_LANES), .NTAPS(WB_TAPS)) u_wb (
    .clk(wb_clk), .rst(wb_rst), .arm(wb_arm), .pps(wb_pps), .adc_valid(wb_adc_valid),
    .adc_x(wb_adc_x), .adc_y(wb_adc_y),
    .coef_we(wb_coef_we), .coef_tap(wb_coef_tap), .coef_idx(wb_coef_idx), .coef_data(wb_coef_data),
    .fft_shift(wb_fft_shift), .acc_len(wb_acc_len), .bs_shift(wb_bs_shift),
    .snap_addr(wb_snap_addr), .snap_data(wb_snap_data), .snap_count(wb_snap_count),
    .rms_x(wb_rms_x), .rms_y(wb_rms_y), .int_count(wb_int_count), .fft_ovf_count(wb_fft_ovf_count),
    .clip_count(wb_clip_count), .drops(wb_drops), .synced(wb_synced),
    .eth_clk, .eth_rst, .pkt_delay(wb_pkt_delay), .freq_scale(wb_freq_scale), .timestamp,
    .src_mac, .dst_mac, .src_ip, .dst_ip, .src_port, .dst_port(wb_dst_port),
    .tx_valid(wb_tx_valid), .tx_data(wb_tx_data), .tx_sop(wb_tx_sop), .tx_eop(wb_tx_eop),
    .tx_bytes(wb_tx_bytes), .tx_ready(wb_tx_ready), .tx_pkt_count(wb_tx_pkt_count));

  nb_spectrometer #(.NFFT(NB_NFFT), .NTAPS(NB_TAPS)) u_nb (
    .clk(nb_clk), .rst(nb_rst), .arm(nb_arm), .pps(nb_pps),
    .ddc_valid(nb_ddc_valid), .ddc_count(nb_ddc_count), .ddc_re(nb_ddc_re), .ddc_im(nb_ddc_im),
    .coef_we(nb_coef_we), .coef_tap(nb_coef_tap), .coef_idx(nb_coef_idx), .coef_data(nb_coef_data),
    .fft_shift(nb_fft_shift), .acc_len(nb_acc_len), .bs_shift(nb_bs_shift),
    .snap_addr(nb_snap_addr), .snap_data(nb_snap_data), .snap_count(nb_snap_count),
    .int_count(nb_int_count), .fft_ovf_count(nb_fft_ovf_count), .clip_count(nb_clip_count),
    .drops(nb_drops), .ser_overflow(nb_ser_overflow), .synced(nb_synced),
    .eth_clk, .eth_rst, .pkt_delay(nb_pkt_delay), .freq_scale(nb_freq_scale), .timestamp,
    .src_mac, .dst_mac, .src_ip, .dst_ip, .src_port, .dst_port(nb_dst_port),
    .tx_valid(nb_tx_valid), .tx_data(nb_tx_data), .tx_sop(nb_tx_sop), .tx_eop(nb_tx_eop),
    .tx_bytes(nb_tx_bytes), .tx_ready(nb_tx_ready), .tx_pkt_count(nb_tx_pkt_count));

  noise_cal u_cal (
    .clk(wb_clk), .rst(wb_rst), .enable(cal_enable), .external(cal_external), .period(cal_period),
    .on_time(cal_on_time), .cal_ext, .cal_out, .cal_edges);
endmodule
