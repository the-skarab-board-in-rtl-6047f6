// nb_spectrometer: narrowband spectrometer, 65536 channels over 187.5 or 93.75 MHz.
//
// Data path (DSP clock 187.5 MHz; the ADC in DDC mode delivers bursts of up to four complex
// 16-bit samples per clock for each of two polarisations):
//   serializer_4to1 (bursts -> one complex sample per valid clock)
//   -> pfb_fir (4 taps, data-valid enable) -> two fft_r2sdf (65536 points, bit-reversed output)
//   -> autocorr (XX, YY) -> vacc (2 lanes x 65536 words, 64 bit, data-valid)
//   -> bit_select (64 -> 32 bit) -> spec_snapshot (two 65536 x 32-bit memories)
//                                -> packet_trickler (bit-reversed write address, 64 packets)
//   -> spead_packetizer -> udp_framer -> tx_* stream (156.25 MHz Ethernet clock)
// With decimation by 16 a sample is valid every clock; with decimation by 32 every other clock
// on average, and every stage advances only on valid samples. An integration leaves as 64
// packets of 8192 bytes, each with 1024 consecutive channels x {XX, YY} x 32 bits.
// arm/pps synchronisation and the counters are as in wb_spectrometer.
module nb_spectrometer #(
  parameter int unsigned NFFT      = skarab_pkg::NB_NFFT,
  parameter int unsigned NTAPS     = skarab_pkg::NB_TAPS,
  parameter int unsigned IW        = skarab_pkg::DDC_W,
  parameter int unsigned NPAR      = 4,
  parameter int unsigned PKT_WORDS = skarab_pkg::PKT_BYTES / 32
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         arm,
  input  logic                         pps,
  input  logic                         ddc_valid,
  input  logic [$clog2(NPAR):0]        ddc_count,
  input  logic signed [IW-1:0]         ddc_re [2][NPAR],
  input  logic signed [IW-1:0]         ddc_im [2][NPAR],
  input  logic                         coef_we,
  input  logic [$clog2(NTAPS)-1:0]     coef_tap,
  input  logic [$clog2(NFFT)-1:0]      coef_idx,
  input  logic signed [17:0]           coef_data,
  input  logic [$clog2(NFFT)-1:0]      fft_shift,
  input  logic [31:0]                  acc_len,
  input  logic [5:0]                   bs_shift,
  input  logic [$clog2(NFFT)-1:0]      snap_addr,
  output logic [31:0]                  snap_data [2],
  output logic [31:0]                  snap_count,
  output logic [31:0]                  int_count,
  output logic [31:0]                  fft_ovf_count,
  output logic [31:0]                  clip_count,
  output logic [31:0]                  drops,
  output logic                         ser_overflow,
  output logic                         synced,
  input  logic                         eth_clk,
  input  logic                         eth_rst,
  input  logic [31:0]                  pkt_delay,
  input  logic [47:0]                  freq_scale,
  input  logic [47:0]                  timestamp,
  input  logic [47:0]                  src_mac,
  input  logic [47:0]                  dst_mac,
  input  logic [31:0]                  src_ip,
  input  logic [31:0]                  dst_ip,
  input  logic [15:0]                  src_port,
  input  logic [15:0]                  dst_port,
  output logic                         tx_valid,
  output logic [255:0]                 tx_data,
  output logic                         tx_sop,
  output logic                         tx_eop,
  output logic [5:0]                   tx_bytes,
  input  logic                         tx_ready,
  output logic [15:0]                  tx_pkt_count
);
  localparam int unsigned NB   = $clog2(NFFT);
  localparam int unsigned NPKT = NFFT * 64 / (256 * PKT_WORDS);
  localparam int unsigned W    = 18;

  logic armed, sync;
  assign sync = armed && pps;
  always_ff @(posedge clk) begin
    if (rst) begin
      armed <= 1'b0; synced <= 1'b0;
    end else begin
      if (arm && !armed && !synced) armed <= 1'b1;
      if (sync) begin armed <= 1'b0; synced <= 1'b1; end
      if (!arm) synced <= 1'b0;
    end
  end
  logic rst_dsp;
  assign rst_dsp = rst || sync;

  // ---- serializer ----
  logic s_v;
  logic signed [IW-1:0] s_re [2], s_im [2];
  serializer_4to1 #(.NPAR(NPAR), .NSIG(2), .W(IW), .DEPTH(256)) u_ser (
    .clk, .rst, .in_valid(ddc_valid), .in_count(ddc_count), .in_re(ddc_re), .in_im(ddc_im),
    .out_valid(s_v), .out_re(s_re), .out_im(s_im), .overflow(ser_overflow));

  // ---- polyphase filter: streams {X re, X im, Y re, Y im}, one lane ----
  logic signed [IW-1:0] pfb_in  [4][1];
  logic signed [W-1:0]  pfb_out [4][1];
  logic pfb_v;
  assign pfb_in[0][0] = s_re[0];
  assign pfb_in[1][0] = s_im[0];
  assign pfb_in[2][0] = s_re[1];
  assign pfb_in[3][0] = s_im[1];
  pfb_fir #(.NCH(4), .LANES(1), .NFFT(NFFT), .NTAPS(NTAPS), .IW(IW), .CW(18), .OW(W)) u_pfb (
    .clk, .rst, .sync, .coef_we, .coef_tap, .coef_idx, .coef_data,
    .in_valid(s_v), .in_data(pfb_in), .out_valid(pfb_v), .out_data(pfb_out));

  // ---- FFTs ----
  logic fx_v, fy_v, fx_ovf, fy_ovf;
  logic signed [W-1:0] fx_re, fx_im, fy_re, fy_im;
  logic [NB-1:0] fx_idx, fy_idx;
  fft_r2sdf #(.N(NFFT), .W(W)) u_fft_x (
    .clk, .rst(rst_dsp), .fft_shift, .in_valid(pfb_v), .in_re(pfb_out[0][0]), .in_im(pfb_out[1][0]),
    .out_valid(fx_v), .out_re(fx_re), .out_im(fx_im), .out_idx(fx_idx), .out_ovf(fx_ovf));
  fft_r2sdf #(.N(NFFT), .W(W)) u_fft_y (
    .clk, .rst(rst_dsp), .fft_shift, .in_valid(pfb_v), .in_re(pfb_out[2][0]), .in_im(pfb_out[3][0]),
    .out_valid(fy_v), .out_re(fy_re), .out_im(fy_im), .out_idx(fy_idx), .out_ovf(fy_ovf));

  a_pol_aligned: assert property (@(posedge clk) disable iff (rst_dsp)
    (fx_v == fy_v) && (!fx_v || fx_idx == fy_idx));

  // ---- auto-correlation ----
  logic ac_v;
  logic signed [2*W:0] xx [1], yy [1];
  logic signed [W-1:0] axr [1], axi [1], ayr [1], ayi [1];
  assign axr[0] = fx_re; assign axi[0] = fx_im; assign ayr[0] = fy_re; assign ayi[0] = fy_im;
  autocorr #(.LANES(1), .W(W)) u_ac (
    .clk, .rst(rst_dsp), .in_valid(fx_v), .xr(axr), .xi(axi), .yr(ayr), .yi(ayi),
    .out_valid(ac_v), .xx, .yy);

  // ---- integration ----
  logic signed [2*W:0] acc_in [2];
  assign acc_in[0] = xx[0];
  assign acc_in[1] = yy[0];
  logic acc_v;
  logic [NB-1:0] acc_a;
  logic signed [63:0] acc_out [2];
  vacc #(.LANES(2), .VLEN(NFFT), .IW(2*W+1), .ACC_W(64)) u_vacc (
    .clk, .rst, .sync, .acc_len, .in_valid(ac_v), .in_data(acc_in),
    .out_valid(acc_v), .out_addr(acc_a), .out_data(acc_out), .out_count(int_count));

  logic bs_v, bs_clip;
  logic [NB-1:0] bs_a;
  logic [31:0] bs_out [2];
  bit_select #(.LANES(2), .IW(64), .OW(32), .AW(NB), .SIGNED_MASK(2'b00)) u_bs (
    .clk, .rst, .shift(bs_shift), .in_valid(acc_v), .in_addr(acc_a), .in_data(acc_out),
    .out_valid(bs_v), .out_addr(bs_a), .out_data(bs_out), .out_clip(bs_clip));

  spec_snapshot #(.LANES(2), .DEPTH(NFFT), .W(32)) u_snap (
    .clk, .rst, .in_valid(bs_v), .in_addr(NB'(skarab_pkg::bitrev(32'(bs_a), NB))), .in_data(bs_out),
    .rd_addr(snap_addr), .rd_data(snap_data), .snap_count);

  always_ff @(posedge clk) begin
    if (rst) begin
      fft_ovf_count <= '0; clip_count <= '0;
    end else begin
      if (fx_v && (fx_ovf || fy_ovf)) fft_ovf_count <= fft_ovf_count + 1'b1;
      if (bs_clip) clip_count <= clip_count + 1'b1;
    end
  end

  logic tr_v, tr_sop, tr_eop, tr_rdy, tr_busy;
  logic [255:0] tr_d;
  logic [$clog2(NPKT)-1:0] tr_pkt;
  logic [31:0] heap_id;
  packet_trickler #(.NCH(NFFT), .WR_CH(1), .CH_W(64), .RD_W(256), .PKT_WORDS(PKT_WORDS), .BITREV(1'b1)) u_trk (
    .wr_clk(clk), .wr_rst(rst), .in_valid(bs_v), .in_addr(bs_a), .in_data({bs_out[0], bs_out[1]}), .drops,
    .rd_clk(eth_clk), .rd_rst(eth_rst), .pkt_delay, .out_ready(tr_rdy), .out_valid(tr_v),
    .out_data(tr_d), .out_sop(tr_sop), .out_eop(tr_eop), .out_pkt(tr_pkt), .heap_id, .busy_rd(tr_busy));

  logic sp_v, sp_sop, sp_eop, sp_rdy;
  logic [255:0] sp_d;
  spead_packetizer #(.NPKT(NPKT), .NCH(NFFT), .PKT_BYTES(PKT_WORDS * 32)) u_spead (
    .clk(eth_clk), .rst(eth_rst), .heap_cnt(heap_id), .freq_scale, .acc_len, .timestamp,
    .in_valid(tr_v), .in_data(tr_d), .in_sop(tr_sop), .in_eop(tr_eop), .in_pkt(tr_pkt), .in_ready(tr_rdy),
    .out_valid(sp_v), .out_data(sp_d), .out_sop(sp_sop), .out_eop(sp_eop), .out_ready(sp_rdy));

  udp_framer #(.PAYLOAD_BYTES(PKT_WORDS * 32 + 96)) u_udp (
    .clk(eth_clk), .rst(eth_rst), .src_mac, .dst_mac, .src_ip, .dst_ip, .src_port, .dst_port,
    .in_valid(sp_v), .in_data(sp_d), .in_sop(sp_sop), .in_eop(sp_eop), .in_ready(sp_rdy),
    .out_valid(tx_valid), .out_data(tx_data), .out_sop(tx_sop), .out_eop(tx_eop), .out_bytes(tx_bytes),
    .out_ready(tx_ready), .pkt_count(tx_pkt_count));
endmodule
