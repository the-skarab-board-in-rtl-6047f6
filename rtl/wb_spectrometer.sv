// wb_spectrometer: full-Stokes wideband spectrometer, 2048 channels over 1.4 GHz (2800 MS/s).
//
// Data path (one DSP clock domain, 175 MHz for 2800 MS/s; 16 real 12-bit samples per clock per
// polarisation from the ADC interface in bypass mode):
//   pfb_fir (14 taps) -> two fft_wideband_real (4096 points, 8 channels per clock)
//   -> stokes (XX, YY, Re XY*, Im XY*) -> vacc (32 lanes x 256 words, 64 bit)
//   -> bit_select (64 -> 32 bit) -> spec_snapshot (XX/YY host read-out)
//                                -> packet_trickler (to the 156.25 MHz Ethernet clock)
//   -> spead_packetizer (96-byte header) -> udp_framer (Ethernet/IPv4/UDP) -> tx_* stream
// plus an adc_rms level meter on each input. A spectrum (frame) takes 256 clocks; an
// integration of acc_len frames leaves as four 8192-byte packets, each with 512 consecutive
// channels x 4 products x 32 bits.
//
// Synchronisation: after 'arm' is raised, the next 'pps' pulse restarts the filter bank, FFT
// and integrator, so integrations start on the pulse; otherwise they run freely from reset.
// Counters: fft_ovf_count (saturating FFT results), clip_count (clipped requantised values),
// drops (integrations lost because the packet buffer was still busy).
module wb_spectrometer #(
  parameter int unsigned NFFT      = skarab_pkg::WB_NFFT,
  parameter int unsigned LANES     = skarab_pkg::WB_LANES,
  parameter int unsigned NTAPS     = skarab_pkg::WB_TAPS,
  parameter int unsigned IW        = skarab_pkg::ADC_W,
  parameter int unsigned PKT_WORDS = skarab_pkg::PKT_BYTES / 32
) (
  // DSP clock domain
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         arm,
  input  logic                         pps,
  input  logic                         adc_valid,
  input  logic signed [IW-1:0]         adc_x [LANES],
  input  logic signed [IW-1:0]         adc_y [LANES],
  input  logic                         coef_we,
  input  logic [$clog2(NTAPS)-1:0]     coef_tap,
  input  logic [$clog2(NFFT)-1:0]      coef_idx,
  input  logic signed [17:0]           coef_data,
  input  logic [$clog2(NFFT)-1:0]      fft_shift,
  input  logic [31:0]                  acc_len,
  input  logic [5:0]                   bs_shift,
  input  logic [$clog2(NFFT/LANES)-1:0] snap_addr,
  output logic [63:0]                  snap_data [LANES/2],
  output logic [31:0]                  snap_count,
  output logic [31:0]                  rms_x,
  output logic [31:0]                  rms_y,
  output logic [31:0]                  int_count,
  output logic [31:0]                  fft_ovf_count,
  output logic [31:0]                  clip_count,
  output logic [31:0]                  drops,
  output logic                         synced,
  // Ethernet clock domain
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
  localparam int unsigned NCH  = NFFT / 2;
  localparam int unsigned OCH  = LANES / 2;          // channels per clock
  localparam int unsigned VLEN = NFFT / LANES;       // clocks per spectrum
  localparam int unsigned VB   = $clog2(VLEN);
  localparam int unsigned NPKT = NCH * 128 / (256 * PKT_WORDS);
  localparam int unsigned W    = 18;

  // ---- PPS synchronisation ----
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

  // ---- level meters ----
  adc_rms #(.LANES(LANES), .W(IW), .INT_CLOCKS(65536)) u_rms_x (.clk, .rst, .in_data(adc_x), .rms_sum(rms_x), .rms_count());
  adc_rms #(.LANES(LANES), .W(IW), .INT_CLOCKS(65536)) u_rms_y (.clk, .rst, .in_data(adc_y), .rms_sum(rms_y), .rms_count());

  // ---- polyphase filter ----
  logic signed [IW-1:0] pfb_in  [2][LANES];
  logic signed [W-1:0]  pfb_out [2][LANES];
  logic                 pfb_v;
  always_comb for (int l = 0; l < int'(LANES); l++) begin pfb_in[0][l] = adc_x[l]; pfb_in[1][l] = adc_y[l]; end
  pfb_fir #(.NCH(2), .LANES(LANES), .NFFT(NFFT), .NTAPS(NTAPS), .IW(IW), .CW(18), .OW(W)) u_pfb (
    .clk, .rst, .sync, .coef_we, .coef_tap, .coef_idx, .coef_data,
    .in_valid(adc_valid), .in_data(pfb_in), .out_valid(pfb_v), .out_data(pfb_out));

  // ---- FFTs ----
  logic signed [W-1:0] fx_re [OCH], fx_im [OCH], fy_re [OCH], fy_im [OCH];
  logic fx_v, fy_v, fx_ovf, fy_ovf;
  logic [VB-1:0] fx_k1, fy_k1;
  fft_wideband_real #(.NFFT(NFFT), .LANES(LANES), .IW(W), .W(W)) u_fft_x (
    .clk, .rst(rst_dsp), .fft_shift, .in_valid(pfb_v), .in_data(pfb_out[0]),
    .out_valid(fx_v), .out_re(fx_re), .out_im(fx_im), .out_k1(fx_k1), .out_ovf(fx_ovf));
  fft_wideband_real #(.NFFT(NFFT), .LANES(LANES), .IW(W), .W(W)) u_fft_y (
    .clk, .rst(rst_dsp), .fft_shift, .in_valid(pfb_v), .in_data(pfb_out[1]),
    .out_valid(fy_v), .out_re(fy_re), .out_im(fy_im), .out_k1(fy_k1), .out_ovf(fy_ovf));

  // both polarisations run identical pipelines and must stay in step
  a_pol_aligned: assert property (@(posedge clk) disable iff (rst_dsp)
    (fx_v == fy_v) && (!fx_v || fx_k1 == fy_k1));

  // ---- correlation products ----
  logic st_v;
  logic signed [2*W:0] xx [OCH], yy [OCH], xyr [OCH], xyi [OCH];
  stokes #(.LANES(OCH), .W(W)) u_stokes (
    .clk, .rst(rst_dsp), .in_valid(fx_v), .xr(fx_re), .xi(fx_im), .yr(fy_re), .yi(fy_im),
    .out_valid(st_v), .xx, .yy, .xy_re(xyr), .xy_im(xyi));

  // ---- integration: lane 4*c + {0,1,2,3} = {XX, YY, Re, Im} of channel slot c ----
  logic signed [2*W:0] acc_in [4*OCH];
  always_comb for (int c = 0; c < int'(OCH); c++) begin
    acc_in[4*c] = xx[c]; acc_in[4*c+1] = yy[c]; acc_in[4*c+2] = xyr[c]; acc_in[4*c+3] = xyi[c];
  end
  logic acc_v;
  logic [VB-1:0] acc_a;
  logic signed [63:0] acc_out [4*OCH];
  vacc #(.LANES(4*OCH), .VLEN(VLEN), .IW(2*W+1), .ACC_W(64)) u_vacc (
    .clk, .rst, .sync, .acc_len, .in_valid(st_v), .in_data(acc_in),
    .out_valid(acc_v), .out_addr(acc_a), .out_data(acc_out), .out_count(int_count));

  // ---- requantisation ----
  logic bs_v, bs_clip;
  logic [VB-1:0] bs_a;
  logic [31:0] bs_out [4*OCH];
  bit_select #(.LANES(4*OCH), .IW(64), .OW(32), .AW(VB), .SIGNED_MASK({OCH{4'b0011}})) u_bs (
    .clk, .rst, .shift(bs_shift), .in_valid(acc_v), .in_addr(acc_a), .in_data(acc_out),
    .out_valid(bs_v), .out_addr(bs_a), .out_data(bs_out), .out_clip(bs_clip));

  // ---- XX/YY snapshot, stored at the channel's own index (k1 in natural order) ----
  logic [63:0] snap_in [OCH];
  always_comb for (int c = 0; c < int'(OCH); c++) snap_in[c] = {bs_out[4*c], bs_out[4*c+1]};
  spec_snapshot #(.LANES(OCH), .DEPTH(VLEN), .W(64)) u_snap (
    .clk, .rst, .in_valid(bs_v), .in_addr(VB'(skarab_pkg::bitrev(32'(bs_a), VB))), .in_data(snap_in),
    .rd_addr(snap_addr), .rd_data(snap_data), .snap_count);

  // ---- counters ----
  always_ff @(posedge clk) begin
    if (rst) begin
      fft_ovf_count <= '0; clip_count <= '0;
    end else begin
      if (fx_v && (fx_ovf || fy_ovf)) fft_ovf_count <= fft_ovf_count + 1'b1;
      if (bs_clip) clip_count <= clip_count + 1'b1;
    end
  end

  // ---- packet buffer: channel slot c at bits [(OCH-1-c)*128 +: 128] = {XX, YY, Re, Im} ----
  logic [OCH*128-1:0] tr_in;
  always_comb for (int c = 0; c < int'(OCH); c++)
    tr_in[(OCH-1-c)*128 +: 128] = {bs_out[4*c], bs_out[4*c+1], bs_out[4*c+2], bs_out[4*c+3]};

  logic tr_v, tr_sop, tr_eop, tr_rdy, tr_busy;
  logic [255:0] tr_d;
  logic [$clog2(NPKT)-1:0] tr_pkt;
  logic [31:0] heap_id;
  packet_trickler #(.NCH(NCH), .WR_CH(OCH), .CH_W(128), .RD_W(256), .PKT_WORDS(PKT_WORDS), .BITREV(1'b1)) u_trk (
    .wr_clk(clk), .wr_rst(rst), .in_valid(bs_v), .in_addr(bs_a), .in_data(tr_in), .drops,
    .rd_clk(eth_clk), .rd_rst(eth_rst), .pkt_delay, .out_ready(tr_rdy), .out_valid(tr_v),
    .out_data(tr_d), .out_sop(tr_sop), .out_eop(tr_eop), .out_pkt(tr_pkt), .heap_id, .busy_rd(tr_busy));

  // acc_len is a static register; it is passed to the header without resynchronisation
  logic sp_v, sp_sop, sp_eop, sp_rdy;
  logic [255:0] sp_d;
  spead_packetizer #(.NPKT(NPKT), .NCH(NCH), .PKT_BYTES(PKT_WORDS * 32)) u_spead (
    .clk(eth_clk), .rst(eth_rst), .heap_cnt(heap_id), .freq_scale, .acc_len, .timestamp,
    .in_valid(tr_v), .in_data(tr_d), .in_sop(tr_sop), .in_eop(tr_eop), .in_pkt(tr_pkt), .in_ready(tr_rdy),
    .out_valid(sp_v), .out_data(sp_d), .out_sop(sp_sop), .out_eop(sp_eop), .out_ready(sp_rdy));

  udp_framer #(.PAYLOAD_BYTES(PKT_WORDS * 32 + 96)) u_udp (
    .clk(eth_clk), .rst(eth_rst), .src_mac, .dst_mac, .src_ip, .dst_ip, .src_port, .dst_port,
    .in_valid(sp_v), .in_data(sp_d), .in_sop(sp_sop), .in_eop(sp_eop), .in_ready(sp_rdy),
    .out_valid(tx_valid), .out_data(tx_data), .out_sop(tx_sop), .out_eop(tx_eop), .out_bytes(tx_bytes),
    .out_ready(tx_ready), .pkt_count(tx_pkt_count));
endmodule
