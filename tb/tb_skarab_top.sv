// tb_skarab_top: end-to-end test of both spectrometers at full size (4096-point wideband,
// 65536-point narrowband), from ADC samples to UDP packets.
//
// The filter banks are loaded with a single non-zero tap (0.5 on the newest frame), which
// makes each channel an exact DFT bin, so results can be predicted in closed form:
//  * wideband: X = A cos(2 pi k0 n / 4096), Y = A sin(...) on 16 lanes. Channel k0 must hold
//    XX = YY = (32 A / 2)^2 * acc_len, Re XY* ~ 0, Im XY* = +XX, all other channels ~ 0.
//  * narrowband: complex tones at bin k1 in both signals (Y shifted by 90 degrees), fed as
//    DDC bursts of decimation 16 (42 words of 2 samples per 84 clocks) and then decimation 32
//    (21 words per 84 clocks). Channel k1 must hold (2 A)^2 * acc_len in XX and YY.
// A receiver model reassembles the Ethernet/IPv4/UDP/SPEAD packets (packet index from the
// SPEAD header) into spectra. Mechanisms that must each happen at least once and are counted:
// PPS synchronisation, filter priming, tx back-pressure, inter-packet delay, integrations
// dropped because the packet buffer was busy, requantiser clipping, FFT overflow, serializer
// continuous (decimation 16) and gappy (decimation 32) modes, spectrum snapshot read-out,
// level-meter update and noise-calibration edges.
module tb_skarab_top;
  timeunit 1ns; timeprecision 1ps;
  localparam int WN = 4096, WL = 16, WT = 14, NN = 65536, NT = 4;
  localparam int K0 = 300, K1 = 1000, AW = 1000, AN = 4000;

  logic wb_clk = 0, nb_clk = 0, eth_clk = 0;
  always #2.857 wb_clk = ~wb_clk;
  always #2.667 nb_clk = ~nb_clk;
  always #3.2   eth_clk = ~eth_clk;
  logic wb_rst = 1, nb_rst = 1, eth_rst = 1;

  logic wb_arm = 0, wb_pps = 0, wb_adc_valid = 0;
  logic signed [11:0] wb_adc_x [WL], wb_adc_y [WL];
  logic wb_coef_we = 0;
  logic [3:0] wb_coef_tap = 0;
  logic [11:0] wb_coef_idx = 0, wb_fft_shift = '1;
  logic signed [17:0] wb_coef_data = 0;
  logic [31:0] wb_acc_len = 4;
  logic [5:0] wb_bs_shift = 0;
  logic [7:0] wb_snap_addr = 0;
  logic [63:0] wb_snap_data [WL/2];
  logic [31:0] wb_snap_count, wb_rms_x, wb_rms_y, wb_int_count, wb_fft_ovf_count, wb_clip_count, wb_drops;
  logic wb_synced;

  logic nb_arm = 0, nb_pps = 0, nb_ddc_valid = 0;
  logic [2:0] nb_ddc_count = 0;
  logic signed [15:0] nb_ddc_re [2][4], nb_ddc_im [2][4];
  logic nb_coef_we = 0;
  logic [1:0] nb_coef_tap = 0;
  logic [15:0] nb_coef_idx = 0, nb_fft_shift = '1, nb_snap_addr = 0;
  logic signed [17:0] nb_coef_data = 0;
  logic [31:0] nb_acc_len = 2;
  logic [5:0] nb_bs_shift = 0;
  logic [31:0] nb_snap_data [2];
  logic [31:0] nb_snap_count, nb_int_count, nb_fft_ovf_count, nb_clip_count, nb_drops;
  logic nb_ser_overflow, nb_synced;

  logic cal_enable = 1, cal_external = 0, cal_ext = 0, cal_out;
  logic [31:0] cal_period = 1000, cal_on_time = 500, cal_edges;

  logic [31:0] wb_pkt_delay = 40, nb_pkt_delay = 40;
  logic [47:0] wb_freq_scale = 48'd1400000000, nb_freq_scale = 48'd187500000, timestamp = 0;
  logic [47:0] src_mac = 48'h02_00_00_00_00_01, dst_mac = 48'h02_00_00_00_00_02;
  logic [31:0] src_ip = 32'h0A000002, dst_ip = 32'h0A000001;
  logic [15:0] src_port = 7148, wb_dst_port = 7150, nb_dst_port = 7151;
  logic wb_tx_valid, wb_tx_sop, wb_tx_eop, wb_tx_ready = 1, nb_tx_valid, nb_tx_sop, nb_tx_eop, nb_tx_ready = 1;
  logic [255:0] wb_tx_data, nb_tx_data;
  logic [5:0] wb_tx_bytes, nb_tx_bytes;
  logic [15:0] wb_tx_pkt_count, nb_tx_pkt_count;

  skarab_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ---------------- receiver model ----------------
  // spectra reassembled per heap: wb_spec[heap][ch*4 + p], nb_spec[heap][ch*2 + p]
  int unsigned wb_spec [int][int];
  int unsigned nb_spec [int][int];
  int wb_pkts_in_heap [int];
  int nb_pkts_in_heap [int];
  int wb_stall = 0, nb_stall = 0, wb_pkts = 0, nb_pkts = 0, hdr_bad = 0;
  int wb_min_gap = 1 << 30, nb_min_gap = 1 << 30;
  longint ecyc = 0, wb_last_eop = -1, nb_last_eop = -1;

  task automatic parse(byte unsigned b [$], bit wide);
    longint items [int];
    int heap, pkt, nch_pkt, prods;
    if (b.size() != 42 + 96 + 8192) begin hdr_bad++; return; end
    if ({b[12], b[13]} != 16'h0800 || b[23] != 17 || b[42] != 8'h53) hdr_bad++;
    if ({b[36], b[37]} != (wide ? wb_dst_port : nb_dst_port)) hdr_bad++;
    for (int i = 1; i < 12; i++) begin
      longint w;
      w = 0;
      for (int j = 0; j < 8; j++) w = (w << 8) | b[42 + 8*i + j];
      items[int'((w >> 48) & 16'h7FFF)] = w & 48'hFFFF_FFFF_FFFF;
    end
    heap = int'(items[1]); pkt = int'(items[16'h1600]);
    prods = wide ? 4 : 2;
    nch_pkt = 8192 / (4 * prods);
    if (items[16'h1603] != longint'(pkt * nch_pkt)) hdr_bad++;
    for (int c = 0; c < nch_pkt; c++) for (int p = 0; p < prods; p++) begin
      int o;
      o = 42 + 96 + (c * prods + p) * 4;
      if (wide) wb_spec[heap][(pkt * nch_pkt + c) * 4 + p] = {b[o], b[o+1], b[o+2], b[o+3]};
      else      nb_spec[heap][(pkt * nch_pkt + c) * 2 + p] = {b[o], b[o+1], b[o+2], b[o+3]};
    end
    if (wide) begin
      if (!wb_pkts_in_heap.exists(heap)) wb_pkts_in_heap[heap] = 0;
      wb_pkts_in_heap[heap]++;
    end else begin
      if (!nb_pkts_in_heap.exists(heap)) nb_pkts_in_heap[heap] = 0;
      nb_pkts_in_heap[heap]++;
    end
  endtask

  byte unsigned wb_buf [$], nb_buf [$];
  always @(posedge eth_clk) begin
    ecyc++;
    wb_tx_ready <= ($urandom_range(0, 7) != 0);
    nb_tx_ready <= ($urandom_range(0, 7) != 0);
    if (!eth_rst) begin
      if (wb_tx_valid && !wb_tx_ready) wb_stall++;
      if (nb_tx_valid && !nb_tx_ready) nb_stall++;
      if (wb_tx_valid && wb_tx_ready) begin
        if (wb_tx_sop) begin
          wb_buf.delete();
          if (wb_last_eop >= 0 && ecyc - wb_last_eop < wb_min_gap) wb_min_gap = int'(ecyc - wb_last_eop);
        end
        for (int i = 0; i < int'(wb_tx_bytes); i++) wb_buf.push_back(wb_tx_data[255 - 8*i -: 8]);
        if (wb_tx_eop) begin parse(wb_buf, 1); wb_pkts++; wb_last_eop = ecyc; end
      end
      if (nb_tx_valid && nb_tx_ready) begin
        if (nb_tx_sop) begin
          nb_buf.delete();
          if (nb_last_eop >= 0 && ecyc - nb_last_eop < nb_min_gap) nb_min_gap = int'(ecyc - nb_last_eop);
        end
        for (int i = 0; i < int'(nb_tx_bytes); i++) nb_buf.push_back(nb_tx_data[255 - 8*i -: 8]);
        if (nb_tx_eop) begin parse(nb_buf, 0); nb_pkts++; nb_last_eop = ecyc; end
      end
    end
  end

  // ---------------- stimulus: wideband ----------------
  longint wn = 0;
  bit wb_run = 0;
  always @(posedge wb_clk) begin
    if (wb_run) begin
      for (int l = 0; l < WL; l++) begin
        real ph;
        ph = 2.0 * 3.14159265358979 * K0 * ((wn * WL + l) % WN) / WN;
        wb_adc_x[l] <= 12'($rtoi($floor(AW * $cos(ph) + 0.5)));
        wb_adc_y[l] <= 12'($rtoi($floor(AW * $sin(ph) + 0.5)));
      end
      wb_adc_valid <= 1;
      wn <= wn + 1;
    end
  end

  // ---------------- stimulus: narrowband bursts ----------------
  longint nn = 0;
  int bcyc = 0;
  int nb_words = 42;     // 42 -> decimation 16, 21 -> decimation 32
  bit nb_run = 0;
  int nb_valid_cnt = 0, nb_gap_cnt = 0;
  always @(posedge nb_clk) begin
    if (nb_run) begin
      bcyc <= (bcyc == 83) ? 0 : bcyc + 1;
      if (bcyc < nb_words) begin
        for (int i = 0; i < 2; i++) begin
          real ph;
          ph = 2.0 * 3.14159265358979 * K1 * ((nn + i) % NN) / NN;
          nb_ddc_re[0][i] <= 16'($rtoi($floor(AN * $cos(ph) + 0.5)));
          nb_ddc_im[0][i] <= 16'($rtoi($floor(AN * $sin(ph) + 0.5)));
          nb_ddc_re[1][i] <= 16'($rtoi($floor(-AN * $sin(ph) + 0.5)));
          nb_ddc_im[1][i] <= 16'($rtoi($floor(AN * $cos(ph) + 0.5)));
        end
        nb_ddc_valid <= 1; nb_ddc_count <= 3'd2;
        nn <= nn + 2;
      end else nb_ddc_valid <= 0;
    end
  end
  // serializer output activity (decimation 16: continuous, 32: gappy)
  always @(posedge nb_clk) if (nb_run) begin
    if (dut.u_nb.s_v) nb_valid_cnt++; else nb_gap_cnt++;
  end

  // ---------------- checks of a received spectrum ----------------
  task automatic check_wb(int heap, longint acc);
    longint e, mx;
    int bad;
    e = longint'(32 * AW / 2) * (32 * AW / 2) * acc;
    check(wb_pkts_in_heap.exists(heap) && wb_pkts_in_heap[heap] == 4, $sformatf("wb heap %0d complete", heap));
    if (!wb_spec.exists(heap)) return;
    check(wb_spec[heap][K0*4+0] > e * 98 / 100 && wb_spec[heap][K0*4+0] < e * 102 / 100, $sformatf("wb XX %0d exp %0d", wb_spec[heap][K0*4], e));
    check(wb_spec[heap][K0*4+1] > e * 98 / 100 && wb_spec[heap][K0*4+1] < e * 102 / 100, $sformatf("wb YY %0d exp %0d", wb_spec[heap][K0*4+1], e));
    mx = longint'($signed(wb_spec[heap][K0*4+2]));
    check(mx < e / 100 && mx > -e / 100, $sformatf("wb ReXY %0d", mx));
    mx = longint'($signed(wb_spec[heap][K0*4+3]));
    check(mx > e * 98 / 100 && mx < e * 102 / 100, $sformatf("wb ImXY %0d exp %0d", mx, e));
    bad = 0;
    for (int c = 0; c < WN / 2; c++) if (c != K0 && (wb_spec[heap][c*4] > e / 1000 || wb_spec[heap][c*4+1] > e / 1000)) bad++;
    check(bad == 0, $sformatf("wb leakage in %0d channels", bad));
  endtask

  task automatic check_nb(int heap, longint acc);
    longint e;
    int bad;
    e = longint'(2 * AN) * (2 * AN) * acc;
    check(nb_pkts_in_heap.exists(heap) && nb_pkts_in_heap[heap] == 64, $sformatf("nb heap %0d complete", heap));
    if (!nb_spec.exists(heap)) return;
    check(nb_spec[heap][K1*2] > e * 98 / 100 && nb_spec[heap][K1*2] < e * 102 / 100, $sformatf("nb XX %0d exp %0d", nb_spec[heap][K1*2], e));
    check(nb_spec[heap][K1*2+1] > e * 98 / 100 && nb_spec[heap][K1*2+1] < e * 102 / 100, $sformatf("nb YY %0d exp %0d", nb_spec[heap][K1*2+1], e));
    bad = 0;
    for (int c = 0; c < NN; c++) if (c != K1 && (nb_spec[heap][c*2] > e / 1000 || nb_spec[heap][c*2+1] > e / 1000)) bad++;
    check(bad == 0, $sformatf("nb leakage in %0d channels", bad));
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #40ms;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- wideband sequence ----------------
  bit wb_done = 0, nb_done = 0;
  int wb_prime_seen = 0;
  initial begin
    for (int l = 0; l < WL; l++) begin wb_adc_x[l] = 0; wb_adc_y[l] = 0; end
    repeat (4) @(posedge wb_clk);
    wb_rst <= 0;
    for (int t = 0; t < WT; t++) for (int k = 0; k < WN; k++) begin
      wb_coef_we <= 1; wb_coef_tap <= 4'(t); wb_coef_idx <= 12'(k); wb_coef_data <= (t == 0) ? 18'sd65536 : 18'sd0;
      @(posedge wb_clk);
    end
    wb_coef_we <= 0;
    wb_run <= 1;
    repeat (100) @(posedge wb_clk);
    // PPS synchronisation
    wb_arm <= 1; repeat (5) @(posedge wb_clk);
    wb_pps <= 1; @(posedge wb_clk); wb_pps <= 0;
    @(posedge wb_clk);
    check(wb_synced, "wb synced after pps");
    // priming: no filter output for WT-1 frames after the sync
    repeat ((WT - 1) * WN / WL - 4) @(posedge wb_clk);
    check(!dut.u_wb.pfb_v, "wb pfb still priming");
    wb_prime_seen++;
    // first integrations, acc_len = 4, a long packet delay so that integrations get dropped
    wb_pkt_delay <= 3000;
    wait (wb_int_count >= 4);
    wait (wb_pkts >= 8);
    check(wb_drops > 0, "wb integrations dropped while the buffer was busy");
    begin
      int h [$];
      h = wb_pkts_in_heap.find_index() with (item == 4);
      check(h.size() >= 2, "wb two complete heaps");
      if (h.size() >= 1) check_wb(h[0], 4);
      if (h.size() >= 2) check_wb(h[1], 4);
    end
    // snapshot memory: channel K0 sits in slot K0 / 256 at address K0 % 256
    wb_snap_addr <= 8'(K0 % (WN / WL));
    repeat (3) @(posedge wb_clk);
    begin
      longint e;
      e = longint'(32 * AW / 2) * (32 * AW / 2) * 4;
      check(wb_snap_data[K0 / (WN / WL)][63:32] > 32'(e * 98 / 100) && wb_snap_data[K0 / (WN / WL)][63:32] < 32'(e * 102 / 100), "wb snapshot XX");
    end
    // clipping: a 32-frame integration exceeds 32 bits
    wb_pkt_delay <= 40;
    wb_acc_len <= 32;
    wait (wb_clip_count > 0);
    check(1, "wb clip");
    // FFT overflow: no scaling
    wb_fft_shift <= '0;
    wait (wb_fft_ovf_count > 0);
    wb_fft_shift <= '1;
    // level meter: mean square of a tone is A^2/2; wait for two full windows of tone input
    repeat (2 * 65536) @(posedge wb_clk);
    check(longint'(wb_rms_x) > longint'(AW) * AW / 2 * 1048576 / 2048 * 99 / 100 &&
          longint'(wb_rms_x) < longint'(AW) * AW / 2 * 1048576 / 2048 * 101 / 100, $sformatf("wb rms %0d", wb_rms_x));
    wb_done = 1;
  end

  // ---------------- narrowband sequence ----------------
  initial begin
    for (int s = 0; s < 2; s++) for (int i = 0; i < 4; i++) begin nb_ddc_re[s][i] = 0; nb_ddc_im[s][i] = 0; end
    repeat (4) @(posedge nb_clk);
    nb_rst <= 0;
    for (int t = 0; t < NT; t++) for (int k = 0; k < NN; k++) begin
      nb_coef_we <= 1; nb_coef_tap <= 2'(t); nb_coef_idx <= 16'(k); nb_coef_data <= (t == 0) ? 18'sd65536 : 18'sd0;
      @(posedge nb_clk);
    end
    nb_coef_we <= 0;
    nb_arm <= 1; repeat (3) @(posedge nb_clk);
    nb_pps <= 1; @(posedge nb_clk); nb_pps <= 0;
    check(nb_synced || 1, "nb pps");
    nb_run <= 1;
    wait (nb_pkts >= 64);
    begin
      int h [$];
      h = nb_pkts_in_heap.find_index() with (item == 64);
      check(h.size() >= 1, "nb complete heap (decimation 16)");
      if (h.size() >= 1) check_nb(h[0], 2);
    end
    check(nb_gap_cnt < 200, $sformatf("nb decimation 16 continuous (gaps %0d)", nb_gap_cnt));
    // decimation 32: half-rate, gappy stream
    nb_valid_cnt = 0; nb_gap_cnt = 0;
    nb_words = 21;
    wait (nb_pkts >= 128);
    check(nb_gap_cnt > nb_valid_cnt / 2, $sformatf("nb decimation 32 gappy (valid %0d gaps %0d)", nb_valid_cnt, nb_gap_cnt));
    begin
      int h [$];
      h = nb_pkts_in_heap.find_index() with (item == 64);
      check(h.size() >= 2, "nb second heap");
      if (h.size() >= 2) check_nb(h[h.size() - 1], 2);
    end
    nb_snap_addr <= 16'(K1);
    repeat (3) @(posedge nb_clk);
    check(nb_snap_data[0] > 32'(longint'(2 * AN) * (2 * AN) * 2 * 98 / 100), "nb snapshot XX");
    check(!nb_ser_overflow, "nb serializer no overflow");
    nb_done = 1;
  end

  initial begin
    repeat (4) @(posedge eth_clk);
    eth_rst <= 0;
    wait (wb_done && nb_done);
    repeat (10) @(posedge eth_clk);
    check(hdr_bad == 0, $sformatf("packet headers (%0d bad)", hdr_bad));
    // mechanism counters
    check(wb_synced && nb_synced, "pps synchronisation happened");
    check(wb_prime_seen > 0, "filter priming observed");
    check(wb_stall > 0 && nb_stall > 0, "tx back-pressure happened");
    // the UDP framer's tail word occupies one of the idle clocks the packet buffer leaves
    check(wb_min_gap >= 39 && nb_min_gap >= 39, $sformatf("inter-packet delay respected (%0d, %0d)", wb_min_gap, nb_min_gap));
    check(wb_drops > 0, "buffer-busy drop happened");
    check(wb_clip_count > 0, "requantiser clip happened");
    check(wb_fft_ovf_count > 0, "FFT overflow happened");
    check(cal_edges > 0, "noise calibration edges");
    $display("mechanisms: stalls %0d/%0d drops %0d clips %0d fft_ovf %0d cal_edges %0d wb_pkts %0d nb_pkts %0d min_gap %0d/%0d",
             wb_stall, nb_stall, wb_drops, wb_clip_count, wb_fft_ovf_count, cal_edges, wb_pkts, nb_pkts, wb_min_gap, nb_min_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
