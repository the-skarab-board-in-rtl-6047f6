// fft_wideband_real: NFFT-point FFT of a real signal that arrives LANES samples per clock,
// producing LANES/2 channels per clock (8 channels per clock for 16 lanes and NFFT=4096).
//
// The transform is split as NFFT = LANES * M. Lane l carries samples x[LANES*n + l]; each lane
// runs its own M-point streaming FFT (fft_r2sdf), so all lanes emit bin k1 of their sub-sequence
// in the same clock. The lane results are rotated by W_NFFT^(l*k1) and a LANES-point DFT across
// the lanes then gives X[k1 + M*k2] for k2 = 0 .. LANES/2-1: the channels below NFFT/2, which
// are all a real input needs. In every clock the outputs are the channels k1, k1+M, k1+2M, ...
// with k1 running in bit-reversed order over a frame of M clocks; out_k1 gives k1.
//
// fft_shift has log2(NFFT) bits: the low log2(M) bits scale the lane FFT stages, and each set
// bit among the upper log2(LANES) bits halves the cross-lane stage, so all ones gives DFT/NFFT.
// Saturation in any stage raises out_ovf. Latency: the lane FFT latency plus two clocks.
// The split into lane FFTs and a cross-lane DFT is this design's own choice; the document
// gives the length (4096), the parallelism (16 in, 8 channels out) and the programmable shift.
module fft_wideband_real #(
  parameter int unsigned NFFT  = 4096,
  parameter int unsigned LANES = 16,
  parameter int unsigned IW    = 18,
  parameter int unsigned W     = 18,
  parameter int unsigned TW    = 18
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [$clog2(NFFT)-1:0]       fft_shift,
  input  logic                          in_valid,
  input  logic signed [IW-1:0]          in_data [LANES],
  output logic                          out_valid,
  output logic signed [W-1:0]           out_re  [LANES/2],
  output logic signed [W-1:0]           out_im  [LANES/2],
  output logic [$clog2(NFFT/LANES)-1:0] out_k1,
  output logic                          out_ovf
);
  localparam int unsigned M    = NFFT / LANES;
  localparam int unsigned LOGM = $clog2(M);
  localparam int unsigned LOGL = $clog2(LANES);
  localparam int unsigned LOGN = $clog2(NFFT);
  localparam int unsigned FRAC = TW - 2;
  localparam int unsigned PW   = W + TW + LOGL + 2;

  logic                 lv   [LANES];
  logic signed [W-1:0]  lre  [LANES];
  logic signed [W-1:0]  lim  [LANES];
  logic [LOGM-1:0]      lidx [LANES];
  logic [LANES-1:0]     lovf;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    fft_r2sdf #(.N(M), .W(W), .TW(TW)) u_fft (
      .clk, .rst,
      .fft_shift (fft_shift[LOGM-1:0]),
      .in_valid,
      .in_re     (W'(in_data[l])),
      .in_im     ('0),
      .out_valid (lv[l]),
      .out_re    (lre[l]),
      .out_im    (lim[l]),
      .out_idx   (lidx[l]),
      .out_ovf   (lovf[l])
    );
  end

  // twiddle table W_NFFT^m and the LANES-point DFT table W_LANES^m
  logic signed [TW-1:0] tcos [NFFT];
  logic signed [TW-1:0] tsin [NFFT];
  initial begin
    for (int m = 0; m < int'(NFFT); m++) begin
      tcos[m] = TW'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * m / NFFT) * (2.0 ** FRAC) + 0.5)));
      tsin[m] = TW'($rtoi($floor(-$sin(2.0 * 3.14159265358979323846 * m / NFFT) * (2.0 ** FRAC) + 0.5)));
    end
  end

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    localparam logic signed [PW-1:0] MAXV = PW'((1 << (W-1)) - 1);
    localparam logic signed [PW-1:0] MINV = -PW'(1 << (W-1));
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  // stage 1: rotate lane l by W_NFFT^(l*k1)
  logic                 rv;
  logic signed [W-1:0]  rre [LANES];
  logic signed [W-1:0]  rim [LANES];
  logic [LOGM-1:0]      rk1;
  logic                 rovf;
  always_ff @(posedge clk) begin
    if (rst) begin
      rv <= 1'b0; rovf <= 1'b0; rk1 <= '0;
    end else begin
      rv <= lv[0];
      if (lv[0]) begin
        rk1  <= lidx[0];
        rovf <= |lovf;
        for (int l = 0; l < int'(LANES); l++) begin
          logic [LOGN-1:0] m;
          logic signed [PW-1:0] pr, pi;
          m  = LOGN'(l * lidx[0]);
          pr = (PW'(lre[l]) * PW'(tcos[m]) - PW'(lim[l]) * PW'(tsin[m])) >>> FRAC;
          pi = (PW'(lre[l]) * PW'(tsin[m]) + PW'(lim[l]) * PW'(tcos[m])) >>> FRAC;
          rre[l] <= sat(pr);
          rim[l] <= sat(pi);
        end
      end
    end
  end

  // stage 2: LANES-point DFT across lanes, first LANES/2 outputs
  int unsigned xshift;
  always_comb begin
    xshift = 0;
    for (int b = 0; b < int'(LOGL); b++) xshift += int'(fft_shift[LOGM + b]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_ovf <= 1'b0; out_k1 <= '0;
    end else begin
      out_valid <= rv;
      if (rv) begin
        logic ov;
        ov = rovf;
        out_k1 <= rk1;
        for (int k2 = 0; k2 < int'(LANES / 2); k2++) begin
          logic signed [PW-1:0] ar, ai;
          ar = '0; ai = '0;
          for (int l = 0; l < int'(LANES); l++) begin
            logic [LOGN-1:0] m;
            m  = LOGN'(((l * k2) % LANES) * M);
            ar += (PW'(rre[l]) * PW'(tcos[m]) - PW'(rim[l]) * PW'(tsin[m])) >>> FRAC;
            ai += (PW'(rre[l]) * PW'(tsin[m]) + PW'(rim[l]) * PW'(tcos[m])) >>> FRAC;
          end
          ar = ar >>> xshift;
          ai = ai >>> xshift;
          if (sat(ar) != ar[W-1:0] || sat(ai) != ai[W-1:0]) ov = 1'b1;
          out_re[k2] <= sat(ar);
          out_im[k2] <= sat(ai);
        end
        out_ovf <= ov;
      end
    end
  end
endmodule
