// fft_r2sdf: streaming complex FFT, radix-2 single-path delay feedback (decimation in
// frequency), one sample per valid clock.
//
// Each of the log2(N) stages holds a delay line of N/2^(s+1) words. In the first half of its
// block a stage stores incoming samples and emits the previously stored differences after
// multiplying them by the stage twiddle; in the second half it emits the sum of the stored
// and incoming sample and stores their difference. Every stage advances only on a valid
// input, so the pipeline works on gappy streams (data-valid enable) as well as on a sample
// every clock. Bit s of fft_shift halves the butterfly results of stage s (the programmable
// rescaling of the FFT); results that still exceed W bits saturate and raise out_ovf.
//
// Output: out_valid marks a bin, out_idx is its bin number. Bins come out in bit-reversed
// order (no reordering buffer, as in the narrowband design, where the reorder is done later
// in the packet buffer). Latency: after the pipeline has seen N-1 valid inputs, each further
// valid input produces one output, registered once per stage (log2(N) clocks).
// Twiddles are W_N^k = exp(-2*pi*i*k/N) in signed TW-bit fixed point with TW-2 fraction bits,
// computed at elaboration. Internal structure is this design's choice; the document gives the
// FFT lengths and the programmable shift.
module fft_r2sdf #(
  parameter int unsigned N  = 65536,
  parameter int unsigned W  = 18,
  parameter int unsigned TW = 18
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(N)-1:0]       fft_shift,
  input  logic                       in_valid,
  input  logic signed [W-1:0]        in_re,
  input  logic signed [W-1:0]        in_im,
  output logic                       out_valid,
  output logic signed [W-1:0]        out_re,
  output logic signed [W-1:0]        out_im,
  output logic [$clog2(N)-1:0]       out_idx,
  output logic                       out_ovf
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned FRAC = TW - 2;

  logic                 sv [LOGN+1];
  logic signed [W-1:0]  sre [LOGN+1];
  logic signed [W-1:0]  sim [LOGN+1];
  logic [LOGN:0]        sovf;

  assign sv[0]   = in_valid;
  assign sre[0]  = in_re;
  assign sim[0]  = in_im;
  assign sovf[0] = 1'b0;

  function automatic logic signed [W-1:0] sat(input logic signed [W+TW:0] v);
    localparam logic signed [W+TW:0] MAXV = (W+TW+1)'((1 << (W-1)) - 1);
    localparam logic signed [W+TW:0] MINV = -(W+TW+1)'(1 << (W-1));
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  function automatic logic fits(input logic signed [W+TW:0] v);
    localparam logic signed [W+TW:0] MAXV = (W+TW+1)'((1 << (W-1)) - 1);
    localparam logic signed [W+TW:0] MINV = -(W+TW+1)'(1 << (W-1));
    return (v <= MAXV) && (v >= MINV);
  endfunction

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    localparam int unsigned L  = N >> (s + 1);
    localparam int unsigned LB = (L > 1) ? $clog2(L) : 1;

    logic signed [W-1:0]  mre [L];
    logic signed [W-1:0]  mim [L];
    logic signed [TW-1:0] tcos [L];
    logic signed [TW-1:0] tsin [L];   // holds -sin
    logic [LOGN-s-1:0]    cnt;
    logic                 primed;
    logic [LB-1:0]        addr;
    logic                 second;

    initial begin
      for (int j = 0; j < int'(L); j++) begin
        tcos[j] = TW'($rtoi($floor($cos(3.14159265358979323846 * j / L) * (2.0 ** FRAC) + 0.5)));
        tsin[j] = TW'($rtoi($floor(-$sin(3.14159265358979323846 * j / L) * (2.0 ** FRAC) + 0.5)));
      end
    end

    if (L > 1) begin : g_addr
      assign addr = cnt[LB-1:0];
    end else begin : g_addr1
      assign addr = '0;
    end
    assign second = cnt[LOGN-s-1];

    logic signed [W+TW:0] a_re, a_im, b_re, b_im, sum_re, sum_im, dif_re, dif_im;
    logic signed [W+TW:0] p_re, p_im;
    logic signed [W+TW:0] y_re, y_im, st_re, st_im;

    always_comb begin
      a_re = (W+TW+1)'(mre[addr]);
      a_im = (W+TW+1)'(mim[addr]);
      b_re = (W+TW+1)'(sre[s]);
      b_im = (W+TW+1)'(sim[s]);
      sum_re = a_re + b_re;
      sum_im = a_im + b_im;
      dif_re = a_re - b_re;
      dif_im = a_im - b_im;
      if (fft_shift[s]) begin
        sum_re = sum_re >>> 1; sum_im = sum_im >>> 1;
        dif_re = dif_re >>> 1; dif_im = dif_im >>> 1;
      end
      p_re = (a_re * (W+TW+1)'(tcos[addr]) - a_im * (W+TW+1)'(tsin[addr])) >>> FRAC;
      p_im = (a_re * (W+TW+1)'(tsin[addr]) + a_im * (W+TW+1)'(tcos[addr])) >>> FRAC;
      if (second) begin
        y_re = sum_re; y_im = sum_im; st_re = dif_re; st_im = dif_im;
      end else begin
        y_re = p_re; y_im = p_im; st_re = b_re; st_im = b_im;
      end
    end

    always_ff @(posedge clk) begin
      if (sv[s]) begin
        mre[addr] <= sat(st_re);
        mim[addr] <= sat(st_im);
      end
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        cnt          <= '0;
        primed       <= 1'b0;
        sv[s+1]      <= 1'b0;
        sre[s+1]     <= '0;
        sim[s+1]     <= '0;
        sovf[s+1]    <= 1'b0;
      end else begin
        sv[s+1] <= sv[s] && (primed || second);
        if (sv[s]) begin
          cnt      <= cnt + 1'b1;
          if (second) primed <= 1'b1;
          sre[s+1] <= sat(y_re);
          sim[s+1] <= sat(y_im);
          sovf[s+1] <= sovf[s] || !fits(y_re) || !fits(y_im) ||
                       (second && (!fits(st_re) || !fits(st_im)));
        end
      end
    end
  end

  logic [LOGN-1:0] ocnt;
  always_ff @(posedge clk) begin
    if (rst) ocnt <= '0;
    else if (sv[LOGN]) ocnt <= ocnt + 1'b1;
  end

  assign out_valid = sv[LOGN];
  assign out_re    = sre[LOGN];
  assign out_im    = sim[LOGN];
  assign out_ovf   = sovf[LOGN] && sv[LOGN];
  assign out_idx   = LOGN'(skarab_pkg::bitrev(32'(ocnt), LOGN));
endmodule
