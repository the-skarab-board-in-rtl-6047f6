// pfb_fir: polyphase FIR front end of the spectrometers.
//
// A frame is NFFT consecutive samples, arriving LANES per valid clock (M = NFFT/LANES clocks
// per frame). For sample position k of frame m the output is
//     y_m[k] = sum_{t=0}^{NTAPS-1} c[t][k] * x_{m-t}[k]
// i.e. one low-pass prototype of NTAPS*NFFT coefficients cut into NTAPS taps per FFT point.
// Every lane keeps the previous NTAPS-1 frames in one memory of M words, each word holding the
// NTAPS-1 older samples of one position, shifted by one sample per visit. NCH independent
// streams (polarisations, or real and imaginary parts) share the coefficients.
//
// The coefficients are written by the host through coef_we/coef_tap/coef_idx/coef_data
// (signed, CW-1 fraction bits); the document chooses a Hamming-windowed prototype with 14
// taps (wideband) or 4 taps (narrowband), which the host loads. The engine advances only on
// in_valid (the narrowband chain needs an enable). sync restarts the frame at position 0 and
// re-primes the filter; out_valid stays low until NTAPS-1 whole frames have been stored, so the
// first output frame is complete. Output: y shifted right by OSHIFT and saturated to OW bits,
// one clock after the input.
module pfb_fir #(
  parameter int unsigned NCH    = 2,
  parameter int unsigned LANES  = 16,
  parameter int unsigned NFFT   = 4096,
  parameter int unsigned NTAPS  = 14,
  parameter int unsigned IW     = 12,
  parameter int unsigned CW     = 18,
  parameter int unsigned OW     = 18,
  parameter int unsigned OSHIFT = CW - 1 - (OW - IW)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          sync,
  input  logic                          coef_we,
  input  logic [$clog2(NTAPS)-1:0]      coef_tap,
  input  logic [$clog2(NFFT)-1:0]       coef_idx,
  input  logic signed [CW-1:0]          coef_data,
  input  logic                          in_valid,
  input  logic signed [IW-1:0]          in_data  [NCH][LANES],
  output logic                          out_valid,
  output logic signed [OW-1:0]          out_data [NCH][LANES]
);
  localparam int unsigned M   = NFFT / LANES;
  localparam int unsigned MB  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned LB  = (LANES > 1) ? $clog2(LANES) : 1;
  localparam int unsigned DW  = (NTAPS - 1) * IW;
  localparam int unsigned SW  = IW + CW + $clog2(NTAPS) + 1;

  logic [MB-1:0] pos;
  logic [$clog2(NTAPS):0] frames;
  logic primed;
  assign primed = (frames >= ($clog2(NTAPS)+1)'(NTAPS - 1));

  always_ff @(posedge clk) begin
    if (rst || sync) begin
      pos    <= '0;
      frames <= '0;
    end else if (in_valid) begin
      pos <= (pos == MB'(M - 1)) ? '0 : pos + 1'b1;
      if (pos == MB'(M - 1) && !primed) frames <= frames + 1'b1;
    end
  end

  function automatic logic signed [OW-1:0] sat(input logic signed [SW-1:0] v);
    localparam logic signed [SW-1:0] MAXV = SW'((1 << (OW-1)) - 1);
    localparam logic signed [SW-1:0] MINV = -SW'(1 << (OW-1));
    if (v > MAXV) return MAXV[OW-1:0];
    if (v < MINV) return MINV[OW-1:0];
    return v[OW-1:0];
  endfunction

  logic [LB-1:0] wr_lane;
  logic [MB-1:0] wr_pos;
  if (LANES > 1) begin : g_wl
    assign wr_lane = coef_idx[LB-1:0];
  end else begin : g_wl1
    assign wr_lane = '0;
  end
  if (M > 1) begin : g_wp
    assign wr_pos = MB'(coef_idx >> $clog2(LANES));
  end else begin : g_wp1
    assign wr_pos = '0;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic signed [CW-1:0] coef [NTAPS][M];
    always_ff @(posedge clk) begin
      if (coef_we && wr_lane == LB'(l)) coef[coef_tap][wr_pos] <= coef_data;
    end

    for (genvar c = 0; c < NCH; c++) begin : g_ch
      logic [DW-1:0] hist [M];
      logic [DW-1:0] h;
      logic signed [SW-1:0] acc;
      assign h = hist[pos];
      always_comb begin
        acc = SW'(in_data[c][l]) * SW'(coef[0][pos]);
        for (int t = 1; t < int'(NTAPS); t++)
          acc += SW'($signed(h[(t-1)*IW +: IW])) * SW'(coef[t][pos]);
      end
      always_ff @(posedge clk) begin
        if (in_valid) begin
          if (NTAPS > 2) hist[pos] <= {h[DW-IW-1:0], in_data[c][l]};
          else           hist[pos] <= DW'(in_data[c][l]);
          out_data[c][l] <= sat(acc >>> OSHIFT);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid && primed && !sync;
  end
endmodule
