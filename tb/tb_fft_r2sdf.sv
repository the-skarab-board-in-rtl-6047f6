// tb_fft_r2sdf: checks the streaming FFT against a direct DFT computed in real arithmetic.
// Four frames of random complex samples are fed, the third with random gaps in in_valid,
// with every stage scaling by 1/2 (result = DFT/N). Each output bin, identified by out_idx,
// is compared with the reference within a small rounding tolerance. A fifth frame flushes the
// pipeline. A last run without scaling drives a full-scale input and expects out_ovf.
module tb_fft_r2sdf;
  localparam int N = 64, W = 18, LOGN = 6, FR = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [LOGN-1:0] fft_shift = '1;
  logic in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_ovf;
  logic signed [W-1:0] out_re, out_im;
  logic [LOGN-1:0] out_idx;
  int checks = 0, failures = 0;

  fft_r2sdf #(.N(N), .W(W), .TW(18)) dut (.*);

  int xr [FR][N];
  int xi [FR][N];
  int ofr = 0, ocount = 0, novf = 0;
  bit check_on = 1;

  always_ff @(posedge clk) if (out_valid && check_on && !rst) begin
    real er, ei, ang;
    er = 0; ei = 0;
    for (int n = 0; n < N; n++) begin
      ang = -2.0 * 3.14159265358979 * n * out_idx / N;
      er += xr[ofr][n] * $cos(ang) - xi[ofr][n] * $sin(ang);
      ei += xr[ofr][n] * $sin(ang) + xi[ofr][n] * $cos(ang);
    end
    er /= N; ei /= N;
    if (ofr < FR - 1) begin
      checks++;
      if ((out_re - er) > 8.0 || (er - out_re) > 8.0 || (out_im - ei) > 8.0 || (ei - out_im) > 8.0) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d bin %0d got %0d,%0d exp %f,%f", ofr, out_idx, out_re, out_im, er, ei);
      end
    end
    ocount++;
    if (ocount == N) begin ocount = 0; ofr++; end
  end
  always_ff @(posedge clk) if (out_valid && out_ovf) novf++;

  initial begin
    #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int f = 0; f < FR; f++) for (int n = 0; n < N; n++) begin
      xr[f][n] = int'($urandom_range(0, 60000)) - 30000;
      xi[f][n] = int'($urandom_range(0, 60000)) - 30000;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FR; f++) for (int n = 0; n < N; n++) begin
      if (f == 2) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1; in_re <= W'(xr[f][n]); in_im <= W'(xi[f][n]);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (ofr != FR - 1) begin failures++; $display("FAIL frames out %0d", ofr); end
    checks++;
    if (novf != 0) begin failures++; $display("FAIL unexpected overflow"); end
    // overflow: no scaling, constant full-scale input
    check_on = 0;
    fft_shift <= '0;
    for (int n = 0; n < 3 * N; n++) begin
      in_valid <= 1; in_re <= 18'sd100000; in_im <= 18'sd100000; @(posedge clk);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (novf == 0) begin failures++; $display("FAIL no overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
