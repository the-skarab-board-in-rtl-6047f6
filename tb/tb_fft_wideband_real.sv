// tb_fft_wideband_real: a 256-point, 16-lane instance (16 clocks per frame) is fed four frames
// of random real samples and every output channel k1 + 16*k2 is compared with a direct DFT
// (scaled by 1/256) computed in real arithmetic. A full-scale input without scaling must raise
// out_ovf. Also checks that one frame of output takes 16 clocks (8 channels per clock).
module tb_fft_wideband_real;
  localparam int NFFT = 256, LANES = 16, M = 16, W = 18, FR = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] fft_shift = '1;
  logic in_valid = 0;
  logic signed [17:0] in_data [LANES];
  logic out_valid, out_ovf;
  logic signed [W-1:0] out_re [LANES/2];
  logic signed [W-1:0] out_im [LANES/2];
  logic [3:0] out_k1;
  int checks = 0, failures = 0;

  fft_wideband_real #(.NFFT(NFFT), .LANES(LANES), .IW(18), .W(W)) dut (.*);

  int x [FR][NFFT];
  int ofr = 0, ocount = 0, novf = 0;
  bit check_on = 1;
  int first_cyc = -1, cyc = 0, frame1_cyc = -1;
  always_ff @(posedge clk) cyc++;

  always_ff @(posedge clk) if (out_valid && check_on && !rst) begin
    if (ocount == 0 && ofr == 1) frame1_cyc = cyc;
    if (ocount == 0 && ofr == 0) first_cyc = cyc;
    for (int k2 = 0; k2 < LANES / 2; k2++) begin
      real er, ei, ang;
      int k;
      k = out_k1 + M * k2;
      er = 0; ei = 0;
      for (int n = 0; n < NFFT; n++) begin
        ang = -2.0 * 3.14159265358979 * n * k / NFFT;
        er += x[ofr][n] * $cos(ang);
        ei += x[ofr][n] * $sin(ang);
      end
      er /= NFFT; ei /= NFFT;
      if (ofr < FR - 1) begin
        checks++;
        if ((out_re[k2] - er) > 10.0 || (er - out_re[k2]) > 10.0 || (out_im[k2] - ei) > 10.0 || (ei - out_im[k2]) > 10.0) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d ch %0d got %0d,%0d exp %f,%f", ofr, k, out_re[k2], out_im[k2], er, ei);
        end
      end
    end
    ocount++;
    if (ocount == M) begin ocount = 0; ofr++; end
  end
  always_ff @(posedge clk) if (out_valid && out_ovf) novf++;

  initial begin
    #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 0; l < LANES; l++) in_data[l] = '0;
    for (int f = 0; f < FR; f++) for (int n = 0; n < NFFT; n++) x[f][n] = int'($urandom_range(0, 4094)) - 2047;
    x[0][0] = 30000;  // an impulse plus noise in frame 0
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FR; f++) for (int c = 0; c < M; c++) begin
      in_valid <= 1;
      for (int l = 0; l < LANES; l++) in_data[l] <= 18'(x[f][c * LANES + l]);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (ofr != FR - 1) begin failures++; $display("FAIL frames %0d", ofr); end
    checks++;
    if (frame1_cyc - first_cyc != M) begin failures++; $display("FAIL frame period %0d", frame1_cyc - first_cyc); end
    checks++;
    if (novf != 0) begin failures++; $display("FAIL unexpected overflow"); end
    check_on = 0;
    fft_shift <= '0;
    for (int c = 0; c < 3 * M; c++) begin
      in_valid <= 1;
      for (int l = 0; l < LANES; l++) in_data[l] <= 18'sd100000;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (novf == 0) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
