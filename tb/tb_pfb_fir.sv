// tb_pfb_fir: small instance (2 streams, 4 lanes, 16-point frames, 3 taps) with random
// coefficients and samples. Outputs are compared with the polyphase sum computed here from the
// stored input history; the first output must belong to frame NTAPS-1 (priming), gaps in
// in_valid must not disturb the result, and a sync pulse must restart priming.
module tb_pfb_fir;
  localparam int NCH = 2, LANES = 4, NFFT = 16, NTAPS = 3, IW = 12, CW = 18, OW = 18, FR = 7;
  localparam int M = NFFT / LANES;
  localparam int OSH = CW - 1 - (OW - IW);
  logic clk = 0, rst = 1, sync = 0;
  always #5 clk = ~clk;
  logic coef_we = 0;
  logic [1:0] coef_tap = 0;
  logic [3:0] coef_idx = 0;
  logic signed [CW-1:0] coef_data = 0;
  logic in_valid = 0;
  logic signed [IW-1:0] in_data [NCH][LANES];
  logic out_valid;
  logic signed [OW-1:0] out_data [NCH][LANES];
  int checks = 0, failures = 0;

  pfb_fir #(.NCH(NCH), .LANES(LANES), .NFFT(NFFT), .NTAPS(NTAPS), .IW(IW), .CW(CW), .OW(OW)) dut (.*);

  int c [NTAPS][NFFT];
  int x [FR][NCH][NFFT];
  int ocnt = 0;   // output clocks seen

  always_ff @(posedge clk) if (out_valid && !rst) begin
    int m, p;
    m = NTAPS - 1 + ocnt / M;
    p = ocnt % M;
    for (int ch = 0; ch < NCH; ch++) for (int l = 0; l < LANES; l++) begin
      longint s, e;
      int k;
      k = p * LANES + l;
      s = 0;
      for (int t = 0; t < NTAPS; t++) s += longint'(c[t][k]) * x[m - t][ch][k];
      e = s >>> OSH;
      if (e > 131071) e = 131071;
      if (e < -131072) e = -131072;
      checks++;
      if (out_data[ch][l] != e) begin
        failures++;
        if (failures < 10) $display("FAIL m%0d ch%0d k%0d got %0d exp %0d", m, ch, k, out_data[ch][l], e);
      end
    end
    ocnt++;
  end

  initial begin
    #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int ch = 0; ch < NCH; ch++) for (int l = 0; l < LANES; l++) in_data[ch][l] = '0;
    for (int t = 0; t < NTAPS; t++) for (int k = 0; k < NFFT; k++) c[t][k] = int'($urandom_range(0, 131070)) - 65535;
    for (int f = 0; f < FR; f++) for (int ch = 0; ch < NCH; ch++) for (int k = 0; k < NFFT; k++)
      x[f][ch][k] = int'($urandom_range(0, 4095)) - 2048;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < NTAPS; t++) for (int k = 0; k < NFFT; k++) begin
      coef_we <= 1; coef_tap <= 2'(t); coef_idx <= 4'(k); coef_data <= CW'(c[t][k]);
      @(posedge clk);
    end
    coef_we <= 0;
    for (int f = 0; f < FR; f++) for (int p = 0; p < M; p++) begin
      while ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      for (int ch = 0; ch < NCH; ch++) for (int l = 0; l < LANES; l++) in_data[ch][l] <= IW'(x[f][ch][p * LANES + l]);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (ocnt != (FR - NTAPS + 1) * M) begin failures++; $display("FAIL output count %0d", ocnt); end
    // sync: restart, outputs must stop for NTAPS-1 frames
    sync <= 1; @(posedge clk); sync <= 0;
    for (int p = 0; p < (NTAPS - 1) * M; p++) begin in_valid <= 1; @(posedge clk); end
    in_valid <= 0;
    repeat (2) @(posedge clk);
    checks++;
    if (ocnt != (FR - NTAPS + 1) * M) begin failures++; $display("FAIL sync did not re-prime"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
