// tb_serializer_4to1: two bursty input patterns as produced in DDC mode: 42 words of 2 valid
// samples every 84 clocks (average one sample per clock, decimation by 16) and 21 such words
// every 84 clocks (half rate, decimation by 32). The output must reproduce the input sample
// sequence of both signals in order, be continuous in the first case once started, have a
// valid duty of one half in the second, and never overflow.
module tb_serializer_4to1;
  localparam int NPAR = 4, NSIG = 2, W = 16;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, overflow;
  always #5 clk = ~clk;
  logic [2:0] in_count = 0;
  logic signed [W-1:0] in_re [NSIG][NPAR], in_im [NSIG][NPAR], out_re [NSIG], out_im [NSIG];
  int checks = 0, failures = 0;
  serializer_4to1 #(.NPAR(NPAR), .NSIG(NSIG), .W(W), .DEPTH(256)) dut (.*);
  int exp_q [$];
  int nout = 0, nvalid_win = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (out_re[0] != W'(e) || out_im[0] != W'(e + 1) || out_re[1] != W'(e + 2) || out_im[1] != W'(e + 3)) begin
        failures++; if (failures < 5) $display("FAIL sample %0d", nout);
      end
      nout++;
    end
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic burst(int nwords);
    for (int c = 0; c < 84; c++) begin
      if (c < nwords) begin
        for (int i = 0; i < 2; i++) begin
          int v;
          v = $urandom_range(0, 8000);
          exp_q.push_back(v);
          in_re[0][i] <= W'(v); in_im[0][i] <= W'(v + 1); in_re[1][i] <= W'(v + 2); in_im[1][i] <= W'(v + 3);
        end
        in_valid <= 1; in_count <= 3'd2;
      end else in_valid <= 0;
      @(posedge clk);
    end
  endtask
  initial begin
    int n0, c0;
    for (int s = 0; s < NSIG; s++) for (int i = 0; i < NPAR; i++) begin in_re[s][i] = 0; in_im[s][i] = 0; end
    repeat (2) @(posedge clk); rst <= 0;
    burst(42);
    n0 = nout; c0 = cyc;
    for (int b = 0; b < 4; b++) burst(42);
    checks++; if (nout - n0 != cyc - c0) begin failures++; $display("FAIL dec16 not continuous %0d/%0d", nout - n0, cyc - c0); end
    repeat (200) @(posedge clk);
    n0 = nout; c0 = cyc;
    for (int b = 0; b < 4; b++) burst(21);
    repeat (3) @(posedge clk);
    checks++; if (nout - n0 != 4 * 42) begin failures++; $display("FAIL dec32 count %0d", nout - n0); end
    checks++; if (overflow) failures++;
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
