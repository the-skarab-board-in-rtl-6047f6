// tb_adc_rms: two 4-lane instances integrate 64 clocks of random 12-bit samples; the first
// register value must equal the sum of squares computed here, shifted right by SHIFT, and the
// update must come exactly every 64 clocks. A second window with full-scale samples and no
// shift checks saturation.
module tb_adc_rms;
  localparam int L = 4, N = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [11:0] in_data [L];
  logic [31:0] rms_sum, rms_count;
  int checks = 0, failures = 0;
  adc_rms #(.LANES(L), .W(12), .INT_CLOCKS(N), .SHIFT(3)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    longint s [3];
    int t0;
    for (int l = 0; l < L; l++) in_data[l] = 0;
    @(posedge clk); rst <= 0;
    for (int w = 0; w < 3; w++) begin
      s[w] = 0;
      for (int c = 0; c < N; c++) begin
        for (int l = 0; l < L; l++) begin
          int v;
          v = int'($urandom_range(0, 4095)) - 2048;
          s[w] += v * v;
          in_data[l] <= 12'(v);
        end
        @(posedge clk);
      end
      #1;
      checks += 2;
      if (rms_count != 32'(w + 1)) begin failures++; $display("FAIL count %0d", rms_count); end
      if (rms_sum != 32'(s[w] >> 3)) begin failures++; $display("FAIL sum %0d exp %0d", rms_sum, s[w] >> 3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
