// tb_noise_cal: internal mode with period 10 and on-time 3 must give the exact duty pattern
// and one rising edge per period; external mode must follow cal_ext after the synchroniser;
// disabled must hold the line low.
module tb_noise_cal;
  logic clk = 0, rst = 1, enable = 0, external = 0, cal_ext = 0, cal_out;
  always #5 clk = ~clk;
  logic [31:0] period = 10, on_time = 3, cal_edges;
  int checks = 0, failures = 0;
  noise_cal dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int high;
    repeat (2) @(posedge clk); rst <= 0;
    repeat (5) @(posedge clk); #1;
    checks++; if (cal_out) failures++;
    enable <= 1;
    @(posedge clk); #1;    // first level registered
    high = 0;
    for (int c = 0; c < 50; c++) begin
      checks++;
      if (cal_out != ((c % 10) < 3)) begin failures++; $display("FAIL c=%0d", c); end
      @(posedge clk); #1;
    end
    checks++; if (cal_edges != 5 && cal_edges != 6) begin failures++; $display("FAIL edges %0d", cal_edges); end
    external <= 1;
    for (int c = 0; c < 40; c++) begin
      cal_ext <= (c / 7) % 2 == 1;
      @(posedge clk); #1;
      if (c >= 2) begin checks++; if (cal_out != (((c - 2) / 7) % 2 == 1)) begin failures++; $display("FAIL ext c=%0d", c); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
