// tb_stokes: random complex inputs on 8 lanes; the four products are checked against
// values computed here with 64-bit integers, one clock later.
module tb_stokes;
  localparam int L = 8, W = 18;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] xr [L], xi [L], yr [L], yi [L];
  logic signed [2*W:0] xx [L], yy [L], xy_re [L], xy_im [L];
  int checks = 0, failures = 0;
  stokes #(.LANES(L), .W(W)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int it = 0; it < 50; it++) begin
      longint a [L], b [L], c [L], d [L];
      for (int l = 0; l < L; l++) begin
        a[l] = longint'($urandom_range(0, 262143)) - 131072; b[l] = longint'($urandom_range(0, 262143)) - 131072;
        c[l] = longint'($urandom_range(0, 262143)) - 131072; d[l] = longint'($urandom_range(0, 262143)) - 131072;
        xr[l] <= W'(a[l]); xi[l] <= W'(b[l]); yr[l] <= W'(c[l]); yi[l] <= W'(d[l]);
      end
      in_valid <= 1;
      @(posedge clk); #1;
      checks++; if (!out_valid) begin failures++; $display("FAIL valid"); end
      for (int l = 0; l < L; l++) begin
        checks += 4;
        if (xx[l] != a[l]*a[l] + b[l]*b[l]) begin failures++; $display("FAIL xx %0d %0d %0d", l, xx[l], a[l]*a[l] + b[l]*b[l]); end
        if (yy[l] != c[l]*c[l] + d[l]*d[l]) begin failures++; $display("FAIL yy"); end
        if (xy_re[l] != a[l]*c[l] + b[l]*d[l]) begin failures++; $display("FAIL re"); end
        if (xy_im[l] != b[l]*c[l] - a[l]*d[l]) begin failures++; $display("FAIL im"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
