// tb_bit_select: random 64-bit values and shifts on an unsigned and a signed lane; the
// outputs are compared with shift-and-clip computed here, including the clip flag.
module tb_bit_select;
  localparam int L = 2;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, out_clip;
  always #5 clk = ~clk;
  logic [5:0] shift = 0;
  logic [7:0] in_addr = 0, out_addr;
  logic signed [63:0] in_data [L];
  logic [31:0] out_data [L];
  int checks = 0, failures = 0;
  bit_select #(.LANES(L), .SIGNED_MASK(2'b10)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int nclip = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int it = 0; it < 300; it++) begin
      longint a, b, ea, eb, sa, sb;
      bit clip;
      int sh;
      sh = $urandom_range(0, 40);
      a = {$urandom, $urandom} >> $urandom_range(0, 40);
      b = {$urandom, $urandom}; b = b >>> $urandom_range(0, 40);
      clip = 0;
      sa = a >>> sh; sb = b >>> sh;
      if (sa < 0) begin ea = 0; clip = 1; end else if (sa > 64'hFFFFFFFF) begin ea = 64'hFFFFFFFF; clip = 1; end else ea = sa;
      if (sb > 2147483647) begin eb = 2147483647; clip = 1; end else if (sb < -64'sd2147483648) begin eb = -64'sd2147483648; clip = 1; end else eb = sb;
      shift <= 6'(sh); in_data[0] <= a; in_data[1] <= b; in_addr <= 8'(it); in_valid <= 1;
      @(posedge clk); in_valid <= 0; #1;
      checks += 5;
      if (!out_valid || out_addr != 8'(it)) failures++;
      if (out_data[0] != 32'(ea)) begin failures++; $display("FAIL u %0d %0d got %0d exp %0d", a, sh, out_data[0], ea); end
      if (out_data[1] != 32'(eb)) begin failures++; $display("FAIL s %0d %0d got %0d exp %0d", b, sh, $signed(out_data[1]), eb); end
      if (out_clip != clip) failures++;
      if (clip) nclip++;
      checks++; if (0) failures++;
    end
    checks++; if (nclip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
