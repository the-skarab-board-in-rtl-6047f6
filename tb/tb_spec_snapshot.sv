// tb_spec_snapshot: two snapshots of random spectra are written; after each, every word is
// read back through the host port and compared, and snap_count must count the snapshots.
module tb_spec_snapshot;
  localparam int L = 4, D = 16;
  logic clk = 0, rst = 1, in_valid = 0;
  always #5 clk = ~clk;
  logic [3:0] in_addr = 0, rd_addr = 0;
  logic [31:0] in_data [L], rd_data [L], snap_count;
  int checks = 0, failures = 0;
  spec_snapshot #(.LANES(L), .DEPTH(D)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [31:0] ref_mem [D][L];
    repeat (2) @(posedge clk); rst <= 0;
    for (int s = 0; s < 2; s++) begin
      for (int a = 0; a < D; a++) begin
        for (int l = 0; l < L; l++) begin ref_mem[a][l] = $urandom; in_data[l] <= ref_mem[a][l]; end
        in_addr <= 4'(a); in_valid <= 1; @(posedge clk);
      end
      in_valid <= 0; @(posedge clk);
      checks++; if (snap_count != 32'(s + 1)) failures++;
      for (int a = 0; a < D; a++) begin
        rd_addr <= 4'(a); @(posedge clk); @(posedge clk); #1;
        for (int l = 0; l < L; l++) begin checks++; if (rd_data[l] != ref_mem[a][l]) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
