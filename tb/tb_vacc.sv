// tb_vacc: 3 lanes, 8-word vectors. Integrations of acc_len = 3, then 1, then 5 frames with
// random gaps in in_valid; every dumped word must equal the sum computed here, dumps must come
// once per integration with the right indices, and out_count must count them.
module tb_vacc;
  localparam int L = 3, V = 8, IW = 37;
  logic clk = 0, rst = 1, sync = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic [31:0] acc_len = 3, out_count;
  logic signed [IW-1:0] in_data [L];
  logic [2:0] out_addr;
  logic signed [63:0] out_data [L];
  int checks = 0, failures = 0;
  vacc #(.LANES(L), .VLEN(V), .IW(IW)) dut (.*);
  longint expv [$];
  int dumps = 0;
  always_ff @(posedge clk) if (out_valid && !rst) begin
    for (int l = 0; l < L; l++) begin
      checks++;
      if (out_data[l] != expv[0]) begin failures++; if (failures < 10) $display("FAIL addr %0d lane %0d got %0d exp %0d", out_addr, l, out_data[l], expv[0]); end
      void'(expv.pop_front());
    end
    checks++; if (out_addr != 3'(dumps % V)) failures++;
    dumps++;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic integ(int n);
    longint s [V][L];
    longint r [$];
    for (int v = 0; v < V; v++) for (int l = 0; l < L; l++) s[v][l] = 0;
    for (int f = 0; f < n; f++) for (int v = 0; v < V; v++) for (int l = 0; l < L; l++) begin
      longint x;
      x = (longint'($urandom_range(0, 32'hFFFFFFFF)) - 64'sd2147483648) * 8;
      s[v][l] += x;
      r.push_back(x);
    end
    for (int v = 0; v < V; v++) for (int l = 0; l < L; l++) expv.push_back(s[v][l]);
    acc_len <= 32'(n);
    for (int f = 0; f < n; f++) for (int v = 0; v < V; v++) begin
      while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
      for (int l = 0; l < L; l++) in_data[l] <= IW'(r.pop_front());
      in_valid <= 1; @(posedge clk);
    end
    in_valid <= 0;
  endtask
  initial begin
    for (int l = 0; l < L; l++) in_data[l] = '0;
    repeat (2) @(posedge clk); rst <= 0;
    integ(3); integ(1); integ(5);
    repeat (4) @(posedge clk);
    checks++; if (dumps != 3 * V) begin failures++; $display("FAIL dumps %0d", dumps); end
    checks++; if (out_count != 3) begin failures++; $display("FAIL count %0d", out_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
