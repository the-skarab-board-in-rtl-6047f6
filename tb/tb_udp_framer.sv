// tb_udp_framer: two 96-byte packets with random output stalls. The output words are turned
// back into a byte stream; the test checks the packet length (42 + 96 bytes), every header
// field, that the IPv4 header checksums to 0xFFFF, the identification counter, and that the
// payload bytes follow the header unchanged.
module tb_udp_framer;
  localparam int P = 96, PW = P / 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [47:0] src_mac = 48'h020304050607, dst_mac = 48'hAABBCCDDEEFF;
  logic [31:0] src_ip = 32'h0A000002, dst_ip = 32'h0A000001;
  logic [15:0] src_port = 16'd7148, dst_port = 16'd60000, pkt_count;
  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready, out_valid, out_sop, out_eop, out_ready = 1;
  logic [255:0] in_data = 0, out_data;
  logic [5:0] out_bytes;
  int checks = 0, failures = 0;
  udp_framer #(.PAYLOAD_BYTES(P)) dut (.*);

  byte unsigned pk [$];
  byte unsigned pkts [2][$];
  int np = 0;
  always_ff @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (!rst && out_valid && out_ready) begin
      if (out_sop) pk.delete();
      for (int b = 0; b < int'(out_bytes); b++) pk.push_back(out_data[255 - 8*b -: 8]);
      if (out_eop) begin if (np < 2) pkts[np] = pk; np++; end
    end
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [255:0] pay [2][PW];
    repeat (2) @(posedge clk); rst <= 0;
    for (int p = 0; p < 2; p++) for (int w = 0; w < PW; w++) begin
      pay[p][w] = {8{$urandom}};
      in_valid <= 1; in_data <= pay[p][w]; in_sop <= (w == 0); in_eop <= (w == PW - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++; if (np != 2) begin failures++; $display("FAIL packets %0d", np); end
    for (int p = 0; p < 2 && np == 2; p++) begin
      int s;
      checks++; if (pkts[p].size() != 42 + P) begin failures++; $display("FAIL len %0d", pkts[p].size()); continue; end
      checks += 8;
      if ({pkts[p][0], pkts[p][1], pkts[p][2], pkts[p][3], pkts[p][4], pkts[p][5]} != dst_mac) failures++;
      if ({pkts[p][6], pkts[p][7], pkts[p][8], pkts[p][9], pkts[p][10], pkts[p][11]} != src_mac) failures++;
      if ({pkts[p][12], pkts[p][13]} != 16'h0800 || pkts[p][14] != 8'h45) failures++;
      if ({pkts[p][16], pkts[p][17]} != 16'(20 + 8 + P)) failures++;
      if ({pkts[p][18], pkts[p][19]} != 16'(p)) failures++;
      if (pkts[p][23] != 17 || {pkts[p][30], pkts[p][31], pkts[p][32], pkts[p][33]} != dst_ip) failures++;
      if ({pkts[p][36], pkts[p][37]} != dst_port || {pkts[p][38], pkts[p][39]} != 16'(8 + P)) failures++;
      s = 0;
      for (int i = 14; i < 34; i += 2) s += {pkts[p][i], pkts[p][i+1]};
      while (s > 16'hFFFF) s = (s & 16'hFFFF) + (s >> 16);
      if (s != 16'hFFFF) begin failures++; $display("FAIL checksum %h", s); end
      for (int b = 0; b < P; b++) begin
        checks++;
        if (pkts[p][42 + b] != pay[p][b / 32][255 - 8*(b % 32) -: 8]) failures++;
      end
    end
    checks++; if (pkt_count != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
