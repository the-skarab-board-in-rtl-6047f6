// tb_spead_packetizer: two packets of a 2-packet heap (64-byte payloads) pass through with
// random stalls on out_ready. Checks the three header words field by field (magic word, heap
// counter, sizes, offsets, packet index, registers) and that the payload words follow intact
// with sop on the first header word and eop on the last payload word.
module tb_spead_packetizer;
  localparam int NPKT = 2, NCH = 32, PB = 64, PW = PB / 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] heap_cnt = 7, acc_len = 1000;
  logic [47:0] freq_scale = 48'd1400000000, timestamp = 48'h123456789A;
  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready, out_valid, out_sop, out_eop, out_ready = 1;
  logic [255:0] in_data = 0, out_data;
  logic [0:0] in_pkt = 0;
  int checks = 0, failures = 0;
  spead_packetizer #(.NPKT(NPKT), .NCH(NCH), .PKT_BYTES(PB)) dut (.*);

  logic [255:0] got [$];
  logic gsop [$], geop [$];
  always_ff @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (!rst && out_valid && out_ready) begin got.push_back(out_data); gsop.push_back(out_sop); geop.push_back(out_eop); end
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [63:0] it(int id, longint v); return {1'b1, 15'(id), 48'(v)}; endfunction

  initial begin
    logic [255:0] pay [NPKT][PW];
    repeat (2) @(posedge clk); rst <= 0;
    for (int p = 0; p < NPKT; p++) for (int w = 0; w < PW; w++) begin
      pay[p][w] = {8{$urandom}};
      in_valid <= 1; in_data <= pay[p][w]; in_sop <= (w == 0); in_eop <= (w == PW - 1); in_pkt <= 1'(p);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++; if (got.size() != NPKT * (PW + 3)) begin failures++; $display("FAIL words %0d", got.size()); end
    for (int p = 0; p < NPKT && got.size() == NPKT * (PW + 3); p++) begin
      logic [767:0] h;
      int b;
      b = p * (PW + 3);
      h = {got[b], got[b+1], got[b+2]};
      checks += 8;
      if (h[767:704] != 64'h5304020600000000 + 11) failures++;
      if (h[703:640] != it(1, 7)) failures++;
      if (h[639:576] != it(2, NPKT * PB)) failures++;
      if (h[575:512] != it(3, p * PB)) failures++;
      if (h[511:448] != it(4, PB)) failures++;
      if (h[447:384] != it(16'h1600, p)) failures++;
      if (h[191:128] != it(16'h1604, 1400000000)) failures++;
      if (h[63:0] != it(16'h1606, 48'h123456789A)) failures++;
      checks += 2;
      if (!gsop[b] || gsop[b+1]) failures++;
      if (!geop[b+PW+2] || geop[b+PW+1]) failures++;
      for (int w = 0; w < PW; w++) begin checks++; if (got[b+3+w] != pay[p][w]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
