// tb_packet_trickler: small instance (64 channels, 4 channels per write, 2 per read word,
// 8-word packets) with a 10 ns write clock and a 7 ns read clock. An integration is written in
// bit-reversed index order; the read stream must present the channels in natural order with
// correct sop/eop/packet index, respect the inter-packet delay and random out_ready stalls.
// A second integration written while the buffer is busy must be dropped and counted; a third
// one, written after the buffer is free, must come out again.
module tb_packet_trickler;
  localparam int NCH = 64, WR_CH = 4, CH_W = 32, RD_W = 64, PW = 8;
  localparam int NW = NCH / WR_CH, RD_CH = RD_W / CH_W, NRW = NCH / RD_CH, NPKT = NRW / PW;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  always #5 wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;
  logic in_valid = 0;
  logic [3:0] in_addr = 0;
  logic [WR_CH*CH_W-1:0] in_data = 0;
  logic [31:0] drops, pkt_delay = 20, heap_id;
  logic out_ready = 1, out_valid, out_sop, out_eop, busy_rd;
  logic [RD_W-1:0] out_data;
  logic [1:0] out_pkt;
  int checks = 0, failures = 0;

  packet_trickler #(.NCH(NCH), .WR_CH(WR_CH), .CH_W(CH_W), .RD_W(RD_W), .PKT_WORDS(PW)) dut (.*);

  logic [CH_W-1:0] chv [NCH];
  int rw = 0, last_eop_t = -1000, rcyc = 0, gaps_ok = 0, heaps = 0;
  always_ff @(posedge rd_clk) rcyc++;
  always_ff @(posedge rd_clk) if (!rd_rst) begin
    out_ready <= ($urandom_range(0, 4) != 0);
    if (out_valid && out_ready) begin
      checks++;
      for (int r = 0; r < RD_CH; r++)
        if (out_data[(RD_CH-1-r)*CH_W +: CH_W] != chv[rw * RD_CH + r]) begin
          failures++; if (failures < 10) $display("FAIL word %0d ch %0d", rw, rw * RD_CH + r);
        end
      checks++;
      if (out_sop != (rw % PW == 0) || out_eop != (rw % PW == PW - 1) || out_pkt != 2'(rw / PW)) failures++;
      if (out_sop && rw != 0) begin
        checks++;
        if (rcyc - last_eop_t < int'(pkt_delay)) begin failures++; $display("FAIL gap %0d", rcyc - last_eop_t); end
        else gaps_ok++;
      end
      if (out_eop) last_eop_t = rcyc;
      rw = (rw + 1) % NRW;
      if (rw == 0) heaps++;
    end
  end

  task automatic write_integ(bit keep);
    for (int i = 0; i < NW; i++) begin
      int k1;
      logic [WR_CH*CH_W-1:0] d;
      k1 = 0;
      for (int b = 0; b < 4; b++) if (i & (1 << b)) k1 |= 1 << (3 - b);
      for (int l = 0; l < WR_CH; l++) begin
        logic [CH_W-1:0] v;
        v = $urandom;
        d[(WR_CH-1-l)*CH_W +: CH_W] = v;
        if (keep) chv[k1 + l * NW] = v;
      end
      in_valid <= 1; in_addr <= 4'(i); in_data <= d;
      @(posedge wr_clk);
    end
    in_valid <= 0;
  endtask

  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge wr_clk); wr_rst <= 0; rd_rst <= 0;
    repeat (3) @(posedge wr_clk);
    write_integ(1);
    repeat (10) @(posedge wr_clk);
    write_integ(0);               // buffer busy: dropped
    wait (heaps == 1);
    wait (!busy_rd);
    repeat (10) @(posedge wr_clk);
    checks++; if (drops != 1) begin failures++; $display("FAIL drops %0d", drops); end
    checks++; if (heap_id != 0) failures++;
    write_integ(1);
    wait (heaps == 2);
    checks++; if (heap_id != 1) begin failures++; $display("FAIL heap_id %0d", heap_id); end
    checks++; if (gaps_ok != 2 * (NPKT - 1)) begin failures++; $display("FAIL gaps %0d", gaps_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
