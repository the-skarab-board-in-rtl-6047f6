// packet_trickler: packet-rate limiter between the integrator (DSP clock) and the 40 GbE
// stream (Ethernet clock).
//
// One whole integration is written into a dual-clock memory: WR_CH channels of CH_W bits per
// write (wideband: 8 channels x 4 products x 32 bits = 1024 bits; narrowband: 1 channel x 2
// products x 32 bits = 64 bits). The FFT delivers channels in bit-reversed order, so the write
// index i is mapped to channel bitrev(i) + lane*NCH/WR_CH (BITREV=1), which also undoes the
// missing FFT reorder. Writing starts only at index 0 and stops once the last index is stored;
// the read side is then started. It reads RD_W-bit words (RD_W/CH_W consecutive channels,
// lowest channel in the most significant bits) in packets of PKT_WORDS words, waits pkt_delay
// Ethernet clocks after each packet (the inter-packet delay) and, after the last packet,
// frees the buffer. An integration that arrives while the buffer is busy is dropped and
// counted in drops (the memory-overflow case the delay setting must avoid).
//
// The memory is split into WR_CH*RD_CH banks so that every write and every read touches each
// bank once. Read port: valid/ready stream with sop/eop and the packet index; read latency one
// clock, stalls hold the read register. The two clock domains exchange only toggle flags
// through two-flop synchronisers; heap_id (integration number) is stable while it is read.
module packet_trickler #(
  parameter int unsigned NCH       = 2048,
  parameter int unsigned WR_CH     = 8,
  parameter int unsigned CH_W      = 128,
  parameter int unsigned RD_W      = 256,
  parameter int unsigned PKT_WORDS = 256,
  parameter bit          BITREV    = 1'b1
) (
  input  logic                         wr_clk,
  input  logic                         wr_rst,
  input  logic                         in_valid,
  input  logic [$clog2(NCH/WR_CH)-1:0] in_addr,
  input  logic [WR_CH*CH_W-1:0]        in_data,
  output logic [31:0]                  drops,

  input  logic                         rd_clk,
  input  logic                         rd_rst,
  input  logic [31:0]                  pkt_delay,
  input  logic                         out_ready,
  output logic                         out_valid,
  output logic [RD_W-1:0]              out_data,
  output logic                         out_sop,
  output logic                         out_eop,
  output logic [$clog2(NCH*CH_W/(RD_W*PKT_WORDS))-1:0] out_pkt,
  output logic [31:0]                  heap_id,
  output logic                         busy_rd
);
  localparam int unsigned RD_CH  = RD_W / CH_W;
  localparam int unsigned NW     = NCH / WR_CH;            // writes per integration
  localparam int unsigned NWB    = $clog2(NW);
  localparam int unsigned NB     = WR_CH * RD_CH;          // banks
  localparam int unsigned D      = NCH / NB;               // bank depth
  localparam int unsigned DB     = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned NRW    = NCH / RD_CH;            // read words per integration
  localparam int unsigned NRWB   = $clog2(NRW);
  localparam int unsigned NPKT   = NRW / PKT_WORDS;
  localparam int unsigned PB     = (NPKT > 1) ? $clog2(NPKT) : 1;
  localparam int unsigned PWB    = $clog2(PKT_WORDS);

  // ---------------- write side ----------------
  logic busy, writing, full_tog, done_s1, done_s2, done_s3, done_tog;
  logic [31:0] icount;
  logic [NWB-1:0] k1;
  logic wr_go;

  assign k1    = BITREV ? NWB'(skarab_pkg::bitrev(32'(in_addr), NWB)) : in_addr;
  assign wr_go = in_valid && !busy && (writing || in_addr == '0);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      busy <= 1'b0; writing <= 1'b0; full_tog <= 1'b0; drops <= '0; icount <= '0;
      done_s1 <= 1'b0; done_s2 <= 1'b0; done_s3 <= 1'b0;
    end else begin
      done_s1 <= done_tog; done_s2 <= done_s1; done_s3 <= done_s2;
      if (done_s3 != done_s2) busy <= 1'b0;
      if (in_valid && in_addr == '0 && busy) drops <= drops + 1'b1;
      if (wr_go) begin
        writing <= 1'b1;
        if (in_addr == NWB'(NW - 1)) begin
          writing  <= 1'b0;
          busy     <= 1'b1;
          full_tog <= ~full_tog;
          icount   <= icount + 1'b1;
        end
      end
    end
  end

  // ---------------- banks ----------------
  logic [DB-1:0] raddr;
  logic          rd_en;
  logic [CH_W-1:0] bank_q [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    localparam int unsigned LANE = b / RD_CH;
    localparam int unsigned SUB  = b % RD_CH;
    logic [CH_W-1:0] mem [D];
    logic we;
    assign we = wr_go && ((32'(k1) % RD_CH) == SUB);
    always_ff @(posedge wr_clk) begin
      if (we) mem[DB'(32'(k1) / RD_CH)] <= in_data[(WR_CH - 1 - LANE) * CH_W +: CH_W];
    end
    always_ff @(posedge rd_clk) begin
      if (rd_en) bank_q[b] <= mem[raddr];
    end
  end

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_SEND, R_GAP} rstate_t;
  rstate_t rstate;
  logic full_s1, full_s2, full_s3;
  logic [NRWB-1:0] rword;
  logic [31:0] gap;
  logic issue;
  logic v1;
  logic [31:0] lane1;
  logic sop1, eop1;
  logic [PB-1:0] pkt1;

  assign rd_en = !v1 || out_ready;
  assign issue = (rstate == R_SEND) && rd_en;
  always_comb begin
    logic [31:0] ch0;
    ch0   = 32'(rword) * RD_CH;
    raddr = DB'((ch0 % NW) / RD_CH);
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rstate <= R_IDLE; rword <= '0; gap <= '0; done_tog <= 1'b0;
      full_s1 <= 1'b0; full_s2 <= 1'b0; full_s3 <= 1'b0;
      v1 <= 1'b0; sop1 <= 1'b0; eop1 <= 1'b0; pkt1 <= '0; lane1 <= '0;
      heap_id <= '0;
    end else begin
      full_s1 <= full_tog; full_s2 <= full_s1; full_s3 <= full_s2;
      if (rd_en) begin
        v1 <= issue;
        if (issue) begin
          lane1 <= (32'(rword) * RD_CH) / NW;
          sop1  <= (rword[PWB-1:0] == '0);
          eop1  <= (rword[PWB-1:0] == '1);
          pkt1  <= PB'(32'(rword) / PKT_WORDS);
        end
      end
      case (rstate)
        R_IDLE: if (full_s3 != full_s2) begin
          rstate  <= R_SEND;
          rword   <= '0;
          heap_id <= icount - 1;
        end
        R_SEND: if (issue) begin
          rword <= rword + 1'b1;
          if (rword[PWB-1:0] == '1) begin
            rstate <= R_GAP;
            gap    <= pkt_delay;
          end
        end
        R_GAP: begin
          if (gap != 0) gap <= gap - 1;
          else if (rword == '0) begin      // wrapped: all packets sent
            rstate   <= R_IDLE;
            done_tog <= ~done_tog;
          end else rstate <= R_SEND;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int r = 0; r < int'(RD_CH); r++)
      out_data[(RD_CH - 1 - r) * CH_W +: CH_W] = bank_q[lane1 * RD_CH + 32'(r)];
  end
  assign out_valid = v1;
  assign out_sop   = sop1;
  assign out_eop   = eop1;
  assign out_pkt   = pkt1;
  assign busy_rd   = (rstate != R_IDLE);

  // heap_id crosses domains as a quasi-static value: icount changes only on the write that
  // fills the buffer, several clocks before the read side samples it.
endmodule
