// spead_packetizer: puts a 96-byte SPEAD header in front of every 8192-byte payload.
//
// The header is twelve 64-bit words on three 256-bit bus words: the SPEAD-64-48 magic word
// (0x53, version 4, 2-byte item identifiers, 6-byte heap addresses, 11 items) followed by 11
// immediate items. The document fixes the header length and states that it carries a packet
// index, the heap size, the frequency scale and the number of packets per heap; the item set
// and identifiers below are this design's choice:
//   0x0001 heap counter (integration number)   0x0002 heap size (bytes)
//   0x0003 heap offset of this packet           0x0004 payload length (bytes)
//   0x1600 packet index                         0x1601 packets per heap
//   0x1602 channels per heap                    0x1603 first channel of this packet
//   0x1604 frequency scale (register)           0x1605 accumulation length (register)
//   0x1606 timestamp (register)
// The first payload word (in_sop) starts a packet: three header words are sent while in_ready
// is held low, then the payload passes through with valid/ready until in_eop. Byte 0 of a bus
// word is bits [255:248].
module spead_packetizer #(
  parameter int unsigned NPKT      = 4,
  parameter int unsigned NCH       = 2048,
  parameter int unsigned PKT_BYTES = 8192,
  parameter int unsigned W         = 256
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [31:0]                  heap_cnt,
  input  logic [47:0]                  freq_scale,
  input  logic [31:0]                  acc_len,
  input  logic [47:0]                  timestamp,
  input  logic                         in_valid,
  input  logic [W-1:0]                 in_data,
  input  logic                         in_sop,
  input  logic                         in_eop,
  input  logic [$clog2(NPKT)-1:0]      in_pkt,
  output logic                         in_ready,
  output logic                         out_valid,
  output logic [W-1:0]                 out_data,
  output logic                         out_sop,
  output logic                         out_eop,
  input  logic                         out_ready
);
  localparam int unsigned CH_PER_PKT = NCH / NPKT;

  typedef enum logic [2:0] {S_IDLE, S_H0, S_H1, S_H2, S_PAY} state_t;
  state_t st;

  function automatic logic [63:0] item(input logic [14:0] id, input logic [47:0] v);
    return {1'b1, id, v};
  endfunction

  logic [767:0] hdr;
  always_comb begin
    hdr = {
      64'h5304_0206_0000_000B,
      item(15'h0001, 48'(heap_cnt)),
      item(15'h0002, 48'(NPKT * PKT_BYTES)),
      item(15'h0003, 48'(32'(in_pkt) * PKT_BYTES)),
      item(15'h0004, 48'(PKT_BYTES)),
      item(15'h1600, 48'(in_pkt)),
      item(15'h1601, 48'(NPKT)),
      item(15'h1602, 48'(NCH)),
      item(15'h1603, 48'(32'(in_pkt) * CH_PER_PKT)),
      item(15'h1604, freq_scale),
      item(15'h1605, 48'(acc_len)),
      item(15'h1606, timestamp)
    };
  end

  always_ff @(posedge clk) begin
    if (rst) st <= S_IDLE;
    else case (st)
      S_IDLE: if (in_valid && in_sop) st <= S_H0;
      S_H0:   if (out_ready) st <= S_H1;
      S_H1:   if (out_ready) st <= S_H2;
      S_H2:   if (out_ready) st <= S_PAY;
      S_PAY:  if (in_valid && out_ready && in_eop) st <= S_IDLE;
      default: st <= S_IDLE;
    endcase
  end

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_sop   = 1'b0;
    out_eop   = 1'b0;
    out_data  = in_data;
    case (st)
      S_H0: begin out_valid = 1'b1; out_sop = 1'b1; out_data = hdr[767:512]; end
      S_H1: begin out_valid = 1'b1; out_data = hdr[511:256]; end
      S_H2: begin out_valid = 1'b1; out_data = hdr[255:0]; end
      S_PAY: begin
        in_ready  = out_ready;
        out_valid = in_valid;
        out_eop   = in_eop;
      end
      default: ;
    endcase
  end

  // the first payload word must wait at the input while the header is sent
  a_hold_first_word: assert property (@(posedge clk) disable iff (rst)
    (st inside {S_H0, S_H1, S_H2}) |-> (in_valid && in_sop));
endmodule
