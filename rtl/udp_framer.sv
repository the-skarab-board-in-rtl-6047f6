// udp_framer: Ethernet II / IPv4 / UDP encapsulation of fixed-size packets on a 256-bit bus.
//
// Each packet of PAYLOAD_BYTES bytes (here the 96-byte SPEAD header plus 8192 bytes of data,
// a multiple of 32) gets a 42-byte header: destination and source MAC, EtherType 0x0800; IPv4
// version 4, IHL 5, total length, an identification that counts packets, don't-fragment, TTL 64,
// protocol 17 and the header checksum; UDP ports, length and a zero (unused) checksum. The
// destination IP address and port come from registers, as in the document; the destination
// MAC is an input here (the document's block obtains it through ARP, which is not built).
//
// Because 42 is not a multiple of 32 every payload byte moves 10 bytes down the bus: output
// word 0 is header bytes 0-31, word 1 is header bytes 32-41 followed by payload bytes 0-21, and
// each later word joins the last 10 bytes of the previous input word with the first 22 of the
// current one. One extra word, with out_bytes = 10, ends the packet. Byte 0 of a word is bits
// [255:248]. Valid/ready on both sides; in_ready is low while the first header word and the
// tail word are sent. No MAC, PCS or transceiver is included.
module udp_framer #(
  parameter int unsigned PAYLOAD_BYTES = 8288
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [47:0]   src_mac,
  input  logic [47:0]   dst_mac,
  input  logic [31:0]   src_ip,
  input  logic [31:0]   dst_ip,
  input  logic [15:0]   src_port,
  input  logic [15:0]   dst_port,
  input  logic          in_valid,
  input  logic [255:0]  in_data,
  input  logic          in_sop,
  input  logic          in_eop,
  output logic          in_ready,
  output logic          out_valid,
  output logic [255:0]  out_data,
  output logic          out_sop,
  output logic          out_eop,
  output logic [5:0]    out_bytes,
  input  logic          out_ready,
  output logic [15:0]   pkt_count
);
  localparam logic [15:0] IP_LEN  = 16'(20 + 8 + PAYLOAD_BYTES);
  localparam logic [15:0] UDP_LEN = 16'(8 + PAYLOAD_BYTES);

  logic [159:0] iph;
  logic [335:0] hdr;
  logic [19:0]  csum_acc;
  logic [15:0]  csum;

  always_comb begin
    iph = {8'h45, 8'h00, IP_LEN, pkt_count, 16'h4000, 8'd64, 8'd17, 16'h0000, src_ip, dst_ip};
    csum_acc = '0;
    for (int i = 0; i < 10; i++) csum_acc += 20'(iph[i*16 +: 16]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum = ~csum_acc[15:0];
    hdr = {dst_mac, src_mac, 16'h0800,
           8'h45, 8'h00, IP_LEN, pkt_count, 16'h4000, 8'd64, 8'd17, csum, src_ip, dst_ip,
           src_port, dst_port, UDP_LEN, 16'h0000};
  end

  typedef enum logic [1:0] {F_IDLE, F_BODY, F_TAIL} fstate_t;
  fstate_t st;
  logic [79:0] carry;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= F_IDLE; carry <= '0; pkt_count <= '0;
    end else case (st)
      F_IDLE: if (in_valid && in_sop && out_ready) begin
        st    <= F_BODY;
        carry <= hdr[79:0];

      end
      F_BODY: if (in_valid && out_ready) begin
        carry <= in_data[79:0];

        if (in_eop) st <= F_TAIL;
      end
      F_TAIL: if (out_ready) begin
        st        <= F_IDLE;
        pkt_count <= pkt_count + 1'b1;
      end
      default: st <= F_IDLE;
    endcase
  end

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_sop   = 1'b0;
    out_eop   = 1'b0;
    out_bytes = 6'd32;
    out_data  = {carry, in_data[255:80]};
    case (st)
      F_IDLE: if (in_valid && in_sop) begin
        out_valid = 1'b1;
        out_sop   = 1'b1;
        out_data  = hdr[335:80];
      end
      F_BODY: begin
        in_ready  = out_ready;
        out_valid = in_valid;
      end
      F_TAIL: begin
        out_valid = 1'b1;
        out_eop   = 1'b1;
        out_bytes = 6'd10;
        out_data  = {carry, 176'b0};
      end
      default: ;
    endcase
  end

  a_payload_size: assert property (@(posedge clk) disable iff (rst) (st == F_IDLE) |-> (PAYLOAD_BYTES % 32 == 0));
endmodule
