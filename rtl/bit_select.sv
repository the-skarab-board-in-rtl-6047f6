// bit_select: requantisation of the 64-bit integrated spectra to 32 bits.
// Each lane is shifted right by the programmable amount 'shift' (a barrel shifter, as in the
// document; the usual setting is 29 - log2(acc_len)) and then clipped to the output range:
// lanes flagged in SIGNED_MASK (cross products) saturate to the signed 32-bit range, the
// others (auto products, never negative) to the unsigned range. Clipping instead of wrapping
// is this design's choice. out_clip flags a clipped value. One clock of latency; out_addr
// carries the vector index through.
module bit_select #(
  parameter int unsigned     LANES       = 32,
  parameter int unsigned     IW          = 64,
  parameter int unsigned     OW          = 32,
  parameter int unsigned     AW          = 8,
  parameter logic [LANES-1:0] SIGNED_MASK = '0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(IW)-1:0]      shift,
  input  logic                       in_valid,
  input  logic [AW-1:0]              in_addr,
  input  logic signed [IW-1:0]       in_data  [LANES],
  output logic                       out_valid,
  output logic [AW-1:0]              out_addr,
  output logic [OW-1:0]              out_data [LANES],
  output logic                       out_clip
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_clip  <= 1'b0;
    end else begin
      logic clip;
      clip = 1'b0;
      out_valid <= in_valid;
      out_addr  <= in_addr;
      for (int l = 0; l < int'(LANES); l++) begin
        logic signed [IW-1:0] v;
        v = in_data[l] >>> shift;
        if (SIGNED_MASK[l]) begin
          if (v > IW'((64'(1) << (OW - 1)) - 1)) begin out_data[l] <= OW'((64'(1) << (OW - 1)) - 1); clip = 1'b1; end
          else if (v < -IW'(64'(1) << (OW - 1))) begin out_data[l] <= OW'(64'(1) << (OW - 1)); clip = 1'b1; end
          else out_data[l] <= v[OW-1:0];
        end else begin
          if (v < 0) begin out_data[l] <= '0; clip = 1'b1; end
          else if (v > IW'((64'(1) << OW) - 1)) begin out_data[l] <= '1; clip = 1'b1; end
          else out_data[l] <= v[OW-1:0];
        end
      end
      out_clip <= in_valid && clip;
    end
  end
endmodule
