// serializer_4to1: turns the bursty, parallel output of the ADC in DDC mode into one
// sequential complex sample stream.
//
// Each input clock may carry up to NPAR complex samples per signal (NSIG signals, e.g. two
// polarisations, sampled together); in_count says how many of the NPAR slots are valid, slot 0
// being the oldest. The samples are written into a FIFO of DEPTH entries and read out one per
// clock whenever the FIFO holds data, with out_valid marking each sample. With decimation by
// 16 the average input rate is one sample per clock and the output becomes continuous after the
// first burst; with decimation by 32 it is half that and out_valid marks the valid samples.
// An input that would overfill the FIFO sets the sticky flag 'overflow' and is dropped.
// The document gives the function (bursts reordered through a FIFO, data-valid output);
// the slot order, depth and overflow handling are this design's choices.
module serializer_4to1 #(
  parameter int unsigned NPAR  = 4,
  parameter int unsigned NSIG  = 2,
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic [$clog2(NPAR):0]       in_count,
  input  logic signed [W-1:0]         in_re  [NSIG][NPAR],
  input  logic signed [W-1:0]         in_im  [NSIG][NPAR],
  output logic                        out_valid,
  output logic signed [W-1:0]         out_re [NSIG],
  output logic signed [W-1:0]         out_im [NSIG],
  output logic                        overflow
);
  localparam int unsigned AB = $clog2(DEPTH);
  localparam int unsigned EW = 2 * W * NSIG;

  logic [EW-1:0] fifo [DEPTH];
  logic [AB:0]   wptr, rptr, level;
  logic          rd;

  assign level = wptr - rptr;
  assign rd    = (level != 0);

  always_ff @(posedge clk) begin
    if (in_valid && (32'(level) + 32'(in_count) <= DEPTH)) begin
      for (int i = 0; i < int'(NPAR); i++) begin
        if (i < int'(in_count)) begin
          logic [EW-1:0] e;
          for (int s = 0; s < int'(NSIG); s++) e[s*2*W +: 2*W] = {in_re[s][i], in_im[s][i]};
          fifo[AB'(wptr + (AB+1)'(i))] <= e;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0; rptr <= '0; out_valid <= 1'b0; overflow <= 1'b0;
      for (int s = 0; s < int'(NSIG); s++) begin out_re[s] <= '0; out_im[s] <= '0; end
    end else begin
      if (in_valid) begin
        if (32'(level) + 32'(in_count) <= DEPTH) wptr <= wptr + (AB+1)'(in_count);
        else overflow <= 1'b1;
      end
      out_valid <= rd;
      if (rd) begin
        rptr <= rptr + 1'b1;
        for (int s = 0; s < int'(NSIG); s++)
          {out_re[s], out_im[s]} <= fifo[rptr[AB-1:0]][s*2*W +: 2*W];
      end
    end
  end
endmodule
