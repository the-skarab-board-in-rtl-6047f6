// adc_rms: input level meter, one per ADC signal.
// The squares of all LANES samples of every clock are summed over INT_CLOCKS clocks
// (65,536 clocks = 2^20 samples for 16 lanes, as in the document) and the total is then
// published in the 32-bit register rms_sum, with rms_count counting the updates. The full sum
// of 2^20 squared 12-bit samples needs 43 bits; the register keeps it shifted right by SHIFT
// bits (saturating), so that rms_sum * 2^SHIFT / (INT_CLOCKS*LANES) is the mean square and its
// square root the RMS amplitude (the target is about 1/8 of full scale, i.e. 256). The shift
// and saturation are this design's choice: the document gives only the 32-bit register.
module adc_rms #(
  parameter int unsigned LANES      = 16,
  parameter int unsigned W          = 12,
  parameter int unsigned INT_CLOCKS = 65536,
  parameter int unsigned SHIFT      = 11
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W-1:0]   in_data [LANES],
  output logic [31:0]           rms_sum,
  output logic [31:0]           rms_count
);
  localparam int unsigned SW = 2 * W + $clog2(LANES) + $clog2(INT_CLOCKS) + 1;
  logic [SW-1:0] acc, sq;
  logic [$clog2(INT_CLOCKS)-1:0] cnt;

  always_comb begin
    sq = '0;
    for (int l = 0; l < int'(LANES); l++) begin
      logic signed [SW-1:0] t;
      t  = SW'(in_data[l]);
      sq += SW'(t * t);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; cnt <= '0; rms_sum <= '0; rms_count <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == $clog2(INT_CLOCKS)'(INT_CLOCKS - 1)) begin
        logic [SW-1:0] tot;
        tot = (acc + sq) >> SHIFT;
        rms_sum   <= (tot > SW'(32'hFFFF_FFFF)) ? 32'hFFFF_FFFF : tot[31:0];
        rms_count <= rms_count + 1'b1;
        acc       <= '0;
      end else begin
        acc <= acc + sq;
      end
    end
  end
endmodule
