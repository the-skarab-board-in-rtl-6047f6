// autocorr: power spectra of two polarisations, XX = |X|^2 and YY = |Y|^2, for LANES parallel
// channels (the narrowband design computes only these two, as the document states, to save
// accumulator memory). Exact 2W+1-bit products, one clock of latency, valid follows input.
module autocorr #(
  parameter int unsigned LANES = 1,
  parameter int unsigned W     = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     xr [LANES],
  input  logic signed [W-1:0]     xi [LANES],
  input  logic signed [W-1:0]     yr [LANES],
  input  logic signed [W-1:0]     yi [LANES],
  output logic                    out_valid,
  output logic signed [2*W:0]     xx [LANES],
  output logic signed [2*W:0]     yy [LANES]
);
  localparam int unsigned PW = 2 * W + 1;
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    for (int l = 0; l < int'(LANES); l++) begin
      xx[l] <= PW'(xr[l]) * PW'(xr[l]) + PW'(xi[l]) * PW'(xi[l]);
      yy[l] <= PW'(yr[l]) * PW'(yr[l]) + PW'(yi[l]) * PW'(yi[l]);
    end
  end
endmodule
