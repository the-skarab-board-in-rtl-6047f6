// stokes: correlation products of two polarisations, channel by channel.
// For each of LANES parallel channels with spectra X and Y it forms
//   XX = |X|^2, YY = |Y|^2, Re(XY*) = Xr*Yr + Xi*Yi, Im(XY*) = Xi*Yr - Xr*Yi,
// the four products from which the Stokes parameters are derived (the document's definition).
// Products are exact (2W+1 bits). One register stage: outputs follow the inputs by one clock,
// out_valid follows in_valid.
module stokes #(
  parameter int unsigned LANES = 8,
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
  output logic signed [2*W:0]     xx    [LANES],
  output logic signed [2*W:0]     yy    [LANES],
  output logic signed [2*W:0]     xy_re [LANES],
  output logic signed [2*W:0]     xy_im [LANES]
);
  localparam int unsigned PW = 2 * W + 1;
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    for (int l = 0; l < int'(LANES); l++) begin
      xx[l]    <= PW'(xr[l]) * PW'(xr[l]) + PW'(xi[l]) * PW'(xi[l]);
      yy[l]    <= PW'(yr[l]) * PW'(yr[l]) + PW'(yi[l]) * PW'(yi[l]);
      xy_re[l] <= PW'(xr[l]) * PW'(yr[l]) + PW'(xi[l]) * PW'(yi[l]);
      xy_im[l] <= PW'(xi[l]) * PW'(yr[l]) - PW'(xr[l]) * PW'(yi[l]);
    end
  end
endmodule
