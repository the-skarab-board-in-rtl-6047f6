// noise_cal: drive for the fast noise-injection (calibration) line on the ADC board's
// general-purpose connector. In internal mode it produces a square wave of 'period' clocks,
// high for 'on_time' clocks of each period; in external mode it follows cal_ext, taken in
// through a two-flop synchroniser. cal_out is the drive (also usable to tag data), and cal_edges counts rising edges. The document gives only that the line can be driven
// or received; period and duty registers are this design's choice.
module noise_cal (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        external,
  input  logic [31:0] period,
  input  logic [31:0] on_time,
  input  logic        cal_ext,
  output logic        cal_out,
  output logic [31:0] cal_edges
);
  logic [31:0] cnt;
  logic s1, s2, lvl, lvl_q;

  always_comb begin
    if (!enable)       lvl = 1'b0;
    else if (external) lvl = s2;
    else               lvl = (cnt < on_time);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; s1 <= 1'b0; s2 <= 1'b0; lvl_q <= 1'b0; cal_edges <= '0;
    end else begin
      s1 <= cal_ext; s2 <= s1;
      cnt <= (!enable || cnt + 1 >= period) ? '0 : cnt + 1;
      lvl_q <= lvl;
      if (lvl && !lvl_q) cal_edges <= cal_edges + 1'b1;
    end
  end
  assign cal_out   = lvl_q;
endmodule
