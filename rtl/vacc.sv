// vacc: vector accumulator with data-valid input.
//
// Frames of VLEN words (LANES values each) arrive on in_valid; word i of every frame is added
// to element i of an accumulation memory at full ACC_W-bit precision. The integration lasts
// acc_len frames (a register, sampled at the start of each integration; 0 acts as 1). The
// first frame of an integration overwrites the memory, the last one is not written back but
// sent out: out_valid marks VLEN words, each with its index out_addr, then a new integration
// starts. Only valid inputs are accumulated, so the same block serves a stream with a sample
// every clock (wideband) and a gappy one (narrowband). sync restarts the frame and the
// integration. out_count counts completed integrations (used as the SPEAD heap counter).
//
// The memory is read one clock ahead (registered read of the next address), written on the
// valid clock; output latency one clock. The document gives the function, the 64-bit width
// and the data-valid behaviour; the memory organisation is this design's.
module vacc #(
  parameter int unsigned LANES = 32,
  parameter int unsigned VLEN  = 256,
  parameter int unsigned IW    = 37,
  parameter int unsigned ACC_W = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sync,
  input  logic [31:0]                acc_len,
  input  logic                       in_valid,
  input  logic signed [IW-1:0]       in_data  [LANES],
  output logic                       out_valid,
  output logic [$clog2(VLEN)-1:0]    out_addr,
  output logic signed [ACC_W-1:0]    out_data [LANES],
  output logic [31:0]                out_count
);
  localparam int unsigned AB = $clog2(VLEN);

  logic [AB-1:0] addr, addr_n;
  logic [31:0]   frame, len;
  logic          first, last;

  logic [LANES*ACC_W-1:0] mem [VLEN];
  logic [LANES*ACC_W-1:0] rdq, wr;

  assign first  = (frame == 0);
  assign last   = (frame + 1 >= ((first ? acc_len : len) == 0 ? 32'd1 : (first ? acc_len : len)));
  assign addr_n = in_valid ? ((addr == AB'(VLEN - 1)) ? '0 : addr + 1'b1) : addr;

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      logic signed [ACC_W-1:0] prev;
      prev = first ? '0 : $signed(rdq[l*ACC_W +: ACC_W]);
      wr[l*ACC_W +: ACC_W] = prev + ACC_W'(in_data[l]);
    end
  end

  always_ff @(posedge clk) begin
    rdq <= mem[addr_n];
    if (in_valid && !last) mem[addr] <= wr;
  end

  always_ff @(posedge clk) begin
    if (rst || sync) begin
      addr      <= '0;
      frame     <= '0;
      len       <= 32'd1;
      out_valid <= 1'b0;
      out_addr  <= '0;
      if (rst) out_count <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        addr <= addr_n;
        if (first && addr == '0) len <= acc_len;
        out_addr <= addr;
        for (int l = 0; l < int'(LANES); l++) out_data[l] <= $signed(wr[l*ACC_W +: ACC_W]);
        if (addr == AB'(VLEN - 1)) begin
          if (last) begin
            frame     <= '0;
            out_count <= out_count + 1'b1;
          end else begin
            frame <= frame + 1'b1;
          end
        end
      end
    end
  end
endmodule
