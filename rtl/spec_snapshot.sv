// spec_snapshot: spectrum memories for host read-out of the requantised XX and YY spectra
// (used in software to measure the system temperature with RFI channels excised).
// LANES memories of DEPTH words are fully rewritten after every integration from the
// bit-selection output (in_valid, in_addr, in_data); the host reads word rd_addr of all lanes
// with one clock of latency. snap_count increments when the last word of a snapshot is written,
// so software can tell a fresh snapshot. The document gives the memories' purpose and sizes.
module spec_snapshot #(
  parameter int unsigned LANES = 16,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [$clog2(DEPTH)-1:0]   in_addr,
  input  logic [W-1:0]               in_data [LANES],
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output logic [W-1:0]               rd_data [LANES],
  output logic [31:0]                snap_count
);
  for (genvar l = 0; l < LANES; l++) begin : g_mem
    logic [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (in_valid) mem[in_addr] <= in_data[l];
      rd_data[l] <= mem[rd_addr];
    end
  end
  always_ff @(posedge clk) begin
    if (rst) snap_count <= '0;
    else if (in_valid && in_addr == $clog2(DEPTH)'(DEPTH - 1)) snap_count <= snap_count + 1'b1;
  end
endmodule
