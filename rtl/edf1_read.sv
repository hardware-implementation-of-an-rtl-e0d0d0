// edf1_read: Read module of the first EDF engine.
//
// Converts the inner loop index j from the loop generator into a read
// address for the deadline and execution-time RAMs, and delays the index and
// the `first` flag by one clock so that they arrive together with the RAM's
// registered read data (the Compare stage). Latency: one clock, one read
// per clock. The address mapping (element k at address k) is this design's
// choice.
module edf1_read
  import edf_pkg::*;
#(
  parameter int unsigned N  = MAX_TASKS,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] j,
  input  logic             first,
  output logic             ram_en,
  output logic [AW-1:0]    ram_addr,
  output logic             d_valid,  // RAM data of element d_idx is valid
  output logic [IDX_W-1:0] d_idx,
  output logic             d_first
);
  assign ram_en   = rd_en;
  assign ram_addr = AW'(j);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_idx   <= '0;
      d_first <= 1'b0;
    end else begin
      d_valid <= rd_en;
      d_first <= rd_en && first;
      if (rd_en) d_idx <= j;
    end
  end
endmodule
