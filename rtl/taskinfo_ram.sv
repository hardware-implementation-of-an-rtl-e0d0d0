// taskinfo_ram: true dual-port synchronous RAM, one field group of the
// taskinfo table (the deadline RAM or the execution-time RAM).
//
// Both ports can read or write one word per clock, as in an FPGA block RAM.
// A read returns data on the clock after the address (registered output,
// held while the port is not enabled). A read on the port that is writing
// returns the old contents. If both ports write the same address in one
// cycle, port B wins. The block-RAM role follows the original article; port
// behaviour on collisions is this design's choice.
module taskinfo_ram #(
  parameter int unsigned DEPTH = edf_pkg::MAX_TASKS,
  parameter int unsigned W     = edf_pkg::TIME_W,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
