// edf1_feasibility: EDF module of the first engine (schedulability test).
//
// Holds the cumulative finish time. `init` loads it with the current
// absolute time at the start of a run. In every write-back slot (`ew`) the
// remaining execution time of the element just placed (the minimum of the
// iteration, so elements arrive in ascending deadline order) is added, and
// `viol` reports, in that same cycle, whether the new cumulative finish time
// exceeds that element's absolute deadline (equation (1) of EDF). The
// register is updated at the end of the `ew` cycle. An inactive element
// (they come last) neither adds time nor raises a violation. The cumulative value is
// wider than the time so that the sum cannot overflow (this design's choice).
module edf1_feasibility
  import edf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  time_t now,
  input  logic  ew,
  input  time_t ex,
  input  time_t dl,
  input  logic  active,
  output cum_t  cum,
  output logic  viol
);
  cum_t sum;

  assign sum  = cum + cum_t'(ex);
  assign viol = ew && active && (sum > cum_t'(dl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cum <= '0;
    else if (init) cum <= cum_t'(now);
    else if (ew && active) cum <= sum;
  end
endmodule
