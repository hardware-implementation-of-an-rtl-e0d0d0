// time_counter: absolute system time for the schedulers.
//
// The counter advances by one on every cycle in which `tick` is high (the
// system time base) and can be loaded by the host with `load`/`load_value`
// (load has priority). It wraps around at 2**TIME_W. The schedulers sample
// `now` when a scheduling run starts. The original article only names this counter
// as the source of the current time; the tick input and the load port are
// this design's choice.
module time_counter
  import edf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  logic  load,
  input  time_t load_value,
  output time_t now
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    now <= '0;
    else if (load) now <= load_value;
    else if (tick) now <= now + time_t'(1);
  end
endmodule
