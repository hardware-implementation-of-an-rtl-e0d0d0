// edf1_control: control block of the first EDF engine, the interface to the
// main processor.
//
// The host pulses `start` with the number of active tasks in `count` (the
// tasks occupy table entries 0 .. count-1). While the engine is idle this
// produces `go` for the loop generator and `init` for the feasibility module
// in the same cycle. During the run the block keeps the results: the task
// identifier placed in the first outer iteration (the task with the earliest
// deadline, `next_tid`, with `next_valid` set when at least one task was
// active) and a sticky deadline-violation flag `err`. `busy` is high from the
// cycle after `start` until `done`, which pulses for one cycle when the run
// has ended; the results stay valid until the next start. A `start` while
// busy is ignored. Holding the results here follows the original article; the
// handshake is this design's choice.
module edf1_control
  import edf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             start,
  output logic             busy,
  output logic             done,
  output tid_t             next_tid,
  output logic             next_valid,
  output logic             err,
  // engine side
  output logic             go,
  output logic             init,
  input  logic             lg_done,
  input  logic             ew,
  input  logic [IDX_W-1:0] i,
  input  tid_t             min_tid,
  input  logic             min_active,
  input  logic             viol
);
  assign go   = start && !busy;
  assign init = go;
  assign done = lg_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      next_tid   <= '0;
      next_valid <= 1'b0;
      err        <= 1'b0;
    end else begin
      if (go) begin
        busy       <= 1'b1;
        next_valid <= 1'b0;
        err        <= 1'b0;
      end else if (lg_done) begin
        busy <= 1'b0;
      end
      if (busy && ew) begin
        if (i == '0) begin
          next_tid   <= min_tid;
          next_valid <= min_active;
        end
        if (viol) err <= 1'b1;
      end
    end
  end
endmodule
