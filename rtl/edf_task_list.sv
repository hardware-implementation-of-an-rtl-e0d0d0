// edf_task_list: ordered list of tasks built from N chained evaluation cells.
//
// Cell 0 is the head. Each cell's `prev` inputs come from the cell before
// it; those of cell 0 are constants (an unmarked, valid predecessor) and the
// current time as its cumulative finish time, so the head needs no extra
// logic and the current time propagates into every cumulative value. All
// cells see the same bus task `cur` and the same step strobes, so inserting
// one task takes a fixed two clocks (mark, then shift/add) whatever N is.
// Outputs: the whole list, the per-cell marks, the head task identifier
// (the task to run next) and the OR of all violation marks.
// The chain structure follows the published task-list diagram; the
// output set is this design's choice.
module edf_task_list
  import edf_pkg::*;
#(
  parameter int unsigned N = MAX_TASKS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  mark_en,
  input  logic  shift_en,
  input  task_t cur,
  input  cum_t  now,
  output cell_t cells     [N],
  output logic  dl_marks  [N],
  output logic  err_marks [N],
  output tid_t  head_tid,
  output logic  head_valid,
  output logic  err_any
);
  cell_t head_prev;

  assign head_prev = '{valid: 1'b1, tid: '0, dl: '0, cet: now};

  for (genvar k = 0; k < N; k++) begin : g_cell
    edf_cell u_cell (
      .clk, .rst_n, .clear, .mark_en, .shift_en, .cur,
      .prev      ((k == 0) ? head_prev : cells[(k == 0) ? 0 : k-1]),
      .prev_mark ((k == 0) ? 1'b0      : dl_marks[(k == 0) ? 0 : k-1]),
      .q         (cells[k]),
      .dl_mark   (dl_marks[k]),
      .err_mark  (err_marks[k])
    );
  end

  always_comb begin
    err_any = 1'b0;
    for (int k = 0; k < N; k++) err_any |= err_marks[k];
  end

  assign head_tid   = cells[0].tid;
  assign head_valid = cells[0].valid;
endmodule
