// edf_cell: one evaluation cell of the ordered task list (second EDF engine).
//
// A cell holds one list place: a valid bit, the task identifier, its
// absolute deadline and its cumulative finish time `cet` (current time plus
// the remaining execution times of this task and of all tasks before it).
// Each cell has two input sets, the common bus with the task being inserted
// (`cur`) and the contents of the previous cell (`prev`), and passes its own
// contents to the next cell.
//
// Steps, driven by the list's control:
//   clear    : invalidate the cell (once, before a run).
//   mark_en  : step 1, `dl_mark` <= cell empty or deadline later than the
//              bus deadline (strictly later, so equal deadlines keep their
//              insertion order). An inactive bus task marks no cell, so
//              the following shift step leaves the list unchanged.
//   shift_en : steps 2 and 3 in one clock. A marked cell whose previous
//              cell is also marked takes over the previous contents (shift
//              right); a marked cell whose previous cell is unmarked is the
//              gap and takes the bus task. Either way its new `cet` is the
//              previous cell's `cet` plus the bus execution time, which both
//              adds the new task's time to the shifted tasks and forms the
//              new task's own cumulative time.
//   err_mark : step 4, combinational: the cell is valid and its cumulative
//              finish time exceeds its deadline.
// The register set, the two multiplexed input sets and the two marks follow
// the published cell diagram; the merging of the add into the shift clock
// (one clock per pair of steps) is this design's own timing.
module edf_cell
  import edf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  mark_en,
  input  logic  shift_en,
  input  task_t cur,
  input  cell_t prev,
  input  logic  prev_mark,
  output cell_t q,
  output logic  dl_mark,
  output logic  err_mark
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      dl_mark <= 1'b0;
    end else if (clear) begin
      q       <= '0;
      dl_mark <= 1'b0;
    end else if (mark_en) begin
      dl_mark <= cur.active && (!q.valid || (q.dl > cur.dl));
    end else if (shift_en && dl_mark) begin
      if (prev_mark) begin
        q.valid <= prev.valid;
        q.tid   <= prev.tid;
        q.dl    <= prev.dl;
      end else begin
        q.valid <= 1'b1;
        q.tid   <= cur.tid;
        q.dl    <= cur.dl;
      end
      q.cet <= prev.cet + cum_t'(cur.ex);
    end
  end

  assign err_mark = q.valid && (q.cet > cum_t'(q.dl));
endmodule
