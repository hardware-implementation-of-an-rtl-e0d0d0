// edf1_compare: Compare module of the first EDF engine (inner loop body).
//
// Each valid element read from the taskinfo table is compared with the
// earliest-deadline element found so far. The first element of an outer
// iteration (element i) is stored both as `moved` (the element that will be
// moved out of place i) and as the initial minimum; every later active
// element replaces the minimum if the minimum is inactive or its deadline is
// strictly smaller, so among equal deadlines the lowest index wins and
// inactive tasks collect at the end of the table. One element per clock; the result of the
// last element is in the registers one clock after its data arrived.
// The register set (moved_data, min_data, min_index) follows the published
// modified selection-sort algorithm.
module edf1_compare
  import edf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d_valid,
  input  logic             d_first,
  input  logic [IDX_W-1:0] d_idx,
  input  task_t            d_task,
  output task_t            min_task,
  output logic [IDX_W-1:0] min_idx,
  output task_t            moved_task
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_task   <= '0;
      min_idx    <= '0;
      moved_task <= '0;
    end else if (d_valid) begin
      if (d_first) begin
        moved_task <= d_task;
        min_task   <= d_task;
        min_idx    <= d_idx;
      end else if (d_task.active && (!min_task.active || d_task.dl < min_task.dl)) begin
        min_task <= d_task;
        min_idx  <= d_idx;
      end
    end
  end
endmodule
