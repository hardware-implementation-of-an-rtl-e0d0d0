// edf_top: EDF task-scheduling coprocessor with both scheduling engines.
//
// A main processor loads the active tasks (identifier, absolute deadline,
// remaining execution time) into an engine's taskinfo table, pulses that
// engine's `start` with the number of tasks and, at `done`, reads the task
// to run next and whether the set is feasible under EDF. Engine 1
// (`s1_*`, edf1_scheduler) is the small sequential engine: a pipelined
// selection sort, n(n+1)/2 + 2n clocks. Engine 2 (`s2_*`, edf2_scheduler) is
// the fast one: a list of N evaluation cells, 2n + 1 clocks. Both engines
// take the current absolute time from one shared time counter, which
// advances on `tick` and can be loaded by the host. The two engines are the
// original article's two alternative implementations; placing them side by side
// with a shared time counter is this design's choice.
module edf_top
  import edf_pkg::*;
#(
  parameter int unsigned N  = MAX_TASKS,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // current time counter
  input  logic             tick,
  input  logic             time_load,
  input  time_t            time_value,
  output time_t            now,
  // engine 1: sequential pipelined selection sort
  input  logic             s1_host_en,
  input  logic             s1_host_we,
  input  logic [AW-1:0]    s1_host_addr,
  input  task_t            s1_host_wdata,
  output task_t            s1_host_rdata,
  input  logic             s1_start,
  input  logic [IDX_W-1:0] s1_count,
  output logic             s1_busy,
  output logic             s1_done,
  output tid_t             s1_next_tid,
  output logic             s1_next_valid,
  output logic             s1_err,
  // engine 2: parallel ordered task list
  input  logic             s2_host_en,
  input  logic             s2_host_we,
  input  logic [AW-1:0]    s2_host_addr,
  input  task_t            s2_host_wdata,
  output task_t            s2_host_rdata,
  input  logic             s2_start,
  input  logic [IDX_W-1:0] s2_count,
  output logic             s2_busy,
  output logic             s2_done,
  output tid_t             s2_next_tid,
  output logic             s2_next_valid,
  output logic             s2_err,
  output cell_t            s2_sorted    [N],
  output logic             s2_err_marks [N]
);
  time_counter u_time (
    .clk, .rst_n, .tick, .load(time_load), .load_value(time_value), .now
  );

  edf1_scheduler #(.N(N)) u_seq (
    .clk, .rst_n, .now,
    .host_en(s1_host_en), .host_we(s1_host_we), .host_addr(s1_host_addr),
    .host_wdata(s1_host_wdata), .host_rdata(s1_host_rdata),
    .start(s1_start), .count(s1_count), .busy(s1_busy), .done(s1_done),
    .next_tid(s1_next_tid), .next_valid(s1_next_valid), .err(s1_err)
  );

  edf2_scheduler #(.N(N)) u_par (
    .clk, .rst_n, .now,
    .host_en(s2_host_en), .host_we(s2_host_we), .host_addr(s2_host_addr),
    .host_wdata(s2_host_wdata), .host_rdata(s2_host_rdata),
    .start(s2_start), .count(s2_count), .busy(s2_busy), .done(s2_done),
    .next_tid(s2_next_tid), .next_valid(s2_next_valid), .err(s2_err),
    .sorted(s2_sorted), .err_marks(s2_err_marks)
  );
endmodule
