// edf2_scheduler: second EDF engine, an ordered task list built by parallel
// insertion.
//
// The taskinfo table (deadline RAM plus identifier/execution-time RAM) is
// read in table order, one entry per two clocks. Each entry is placed on a
// common bus. If the task is active, every cell of the task list compares
// its deadline with the bus deadline at once (mark step), then all later
// cells shift one place towards
// the tail, the gap takes the new task, and every shifted cell adds the new
// task's execution time to its cumulative finish time (shift/add step).
// A cell whose cumulative finish time exceeds its deadline raises its
// violation mark. After `count` tasks the list is in ascending deadline
// order, its head is the task to run next and `err` is the OR of the marks.
// Run time: 2*count + 1 clocks from `start` to `done`, 65 for 32 tasks.
//
// Host port: port B of the two RAMs, readable at any time (`host_rdata` one
// clock after `host_en`), writable while the engine is idle; port A belongs
// to the engine. The tasks to schedule must sit in entries 0 .. count-1.
// `sorted` and `err_marks` expose the whole list, head first. Inactive
// entries take their two clocks but are not inserted. The list structure
// and the two-clocks-per-task rate follow the original article; the port split and
// the host protocol are this design's choice.
module edf2_scheduler
  import edf_pkg::*;
#(
  parameter int unsigned N  = MAX_TASKS,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  time_t            now,
  // host access to the taskinfo table
  input  logic             host_en,
  input  logic             host_we,
  input  logic [AW-1:0]    host_addr,
  input  task_t            host_wdata,
  output task_t            host_rdata,
  // control
  input  logic             start,
  input  logic [IDX_W-1:0] count,
  output logic             busy,
  output logic             done,
  output tid_t             next_tid,
  output logic             next_valid,
  output logic             err,
  // ordered list
  output cell_t            sorted    [N],
  output logic             err_marks [N]
);
  logic          clear, mark_en, shift_en, rd_en;
  logic [AW-1:0] rd_addr;
  cum_t          list_now;
  task_t         cur;
  ex_word_t      cur_ex, host_ex;
  logic          host_wr;

  edf2_control #(.N(N)) u_ctl (
    .clk, .rst_n, .start, .count, .now, .busy, .done, .clear, .mark_en,
    .shift_en, .list_now, .rd_en, .rd_addr
  );

  assign host_wr = host_en && host_we && !busy && !start;

  taskinfo_ram #(.DEPTH(N), .W(TIME_W)) u_dl_ram (
    .clk,
    .a_en(rd_en), .a_we(1'b0), .a_addr(rd_addr), .a_wdata('0), .a_rdata(cur.dl),
    .b_en(host_en), .b_we(host_wr), .b_addr(host_addr), .b_wdata(host_wdata.dl),
    .b_rdata(host_rdata.dl)
  );

  taskinfo_ram #(.DEPTH(N), .W($bits(ex_word_t))) u_ex_ram (
    .clk,
    .a_en(rd_en), .a_we(1'b0), .a_addr(rd_addr), .a_wdata('0), .a_rdata(cur_ex),
    .b_en(host_en), .b_we(host_wr), .b_addr(host_addr),
    .b_wdata({host_wdata.active, host_wdata.tid, host_wdata.ex}), .b_rdata(host_ex)
  );

  assign cur.active     = cur_ex.active;
  assign cur.tid        = cur_ex.tid;
  assign cur.ex         = cur_ex.ex;
  assign host_rdata.active = host_ex.active;
  assign host_rdata.tid = host_ex.tid;
  assign host_rdata.ex  = host_ex.ex;

  edf_task_list #(.N(N)) u_list (
    .clk, .rst_n, .clear, .mark_en, .shift_en, .cur, .now(list_now),
    .cells(sorted), .dl_marks(), .err_marks, .head_tid(next_tid),
    .head_valid(next_valid), .err_any(err)
  );

  // The list has a place for every table entry, so the tail never overflows.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (count <= IDX_W'(N)));
endmodule
