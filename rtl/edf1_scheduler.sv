// edf1_scheduler: first EDF engine, a pipelined straight-selection sort of
// the taskinfo table combined with the EDF feasibility test.
//
// For each outer iteration i the engine reads elements i .. n-1 one per
// clock, tracks the active element with the earliest deadline, then in one slot
// writes that element to place i (RAM port A) and the displaced element i to
// the minimum's old place (port B), while the feasibility module adds its
// execution time to the cumulative finish time and checks it against its
// deadline. After a run the table is sorted by ascending deadline, `next_tid`
// is the task to run next and `err` tells whether any deadline would be
// missed. Run time from the `start` cycle to the `done` cycle:
// n(n+1)/2 + 2n cycles (592 for n = 32), independent of the data.
//
// Blocks: loop generator, Read, Compare, EDF (feasibility) and Control, as
// in the published block diagram, plus two dual-port RAMs: one for the
// deadlines, one for the task identifier and remaining execution time.
// Host port: while the engine is not busy the host reads or writes whole
// taskinfo elements through RAM port A (`host_en`, `host_we`, `host_addr`,
// `host_wdata`; `host_rdata` one clock after a read). Host accesses during
// a run are ignored. The tasks to schedule must sit in entries 0 .. count-1.
module edf1_scheduler
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
  output logic             err
);
  logic             go, init, lg_busy, rd_en, first, ew, lg_done, viol;
  logic [IDX_W-1:0] j, i, d_idx, min_idx;
  logic             ram_rd_en, d_valid, d_first;
  logic [AW-1:0]    ram_rd_addr;
  task_t            d_task, min_task, moved_task;
  cum_t             cum;

  edf1_loop_gen u_loop (
    .clk, .rst_n, .go, .count, .busy(lg_busy), .rd_en, .j, .first, .i, .ew,
    .done(lg_done)
  );

  edf1_read #(.N(N)) u_read (
    .clk, .rst_n, .rd_en, .j, .first, .ram_en(ram_rd_en), .ram_addr(ram_rd_addr),
    .d_valid, .d_idx, .d_first
  );

  edf1_compare u_cmp (
    .clk, .rst_n, .d_valid, .d_first, .d_idx, .d_task, .min_task, .min_idx,
    .moved_task
  );

  edf1_feasibility u_edf (
    .clk, .rst_n, .init, .now, .ew, .ex(min_task.ex), .dl(min_task.dl), .active(min_task.active), .cum,
    .viol
  );

  edf1_control u_ctl (
    .clk, .rst_n, .start, .busy, .done, .next_tid, .next_valid, .err, .go,
    .init, .lg_done, .ew, .i, .min_tid(min_task.tid), .min_active(min_task.active), .viol
  );

  // RAM port A: write-back of the minimum to place i, element reads, or host.
  // RAM port B: write-back of the displaced element to the minimum's place.
  logic          a_en, a_we, b_we, host_ok;
  logic [AW-1:0] a_addr, b_addr;
  task_t         a_wdata, a_rdata, b_wdata;
  ex_word_t      ex_a_rdata, ex_b_rdata;
  time_t         dl_b_rdata;

  assign host_ok = !busy && !go && host_en;
  assign a_en    = ew || ram_rd_en || host_ok;
  assign a_we    = ew || (host_ok && host_we);
  assign a_addr  = ew ? AW'(i) : ram_rd_en ? ram_rd_addr : host_addr;
  assign a_wdata = ew ? min_task : host_wdata;
  assign b_we    = ew && (min_idx != i);
  assign b_addr  = AW'(min_idx);
  assign b_wdata = moved_task;

  taskinfo_ram #(.DEPTH(N), .W(TIME_W)) u_dl_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata(a_wdata.dl), .a_rdata(a_rdata.dl),
    .b_en(b_we), .b_we, .b_addr, .b_wdata(b_wdata.dl), .b_rdata(dl_b_rdata)
  );

  taskinfo_ram #(.DEPTH(N), .W($bits(ex_word_t))) u_ex_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata({a_wdata.active, a_wdata.tid, a_wdata.ex}), .a_rdata(ex_a_rdata),
    .b_en(b_we), .b_we, .b_addr, .b_wdata({b_wdata.active, b_wdata.tid, b_wdata.ex}), .b_rdata(ex_b_rdata)
  );

  assign a_rdata.active = ex_a_rdata.active;
  assign a_rdata.tid = ex_a_rdata.tid;
  assign a_rdata.ex  = ex_a_rdata.ex;
  assign d_task      = a_rdata;
  assign host_rdata  = a_rdata;

  // Port B read data is not used: port B only writes.
  logic unused_ok;
  assign unused_ok = ^{dl_b_rdata, ex_b_rdata, lg_busy, cum};

  // The loop generator and the control block agree on when a run is active.
  a_busy_match: assert property (@(posedge clk) disable iff (!rst_n) lg_busy |-> busy);
  // Write-back and reads never share port A.
  a_port_a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(ew && ram_rd_en));
endmodule
