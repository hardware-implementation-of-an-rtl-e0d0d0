// edf_ref_pkg: reference model of EDF scheduling for the testbenches.
//
// edf_schedule() drops inactive tasks, orders the rest by ascending
// absolute deadline (stable:
// equal deadlines keep table order), accumulates the remaining execution
// times starting from the current time, and reports the task to run next
// and whether any task would finish after its deadline. It is written
// directly from the definition, independently of both hardware engines.
package edf_ref_pkg;
  import edf_pkg::*;

  typedef struct {
    task_t order [MAX_TASKS];   // tasks in ascending deadline order
    cum_t  cet   [MAX_TASKS];   // cumulative finish time of each
    tid_t  next_tid;
    bit    err;
    int    n_act;                // number of active tasks
  } edf_result_t;

  function automatic edf_result_t edf_schedule(task_t tasks [MAX_TASKS], int n, time_t now);
    edf_result_t r;
    int          m = 0;
    cum_t        acc;
    r.err      = 0;
    r.next_tid = '0;
    for (int k = 0; k < MAX_TASKS; k++) begin
      r.order[k] = '0;
      r.cet[k]   = '0;
    end
    // stable insertion: place each task after all with deadline <= its own
    for (int k = 0; k < n; k++) begin
      int p = m;
      if (!tasks[k].active) continue;
      while (p > 0 && r.order[p-1].dl > tasks[k].dl) begin
        r.order[p] = r.order[p-1];
        p--;
      end
      r.order[p] = tasks[k];
      m++;
    end
    acc = cum_t'(now);
    r.n_act = m;
    for (int k = 0; k < m; k++) begin
      acc = acc + cum_t'(r.order[k].ex);
      r.cet[k] = acc;
      if (acc > cum_t'(r.order[k].dl)) r.err = 1;
    end
    if (m > 0) r.next_tid = r.order[0].tid;
    return r;
  endfunction
endpackage
