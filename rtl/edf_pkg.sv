// edf_pkg: widths and record types shared by both EDF scheduling engines.
//
// A task is described by an active flag (ready to run), an identifier, an
// absolute deadline and a remaining execution time (a relative interval).
// Inactive entries stay in the table but take no part in scheduling. Deadlines, execution times,
// the current time and the cumulative finish time all use the same unsigned
// TIME_W-bit time unit, so they can be added and compared directly.
// MAX_TASKS = 32 is the table size used for the reported results; the
// widths TIME_W and TID_W are this design's choice.
package edf_pkg;
  parameter int unsigned MAX_TASKS = 32;   // taskinfo table depth
  parameter int unsigned TIME_W    = 16;   // time, deadline, execution-time width
  parameter int unsigned TID_W     = 8;    // task identifier width

  // Cumulative finish times carry enough extra bits that the current time
  // plus the execution times of MAX_TASKS tasks can never overflow.
  parameter int unsigned IDX_W     = $clog2(MAX_TASKS + 1);   // loop index width
  parameter int unsigned CUM_W     = TIME_W + IDX_W;

  typedef logic [TIME_W-1:0] time_t;
  typedef logic [CUM_W-1:0]  cum_t;
  typedef logic [TID_W-1:0]  tid_t;

  // Word of the execution-time RAM: active flag, task identifier and remaining
  // execution time.
  typedef struct packed {
    logic  active;
    tid_t  tid;
    time_t ex;
  } ex_word_t;

  // One complete taskinfo element.
  typedef struct packed {
    logic  active;
    tid_t  tid;
    time_t dl;
    time_t ex;
  } task_t;

  // Contents of one cell of the ordered task list (second engine).
  typedef struct packed {
    logic  valid;
    tid_t  tid;
    time_t dl;
    cum_t  cet;    // cumulative finish time up to and including this task
  } cell_t;
endpackage
