// tb_edf_top: end-to-end test of the coprocessor at its default size
// (32-entry tables, 32-cell task list, no parameter overrides).
//
// Each round loads the same random task set into both engines' tables,
// lets the shared time counter run (ticks, and a load now and then), starts
// both engines in the same cycle and checks, for each engine, the run time
// (n(n+1)/2 + 2n and 2n + 1 clocks, 592 and 65 for 32 tasks), the task to
// run next and the deadline-violation flag against the reference model;
// the second engine's ordered list and the first engine's sorted table are
// compared with the reference order. Rounds include 0, 1, 2 and 32 tasks,
// tied deadlines and infeasible loads. The test counts how often each
// mechanism occurred (swap and in-place write-back in the sort, violation
// in each engine, inactive tasks skipped, insertion at the head, in the middle with a shift and at
// the tail of the list, time counter ticks and loads) and fails if one
// never did; sort and list events are predicted from each task set.
module tb_edf_top;
  import edf_pkg::*;
  import edf_ref_pkg::*;
  localparam int N = MAX_TASKS, AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n, tick, time_load;
  time_t            time_value, now;
  logic             s1_host_en, s1_host_we, s1_start, s1_busy, s1_done, s1_next_valid, s1_err;
  logic [AW-1:0]    s1_host_addr;
  task_t            s1_host_wdata, s1_host_rdata;
  logic [IDX_W-1:0] s1_count;
  tid_t             s1_next_tid;
  logic             s2_host_en, s2_host_we, s2_start, s2_busy, s2_done, s2_next_valid, s2_err;
  logic [AW-1:0]    s2_host_addr;
  task_t            s2_host_wdata, s2_host_rdata;
  logic [IDX_W-1:0] s2_count;
  tid_t             s2_next_tid;
  cell_t            s2_sorted [N];
  logic             s2_err_marks [N];

  edf_top dut (.*);

  task_t       tasks [MAX_TASKS];
  edf_result_t ref_r;
  int checks = 0, failures = 0;
  int n_swap = 0, n_inplace = 0, n_viol1 = 0, n_viol2 = 0;
  int n_skip = 0, n_head = 0, n_mid = 0, n_tail = 0, n_tick = 0, n_load = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters. The engines' internal events are predicted from the
  // task set (a selection-sort model for engine 1, the insertion position
  // for engine 2); the result checks then show the engines went through them.
  task automatic count_mechanisms(int n);
    task_t t [MAX_TASKS];
    for (int k = 0; k < n; k++) t[k] = tasks[k];
    for (int i = 0; i < n; i++) begin
      automatic int mi = i;
      for (int j = i + 1; j < n; j++)
        if (t[j].active && (!t[mi].active || t[j].dl < t[mi].dl)) mi = j;
      if (mi != i) begin
        automatic task_t tmp = t[i];
        t[i] = t[mi]; t[mi] = tmp; n_swap++;
      end else n_inplace++;
    end
    for (int k = 0; k < n; k++) begin
      automatic int later = 0;
      automatic int n_before = 0;
      if (!tasks[k].active) begin n_skip++; continue; end
      for (int p = 0; p < k; p++) if (tasks[p].active) begin
        n_before++;
        if (tasks[p].dl > tasks[k].dl) later++;
      end
      if (n_before > 0 && later == n_before) n_head++;
      else if (later > 0)                n_mid++;
      else if (n_before > 0)               n_tail++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (tick && !time_load) n_tick++;
    if (time_load)          n_load++;
  end

  always @(negedge clk) begin
    tick = ($urandom % 3) == 0;
    time_load = ($urandom % 500) == 0;
    time_value = time_t'($urandom % 2000);
  end

  initial begin
    rst_n = 0; s1_host_en = 0; s1_host_we = 0; s1_host_addr = '0; s1_host_wdata = '0;
    s1_start = 0; s1_count = '0; s2_host_en = 0; s2_host_we = 0; s2_host_addr = '0;
    s2_host_wdata = '0; s2_start = 0; s2_count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      automatic int    n = (r < 3) ? r : (r % 3 == 0) ? N : 1 + $urandom % N;
      automatic int    c1 = 0, c2 = 0, cyc = 0;
      automatic time_t t0;
      for (int k = 0; k < MAX_TASKS; k++) tasks[k] = '0;
      // task set relative to the time expected at start (roughly)
      for (int k = 0; k < n; k++) begin
        tasks[k].active = (r % 5 == 4) ? (($urandom % 4) != 0) : 1'b1;
        tasks[k].tid = tid_t'(k + 100);
        tasks[k].dl  = time_t'((r % 4 == 1) ? 2000 + ($urandom % 8) * 500 : 1500 + $urandom % 20000);
        tasks[k].ex  = time_t'($urandom % ((r % 2) ? 300 : 1200));
        @(negedge clk);
        s1_host_en = 1; s1_host_we = 1; s1_host_addr = AW'(k); s1_host_wdata = tasks[k];
        s2_host_en = 1; s2_host_we = 1; s2_host_addr = AW'(k); s2_host_wdata = tasks[k];
      end
      @(negedge clk);
      s1_host_en = 0; s1_host_we = 0; s2_host_en = 0; s2_host_we = 0;
      s1_start = 1; s1_count = IDX_W'(n);
      s2_start = 1; s2_count = IDX_W'(n);
      #1 t0 = now;
      ref_r = edf_schedule(tasks, n, t0);
      @(negedge clk);
      s1_start = 0; s2_start = 0; cyc = 1;
      while (c1 == 0 || c2 == 0) begin
        if (s1_done && c1 == 0) c1 = cyc;
        if (s2_done && c2 == 0) c2 = cyc;
        if (c1 == 0 || c2 == 0) begin @(negedge clk); cyc++; end
      end
      check(c1 == ((n == 0) ? 1 : n * (n + 1) / 2 + 2 * n), $sformatf("engine 1 run time %0d, n=%0d", c1, n));
      check(c2 == 2 * n + 1, $sformatf("engine 2 run time %0d, n=%0d", c2, n));
      if (n == N) begin
        check(c1 == 592, "engine 1: 592 clocks for 32 tasks");
        check(c2 == 65, "engine 2: 65 clocks for 32 tasks");
      end
      check(s1_next_valid == (ref_r.n_act > 0) && s2_next_valid == (ref_r.n_act > 0), "next_valid");
      if (ref_r.n_act > 0) begin
        check(s1_next_tid == ref_r.next_tid, $sformatf("engine 1 next %0d exp %0d", s1_next_tid, ref_r.next_tid));
        check(s2_next_tid == ref_r.next_tid, $sformatf("engine 2 next %0d exp %0d", s2_next_tid, ref_r.next_tid));
      end
      check(s1_err == ref_r.err, "engine 1 violation flag");
      check(s2_err == ref_r.err, "engine 2 violation flag");
      for (int c = 0; c < N; c++)
        if (c >= ref_r.n_act) check(!s2_sorted[c].valid, "engine 2 unused place empty");
        else check(s2_sorted[c].tid == ref_r.order[c].tid && s2_sorted[c].cet == ref_r.cet[c] &&
              s2_err_marks[c] == (ref_r.cet[c] > cum_t'(ref_r.order[c].dl)),
              $sformatf("engine 2 list place %0d", c));
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        s1_host_en = 1; s1_host_addr = AW'(k);
        @(negedge clk);
        s1_host_en = 0;
        check(((k < ref_r.n_act) ? (s1_host_rdata.active && s1_host_rdata.dl == ref_r.order[k].dl)
                                 : !s1_host_rdata.active) &&
              s1_host_rdata == tasks[int'(s1_host_rdata.tid) - 100], "engine 1 sorted table");
      end
      if (ref_r.err) n_viol2++;
      if (ref_r.err && s1_err) n_viol1++;
      count_mechanisms(n);
    end
    $display("mechanisms: swap=%0d in-place=%0d viol1=%0d viol2=%0d skip=%0d head=%0d mid=%0d tail=%0d ticks=%0d loads=%0d",
             n_swap, n_inplace, n_viol1, n_viol2, n_skip, n_head, n_mid, n_tail, n_tick, n_load);
    check(n_swap > 0, "swap occurred");
    check(n_inplace > 0, "in-place write-back occurred");
    check(n_viol1 > 0, "violation flagged");
    check(n_viol2 > 0 && n_viol2 < 40, "feasible and infeasible sets");
    check(n_skip > 0, "inactive task skipped");
    check(n_head > 0, "head insertion occurred");
    check(n_mid > 0, "middle insertion with shift occurred");
    check(n_tail > 0, "tail insertion occurred");
    check(n_tick > 0 && n_load > 0, "time counter ticked and was loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
