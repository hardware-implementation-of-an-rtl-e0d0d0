// tb_edf_run_time_sweep: run time of both engines against the number of
// tasks, at the default size (32-entry tables, 32 cells).
//
// For every task count n = 1 .. 32 one feasible random task set is loaded
// into both engines, which are started together. The test checks each
// engine's run time against its closed form (n(n+1)/2 + 2n and 2n + 1
// clocks) and its result against the reference model, prints the table of
// run times, and checks the comparison points of the evaluation: at 32
// tasks about 600 versus about 65 clocks (engine 2 roughly ten times
// faster), and nearly equal run times below three tasks.
module tb_edf_run_time_sweep;
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
  int          t1 [N+1], t2 [N+1];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; tick = 0; time_load = 0; time_value = '0;
    s1_host_en = 0; s1_host_we = 0; s1_host_addr = '0; s1_host_wdata = '0; s1_start = 0; s1_count = '0;
    s2_host_en = 0; s2_host_we = 0; s2_host_addr = '0; s2_host_wdata = '0; s2_start = 0; s2_count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= N; n++) begin
      automatic int cyc = 0;
      t1[n] = 0; t2[n] = 0;
      for (int k = 0; k < MAX_TASKS; k++) tasks[k] = '0;
      for (int k = 0; k < n; k++) begin
        tasks[k] = '{active: 1'b1, tid: tid_t'(k), dl: time_t'(2000 + $urandom % 30000),
                     ex: time_t'($urandom % 50)};
        @(negedge clk);
        s1_host_en = 1; s1_host_we = 1; s1_host_addr = AW'(k); s1_host_wdata = tasks[k];
        s2_host_en = 1; s2_host_we = 1; s2_host_addr = AW'(k); s2_host_wdata = tasks[k];
      end
      @(negedge clk);
      s1_host_en = 0; s1_host_we = 0; s2_host_en = 0; s2_host_we = 0;
      s1_start = 1; s1_count = IDX_W'(n); s2_start = 1; s2_count = IDX_W'(n);
      #1 ref_r = edf_schedule(tasks, n, now);
      @(negedge clk);
      s1_start = 0; s2_start = 0; cyc = 1;
      while (t1[n] == 0 || t2[n] == 0) begin
        if (s1_done && t1[n] == 0) t1[n] = cyc;
        if (s2_done && t2[n] == 0) t2[n] = cyc;
        if (t1[n] == 0 || t2[n] == 0) begin @(negedge clk); cyc++; end
      end
      check(t1[n] == n * (n + 1) / 2 + 2 * n, $sformatf("engine 1, n=%0d: %0d clocks", n, t1[n]));
      check(t2[n] == 2 * n + 1, $sformatf("engine 2, n=%0d: %0d clocks", n, t2[n]));
      check(!ref_r.err && !s1_err && !s2_err, "feasible set accepted");
      check(s1_next_tid == ref_r.next_tid && s2_next_tid == ref_r.next_tid, "next task");
    end
    $display("  n  engine1  engine2");
    for (int n = 1; n <= N; n++) $display("%3d  %7d  %7d", n, t1[n], t2[n]);
    check(t1[N] >= 540 && t1[N] <= 660, "engine 1 about 600 clocks at 32 tasks");
    check(t2[N] >= 60 && t2[N] <= 70, "engine 2 about 65 clocks at 32 tasks");
    check(t1[N] >= 8 * t2[N], "engine 2 nearly ten times faster at 32 tasks");
    check(t1[1] - t2[1] <= 2 && t1[2] - t2[2] <= 2, "similar run times below three tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
