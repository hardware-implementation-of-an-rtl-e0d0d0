// tb_edf2_scheduler: end-to-end test of the second EDF engine at N = 8.
// Random task sets are written through the host port, the engine is
// started, and the test checks the run time 2n + 1, the next task ID, the
// error flag and the whole ordered list (IDs, deadlines, cumulative finish
// times, violation marks) against the reference model, and that the table
// itself is left unchanged.
module tb_edf2_scheduler;
  import edf_pkg::*;
  import edf_ref_pkg::*;
  localparam int N = 8, AW = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             rst_n, host_en, host_we, start, busy, done, next_valid, err;
  logic [AW-1:0]    host_addr;
  task_t            host_wdata, host_rdata;
  logic [IDX_W-1:0] count;
  tid_t             next_tid;
  time_t            now;
  cell_t            sorted [N];
  logic             err_marks [N];
  task_t            tasks [MAX_TASKS];
  edf_result_t      ref_r;
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  edf2_scheduler #(.N(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; host_en = 0; host_we = 0; host_addr = '0; host_wdata = '0; start = 0;
    count = '0; now = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      automatic int n = (r < 9) ? r : 1 + $urandom % N;
      automatic int cycles = 0;
      now = time_t'($urandom % 1000);
      for (int k = 0; k < MAX_TASKS; k++) tasks[k] = '0;
      for (int k = 0; k < n; k++) begin
        tasks[k].active = (r % 5 == 3) ? (($urandom % 3) != 0) : 1'b1;
        tasks[k].tid = tid_t'($urandom);
        tasks[k].dl  = (r % 4 == 0) ? now + time_t'($urandom % 6) * 100
                                    : now + time_t'($urandom % 3000);
        tasks[k].ex  = time_t'($urandom % ((r % 2) ? 200 : 900));
        @(negedge clk);
        host_en = 1; host_we = 1; host_addr = AW'(k); host_wdata = tasks[k];
      end
      @(negedge clk);
      host_en = 0; host_we = 0;
      ref_r = edf_schedule(tasks, n, now);
      start = 1; count = IDX_W'(n);
      @(negedge clk);
      start = 0; cycles = 1;
      now = now + time_t'(5);            // time moves on during the run
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == 2 * n + 1, $sformatf("run time %0d for n=%0d", cycles, n));
      check(next_valid == (ref_r.n_act > 0), "next_valid");
      if (ref_r.n_act > 0) check(next_tid == ref_r.next_tid, "next_tid");
      check(err == ref_r.err, "deadline violation flag");
      if (ref_r.err) n_err++; else n_ok++;
      for (int c = 0; c < N; c++) begin
        if (c < ref_r.n_act)
          check(sorted[c].valid && sorted[c].tid == ref_r.order[c].tid &&
                sorted[c].dl == ref_r.order[c].dl && sorted[c].cet == ref_r.cet[c] &&
                err_marks[c] == (ref_r.cet[c] > cum_t'(ref_r.order[c].dl)),
                $sformatf("list place %0d", c));
        else
          check(!sorted[c].valid, "unused place empty");
      end
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        host_en = 1; host_addr = AW'(k);
        @(negedge clk);
        host_en = 0;
        check(host_rdata == tasks[k], "table unchanged");
      end
    end
    check(n_err > 0 && n_ok > 0, "both feasible and infeasible sets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
