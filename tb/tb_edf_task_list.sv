// tb_edf_task_list: drives the task list directly (clear, then for each
// task a mark clock and a shift/add clock with the task on the bus) and
// after every insertion compares the whole list, its cumulative finish
// times, violation marks, head and error flag with the reference EDF
// schedule of the tasks inserted so far (inactive tasks must leave the
// list unchanged). N = 8 cells.
module tb_edf_task_list;
  import edf_pkg::*;
  import edf_ref_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic  rst_n, clear, mark_en, shift_en, head_valid, err_any;
  task_t cur;
  cum_t  now;
  cell_t cells [N];
  logic  dl_marks [N], err_marks [N];
  tid_t  head_tid;
  task_t tasks [MAX_TASKS];
  edf_result_t ref_r;
  int checks = 0, failures = 0, n_err = 0;

  edf_task_list #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; clear = 0; mark_en = 0; shift_en = 0; cur = '0; now = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      automatic time_t t_now = time_t'($urandom % 500);
      @(negedge clk);
      clear = 1; now = cum_t'(t_now);
      @(negedge clk);
      clear = 0;
      for (int k = 0; k < N; k++) begin
        tasks[k].active = (r % 3 == 2) ? (($urandom % 3) != 0) : 1'b1;
        tasks[k].tid = tid_t'(k + 10 * (r % 5));
        tasks[k].dl  = t_now + time_t'((r % 3 == 0) ? ($urandom % 4) * 50 : $urandom % 1500);
        tasks[k].ex  = time_t'($urandom % ((r % 2) ? 100 : 400));
        cur = tasks[k];
        mark_en = 1;
        @(negedge clk);
        mark_en = 0; shift_en = 1;
        @(negedge clk);
        shift_en = 0; cur = '0;
        ref_r = edf_schedule(tasks, k + 1, t_now);
        for (int c = 0; c < N; c++) begin
          if (c < ref_r.n_act) begin
            check(cells[c].valid && cells[c].tid == ref_r.order[c].tid &&
                  cells[c].dl == ref_r.order[c].dl && cells[c].cet == ref_r.cet[c],
                  $sformatf("r=%0d k=%0d cell %0d", r, k, c));
            check(err_marks[c] == (ref_r.cet[c] > cum_t'(ref_r.order[c].dl)), "err mark");
          end else begin
            check(!cells[c].valid, "empty cell stays empty");
          end
        end
        check(head_valid == (ref_r.n_act > 0) && (ref_r.n_act == 0 || head_tid == ref_r.next_tid), "head");
        check(err_any == ref_r.err, "error flag");
      end
      if (err_any) n_err++;
    end
    check(n_err > 0 && n_err < 300, "feasible and infeasible sets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
