// tb_edf1_feasibility: loads the current time, then presents elements in
// write-back slots and checks the cumulative finish time and the violation
// flag of every slot against a running sum, including finishing exactly
// at the deadline and one unit after it. Inactive elements must change
// nothing.
module tb_edf1_feasibility;
  import edf_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic  rst_n, init, ew, viol, active;
  time_t now, ex, dl;
  cum_t  cum, model;
  int checks = 0, failures = 0, nviol = 0;

  edf1_feasibility dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; init = 0; ew = 0; active = 1; now = '0; ex = '0; dl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      init = 1; now = time_t'($urandom); ew = 0;
      model = cum_t'(now);
      @(negedge clk);
      init = 0;
      for (int k = 0; k < MAX_TASKS; k++) begin
        ew = $urandom % 3 != 0;
        active = (r % 4 == 3) ? ($urandom % 2) : 1'b1;
        ex = (r % 10 == 0) ? '1 : time_t'($urandom % 2000);
        dl = time_t'(model) + time_t'($urandom % 4000);
        // boundary: finishing exactly at the deadline is not a violation
        if (k % 4 == 1 && model + cum_t'(ex) < 2 ** TIME_W) dl = time_t'(model + cum_t'(ex));
        if (k % 4 == 3 && model + cum_t'(ex) < 2 ** TIME_W && model + cum_t'(ex) > 0)
          dl = time_t'(model + cum_t'(ex) - 1);
        #1;
        checks++;
        if (viol !== (ew && active && (model + cum_t'(ex) > cum_t'(dl)))) begin
          failures++; $display("viol mismatch r=%0d k=%0d", r, k);
        end
        if (viol) nviol++;
        if (ew && active) model = model + cum_t'(ex);
        @(negedge clk);
        checks++;
        if (cum !== model) begin failures++; $display("cum mismatch r=%0d k=%0d", r, k); end
      end
      ew = 0;
    end
    checks++;
    if (nviol == 0) failures++;   // the stimulus must have produced violations
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
