// tb_edf1_compare: feeds sequences of taskinfo elements (first element
// flagged) into the Compare module and checks that it ends with the element
// of smallest deadline (lowest index on ties), its index and the first
// element as the moved element. Some sequences hold inactive elements,
// which must never become the minimum unless element i is inactive and no
// active element follows. Bubbles (d_valid low) must change nothing.
module tb_edf1_compare;
  import edf_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             rst_n, d_valid, d_first;
  logic [IDX_W-1:0] d_idx, min_idx;
  task_t            d_task, min_task, moved_task;
  task_t            seq [MAX_TASKS];
  int checks = 0, failures = 0;

  edf1_compare dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; d_valid = 0; d_first = 0; d_idx = '0; d_task = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int base = $urandom % 8;
      automatic int len  = 1 + $urandom % (MAX_TASKS - base);
      automatic int best = base;
      for (int k = 0; k < len; k++) begin
        seq[k].active = (t % 5 == 4) ? ($urandom % 2) : 1'b1;
        seq[k].tid = tid_t'($urandom);
        seq[k].dl  = (t % 3 == 0) ? time_t'($urandom % 6) : time_t'($urandom);
        seq[k].ex  = time_t'($urandom);
      end
      for (int k = 1; k < len; k++)
        if (seq[k].active && (!seq[best - base].active || seq[k].dl < seq[best - base].dl)) best = base + k;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        d_valid = 1; d_first = (k == 0); d_idx = IDX_W'(base + k); d_task = seq[k];
        if ($urandom % 4 == 0) begin      // bubble with garbage data
          @(negedge clk);
          d_valid = 0; d_first = 1; d_task.dl = '0;
          @(negedge clk);
          d_valid = 1; d_first = (k == 0); d_task = seq[k];
        end
      end
      @(negedge clk);
      d_valid = 0;
      #1;
      checks += 3;
      if (min_idx !== IDX_W'(best)) begin failures++; $display("idx %0d exp %0d", min_idx, best); end
      if (min_task !== seq[best - base]) failures++;
      if (moved_task !== seq[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
