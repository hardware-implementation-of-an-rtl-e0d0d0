// tb_edf1_loop_gen: compares the loop generator's slot stream, cycle by
// cycle, with the schedule of the pipelined selection sort: for every outer
// index i, one read slot per j = i .. n-1, one compare-only slot, one
// write-back/feasibility slot, and `done` right after. Checks the run
// length n(n+1)/2 + 2n (18 cycles for four tasks, 592 for 32).
module tb_edf1_loop_gen;
  import edf_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             rst_n, go, busy, rd_en, first, ew, done;
  logic [IDX_W-1:0] count, j, i;
  int checks = 0, failures = 0;

  edf1_loop_gen dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_slot(bit e_rd, int e_j, bit e_first, bit e_ew, int e_i, bit e_done);
    checks++;
    if (rd_en !== e_rd || (e_rd && (j !== IDX_W'(e_j) || first !== e_first)) ||
        ew !== e_ew || (e_ew && i !== IDX_W'(e_i)) || done !== e_done) begin
      failures++;
      $display("slot mismatch: rd=%0b j=%0d first=%0b ew=%0b i=%0d done=%0b / exp %0b %0d %0b %0b %0d %0b",
               rd_en, j, first, ew, i, done, e_rd, e_j, e_first, e_ew, e_i, e_done);
    end
  endtask

  task automatic run(int n);
    automatic int cycles = 0;
    @(negedge clk);
    go = 1; count = IDX_W'(n);
    for (int ii = 0; ii < n; ii++) begin
      for (int jj = ii; jj < n; jj++) begin
        #1 expect_slot(1, jj, jj == ii, 0, 0, 0);
        @(negedge clk); go = 0; cycles++;
      end
      #1 expect_slot(0, 0, 0, 0, 0, 0);          // last compare
      @(negedge clk); go = 0; cycles++;
      #1 expect_slot(0, 0, 0, 1, ii, 0);         // write-back + EDF check
      @(negedge clk); cycles++;
    end
    if (n == 0) begin @(negedge clk); go = 0; end
    #1 expect_slot(0, 0, 0, 0, 0, 1);
    checks++;
    if (cycles != n * (n + 1) / 2 + 2 * n) failures++;
    if (busy) begin failures++; $display("still busy after n=%0d", n); end
    @(negedge clk);
    #1 expect_slot(0, 0, 0, 0, 0, 0);
  endtask

  initial begin
    rst_n = 0; go = 0; count = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(4); run(1); run(0); run(2); run(7); run(MAX_TASKS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
