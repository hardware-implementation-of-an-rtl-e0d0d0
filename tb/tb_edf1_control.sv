// tb_edf1_control: plays the engine side of the first engine's control
// block (write-back slots with outer index, minimum's task ID and violation
// flag, then the loop generator's done) and checks the host side: go/init
// only when idle, busy from start to done, the first iteration's task ID
// held as next_tid, a sticky error, and results cleared by the next start.
module tb_edf1_control;
  import edf_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             rst_n, start, busy, done, next_valid, err, go, init, lg_done, ew, viol, min_active;
  tid_t             next_tid, min_tid;
  logic [IDX_W-1:0] i;
  int checks = 0, failures = 0;

  edf1_control dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; min_active = 1; start = 0; lg_done = 0; ew = 0; viol = 0; i = '0; min_tid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      automatic int   n = 1 + $urandom % 10;
      automatic bit   e_err = 0;
      automatic tid_t e_tid = '0;
      automatic bit   e_valid = 0;
      @(negedge clk);
      start = 1;
      #1 check(go && init, "go/init on start while idle");
      @(negedge clk);
      #1 check(busy && !next_valid && !err, "busy and cleared results after start");
      // a second start while busy must not produce go
      #1 check(!go, "no go while busy");
      start = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        ew = 1; i = IDX_W'(k); min_tid = tid_t'($urandom);
        viol = ($urandom % 8) == 0 && (r % 2 == 1);
        min_active = (r % 7 == 3) ? 1'b0 : 1'b1;
        if (k == 0) begin e_tid = min_tid; e_valid = min_active; end
        if (viol) e_err = 1;
        @(negedge clk);
        ew = 0; viol = 1; min_tid = tid_t'($urandom);   // outside ew: ignored
        #1 check(busy && !done, "busy during run");
      end
      @(negedge clk);
      viol = 0; lg_done = 1;
      #1 check(done, "done follows loop generator");
      @(negedge clk);
      lg_done = 0;
      #1 check(!busy, "idle after done");
      check(next_valid == e_valid && (!e_valid || next_tid == e_tid), "next_tid is the first iteration's minimum");
      check(err == e_err, "error flag");
      repeat ($urandom % 3) @(negedge clk);
      #1 check(next_valid == e_valid && (!e_valid || next_tid == e_tid) && err == e_err, "results held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
