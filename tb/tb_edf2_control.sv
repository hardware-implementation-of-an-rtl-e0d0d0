// tb_edf2_control: checks the second engine's sequencer cycle by cycle:
// in the start cycle clear and a read of entry 0 and the sampled time; then
// for each entry a mark clock and a shift clock, the shift clock reading the
// next entry; done one clock after the last shift, 2n + 1 clocks in all;
// start ignored while busy.
module tb_edf2_control;
  import edf_pkg::*;
  localparam int N = 32, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             rst_n, start, busy, done, clear, mark_en, shift_en, rd_en;
  logic [IDX_W-1:0] count;
  time_t            now;
  cum_t             list_now;
  logic [AW-1:0]    rd_addr;
  int checks = 0, failures = 0;

  edf2_control #(.N(N)) dut (.*);

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
    rst_n = 0; start = 0; count = '0; now = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      automatic int n = (r < 3) ? r : 1 + $urandom % N;
      automatic time_t t0 = time_t'($urandom);
      automatic int cycles = 1;
      @(negedge clk);
      start = 1; count = IDX_W'(n); now = t0;
      #1 check(clear && (rd_en == (n > 0)) && rd_addr == '0 && !mark_en && !shift_en, "start cycle");
      @(negedge clk);
      start = 0; now = t0 + time_t'(7);
      for (int k = 0; k < n; k++) begin
        #1 check(mark_en && !shift_en && !rd_en && !clear && busy && list_now == cum_t'(t0), "mark clock");
        start = (k == 0);    // must be ignored
        @(negedge clk); cycles++;
        start = 0;
        #1 check(shift_en && !mark_en && !clear && rd_en == (k < n - 1), "shift clock");
        if (k < n - 1) check(rd_addr == AW'(k + 1), "next entry read");
        @(negedge clk); cycles++;
      end
      #1 check(done && !busy && !mark_en && !shift_en, "done");
      check(cycles == 2 * n + 1, $sformatf("run length %0d for n=%0d", cycles, n));
      @(negedge clk);
      #1 check(!done, "done is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
