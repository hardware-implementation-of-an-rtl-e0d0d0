// tb_time_counter: checks counting on tick, holding without tick, loading
// (with priority over tick), wrap-around and reset of the time counter.
module tb_time_counter;
  import edf_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic  rst_n, tick, load;
  time_t load_value, now, model;
  int checks = 0, failures = 0;

  time_counter dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tick = 0; load = 0; load_value = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (now !== '0) failures++;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      tick = $urandom % 2;
      load = ($urandom % 50) == 0;
      load_value = (t % 400 == 17) ? '1 - time_t'(3) : time_t'($urandom);
      if (t % 400 == 17) load = 1;
      if (load)      model = load_value;
      else if (tick) model = model + time_t'(1);
      @(posedge clk); #1;
      checks++;
      if (now !== model) begin failures++; $display("t=%0d now=%0d exp=%0d", t, now, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
