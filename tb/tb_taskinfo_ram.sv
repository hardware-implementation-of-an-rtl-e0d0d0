// tb_taskinfo_ram: random reads and writes on both ports of the dual-port
// taskinfo RAM against an array model: one-clock read latency, old data on a
// read of the word being written by the same port, port B winning a
// same-address write collision, read data held while a port is idle.
module tb_taskinfo_ram;
  localparam int DEPTH = 16, W = 12, AW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0]  model [DEPTH];
  logic [W-1:0]  exp_a, exp_b;
  int checks = 0, failures = 0;

  taskinfo_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(k); a_wdata = W'($urandom);
      b_en = 0;
      model[k] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a_en = ($urandom % 4) != 0; a_we = $urandom % 2; a_addr = AW'($urandom); a_wdata = W'($urandom);
      b_en = ($urandom % 4) != 0; b_we = $urandom % 2; b_addr = (t % 7 == 0) ? a_addr : AW'($urandom);
      b_wdata = W'($urandom);
      // expected read data: old contents (read-first); idle port holds its value
      exp_a = a_en ? model[a_addr] : a_rdata;
      exp_b = b_en ? model[b_addr] : b_rdata;
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;   // port B wins a collision
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("port A mismatch t=%0d", t); end
      if (b_rdata !== exp_b) begin failures++; $display("port B mismatch t=%0d", t); end
    end
    // final sweep of the whole memory
    @(negedge clk); a_we = 0; b_en = 0;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); a_en = 1; a_addr = AW'(k);
      @(posedge clk); #1;
      checks++;
      if (a_rdata !== model[k]) begin failures++; $display("sweep mismatch %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
