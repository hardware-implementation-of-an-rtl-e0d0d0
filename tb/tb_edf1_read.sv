// tb_edf1_read: drives random read slots into the Read module and checks
// the RAM address in the same cycle and the index/first tags one clock later.
module tb_edf1_read;
  import edf_pkg::*;
  localparam int N = 32, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             rst_n, rd_en, first, ram_en, d_valid, d_first;
  logic [IDX_W-1:0] j, d_idx, last_idx;
  logic [AW-1:0]    ram_addr;
  logic             p_en, p_first;
  logic [IDX_W-1:0] p_j;
  int checks = 0, failures = 0;

  edf1_read #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; rd_en = 0; first = 0; j = '0; last_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      rd_en = $urandom % 3 != 0; first = $urandom % 2; j = IDX_W'($urandom % N);
      p_en = rd_en; p_first = first; p_j = j;
      #1;
      checks++;
      if (ram_en !== rd_en || ram_addr !== AW'(j)) failures++;
      @(posedge clk); #1;
      checks++;
      if (p_en) last_idx = p_j;
      if (d_valid !== p_en || d_first !== (p_en && p_first) || d_idx !== last_idx) begin
        failures++;
        $display("tag mismatch t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
