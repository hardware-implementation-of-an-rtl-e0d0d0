// tb_edf_cell: directed and random tests of one evaluation cell with a
// modelled predecessor: clearing, the deadline mark (empty cell or strictly
// later deadline, never for an inactive bus task), the shift step taking the predecessor's contents or the
// bus task depending on the predecessor's mark, the cumulative-time add,
// no change when unmarked, and the combinational violation mark.
module tb_edf_cell;
  import edf_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic  rst_n, clear, mark_en, shift_en, prev_mark, dl_mark, err_mark;
  task_t cur;
  cell_t prev, q, m;
  logic  m_mark;
  int checks = 0, failures = 0, n_shift = 0, n_fill = 0, n_err = 0, n_hold = 0;

  edf_cell dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (q !== m || dl_mark !== m_mark ||
        err_mark !== (m.valid && (m.cet > cum_t'(m.dl)))) begin
      failures++;
      $display("FAIL %s: q=%p exp=%p mark=%0b exp=%0b", what, q, m, dl_mark, m_mark);
    end
  endtask

  initial begin
    rst_n = 0; clear = 0; mark_en = 0; shift_en = 0; prev_mark = 0; cur = '0; prev = '0;
    m = '0; m_mark = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cur.active = ($urandom % 8) != 0;
      cur.tid = tid_t'($urandom); cur.dl = time_t'($urandom % 64); cur.ex = time_t'($urandom % 40);
      prev.valid = $urandom % 2; prev.tid = tid_t'($urandom); prev.dl = time_t'($urandom % 64);
      prev.cet = cum_t'($urandom % 80);
      prev_mark = $urandom % 2;
      clear = (t % 50 == 0); mark_en = 0; shift_en = 0;
      if (!clear) begin
        if (t % 2 == 1) mark_en = 1; else shift_en = 1;
      end
      // model
      if (clear) begin
        m = '0; m_mark = 0;
      end else if (mark_en) begin
        m_mark = cur.active && (!m.valid || (m.dl > cur.dl));
      end else if (shift_en && m_mark) begin
        if (prev_mark) begin m.valid = prev.valid; m.tid = prev.tid; m.dl = prev.dl; n_shift++; end
        else begin m.valid = 1; m.tid = cur.tid; m.dl = cur.dl; n_fill++; end
        m.cet = prev.cet + cum_t'(cur.ex);
      end else if (shift_en) n_hold++;
      @(posedge clk); #1;
      compare($sformatf("t=%0d", t));
      if (err_mark) n_err++;
    end
    checks++;
    if (n_shift == 0 || n_fill == 0 || n_err == 0 || n_hold == 0) begin
      failures++; $display("coverage: shift=%0d fill=%0d err=%0d hold=%0d", n_shift, n_fill, n_err, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
