// edf2_control: outer-loop generator and step sequencer of the second EDF
// engine.
//
// On `start` (while idle) it clears the task list, samples the current time
// for the head cell, latches `count` and reads taskinfo entry 0, all in the
// `start` cycle. Then, for each entry k = 0 .. count-1, it spends one clock
// on the mark step (`mark_en`, with entry k on the RAM output) and one on
// the shift/add step (`shift_en`), reading entry k+1 in the shift clock.
// `done` pulses in the clock after the last shift step, so a run takes
// 2*count + 1 clocks from `start` to `done` (65 for 32 tasks). The list
// keeps its contents until the next start, so its head and violation flag
// are the held results. The original article gives only that this logic is similar
// to the first engine's; the state machine is this design's own.
module edf2_control
  import edf_pkg::*;
#(
  parameter int unsigned N  = MAX_TASKS,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IDX_W-1:0] count,
  input  time_t            now,
  output logic             busy,
  output logic             done,
  output logic             clear,
  output logic             mark_en,
  output logic             shift_en,
  output cum_t             list_now,
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr
);
  typedef enum logic [1:0] {S_IDLE, S_MARK, S_SHIFT} state_e;

  state_e           state;
  logic [IDX_W-1:0] k_q, n_q;
  logic             go, last;

  assign go       = (state == S_IDLE) && start;
  assign busy     = (state != S_IDLE);
  assign clear    = go;
  assign mark_en  = (state == S_MARK);
  assign shift_en = (state == S_SHIFT);
  assign last     = (k_q == n_q - IDX_W'(1));
  assign rd_en    = (go && count != '0) || (shift_en && !last);
  assign rd_addr  = go ? '0 : AW'(k_q + IDX_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k_q      <= '0;
      n_q      <= '0;
      done     <= 1'b0;
      list_now <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_q      <= count;
          k_q      <= '0;
          list_now <= cum_t'(now);
          if (count == '0) done  <= 1'b1;
          else             state <= S_MARK;
        end
        S_MARK: state <= S_SHIFT;
        S_SHIFT: begin
          if (last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            k_q   <= k_q + IDX_W'(1);
            state <= S_MARK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
