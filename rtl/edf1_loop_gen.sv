// edf1_loop_gen: loop generator of the first (sequential, pipelined) EDF engine.
//
// It produces the outer index i and the inner index j of the straight
// selection sort and places them in the pipeline slots of the four-task
// example schedule: for each outer iteration i = 0 .. n-1 it issues one read
// slot per element j = i .. n-1 (`rd_en`, `j`, `first` marks j == i), then one
// slot in which the last element is still being compared, then one slot
// `ew` in which the feasibility check and the write-back happen together.
// An outer iteration therefore takes (n - i) + 2 cycles and a whole run
// n(n+1)/2 + 2n cycles (18 for four tasks, 592 for 32).
//
// Interface: `go` (one cycle, while idle) starts a run over `count` tasks;
// the first read slot is the `go` cycle itself. `done` pulses on the cycle
// after the last `ew` slot (or after `go` when count is 0). The count is
// latched at `go`. The slot layout follows the published pipeline schedule;
// the state encoding and the `go`/`done` handshake are this design's own.
module edf1_loop_gen
  import edf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic [IDX_W-1:0] count,
  output logic             busy,
  output logic             rd_en,   // read slot: element j is read
  output logic [IDX_W-1:0] j,
  output logic             first,   // this read is element i (moved_data)
  output logic [IDX_W-1:0] i,
  output logic             ew,      // feasibility check + write-back slot
  output logic             done
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_GAP, S_EW} state_e;

  state_e           state;
  logic [IDX_W-1:0] i_q, j_q, n_q;

  assign busy  = (state != S_IDLE);
  assign rd_en = (state == S_READ) || (state == S_IDLE && go && count != '0);
  assign j     = (state == S_IDLE) ? '0 : j_q;
  assign i     = i_q;
  assign first = rd_en && ((state == S_IDLE) || (j_q == i_q));
  assign ew    = (state == S_EW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i_q   <= '0;
      j_q   <= '0;
      n_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          n_q <= count;
          i_q <= '0;
          if (count == '0) begin
            done <= 1'b1;
          end else if (count == IDX_W'(1)) begin
            state <= S_GAP;
          end else begin
            j_q   <= IDX_W'(1);
            state <= S_READ;
          end
        end
        S_READ: begin
          if (j_q == n_q - IDX_W'(1)) state <= S_GAP;
          else                        j_q   <= j_q + IDX_W'(1);
        end
        S_GAP: state <= S_EW;
        S_EW: begin
          if (i_q == n_q - IDX_W'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            i_q   <= i_q + IDX_W'(1);
            j_q   <= i_q + IDX_W'(1);
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
