// sa_ctrl: sequencer of the systolic N-queens array.
//
// After `start` (ignored while busy) it repeats one iteration step of the
// N^2-parallel network until the board holds a solution or MAX_STEPS updates
// have been applied:
//   LOAD   1 clock   `tok_load`: every cell copies V into its tokens
//   MOVE   N clocks  `tok_move` with `move_cnt` = 1..N: systolic movement
//   CHECK  1 clock   if `all_ok`, stop with `solved`; else `upd` applies the
//                    motion equation in every cell at once
// so a step costs N+2 clocks. `c_hi` selects the hill-climbing coefficient
// C = 4 for the first CHI of every CPER steps (t mod 20 < 5, with
// t = updates applied so far) and C = 1 otherwise. `steps` is the number of
// updates applied; `done` is a level that holds until the next `start`.
//
// The iteration limit of 500 and the hill-climbing schedule come from the
// source design; the three-phase schedule and its cycle count are this
// design's own.
module sa_ctrl
  import bnn_pkg::*;
#(
  parameter int N          = 9,
  parameter int MAX_STEPS  = 500,
  parameter int CPER       = C_PERIOD,
  parameter int CHI        = C_HI_STEPS,
  localparam int CW        = $clog2(N + 1),
  localparam int SW        = $clog2(MAX_STEPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          all_ok,
  output logic          tok_load,
  output logic          tok_move,
  output logic [CW-1:0] move_cnt,
  output logic          upd,
  output logic          c_hi,
  output logic          busy,
  output logic          done,
  output logic          solved,
  output logic [SW-1:0] steps
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_MOVE, S_CHECK} state_e;
  state_e state;
  int unsigned cmod;   // t mod CPER

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; move_cnt <= '0; steps <= '0; cmod <= 0;
      done <= 1'b0; solved <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD; steps <= '0; cmod <= 0; done <= 1'b0; solved <= 1'b0;
        end
        S_LOAD: begin
          state <= S_MOVE; move_cnt <= CW'(1);
        end
        S_MOVE: begin
          if (int'(move_cnt) == N) state <= S_CHECK;
          else                     move_cnt <= move_cnt + 1'b1;
        end
        S_CHECK: begin
          move_cnt <= '0;
          if (all_ok) begin
            state <= S_IDLE; done <= 1'b1; solved <= 1'b1;
          end else if (int'(steps) == MAX_STEPS) begin
            state <= S_IDLE; done <= 1'b1;
          end else begin
            steps <= steps + 1'b1;
            cmod  <= (cmod == CPER - 1) ? 0 : cmod + 1;
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign tok_load = (state == S_LOAD);
  assign tok_move = (state == S_MOVE);
  assign upd      = (state == S_CHECK) && !all_ok && (int'(steps) != MAX_STEPS);
  assign c_hi     = (cmod < CHI);

endmodule
