// mnn_ctrl: sequencer of the maximum neural network in N-parallel mode.
//
// The N neurons of a row are updated together, the rows one after the other,
// so every row sees the newest outputs of the rows before it. After `start`
// the controller first checks the loaded state, then runs sweeps:
//   READ   1 clock  RAM read of row `row`
//   WRITE  1 clock  processing units and maximum neuron produce the row's
//                   new U, T and V; `row_we` stores them (RAM and array)
// for row = 0..N-1, followed by
//   CHECK  1 clock  stop with `success` if the array reports a solution,
//                   stop without it after MAX_STEPS sweeps, else sweep again.
// A sweep (iteration step) therefore costs 2N+1 clocks; `steps` counts sweeps.
// The check after every step and the limit of 100 steps follow the source
// design; the two-clock row schedule is this design's choice.
module mnn_ctrl #(
  parameter int N         = 31,
  parameter int MAX_STEPS = 100,
  localparam int RW       = $clog2(N),
  localparam int SW       = $clog2(MAX_STEPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          solved,
  output logic [RW-1:0] row,
  output logic          row_we,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [SW-1:0] steps
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_CHECK} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; row <= '0; steps <= '0; done <= 1'b0; success <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CHECK; row <= '0; steps <= '0; done <= 1'b0; success <= 1'b0;
        end
        S_READ:  state <= S_WRITE;
        S_WRITE: begin
          if (int'(row) == N - 1) begin
            row   <= '0;
            steps <= steps + 1'b1;
            state <= S_CHECK;
          end else begin
            row   <= row + 1'b1;
            state <= S_READ;
          end
        end
        S_CHECK: begin
          if (solved) begin
            state <= S_IDLE; done <= 1'b1; success <= 1'b1;
          end else if (int'(steps) == MAX_STEPS) begin
            state <= S_IDLE; done <= 1'b1;
          end else begin
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign row_we = (state == S_WRITE);
  assign busy   = (state != S_IDLE);
endmodule
