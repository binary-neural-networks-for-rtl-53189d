// bus_sequencer: round controller and bus buffer of the bus-connected network.
//
// After `start` it repeats iteration steps until the network rests in a local
// minimum or MAX_STEPS updates have been applied. One step:
//   GRANT  1 clock   every active neuron gets the right to arbitrate
//   ARB    1 clock   the arbiters settle; if anybody participates, the buffer
//                    latches the inverted arbitration lines as the master ID
//                    (address bus) and `take` removes the winner's right
//   RD,ACC 2 clocks  every neuron reads its synaptic memory at the master ID
//                    and counts the broadcast; then back to ARB
//   UPD    1 clock   no participant is left: every neuron applies its terms
//   CHECK  1 clock   stop if no neuron is unstable (local minimum) or the
//                    step limit is reached, else start the next step
// A step with a active neurons therefore takes 3a + 4 clocks; at 10 MHz a
// broadcast is 100 ns of arbitration plus 200 ns of computation. `boost` is
// high during steps with t mod 20 < 5 (t = updates applied so far), which
// switches the term units to the C = 4 coefficients. `bcasts` counts the
// broadcasts of the run.
//
// The arbitration/broadcast sequence and its 100 ns + 200 ns timing follow the
// source design; the central sequencer and the stop test are this design's.
module bus_sequencer
  import bnn_pkg::*;
#(
  parameter int ID_W       = 9,
  parameter int MAX_STEPS  = 500,
  parameter int CPER       = C_PERIOD,
  parameter int CHI        = C_HI_STEPS,
  localparam int SW        = $clog2(MAX_STEPS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            any_part,
  input  logic [ID_W-1:0] arb_bus_n,     // active-low arbitration lines
  input  logic            any_unstable,
  output bus_cmd_t        cmd,
  output logic [ID_W-1:0] master_id,
  output logic            busy,
  output logic            done,
  output logic            local_min,
  output logic [SW-1:0]   steps,
  output logic [15:0]     bcasts
);
  typedef enum logic [2:0] {S_IDLE, S_GRANT, S_ARB, S_RD, S_ACC, S_UPD, S_CHECK} state_e;
  state_e      state;
  int unsigned cmod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; master_id <= '0; steps <= '0; cmod <= 0; bcasts <= '0;
      done <= 1'b0; local_min <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_GRANT; steps <= '0; cmod <= 0; bcasts <= '0;
          done <= 1'b0; local_min <= 1'b0;
        end
        S_GRANT: state <= S_ARB;
        S_ARB: if (any_part) begin
          master_id <= ~arb_bus_n;          // buffer: arbitration bus -> address bus
          bcasts    <= bcasts + 1'b1;
          state     <= S_RD;
        end else begin
          state <= S_UPD;
        end
        S_RD:  state <= S_ACC;
        S_ACC: state <= S_ARB;
        S_UPD: begin
          steps <= steps + 1'b1;
          cmod  <= (cmod == CPER - 1) ? 0 : cmod + 1;
          state <= S_CHECK;
        end
        S_CHECK: begin
          if (!any_unstable) begin
            state <= S_IDLE; done <= 1'b1; local_min <= 1'b1;
          end else if (int'(steps) == MAX_STEPS) begin
            state <= S_IDLE; done <= 1'b1;
          end else begin
            state <= S_GRANT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cmd       = '0;
    cmd.grant = (state == S_GRANT);
    cmd.take  = (state == S_ARB) && any_part;
    cmd.rd    = (state == S_RD);
    cmd.acc   = (state == S_ACC);
    cmd.upd   = (state == S_UPD);
    cmd.boost = (cmod < CHI);
  end
  assign busy = (state != S_IDLE);

  // a master is only latched while somebody participates
  a_take_needs_part: assert property (@(posedge clk) disable iff (!rst_n)
                                      cmd.take |-> any_part);
endmodule
