// bus_local_arbiter: local arbiter of one neuron on the arbitration bus.
//
// The arbitration bus is a set of ID_W wired-OR lines; on the backplane they
// are active low, so the bus shows the inverse bit pattern of the winner's ID.
// Here `bus_or` is the resolved line value in active-high form (the OR of all
// arbiters' `drive`). Parallel contention, as on Futurebus: a participating
// arbiter drives a 1 on every line where its ID has a 1, but withdraws from
// all lower lines as soon as a higher line carries a 1 where its own ID has a
// 0. The lines settle to the largest participating ID within one clock, and
// `win` tells that this arbiter is the bus master.
//
// Participation right: `grant` (round start) gives it to the neuron if V = 1;
// `take` (the winner was latched as bus master) removes it from the winner,
// so every active neuron becomes master once per round.
//
// The drive depends on `bus_or`, which in turn is the OR of every arbiter's
// drive; bit k only depends on lines above k, so the loop is broken at bit
// level, but a simulator that orders whole variables sees a combinational
// loop through the bus. This is the wired-OR settling of the real bus and is
// kept on purpose.
//
// Largest-ID-wins contention, the inverted bus pattern and the participation
// right follow the source design; the one-clock settling and the bit-serial
// back-off written as a priority chain are this design's.
module bus_local_arbiter #(
  parameter int ID_W = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] my_id,
  input  logic            v,
  input  logic            grant,
  input  logic            take,
  input  logic [ID_W-1:0] bus_or,
  output logic [ID_W-1:0] drive,
  output logic            win,
  output logic            part
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           part <= 1'b0;
    else if (grant)       part <= v;
    else if (take && win) part <= 1'b0;
  end

  logic alive [ID_W+1];
  always_comb begin
    alive[ID_W] = part;
    for (int k = ID_W - 1; k >= 0; k--) begin
      drive[k]  = alive[k+1] & my_id[k];
      alive[k]  = alive[k+1] & (my_id[k] | ~bus_or[k]);
    end
  end

  assign win = part && (bus_or == my_id);
endmodule
