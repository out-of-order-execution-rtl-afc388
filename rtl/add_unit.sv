// add_unit: the ADD functional unit. Adds the two source values of the
// operation it receives from the ADD reservation station and, ADD_LATENCY
// cycles after dispatch counting the dispatch cycle, places the sum with the
// operation's tag on the ADD unit's own tag/value bus (during its last
// execute cycle). Fully pipelined: one new operation per cycle.
//
// The 4-cycle latency (E1..E4) and the separate bus per unit follow the
// reference Tomasulo machine; the wrap-around 32-bit sum is this design's choice.
module add_unit
  import tomasulo_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LATENCY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  fu_op_t op,
  output cdb_t   bus
);

  cdb_t sum;

  always_comb begin
    sum.valid = op.valid;
    sum.tag   = op.tag;
    sum.rob   = op.rob;
    sum.exc   = op.exc;
    sum.value = op.a + op.b;
  end

  fu_pipe #(.LATENCY(LATENCY)) u_pipe (
    .clk, .rst_n, .flush, .first(sum), .bus
  );

endmodule
