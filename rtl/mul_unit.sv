// mul_unit: the MUL functional unit. Multiplies the two source values of the
// operation it receives from the MUL reservation station and, MUL_LATENCY
// cycles after dispatch counting the dispatch cycle, places the product (low
// DATA_W bits) with the operation's tag on the MUL unit's own tag/value bus
// (during its last execute cycle). Fully pipelined: one new operation per
// cycle.
//
// The 6-cycle latency (E1..E6) and the separate bus per unit follow the
// reference Tomasulo machine; keeping the low half of the product and pipelining the multiplier
// are this design's choices.
module mul_unit
  import tomasulo_pkg::*;
#(
  parameter int unsigned LATENCY = MUL_LATENCY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  fu_op_t op,
  output cdb_t   bus
);

  cdb_t product;

  always_comb begin
    product.valid = op.valid;
    product.tag   = op.tag;
    product.rob   = op.rob;
    product.exc   = op.exc;
    product.value = op.a * op.b;
  end

  fu_pipe #(.LATENCY(LATENCY)) u_pipe (
    .clk, .rst_n, .flush, .first(product), .bus
  );

endmodule
