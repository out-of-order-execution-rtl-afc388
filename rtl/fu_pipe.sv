// fu_pipe: the stage registers of a fully pipelined functional unit with a
// fixed latency, ending in the unit's own tag/value bus.
//
// The owning unit computes the result in the cycle the operation is
// dispatched (its first execute cycle, E1) and hands it in, already packed
// with its tag, reorder buffer slot and exception flag as a bus word; the word
// then travels through LATENCY-1 registers.
// The bus is driven from the last register, that is during execute cycle
// E<LATENCY>; consumers and the register file take the value at the end of
// that cycle and can use it in the next one, the write-back (W) cycle of
// the pipeline diagram. A new operation can enter every cycle, so results leave in order,
// at most one per cycle, and the bus never needs arbitration. flush drops
// everything in flight.
//
// Pipelining at one operation per cycle follows the reference machine, in
// which two ADDs overlap in the adder; the placement of the computation in E1 is this design's
// choice, invisible from outside.
module fu_pipe
  import tomasulo_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LATENCY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  cdb_t   first,
  output cdb_t   bus
);

  if (LATENCY <= 1) begin : g_comb
    assign bus = first;
  end else begin : g_pipe
    cdb_t stage [LATENCY-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < LATENCY - 1; s++) stage[s] <= '0;
      end else if (flush) begin
        for (int s = 0; s < LATENCY - 1; s++) stage[s].valid <= 1'b0;
      end else begin
        stage[0] <= first;
        for (int s = 1; s < LATENCY - 1; s++) stage[s] <= stage[s-1];
      end
    end
    assign bus = stage[LATENCY-2];
  end

endmodule
