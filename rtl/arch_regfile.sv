// arch_regfile: the architectural register file of the precise-exception
// machine. It holds only values (no valid bit or tag) and is written solely
// by retiring instructions, so it always reflects program order. Its whole
// contents are offered to the frontend register file, which copies them on a
// flush. init_* writes a register directly (used to set up a run).
//
// Timing: writes take effect at the clock edge; the contents are visible
// combinationally. Reset clears every register. Value-only storage and
// in-order update follow the described machine; the init port is this
// design's choice.
module arch_regfile
  import tomasulo_pkg::*;
#(
  parameter int unsigned NREGS = NUM_REGS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     init_we,
  input  reg_idx_t init_idx,
  input  data_t    init_value,
  input  logic     retire_we,
  input  reg_idx_t retire_dst,
  input  data_t    retire_value,
  output data_t    value [NREGS]
);

  data_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      if (retire_we)    regs[retire_dst] <= retire_value;
      else if (init_we) regs[init_idx]   <= init_value;
    end
  end

  assign value = regs;

endmodule
