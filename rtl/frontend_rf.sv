// frontend_rf: the register alias table, also called the frontend register
// file. Each architectural register holds Valid, Tag and Value. A valid
// register holds its current value; an invalid one holds the tag of the
// reservation-station entry that will produce it (its latest writer).
//
// Decode reads two sources and renames one destination per cycle. Reads are
// combinational and look at the tag/value buses of the same cycle, so a source
// whose producer broadcasts while the consumer is decoded is picked up as a
// value and not lost. On a broadcast, a register whose tag matches and which
// is still invalid takes the value and becomes valid; a rename of the same
// register in the same cycle wins, since it names a younger writer. On flush
// the whole file is reloaded, all valid, from the architectural register file.
// init_* writes a value directly (used to set up the registers before a run).
//
// Timing: reads are combinational; rename, broadcast, flush and init take
// effect at the next rising clock edge. Reset makes every register valid and
// zero.
//
// The Valid/Tag/Value organisation, update by tag match and reload on flush
// follow the described machine; the same-cycle bypass, the rename priority and
// the init port are this design's choices.
module frontend_rf
  import tomasulo_pkg::*;
#(
  parameter int unsigned NREGS = NUM_REGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // direct initialisation
  input  logic                 init_we,
  input  reg_idx_t             init_idx,
  input  data_t                init_value,
  // decode: two source reads
  input  reg_idx_t             rd_idx   [2],
  output operand_t             rd_data  [2],
  // decode: rename of the destination
  input  logic                 rename_we,
  input  reg_idx_t             rename_idx,
  input  tag_t                 rename_tag,
  // tag/value buses
  input  cdb_t                 cdb      [NUM_CDB],
  // flush: copy of the architectural register file
  input  logic                 flush,
  input  data_t                arch_value [NREGS],
  // state, for observation
  output operand_t             regs_o   [NREGS]
);

  operand_t regs [NREGS];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      rd_data[p] = regs[rd_idx[p]];
      if (!regs[rd_idx[p]].valid) begin
        for (int c = 0; c < NUM_CDB; c++) begin
          if (cdb_hit(cdb[c], regs[rd_idx[p]].tag)) begin
            rd_data[p].valid = 1'b1;
            rd_data[p].value = cdb[c].value;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '{valid: 1'b1, tag: '0, value: '0};
    end else if (flush) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '{valid: 1'b1, tag: '0, value: arch_value[r]};
    end else begin
      for (int r = 0; r < NREGS; r++) begin
        for (int c = 0; c < NUM_CDB; c++) begin
          if (!regs[r].valid && cdb_hit(cdb[c], regs[r].tag)) begin
            regs[r].valid <= 1'b1;
            regs[r].value <= cdb[c].value;
          end
        end
      end
      if (init_we) regs[init_idx] <= '{valid: 1'b1, tag: '0, value: init_value};
      if (rename_we) begin
        regs[rename_idx].valid <= 1'b0;
        regs[rename_idx].tag   <= rename_tag;
      end
    end
  end

  assign regs_o = regs;

endmodule
