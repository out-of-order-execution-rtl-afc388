// rename_issue: the decode stage. For the instruction at its input it
// (1) checks that the reservation station of the unit it needs has a free
// entry, and that the reorder buffer has room, (2) reads both sources from
// the register alias table, (3) writes the sources - value if valid, else the
// producer's tag - into the free reservation station entry, and (4) renames
// the destination register to that entry's tag. If either structure is full
// the instruction stalls at decode, and so do all younger ones: instructions
// enter the window in program order.
//
// Purely combinational: accept (instr_valid && instr_ready) means every write
// above happens at the next clock edge. Nothing is accepted in a flush cycle.
// The four steps and the stall on a full station follow the described
// machine; the reorder-buffer check belongs to the precise-exception version.
module rename_issue
  import tomasulo_pkg::*;
(
  input  logic                instr_valid,
  input  instr_t              instr,
  output logic                instr_ready,
  input  logic                flush,
  // reservation stations
  input  logic                add_has_free,
  input  logic [RS_IDX_W-1:0] add_alloc_idx,
  input  logic                mul_has_free,
  input  logic [RS_IDX_W-1:0] mul_alloc_idx,
  output logic                add_alloc_we,
  output logic                mul_alloc_we,
  output rs_payload_t         payload,
  // reorder buffer
  input  logic                rob_has_free,
  input  rob_idx_t            rob_alloc_idx,
  output logic                rob_alloc_we,
  // register alias table
  output reg_idx_t            rat_rd_idx  [2],
  input  operand_t            rat_rd_data [2],
  output logic                rename_we,
  output reg_idx_t            rename_idx,
  output tag_t                rename_tag,
  // stall, for observation
  output logic                stall
);

  logic rs_free;
  logic fire;

  assign rs_free     = (instr.op == UNIT_MUL) ? mul_has_free : add_has_free;
  assign instr_ready = rs_free && rob_has_free && !flush;
  assign fire        = instr_valid && instr_ready;
  assign stall       = instr_valid && !instr_ready;

  assign rat_rd_idx[0] = instr.src1;
  assign rat_rd_idx[1] = instr.src2;

  always_comb begin
    payload      = '0;
    payload.src1 = rat_rd_data[0];
    payload.src2 = rat_rd_data[1];
    // a valid source carries no tag
    if (payload.src1.valid) payload.src1.tag = '0;
    if (payload.src2.valid) payload.src2.tag = '0;
    payload.rob  = rob_alloc_idx;
    payload.exc  = instr.exc;
  end

  assign add_alloc_we = fire && (instr.op == UNIT_ADD);
  assign mul_alloc_we = fire && (instr.op == UNIT_MUL);
  assign rob_alloc_we = fire;
  assign rename_we    = fire;
  assign rename_idx   = instr.dst;
  assign rename_tag   = (instr.op == UNIT_MUL) ? make_tag(UNIT_MUL, mul_alloc_idx)
                                               : make_tag(UNIT_ADD, add_alloc_idx);

endmodule
