// tomasulo_top: an out-of-order machine built on Tomasulo's algorithm, with a
// reorder buffer for precise exceptions.
//
// Instructions (OP src1, src2 -> dst, OP = ADD or MUL) arrive in program
// order at the decode port. Decode renames each destination to a
// reservation-station entry: the entry's tag becomes the register's pending
// name in the frontend register file (register alias table), and the
// instruction waits in the station of its unit with, for each source, either
// a value or the tag of the instruction that will produce it. Whenever a unit
// finishes, it puts tag and value on its own bus. Waiting entries whose source
// tags match take the value (wakeup); a ready entry is dispatched to its unit
// (select, one per unit per cycle) regardless of program order. The frontend
// register file takes the value for a register whose tag still matches, and
// the station entry is freed, so the tag is reclaimed. The reorder buffer
// retires results in program order into the architectural register file; an
// instruction marked with an exception flushes the machine when it is the
// oldest, and the frontend register file is reloaded from the architectural
// one.
//
// Sizes are those of the reference machine: 4 ADD entries (tags a-d), 4 MUL
// entries (tags x, y, z, t), an adder of 4 and a multiplier of 6 execute
// cycles, both pipelined, 16 reorder-buffer slots, registers R0..R11.
//
// Timing: an instruction accepted at decode in cycle t can start executing in
// cycle t+1. A unit drives its bus in its last execute cycle; a consumer of
// that value can start executing in the following cycle, which is also the
// first cycle the register file shows it. The six-instruction reference program
// (README) therefore completes in 20 cycles counted from fetch of its first instruction one cycle
// before decode. A stalled instruction (full station or reorder buffer) holds
// instr_ready low. The init port writes both register files and is meant for
// use while the machine is empty.
module tomasulo_top
  import tomasulo_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // register initialisation
  input  logic     init_we,
  input  reg_idx_t init_idx,
  input  data_t    init_value,
  // decode port
  input  logic     instr_valid,
  input  instr_t   instr,
  output logic     instr_ready,
  // tag/value buses of the ADD and MUL units
  output cdb_t     add_bus,
  output cdb_t     mul_bus,
  // retirement and exceptions
  output logic     retire_valid,
  output reg_idx_t retire_dst,
  output data_t    retire_value,
  output logic     exception,
  output rob_idx_t exception_rob,
  // state, for observation
  output logic     stall,
  output logic     idle,
  output operand_t frontend_regs [NUM_REGS],
  output data_t    arch_regs     [NUM_REGS],
  output logic [RS_ENTRIES-1:0] add_rs_busy,
  output logic [RS_ENTRIES-1:0] mul_rs_busy,
  output rs_payload_t add_rs_entries [RS_ENTRIES],
  output rs_payload_t mul_rs_entries [RS_ENTRIES]
);

  cdb_t        cdb [NUM_CDB];
  logic        flush;

  logic                add_has_free, mul_has_free;
  logic [RS_IDX_W-1:0] add_alloc_idx, mul_alloc_idx;
  logic                add_alloc_we, mul_alloc_we;
  rs_payload_t         payload;
  fu_op_t              add_op, mul_op;

  logic     rob_has_free, rob_alloc_we, rob_empty;
  rob_idx_t rob_alloc_idx;

  reg_idx_t rat_rd_idx  [2];
  operand_t rat_rd_data [2];
  logic     rename_we;
  reg_idx_t rename_idx;
  tag_t     rename_tag;

  assign cdb[UNIT_ADD] = add_bus;
  assign cdb[UNIT_MUL] = mul_bus;

  rename_issue u_decode (
    .instr_valid, .instr, .instr_ready, .flush,
    .add_has_free, .add_alloc_idx, .mul_has_free, .mul_alloc_idx,
    .add_alloc_we, .mul_alloc_we, .payload,
    .rob_has_free, .rob_alloc_idx, .rob_alloc_we,
    .rat_rd_idx, .rat_rd_data, .rename_we, .rename_idx, .rename_tag,
    .stall
  );

  frontend_rf u_rat (
    .clk, .rst_n,
    .init_we, .init_idx, .init_value,
    .rd_idx(rat_rd_idx), .rd_data(rat_rd_data),
    .rename_we, .rename_idx, .rename_tag,
    .cdb, .flush, .arch_value(arch_regs),
    .regs_o(frontend_regs)
  );

  reservation_station #(.UNIT(UNIT_ADD)) u_rs_add (
    .clk, .rst_n, .flush,
    .has_free(add_has_free), .alloc_idx(add_alloc_idx),
    .alloc_we(add_alloc_we), .alloc_payload(payload),
    .cdb, .dispatch(add_op),
    .busy_o(add_rs_busy), .entry_o(add_rs_entries)
  );

  reservation_station #(.UNIT(UNIT_MUL)) u_rs_mul (
    .clk, .rst_n, .flush,
    .has_free(mul_has_free), .alloc_idx(mul_alloc_idx),
    .alloc_we(mul_alloc_we), .alloc_payload(payload),
    .cdb, .dispatch(mul_op),
    .busy_o(mul_rs_busy), .entry_o(mul_rs_entries)
  );

  add_unit u_add (.clk, .rst_n, .flush, .op(add_op), .bus(add_bus));
  mul_unit u_mul (.clk, .rst_n, .flush, .op(mul_op), .bus(mul_bus));

  reorder_buffer u_rob (
    .clk, .rst_n,
    .has_free(rob_has_free), .alloc_idx(rob_alloc_idx),
    .alloc_we(rob_alloc_we), .alloc_dst(rename_idx),
    .cdb,
    .retire_we(retire_valid), .retire_dst, .retire_value,
    .flush, .flush_idx(exception_rob), .empty(rob_empty)
  );

  arch_regfile u_arf (
    .clk, .rst_n,
    .init_we, .init_idx, .init_value,
    .retire_we(retire_valid), .retire_dst, .retire_value,
    .value(arch_regs)
  );

  assign exception = flush;
  assign idle      = rob_empty;

endmodule
