// tomasulo_pkg: sizes and types shared by the out-of-order machine.
//
// The machine renames each destination register to the reservation-station
// entry that will produce its value. A tag therefore names one entry of one
// station: the top bit selects the station (0 = ADD unit, 1 = MUL unit) and the
// low bits the entry. With four entries per station the eight tags are the
// entries a, b, c, d (ADD) and x, y, z, t (MUL) of the reference program.
//
// Taken from the reference machine: four entries per station, a 4-cycle adder, a 6-cycle
// multiplier, registers R1..R11 (plus R0), a 16-entry reorder buffer. Own choices: 32-bit values, the
// instruction layout below, and the exception flag carried with each result.
package tomasulo_pkg;

  parameter int unsigned DATA_W      = 32;  // value width (own choice)
  parameter int unsigned NUM_REGS    = 12;  // R0..R11
  parameter int unsigned REG_W       = $clog2(NUM_REGS);
  parameter int unsigned RS_ENTRIES  = 4;   // a..d and x,y,z,t
  parameter int unsigned RS_IDX_W    = $clog2(RS_ENTRIES);
  parameter int unsigned TAG_W       = RS_IDX_W + 1;
  parameter int unsigned ADD_LATENCY = 4;   // E1..E4
  parameter int unsigned MUL_LATENCY = 6;   // E1..E6
  parameter int unsigned ROB_ENTRIES = 16;  // Entry 0..15
  parameter int unsigned ROB_IDX_W   = $clog2(ROB_ENTRIES);
  parameter int unsigned NUM_CDB     = 2;   // one tag/value bus per unit

  typedef logic [DATA_W-1:0]    data_t;
  typedef logic [REG_W-1:0]     reg_idx_t;
  typedef logic [TAG_W-1:0]     tag_t;
  typedef logic [ROB_IDX_W-1:0] rob_idx_t;

  // Functional unit an instruction needs; also the top bit of its tag.
  typedef enum logic {
    UNIT_ADD = 1'b0,
    UNIT_MUL = 1'b1
  } unit_e;

  // Instruction as presented at the decode stage: OP src1, src2 -> dst.
  // exc marks an instruction whose execution raises an exception.
  typedef struct packed {
    unit_e    op;
    reg_idx_t src1;
    reg_idx_t src2;
    reg_idx_t dst;
    logic     exc;
  } instr_t;

  // One source operand: V, Tag, Value, as in the reservation station tables.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    data_t value;
  } operand_t;

  // Contents written into a reservation station entry at decode.
  typedef struct packed {
    operand_t src1;
    operand_t src2;
    rob_idx_t rob;
    logic     exc;
  } rs_payload_t;

  // An operation leaving a reservation station for its functional unit.
  typedef struct packed {
    logic     valid;
    tag_t     tag;
    rob_idx_t rob;
    logic     exc;
    data_t    a;
    data_t    b;
  } fu_op_t;

  // One tag/value bus. Each functional unit drives its own.
  typedef struct packed {
    logic     valid;
    tag_t     tag;
    rob_idx_t rob;
    logic     exc;
    data_t    value;
  } cdb_t;

  function automatic tag_t make_tag(unit_e unit, logic [RS_IDX_W-1:0] idx);
    return {unit, idx};
  endfunction

  // True if bus b carries the value named by tag t.
  function automatic logic cdb_hit(cdb_t b, tag_t t);
    return b.valid && (b.tag == t);
  endfunction

endpackage
