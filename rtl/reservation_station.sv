// reservation_station: the waiting area in front of one functional unit.
//
// Each entry holds an instruction after renaming: for both sources a Valid
// bit with either the value or the tag of its producer, plus the reorder
// buffer slot that receives the result. Every cycle each entry compares the
// tags of its not-yet-valid sources with the tags on all tag/value buses and
// copies the value on a match (wakeup). An entry whose two sources are valid
// is ready; among ready entries the one with the lowest index is sent to the
// functional unit (select), one per cycle. The entry stays allocated while the
// unit works on it and is freed when the unit broadcasts its tag, so a tag is
// never reused while a copy of it is still in flight.
//
// Interface: has_free/alloc_idx tell decode whether and where an instruction
// can go; alloc_we writes alloc_payload there. dispatch carries the chosen
// operation and its operands. flush empties the station.
//
// Timing: an entry written at decode in cycle t can be dispatched in cycle
// t+1 (its first execute cycle); a value broadcast in cycle t makes the
// waiting entry ready in cycle t+1. The entry/tag organisation and the wakeup
// by tag comparison follow the described machine; the lowest-index select, the
// lowest-index allocation and freeing at broadcast are this design's choices.
module reservation_station
  import tomasulo_pkg::*;
#(
  parameter unit_e       UNIT    = UNIT_ADD,
  parameter int unsigned ENTRIES = RS_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  // allocation from decode
  output logic                       has_free,
  output logic [RS_IDX_W-1:0]        alloc_idx,
  input  logic                       alloc_we,
  input  rs_payload_t                alloc_payload,
  // tag/value buses
  input  cdb_t                       cdb      [NUM_CDB],
  // to the functional unit
  output fu_op_t                     dispatch,
  // state, for observation
  output logic [ENTRIES-1:0]         busy_o,
  output rs_payload_t                entry_o  [ENTRIES]
);

  logic        busy    [ENTRIES];
  logic        issued  [ENTRIES];
  rs_payload_t entry   [ENTRIES];

  logic [ENTRIES-1:0]  ready;
  logic                sel_valid;
  logic [RS_IDX_W-1:0] sel_idx;

  // lowest free entry
  always_comb begin
    has_free  = 1'b0;
    alloc_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!busy[i]) begin
        has_free  = 1'b1;
        alloc_idx = RS_IDX_W'(i);
      end
    end
  end

  // wakeup state and select of the lowest ready entry
  always_comb begin
    sel_valid = 1'b0;
    sel_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      ready[i] = busy[i] && !issued[i] && entry[i].src1.valid && entry[i].src2.valid;
      if (ready[i]) begin
        sel_valid = 1'b1;
        sel_idx   = RS_IDX_W'(i);
      end
    end
  end

  always_comb begin
    dispatch       = '0;
    dispatch.valid = sel_valid;
    dispatch.tag   = make_tag(UNIT, sel_idx);
    dispatch.rob   = entry[sel_idx].rob;
    dispatch.exc   = entry[sel_idx].exc;
    dispatch.a     = entry[sel_idx].src1.value;
    dispatch.b     = entry[sel_idx].src2.value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        busy[i]   <= 1'b0;
        issued[i] <= 1'b0;
        entry[i]  <= '0;
      end
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) begin
        busy[i]   <= 1'b0;
        issued[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (busy[i]) begin
          for (int c = 0; c < NUM_CDB; c++) begin
            if (!entry[i].src1.valid && cdb_hit(cdb[c], entry[i].src1.tag)) begin
              entry[i].src1.valid <= 1'b1;
              entry[i].src1.value <= cdb[c].value;
            end
            if (!entry[i].src2.valid && cdb_hit(cdb[c], entry[i].src2.tag)) begin
              entry[i].src2.valid <= 1'b1;
              entry[i].src2.value <= cdb[c].value;
            end
            // the unit broadcasts this entry's own tag: result delivered
            if (cdb_hit(cdb[c], make_tag(UNIT, RS_IDX_W'(i)))) begin
              busy[i]   <= 1'b0;
              issued[i] <= 1'b0;
            end
          end
        end
      end
      if (sel_valid) issued[sel_idx] <= 1'b1;
      if (alloc_we && has_free) begin
        busy[alloc_idx]   <= 1'b1;
        issued[alloc_idx] <= 1'b0;
        entry[alloc_idx]  <= alloc_payload;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      busy_o[i]  = busy[i];
      entry_o[i] = entry[i];
    end
  end

  // A dispatched entry must have both operands.
  assert property (@(posedge clk) disable iff (!rst_n)
    dispatch.valid |-> (entry[sel_idx].src1.valid && entry[sel_idx].src2.valid));
  // Decode only allocates when an entry is free.
  assert property (@(posedge clk) disable iff (!rst_n) alloc_we |-> has_free);

endmodule
