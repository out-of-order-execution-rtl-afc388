// reorder_buffer: keeps instructions in program order so that the
// architectural register file is updated in order and exceptions are precise.
//
// Each of the ENTRIES slots holds Valid, the destination register, its value,
// a Written (done) flag and an exception flag. Decode allocates the slot at
// the tail in program order. When a functional unit broadcasts a result, the
// slot named by the result's reorder-buffer index is marked written and takes
// the value. Every cycle the oldest slot (head) is examined: once written, it
// retires. Without an exception its value goes to the architectural register
// file; with one, nothing is written and flush is raised for one cycle, which
// empties this buffer, the reservation stations and the units and makes the
// frontend register file a copy of the architectural one.
//
// Timing: allocation and completion take effect at the clock edge; retire and
// flush are combinational from the head slot, one instruction per cycle.
// The slot contents and the in-order retire/flush policy follow the described
// machine; one retirement per cycle and the circular head/tail pointers are
// this design's choices.
module reorder_buffer
  import tomasulo_pkg::*;
#(
  parameter int unsigned ENTRIES = ROB_ENTRIES
) (
  input  logic     clk,
  input  logic     rst_n,
  // allocation
  output logic     has_free,
  output rob_idx_t alloc_idx,
  input  logic     alloc_we,
  input  reg_idx_t alloc_dst,
  // completion
  input  cdb_t     cdb [NUM_CDB],
  // retirement
  output logic     retire_we,
  output reg_idx_t retire_dst,
  output data_t    retire_value,
  output logic     flush,
  output rob_idx_t flush_idx,
  output logic     empty
);

  typedef struct packed {
    logic     valid;
    reg_idx_t dst;
    data_t    value;
    logic     written;
    logic     exc;
  } rob_entry_t;

  rob_entry_t slot [ENTRIES];
  rob_idx_t   head, tail;
  logic [ROB_IDX_W:0] count;

  logic retire;

  assign has_free  = (count < (ROB_IDX_W+1)'(ENTRIES));
  assign empty     = (count == '0);
  assign alloc_idx = tail;

  assign retire       = slot[head].valid && slot[head].written;
  assign retire_we    = retire && !slot[head].exc;
  assign flush        = retire && slot[head].exc;
  assign flush_idx    = head;
  assign retire_dst   = slot[head].dst;
  assign retire_value = slot[head].value;

  function automatic rob_idx_t next_idx(rob_idx_t i);
    return (i == rob_idx_t'(ENTRIES - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) slot[i] <= '0;
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) slot[i].valid <= 1'b0;
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      for (int c = 0; c < NUM_CDB; c++) begin
        if (cdb[c].valid) begin
          slot[cdb[c].rob].written <= 1'b1;
          slot[cdb[c].rob].value   <= cdb[c].value;
          slot[cdb[c].rob].exc     <= cdb[c].exc;
        end
      end
      if (retire) begin
        slot[head].valid <= 1'b0;
        head <= next_idx(head);
      end
      if (alloc_we) begin
        slot[tail] <= '{valid: 1'b1, dst: alloc_dst, value: '0, written: 1'b0, exc: 1'b0};
        tail <= next_idx(tail);
      end
      count <= count + (ROB_IDX_W+1)'(alloc_we) - (ROB_IDX_W+1)'(retire);
    end
  end

  // Decode allocates only when a slot is free; results only complete live slots.
  assert property (@(posedge clk) disable iff (!rst_n) alloc_we |-> has_free);
  for (genvar c = 0; c < NUM_CDB; c++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n || flush)
      cdb[c].valid |-> slot[cdb[c].rob].valid);
  end

endmodule
