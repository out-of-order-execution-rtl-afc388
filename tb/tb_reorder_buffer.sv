// tb_reorder_buffer: the 16-slot reorder buffer against an in-order queue
// model written here. Decode allocates slots with random destinations while
// the model has room; results for random outstanding slots arrive on either
// bus in any order, a few with the exception flag. Each cycle the free flag,
// the allocation slot, the retirement (destination and value, in program
// order, only once the oldest is written) and the flush (only for the oldest,
// with its slot number) are compared with the model. The test also checks
// that the buffer really fills to 16 and then refuses allocation.
module tb_reorder_buffer;
  import tomasulo_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     has_free;
  rob_idx_t alloc_idx;
  logic     alloc_we = 1'b0;
  reg_idx_t alloc_dst = '0;
  cdb_t     cdb [NUM_CDB];
  logic     retire_we;
  reg_idx_t retire_dst;
  data_t    retire_value;
  logic     flush;
  rob_idx_t flush_idx;
  logic     empty;

  reorder_buffer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_retire = 0, n_flush = 0, n_full = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct {
    int       slot;
    reg_idx_t dst;
    bit       written;
    data_t    value;
    bit       exc;
  } m_entry_t;

  m_entry_t q [$];
  int       tail = 0;

  task automatic step(bit want_alloc, int n_complete, bit allow_exc);
    bit used [ROB_ENTRIES];
    @(negedge clk);
    // like decode, never allocate when the buffer says it is full
    alloc_we  = want_alloc && (q.size() < ROB_ENTRIES) && has_free;
    alloc_dst = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
    for (int c = 0; c < NUM_CDB; c++) begin
      cdb[c] = '0;
      if (c < n_complete) begin
        int pick;
        pick = -1;
        for (int tries = 0; tries < 8 && q.size() > 0; tries++) begin
          int k;
          k = $urandom_range(0, q.size() - 1);
          if (!q[k].written && !used[q[k].slot]) begin pick = k; break; end
        end
        if (pick >= 0) begin
          used[q[pick].slot] = 1;
          cdb[c].valid = 1'b1;
          cdb[c].rob   = rob_idx_t'(q[pick].slot);
          cdb[c].value = $urandom;
          cdb[c].exc   = allow_exc && ($urandom_range(0, 29) == 0);
        end
      end
    end
    #1;
    check(has_free == (q.size() < ROB_ENTRIES), "has_free");
    check(empty == (q.size() == 0), "empty");
    if (q.size() < ROB_ENTRIES) check(alloc_idx == rob_idx_t'(tail), "alloc slot");
    if (q.size() == ROB_ENTRIES) n_full++;
    if (q.size() > 0 && q[0].written) begin
      check(q[0].exc ? (flush && !retire_we && flush_idx == rob_idx_t'(q[0].slot))
                     : (retire_we && !flush && retire_dst == q[0].dst && retire_value == q[0].value),
            $sformatf("retire of slot %0d", q[0].slot));
    end else begin
      check(!retire_we && !flush, "no retirement while the oldest is not written");
    end
    @(posedge clk); #1;
    // model update
    if (q.size() > 0 && q[0].written && q[0].exc) begin
      q.delete();
      tail = 0;
      n_flush++;
    end else begin
      bit ret;
      ret = (q.size() > 0 && q[0].written);
      for (int c = 0; c < NUM_CDB; c++)
        if (cdb[c].valid)
          foreach (q[k]) if (q[k].slot == cdb[c].rob) begin
            q[k].written = 1; q[k].value = cdb[c].value; q[k].exc = cdb[c].exc;
          end
      if (ret) begin
        void'(q.pop_front());
        n_retire++;
      end
      if (alloc_we) begin
        q.push_back('{slot: tail, dst: alloc_dst, written: 0, value: '0, exc: 0});
        tail = (tail + 1) % ROB_ENTRIES;
      end
    end
  endtask

  initial begin
    cdb[0] = '0; cdb[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // fill completely without completing anything
    for (int k = 0; k < ROB_ENTRIES + 3; k++) step(1, 0, 0);
    check(q.size() == ROB_ENTRIES && !has_free, "buffer holds 16 and refuses more");
    // random traffic
    for (int k = 0; k < 5000; k++)
      step($urandom_range(0, 2) != 0, $urandom_range(0, 2), k > 1000);
    check(n_retire > 500 && n_flush > 5 && n_full > 3,
          $sformatf("activity: %0d retired, %0d flushes, %0d full cycles", n_retire, n_flush, n_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
