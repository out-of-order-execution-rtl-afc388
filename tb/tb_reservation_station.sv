// tb_reservation_station: the ADD-unit station (4 entries) against a model
// written here. A stand-in unit returns each dispatched operation's tag on
// the ADD bus 3 cycles after dispatch; the MUL bus carries random MUL tags.
// Decode allocates with random sources (valid values or random tags) whenever
// the model says an entry is free. Each cycle the free flag, the allocation
// index, the dispatched operation (tag, operands, reorder-buffer slot) and
// every entry's busy flag are compared with the model. Directed steps check
// the timing of the reference program: an entry allocated with ready operands is
// dispatched in the next cycle, and one woken by a broadcast is dispatched in
// the cycle after the broadcast. A flush must empty the station.
module tb_reservation_station;
  import tomasulo_pkg::*;

  localparam int L = 3;

  logic                clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic                has_free;
  logic [RS_IDX_W-1:0] alloc_idx;
  logic                alloc_we = 1'b0;
  rs_payload_t         alloc_payload = '0;
  cdb_t                cdb [NUM_CDB];
  fu_op_t              dispatch;
  logic [RS_ENTRIES-1:0] busy_o;
  rs_payload_t         entry_o [RS_ENTRIES];

  reservation_station dut (.*);   // default: the ADD-unit station

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dispatch = 0, n_wakeup = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model
  bit          mb [RS_ENTRIES];
  bit          mi [RS_ENTRIES];
  rs_payload_t me [RS_ENTRIES];
  fu_op_t      pipe [L];
  fu_op_t      seen;      // dispatch observed in the last step   // stand-in unit, pipe[L-1] drives the ADD bus

  function automatic int model_free();
    for (int i = 0; i < RS_ENTRIES; i++) if (!mb[i]) return i;
    return -1;
  endfunction

  function automatic int model_sel();
    for (int i = 0; i < RS_ENTRIES; i++)
      if (mb[i] && !mi[i] && me[i].src1.valid && me[i].src2.valid) return i;
    return -1;
  endfunction

  function automatic operand_t rand_src();
    operand_t o;
    o.valid = ($urandom_range(0, 2) == 0);
    o.tag   = tag_t'($urandom);
    o.value = $urandom_range(0, 500);
    if (o.valid) o.tag = '0;
    return o;
  endfunction

  // one cycle: drive, compare, update model
  task automatic step(bit do_alloc, rs_payload_t p, cdb_t other, bit fl);
    int f, s;
    cdb_t own;
    own = '0;
    if (pipe[L-1].valid) begin
      own.valid = 1'b1; own.tag = pipe[L-1].tag; own.rob = pipe[L-1].rob;
      own.value = pipe[L-1].a + pipe[L-1].b;
    end
    cdb[0] = own;
    cdb[1] = other;
    flush = fl;
    f = model_free();
    alloc_we = do_alloc && (f >= 0);
    alloc_payload = p;
    @(negedge clk);
    check(has_free == (f >= 0), "has_free");
    if (f >= 0) check(alloc_idx == RS_IDX_W'(f), $sformatf("alloc_idx %0d expected %0d", alloc_idx, f));
    s = model_sel();
    seen = dispatch;
    check(dispatch.valid == (s >= 0), $sformatf("dispatch valid %0b expected %0b", dispatch.valid, s >= 0));
    if (s >= 0) begin
      check(dispatch.tag == make_tag(UNIT_ADD, RS_IDX_W'(s)) && dispatch.a == me[s].src1.value &&
            dispatch.b == me[s].src2.value && dispatch.rob == me[s].rob,
            $sformatf("dispatch of entry %0d", s));
      n_dispatch++;
    end
    // model update
    for (int k = L - 1; k > 0; k--) pipe[k] = pipe[k-1];
    pipe[0] = '0;
    if (fl) begin
      for (int i = 0; i < RS_ENTRIES; i++) begin mb[i] = 0; mi[i] = 0; end
      for (int k = 0; k < L; k++) pipe[k] = '0;
    end else begin
      for (int i = 0; i < RS_ENTRIES; i++) if (mb[i]) begin
        for (int c = 0; c < NUM_CDB; c++) begin
          if (cdb[c].valid && !me[i].src1.valid && cdb[c].tag == me[i].src1.tag) begin
            me[i].src1.valid = 1; me[i].src1.value = cdb[c].value; n_wakeup++;
          end
          if (cdb[c].valid && !me[i].src2.valid && cdb[c].tag == me[i].src2.tag) begin
            me[i].src2.valid = 1; me[i].src2.value = cdb[c].value; n_wakeup++;
          end
          if (cdb[c].valid && cdb[c].tag == make_tag(UNIT_ADD, RS_IDX_W'(i))) begin mb[i] = 0; mi[i] = 0; end
        end
      end
      if (s >= 0) begin
        mi[s] = 1;
        pipe[0] = dispatch;
      end
      if (alloc_we) begin mb[f] = 1; mi[f] = 0; me[f] = p; end
    end
    @(posedge clk); #1;
    for (int i = 0; i < RS_ENTRIES; i++) check(busy_o[i] == mb[i], $sformatf("busy of entry %0d", i));
  endtask

  initial begin
    rs_payload_t p;
    cdb_t none;
    none = '0;
    cdb[0] = '0; cdb[1] = '0;
    for (int i = 0; i < RS_ENTRIES; i++) begin mb[i] = 0; mi[i] = 0; me[i] = '0; end
    for (int k = 0; k < L; k++) pipe[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // directed: ready at allocation -> dispatched the next cycle
    p = '0;
    p.src1 = '{valid: 1, tag: 0, value: 2};
    p.src2 = '{valid: 1, tag: 0, value: 6};
    step(1, p, none, 0);
    check(!seen.valid, "nothing dispatched in the allocation cycle");
    step(0, p, none, 0);
    check(seen.valid && seen.a == 2 && seen.b == 6, "ready entry dispatched the cycle after allocation");
    // directed: waits on MUL tag x (4), broadcast, dispatched the next cycle
    p.src1 = '{valid: 0, tag: 4, value: 0};
    p.src2 = '{valid: 1, tag: 0, value: 4};
    step(1, p, none, 0);
    step(0, p, none, 0);
    check(!seen.valid, "waiting entry not dispatched");
    step(0, p, '{valid: 1, tag: 4, rob: 0, exc: 0, value: 2}, 0);
    check(!seen.valid, "not dispatched in the broadcast cycle");
    step(0, p, none, 0);
    check(seen.valid && seen.tag == make_tag(UNIT_ADD, 1) && seen.a == 2 && seen.b == 4,
          "woken entry dispatched the cycle after the broadcast");
    // random
    for (int k = 0; k < 4000; k++) begin
      cdb_t o;
      p = '0;
      p.src1 = rand_src();
      p.src2 = rand_src();
      p.rob  = rob_idx_t'($urandom);
      o = '0;
      o.valid = ($urandom_range(0, 1) == 0);
      o.tag   = make_tag(UNIT_MUL, RS_IDX_W'($urandom));
      o.value = $urandom_range(0, 500);
      step($urandom_range(0, 1) == 0, p, o, $urandom_range(0, 199) == 0);
    end
    check(n_dispatch > 100 && n_wakeup > 100, $sformatf("activity: %0d dispatches, %0d wakeups", n_dispatch, n_wakeup));
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
