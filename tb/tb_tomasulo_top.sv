// tb_tomasulo_top: end-to-end test of the out-of-order machine at its default
// sizes.
//
// Part 1 runs the six-instruction reference program
//   MUL R1,R2->R3; ADD R3,R4->R5; ADD R2,R6->R7; ADD R8,R9->R10;
//   MUL R7,R10->R11; ADD R5,R11->R5          with Ri = i initially,
// one instruction decoded per cycle from cycle 2 (fetch in cycle 1), and
// checks cycle by cycle: which tag is broadcast on which bus in which cycle
// and with which value, the alias table and both reservation stations after
// all six are renamed, the cycle each result appears in the register file,
// and the final architectural registers. The last result is written in cycle
// 20. Part 2 fills the reorder buffer behind a chain of multiplies. Part 3
// feeds random programs, some instructions marked as raising an exception,
// and compares every retirement and every flush with an in-order reference
// model written here. Part 4 runs two further five-instruction
// sequences and checks their results. Each mechanism (out-of-order completion, wakeup,
// simultaneous broadcasts, same-cycle bypass at decode, station-full stall,
// reorder-buffer-full stall, double renaming, exception flush) is counted
// and must occur at least once.
module tb_tomasulo_top;
  import tomasulo_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     init_we = 1'b0;
  reg_idx_t init_idx = '0;
  data_t    init_value = '0;
  logic     instr_valid = 1'b0;
  instr_t   instr = '0;
  logic     instr_ready;
  cdb_t     add_bus, mul_bus;
  logic     retire_valid;
  reg_idx_t retire_dst;
  data_t    retire_value;
  logic     exception;
  rob_idx_t exception_rob;
  logic     stall, idle;
  operand_t frontend_regs [NUM_REGS];
  data_t    arch_regs     [NUM_REGS];
  logic [RS_ENTRIES-1:0] add_rs_busy, mul_rs_busy;
  rs_payload_t add_rs_entries [RS_ENTRIES];
  rs_payload_t mul_rs_entries [RS_ENTRIES];

  tomasulo_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;   // number of the current cycle in part 1

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [cycle %0d]: %s", cyc, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_ooo = 0, n_wakeup = 0, n_dual_bcast = 0, n_bypass = 0;
  int n_rs_stall = 0, n_rob_stall = 0, n_double_rename = 0, n_flush = 0;

  // program-order bookkeeping shared by all parts
  int     prog_of_rob [ROB_ENTRIES];
  bit     done_of_rob [ROB_ENTRIES];
  int     next_rob = 0;
  int     inflight_q [$];   // program indices accepted and not retired, oldest first
  bit     pending_dst [NUM_REGS];

  // reorder buffer slots are handed out in order from 0 after reset or flush
  always @(posedge clk) begin
    if (!rst_n || exception) next_rob <= 0;
    else if (instr_valid && instr_ready) next_rob <= (next_rob + 1) % ROB_ENTRIES;
  end

  always @(posedge clk) if (rst_n) begin
    // out-of-order completion: a result broadcast while an older one is pending
    for (int u = 0; u < 2; u++) begin
      cdb_t b;
      b = (u == 0) ? add_bus : mul_bus;
      if (b.valid) begin
        int p;
        p = prog_of_rob[b.rob];
        foreach (inflight_q[k])
          if (inflight_q[k] < p && !done_of_rob[k_rob(inflight_q[k])]) begin
            n_ooo++;
            break;
          end
      end
    end
    if (add_bus.valid && mul_bus.valid) n_dual_bcast++;
    // wakeup: a waiting source of a station entry matches a broadcast tag
    for (int i = 0; i < RS_ENTRIES; i++) begin
      if (add_rs_busy[i] && !add_rs_entries[i].src1.valid &&
          ((add_bus.valid && add_bus.tag == add_rs_entries[i].src1.tag) ||
           (mul_bus.valid && mul_bus.tag == add_rs_entries[i].src1.tag))) n_wakeup++;
      if (mul_rs_busy[i] && !mul_rs_entries[i].src1.valid &&
          ((add_bus.valid && add_bus.tag == mul_rs_entries[i].src1.tag) ||
           (mul_bus.valid && mul_bus.tag == mul_rs_entries[i].src1.tag))) n_wakeup++;
    end
    // bypass: a source read at decode is produced in this very cycle
    if (instr_valid && instr_ready) begin
      for (int s = 0; s < 2; s++) begin
        reg_idx_t r;
        r = (s == 0) ? instr.src1 : instr.src2;
        if (!frontend_regs[r].valid &&
            ((add_bus.valid && add_bus.tag == frontend_regs[r].tag) ||
             (mul_bus.valid && mul_bus.tag == frontend_regs[r].tag))) n_bypass++;
      end
      if (!frontend_regs[instr.dst].valid) n_double_rename++;
    end
    if (stall && !exception) begin
      if ((instr.op == UNIT_ADD && &add_rs_busy) || (instr.op == UNIT_MUL && &mul_rs_busy))
        n_rs_stall++;
      else
        n_rob_stall++;
    end
    if (exception) n_flush++;
  end

  function automatic int k_rob(int prog);
    for (int r = 0; r < ROB_ENTRIES; r++) if (prog_of_rob[r] == prog) return r;
    return 0;
  endfunction

  // ---------------- reference model ----------------
  data_t ref_regs [NUM_REGS];

  function automatic data_t ref_exec(instr_t in);
    return (in.op == UNIT_MUL) ? ref_regs[in.src1] * ref_regs[in.src2]
                               : ref_regs[in.src1] + ref_regs[in.src2];
  endfunction

  // ---------------- drivers ----------------
  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic load_regs(input data_t v [NUM_REGS]);
    for (int r = 0; r < NUM_REGS; r++) begin
      init_we = 1'b1; init_idx = reg_idx_t'(r); init_value = v[r];
      @(posedge clk); #1;
      ref_regs[r] = v[r];
    end
    init_we = 1'b0;
  endtask

  // Run a program to completion. Instructions are offered one per cycle in
  // order; each retirement is compared with the reference; a flush restarts
  // the program after the faulting instruction.
  task automatic run_program(input instr_t prog [], input int max_cycles, output int cycles);
    int pc;
    int retired;
    pc = 0; retired = 0; cycles = 0;
    inflight_q.delete();
    for (int r = 0; r < ROB_ENTRIES; r++) begin prog_of_rob[r] = -1; done_of_rob[r] = 0; end
    while ((pc < prog.size() || inflight_q.size() != 0) && cycles < max_cycles) begin
      instr_valid = (pc < prog.size());
      instr       = (pc < prog.size()) ? prog[pc] : '0;
      @(negedge clk);   // outputs settled for this cycle
      cycles++;
      // completion marks
      if (add_bus.valid) done_of_rob[add_bus.rob] = 1;
      if (mul_bus.valid) done_of_rob[mul_bus.rob] = 1;
      if (exception) begin
        int p;
        p = inflight_q.pop_front();
        check(prog_of_rob[exception_rob] == p, $sformatf("flush names ROB slot %0d (instr %0d) not instr %0d", exception_rob, prog_of_rob[exception_rob], p));
        check(prog[p].exc, $sformatf("flush by instr %0d which has no exception", p));
        @(posedge clk); #1;
        for (int r = 0; r < NUM_REGS; r++) begin
          check(arch_regs[r] == ref_regs[r], $sformatf("after flush R%0d arch=%0d ref=%0d", r, arch_regs[r], ref_regs[r]));
          check(frontend_regs[r].valid && frontend_regs[r].value == ref_regs[r],
                $sformatf("after flush frontend R%0d not restored", r));
        end
        check(add_rs_busy == '0 && mul_rs_busy == '0 && idle, "machine not empty after flush");
        inflight_q.delete();
        for (int r = 0; r < ROB_ENTRIES; r++) begin prog_of_rob[r] = -1; done_of_rob[r] = 0; end
        pc = p + 1;
        retired++;
        continue;
      end
      if (retire_valid) begin
        int p;
        data_t v;
        p = inflight_q.pop_front();
        v = ref_exec(prog[p]);
        check(!prog[p].exc, $sformatf("instr %0d with exception retired", p));
        check(retire_dst == prog[p].dst && retire_value == v,
              $sformatf("retire instr %0d: R%0d=%0d, expected R%0d=%0d", p, retire_dst, retire_value, prog[p].dst, v));
        ref_regs[prog[p].dst] = v;
        done_of_rob[k_rob(p)] = 0;
        prog_of_rob[k_rob(p)] = -1;
        retired++;
      end
      if (instr_valid && instr_ready) begin
        prog_of_rob[next_rob] = pc;
        done_of_rob[next_rob] = 0;
        inflight_q.push_back(pc);
        pc++;
      end
      @(posedge clk); #1;
    end
    instr_valid = 1'b0;
    check(cycles < max_cycles, "program did not finish");
  endtask

  // ---------------- part 1: the reference program ----------------
  function automatic instr_t mk(unit_e op, int s1, int s2, int d, bit e = 0);
    instr_t i;
    i.op = op; i.src1 = reg_idx_t'(s1); i.src2 = reg_idx_t'(s2); i.dst = reg_idx_t'(d); i.exc = e;
    return i;
  endfunction

  instr_t example [6];
  // expected broadcasts: cycle, bus (0 add, 1 mul), tag, value
  int exp_cyc [6] = '{8, 8, 9, 12, 15, 19};
  int exp_bus [6] = '{1, 0, 0, 0, 1, 0};
  int exp_tag [6] = '{4, 1, 2, 0, 5, 3};     // x, b, c, a, y, d
  int exp_val [6] = '{2, 8, 17, 6, 136, 142};

  task automatic part1();
    data_t init [NUM_REGS];
    int seen;
    for (int r = 0; r < NUM_REGS; r++) init[r] = data_t'(r);
    load_regs(init);
    example[0] = mk(UNIT_MUL, 1, 2, 3);
    example[1] = mk(UNIT_ADD, 3, 4, 5);
    example[2] = mk(UNIT_ADD, 2, 6, 7);
    example[3] = mk(UNIT_ADD, 8, 9, 10);
    example[4] = mk(UNIT_MUL, 7, 10, 11);
    example[5] = mk(UNIT_ADD, 5, 11, 5);
    seen = 0;
    cyc = 1;                        // cycle 1: the first instruction is fetched
    @(posedge clk); #1;
    for (cyc = 2; cyc <= 22; cyc++) begin
      instr_valid = (cyc - 2 < 6);
      instr       = instr_valid ? example[cyc-2] : '0;
      @(negedge clk);
      if (instr_valid) check(instr_ready, "reference instruction stalled");
      // state after all six renames (the tables of cycle 7), seen in cycle 8
      if (cyc == 8) begin
        check(!frontend_regs[3].valid  && frontend_regs[3].tag  == 4, "R3 -> x");
        check(!frontend_regs[5].valid  && frontend_regs[5].tag  == 3, "R5 -> d");
        check(!frontend_regs[7].valid  && frontend_regs[7].tag  == 1, "R7 -> b");
        check(!frontend_regs[10].valid && frontend_regs[10].tag == 2, "R10 -> c");
        check(!frontend_regs[11].valid && frontend_regs[11].tag == 5, "R11 -> y");
        check(add_rs_busy == 4'b1111 && mul_rs_busy == 4'b0011, "stations a-d, x, y occupied");
        check(!add_rs_entries[0].src1.valid && add_rs_entries[0].src1.tag == 4 &&
              add_rs_entries[0].src2.valid && add_rs_entries[0].src2.value == 4, "RS a = (x, 4)");
        check(add_rs_entries[1].src1.value == 2 && add_rs_entries[1].src2.value == 6, "RS b = (2, 6)");
        check(add_rs_entries[2].src1.value == 8 && add_rs_entries[2].src2.value == 9, "RS c = (8, 9)");
        check(!add_rs_entries[3].src1.valid && add_rs_entries[3].src1.tag == 0 &&
              !add_rs_entries[3].src2.valid && add_rs_entries[3].src2.tag == 5, "RS d = (a, y)");
        check(mul_rs_entries[0].src1.value == 1 && mul_rs_entries[0].src2.value == 2, "RS x = (1, 2)");
        check(!mul_rs_entries[1].src1.valid && mul_rs_entries[1].src1.tag == 1 &&
              !mul_rs_entries[1].src2.valid && mul_rs_entries[1].src2.tag == 2, "RS y = (b, c)");
      end
      // broadcasts
      for (int k = 0; k < 6; k++) begin
        if (exp_cyc[k] == cyc) begin
          cdb_t b;
          b = exp_bus[k] ? mul_bus : add_bus;
          check(b.valid && b.tag == tag_t'(exp_tag[k]) && b.value == data_t'(exp_val[k]),
                $sformatf("broadcast %0d: valid=%0b tag=%0d value=%0d", k, b.valid, b.tag, b.value));
          seen++;
        end
      end
      if (add_bus.valid && !(cyc inside {8, 9, 12, 19})) check(0, "unexpected ADD broadcast");
      if (mul_bus.valid && !(cyc inside {8, 15}))        check(0, "unexpected MUL broadcast");
      // the W cycle: first cycle the register file shows the value
      if (cyc == 9)  check(frontend_regs[3].valid && frontend_regs[3].value == 2 &&
                           frontend_regs[7].valid && frontend_regs[7].value == 8, "W: R3=2, R7=8 in cycle 9");
      if (cyc == 10) check(frontend_regs[10].valid && frontend_regs[10].value == 17, "W: R10=17 in cycle 10");
      if (cyc == 15) check(!frontend_regs[11].valid, "R11 still pending in cycle 15");
      if (cyc == 16) check(frontend_regs[11].valid && frontend_regs[11].value == 136, "W: R11=136 in cycle 16");
      if (cyc == 19) check(!frontend_regs[5].valid, "R5 still pending in cycle 19");
      if (cyc == 20) check(frontend_regs[5].valid && frontend_regs[5].value == 142, "W: R5=142 in cycle 20");
      @(posedge clk); #1;
    end
    instr_valid = 1'b0;
    check(seen == 6, "six broadcasts seen");
    begin
      int expv [12] = '{0, 1, 2, 2, 4, 142, 6, 8, 8, 9, 17, 136};
      for (int r = 0; r < NUM_REGS; r++)
        check(arch_regs[r] == data_t'(expv[r]), $sformatf("final arch R%0d = %0d, expected %0d", r, arch_regs[r], expv[r]));
    end
    check(idle, "machine idle after the reference program");
  endtask

  // ---------------- part 2: reorder buffer fills up ----------------
  task automatic part2();
    instr_t prog [];
    data_t init [NUM_REGS];
    int cycles;
    for (int r = 0; r < NUM_REGS; r++) init[r] = data_t'(r + 3);
    load_regs(init);
    prog = new[36];
    for (int k = 0; k < 5; k++) prog[k] = mk(UNIT_MUL, 1, 1, 1);
    for (int k = 5; k < 36; k++) prog[k] = mk(UNIT_ADD, 2 + k % 4, 6 + k % 3, 2 + k % 8);
    run_program(prog, 2000, cycles);
    for (int r = 0; r < NUM_REGS; r++)
      check(arch_regs[r] == ref_regs[r], $sformatf("part 2 final R%0d", r));
  endtask

  // ---------------- part 3: random programs with exceptions ----------------
  task automatic part3(int n, int reg_span, int exc_pct);
    instr_t prog [];
    data_t init [NUM_REGS];
    int cycles;
    for (int r = 0; r < NUM_REGS; r++) init[r] = $urandom_range(0, 20);
    load_regs(init);
    prog = new[n];
    foreach (prog[k]) begin
      prog[k].op   = ($urandom_range(0, 2) == 0) ? UNIT_MUL : UNIT_ADD;
      prog[k].src1 = reg_idx_t'($urandom_range(0, reg_span - 1));
      prog[k].src2 = reg_idx_t'($urandom_range(0, reg_span - 1));
      prog[k].dst  = reg_idx_t'($urandom_range(0, reg_span - 1));
      prog[k].exc  = ($urandom_range(0, 99) < exc_pct);
    end
    run_program(prog, 40 * n, cycles);
    for (int r = 0; r < NUM_REGS; r++)
      check(arch_regs[r] == ref_regs[r], $sformatf("part 3 final R%0d", r));
    for (int r = 0; r < NUM_REGS; r++)
      check(frontend_regs[r].valid && frontend_regs[r].value == ref_regs[r], $sformatf("part 3 frontend R%0d", r));
  endtask

  // ---------------- part 4: two further short programs ----------------
  task automatic part4();
    instr_t prog [];
    data_t init [NUM_REGS];
    int cycles;
    for (int r = 0; r < NUM_REGS; r++) init[r] = data_t'(r);
    // IMUL R3<-R1,R2; ADD R3<-R3,R1; ADD R1<-R6,R7; IMUL R5<-R6,R8; ADD R7<-R3,R5
    load_regs(init);
    prog = new[5];
    prog[0] = mk(UNIT_MUL, 1, 2, 3);
    prog[1] = mk(UNIT_ADD, 3, 1, 3);
    prog[2] = mk(UNIT_ADD, 6, 7, 1);
    prog[3] = mk(UNIT_MUL, 6, 8, 5);
    prog[4] = mk(UNIT_ADD, 3, 5, 7);
    run_program(prog, 200, cycles);
    $display("five-instruction program: %0d cycles from first decode to last retirement", cycles);
    for (int r = 0; r < NUM_REGS; r++)
      check(arch_regs[r] == ref_regs[r], $sformatf("part 4a final R%0d", r));
    // MUL R3<-R1,R2; ADD R3<-R3,R1; ADD R4<-R6,R7; MUL R5<-R6,R8; ADD R7<-R9,R9
    load_regs(init);
    prog[0] = mk(UNIT_MUL, 1, 2, 3);
    prog[1] = mk(UNIT_ADD, 3, 1, 3);
    prog[2] = mk(UNIT_ADD, 6, 7, 4);
    prog[3] = mk(UNIT_MUL, 6, 8, 5);
    prog[4] = mk(UNIT_ADD, 9, 9, 7);
    run_program(prog, 200, cycles);
    for (int r = 0; r < NUM_REGS; r++)
      check(arch_regs[r] == ref_regs[r], $sformatf("part 4b final R%0d", r));
    check(arch_regs[3] == 3 && arch_regs[4] == 13 && arch_regs[5] == 48 && arch_regs[7] == 18,
          "part 4b values");
  endtask

  initial begin
    do_reset();
    part1();
    part2();
    part4();
    part3(300, NUM_REGS, 3);
    part3(300, 4, 0);
    part3(300, NUM_REGS, 0);
    $display("mechanisms: ooo=%0d wakeup=%0d dual_bcast=%0d bypass=%0d rs_stall=%0d rob_stall=%0d double_rename=%0d flush=%0d",
             n_ooo, n_wakeup, n_dual_bcast, n_bypass, n_rs_stall, n_rob_stall, n_double_rename, n_flush);
    check(n_ooo > 0, "out-of-order completion never happened");
    check(n_wakeup > 0, "wakeup never happened");
    check(n_dual_bcast > 0, "simultaneous broadcasts never happened");
    check(n_bypass > 0, "decode bypass never happened");
    check(n_rs_stall > 0, "station-full stall never happened");
    check(n_rob_stall > 0, "reorder-buffer-full stall never happened");
    check(n_double_rename > 0, "double renaming never happened");
    check(n_flush > 0, "exception flush never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
