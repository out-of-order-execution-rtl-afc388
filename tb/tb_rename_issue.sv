// tb_rename_issue: the decode/rename logic, which is combinational. First the
// decode of "MUL R1, R2 -> R3" from the reference program with every station empty: it
// must go to entry x of the MUL station with sources 1 and 2 and rename R3 to
// tag x. Then random instructions, station and reorder-buffer states and
// register-table reads are applied and every output is compared with values
// computed here: accept only with a free entry in the right station, a free
// reorder-buffer slot and no flush; sources as value or tag; destination
// renamed to the tag of the chosen entry.
module tb_rename_issue;
  import tomasulo_pkg::*;

  logic                instr_valid;
  instr_t              instr;
  logic                instr_ready;
  logic                flush;
  logic                add_has_free, mul_has_free;
  logic [RS_IDX_W-1:0] add_alloc_idx, mul_alloc_idx;
  logic                add_alloc_we, mul_alloc_we;
  rs_payload_t         payload;
  logic                rob_has_free;
  rob_idx_t            rob_alloc_idx;
  logic                rob_alloc_we;
  reg_idx_t            rat_rd_idx [2];
  operand_t            rat_rd_data [2];
  logic                rename_we;
  reg_idx_t            rename_idx;
  tag_t                rename_tag;
  logic                stall;

  rename_issue dut (.*);

  int checks = 0, failures = 0;
  int n_accept = 0, n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // the reference program's first decode
    instr = '{op: UNIT_MUL, src1: 1, src2: 2, dst: 3, exc: 0};
    instr_valid = 1; flush = 0;
    add_has_free = 1; add_alloc_idx = 0; mul_has_free = 1; mul_alloc_idx = 0;
    rob_has_free = 1; rob_alloc_idx = 0;
    rat_rd_data[0] = '{valid: 1, tag: 0, value: 1};
    rat_rd_data[1] = '{valid: 1, tag: 0, value: 2};
    #1;
    check(rat_rd_idx[0] == 1 && rat_rd_idx[1] == 2, "reads R1 and R2");
    check(instr_ready && mul_alloc_we && !add_alloc_we && rob_alloc_we, "goes to the MUL station");
    check(payload.src1.valid && payload.src1.value == 1 && payload.src2.valid && payload.src2.value == 2,
          "sources 1 and 2");
    check(rename_we && rename_idx == 3 && rename_tag == 4, "R3 renamed to x");
    // random
    for (int k = 0; k < 5000; k++) begin
      bit room, acc;
      tag_t etag;
      instr.op   = unit_e'($urandom_range(0, 1));
      instr.src1 = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      instr.src2 = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      instr.dst  = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      instr.exc  = $urandom_range(0, 1);
      instr_valid   = ($urandom_range(0, 3) != 0);
      flush         = ($urandom_range(0, 9) == 0);
      add_has_free  = ($urandom_range(0, 3) != 0);
      mul_has_free  = ($urandom_range(0, 3) != 0);
      add_alloc_idx = RS_IDX_W'($urandom);
      mul_alloc_idx = RS_IDX_W'($urandom);
      rob_has_free  = ($urandom_range(0, 5) != 0);
      rob_alloc_idx = rob_idx_t'($urandom);
      for (int p = 0; p < 2; p++) begin
        rat_rd_data[p].valid = $urandom_range(0, 1);
        rat_rd_data[p].tag   = tag_t'($urandom);
        rat_rd_data[p].value = $urandom;
      end
      #1;
      room = (instr.op == UNIT_ADD ? add_has_free : mul_has_free) && rob_has_free && !flush;
      acc  = instr_valid && room;
      etag = (instr.op == UNIT_ADD) ? {1'b0, add_alloc_idx} : {1'b1, mul_alloc_idx};
      check(instr_ready == room, "ready");
      check(stall == (instr_valid && !room), "stall");
      check(add_alloc_we == (acc && instr.op == UNIT_ADD) && mul_alloc_we == (acc && instr.op == UNIT_MUL),
            "station write enables");
      check(rob_alloc_we == acc && rename_we == acc, "rob and rename enables");
      check(rename_idx == instr.dst && rename_tag == etag, "rename target");
      check(rat_rd_idx[0] == instr.src1 && rat_rd_idx[1] == instr.src2, "read indices");
      check(payload.src1.valid == rat_rd_data[0].valid &&
            (rat_rd_data[0].valid ? payload.src1.value == rat_rd_data[0].value
                                  : payload.src1.tag == rat_rd_data[0].tag), "source 1");
      check(payload.src2.valid == rat_rd_data[1].valid &&
            (rat_rd_data[1].valid ? payload.src2.value == rat_rd_data[1].value
                                  : payload.src2.tag == rat_rd_data[1].tag), "source 2");
      check(payload.rob == rob_alloc_idx && payload.exc == instr.exc, "slot and exception flag");
      if (acc) n_accept++;
      if (stall) n_stall++;
    end
    check(n_accept > 100 && n_stall > 100, "both accepts and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
