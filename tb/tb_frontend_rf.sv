// tb_frontend_rf: random test of the register alias table against a model
// written here. Every cycle it may initialise a register, rename one to a
// random tag, broadcast random tags on both buses and, rarely, flush with a
// random architectural copy. Each cycle it compares both decode reads,
// including the same-cycle bypass from the buses, and the whole table with
// the model. Directed steps check that a rename beats a broadcast to the same
// register and that a broadcast only updates a register whose tag matches.
module tb_frontend_rf;
  import tomasulo_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     init_we = 1'b0;
  reg_idx_t init_idx = '0;
  data_t    init_value = '0;
  reg_idx_t rd_idx [2];
  operand_t rd_data [2];
  logic     rename_we = 1'b0;
  reg_idx_t rename_idx = '0;
  tag_t     rename_tag = '0;
  cdb_t     cdb [NUM_CDB];
  logic     flush = 1'b0;
  data_t    arch_value [NUM_REGS];
  operand_t regs_o [NUM_REGS];

  frontend_rf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  operand_t m [NUM_REGS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic operand_t model_read(reg_idx_t r);
    operand_t o;
    o = m[r];
    if (!o.valid)
      for (int c = 0; c < NUM_CDB; c++)
        if (cdb[c].valid && cdb[c].tag == o.tag) begin o.valid = 1'b1; o.value = cdb[c].value; end
    return o;
  endfunction

  function automatic bit same(operand_t a, operand_t b);
    return a.valid == b.valid && (a.valid ? a.value == b.value : a.tag == b.tag);
  endfunction

  task automatic step();
    operand_t nm [NUM_REGS];
    @(negedge clk);
    for (int p = 0; p < 2; p++)
      check(same(rd_data[p], model_read(rd_idx[p])), $sformatf("read port %0d of R%0d", p, rd_idx[p]));
    nm = m;
    if (flush) begin
      for (int r = 0; r < NUM_REGS; r++) nm[r] = '{valid: 1'b1, tag: '0, value: arch_value[r]};
    end else begin
      for (int r = 0; r < NUM_REGS; r++)
        for (int c = 0; c < NUM_CDB; c++)
          if (!m[r].valid && cdb[c].valid && cdb[c].tag == m[r].tag) begin
            nm[r].valid = 1'b1; nm[r].value = cdb[c].value;
          end
      if (init_we) nm[init_idx] = '{valid: 1'b1, tag: '0, value: init_value};
      if (rename_we) begin nm[rename_idx].valid = 1'b0; nm[rename_idx].tag = rename_tag; end
    end
    m = nm;
    @(posedge clk); #1;
    for (int r = 0; r < NUM_REGS; r++)
      check(same(regs_o[r], m[r]), $sformatf("table R%0d", r));
  endtask

  task automatic idle_inputs();
    init_we = 0; rename_we = 0; flush = 0;
    for (int c = 0; c < NUM_CDB; c++) cdb[c] = '0;
  endtask

  initial begin
    idle_inputs();
    rd_idx[0] = '0; rd_idx[1] = '0;
    for (int r = 0; r < NUM_REGS; r++) begin
      arch_value[r] = '0;
      m[r] = '{valid: 1'b1, tag: '0, value: '0};
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // directed: rename R3 to tag 4, then broadcast tag 4 while renaming R3 to tag 6
    rename_we = 1; rename_idx = 3; rename_tag = 4; step();
    rename_we = 1; rename_idx = 3; rename_tag = 6;
    cdb[0] = '{valid: 1'b1, tag: 4, rob: '0, exc: 1'b0, value: 99};
    step();
    check(!regs_o[3].valid && regs_o[3].tag == 6, "rename wins over broadcast");
    idle_inputs();
    cdb[1] = '{valid: 1'b1, tag: 4, rob: '0, exc: 1'b0, value: 77};
    step();
    check(!regs_o[3].valid, "stale tag does not update");
    idle_inputs();
    cdb[1] = '{valid: 1'b1, tag: 6, rob: '0, exc: 1'b0, value: 55};
    rd_idx[0] = 3;
    step();
    check(regs_o[3].valid && regs_o[3].value == 55, "matching tag updates");
    // random
    for (int k = 0; k < 3000; k++) begin
      idle_inputs();
      rd_idx[0] = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      rd_idx[1] = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      init_we    = ($urandom_range(0, 15) == 0);
      init_idx   = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      init_value = $urandom;
      rename_we  = ($urandom_range(0, 2) == 0);
      rename_idx = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      rename_tag = tag_t'($urandom);
      for (int c = 0; c < NUM_CDB; c++) begin
        cdb[c].valid = ($urandom_range(0, 1) == 0);
        cdb[c].tag   = tag_t'($urandom);
        cdb[c].value = $urandom;
      end
      flush = ($urandom_range(0, 99) == 0);
      for (int r = 0; r < NUM_REGS; r++) arch_value[r] = $urandom;
      step();
    end
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
