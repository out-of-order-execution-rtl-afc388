// tb_arch_regfile: the architectural register file against an array model.
// Random retirements and initialisation writes (retirement wins when both
// come in the same cycle) are applied, and after every clock edge all
// registers are compared with the model. Reset must clear every register.
module tb_arch_regfile;
  import tomasulo_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     init_we = 1'b0;
  reg_idx_t init_idx = '0;
  data_t    init_value = '0;
  logic     retire_we = 1'b0;
  reg_idx_t retire_dst = '0;
  data_t    retire_value = '0;
  data_t    value [NUM_REGS];

  arch_regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  data_t m [NUM_REGS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int r = 0; r < NUM_REGS; r++) check(value[r] == '0, "reset value");
    rst_n = 1'b1;
    for (int r = 0; r < NUM_REGS; r++) m[r] = '0;
    for (int k = 0; k < 3000; k++) begin
      init_we      = ($urandom_range(0, 3) == 0);
      init_idx     = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      init_value   = $urandom;
      retire_we    = ($urandom_range(0, 1) == 0);
      retire_dst   = reg_idx_t'($urandom_range(0, NUM_REGS - 1));
      retire_value = $urandom;
      if (retire_we)    m[retire_dst] = retire_value;
      else if (init_we) m[init_idx]   = init_value;
      @(posedge clk); #1;
      for (int r = 0; r < NUM_REGS; r++) check(value[r] == m[r], $sformatf("R%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
