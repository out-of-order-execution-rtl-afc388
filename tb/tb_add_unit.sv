// tb_add_unit: checks the ADD unit at its default latency of 4 execute
// cycles. Random operations (with gaps) are dispatched; each must appear on
// the unit's bus exactly 3 cycles after its dispatch cycle (that is in
// its E4 cycle) with the expected sum, tag, reorder-buffer slot and exception
// flag, and nothing else may appear. A flush in the middle must drop all
// operations in flight.
module tb_add_unit;
  import tomasulo_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  fu_op_t op = '0;
  cdb_t   bus;

  add_unit dut (.clk, .rst_n, .flush, .op, .bus);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  // expected bus content per cycle
  cdb_t expect_at [int];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      op = '0;
      if ($urandom_range(0, 3) != 0) begin
        op.valid = 1'b1;
        op.tag   = tag_t'($urandom);
        op.rob   = rob_idx_t'($urandom);
        op.exc   = ($urandom_range(0, 9) == 0);
        op.a     = (k % 5 == 0) ? data_t'($urandom) : data_t'($urandom_range(0, 1000));
        op.b     = (k % 7 == 0) ? data_t'($urandom) : data_t'($urandom_range(0, 1000));
      end
      flush = (k == 200);
      if (flush) begin
        // everything in flight is dropped, including this cycle's operation
        foreach (expect_at[c]) if (c >= cyc) expect_at.delete(c);
      end else if (op.valid) begin
        cdb_t e;
        e.valid = 1'b1; e.tag = op.tag; e.rob = op.rob; e.exc = op.exc;
        e.value = data_t'(op.a + op.b);
        expect_at[cyc + ADD_LATENCY - 1] = e;
      end
      @(negedge clk);
      if (expect_at.exists(cyc)) begin
        checks++;
        if (bus !== expect_at[cyc]) begin
          failures++;
          $display("FAIL cycle %0d: bus %p expected %p", cyc, bus, expect_at[cyc]);
        end
      end else begin
        checks++;
        if (bus.valid && k != 200) begin
          failures++;
          $display("FAIL cycle %0d: unexpected result %p", cyc, bus);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
