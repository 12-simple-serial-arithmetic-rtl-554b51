// tb_carry_reg: random test of the carry register. OP_INIT must clear it,
// OP_STEP must store d; the output is compared with a model after each clock.
module tb_carry_reg;
  import serial_adder_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  opcode_t op;
  logic d, q, m;
  int checks = 0, failures = 0, clears_of_one = 0;

  carry_reg dut (.clk, .op, .d, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      op = ($urandom % 3 == 0) ? OP_INIT : OP_STEP;
      d  = 1'($urandom);
      if (i == 0) op = OP_INIT;
      if (op == OP_INIT && d) clears_of_one++;
      m  = (op == OP_INIT) ? 1'b0 : d;
      @(posedge clk); #1;
      checks++;
      if (q !== m) begin
        failures++;
        $display("FAIL op=%s d=%b q=%b exp %b", op.name(), d, q, m);
      end
    end
    checks++;
    if (clears_of_one == 0) begin failures++; $display("FAIL clear with d=1 never tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
