// tb_shift_reg: random test of the load / shift-right register at N = 8 and
// at N = 13. A reference model is updated alongside the register; after every
// clock both instances are compared with it. Also checks that N shifts that
// feed back the LSB (rotation, as register B does) restore the loaded value.
module tb_shift_reg;
  import serial_adder_pkg::*;

  localparam int N1 = 8;
  localparam int N2 = 13;

  logic clk = 0;
  always #5 clk = ~clk;

  opcode_t       op;
  logic [N1-1:0] d1, q1, m1;
  logic [N2-1:0] d2, q2, m2;
  logic          sin1, sin2;
  int checks = 0, failures = 0;

  shift_reg #(.N(N1)) dut1 (.clk, .op, .d(d1), .sin(sin1), .q(q1));
  shift_reg #(.N(N2)) dut2 (.clk, .op, .d(d2), .sin(sin2), .q(q2));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input opcode_t o, input logic rot);
    @(negedge clk);
    op = o;
    d1 = N1'($urandom);
    d2 = N2'($urandom);
    sin1 = rot ? q1[0] : 1'($urandom);
    sin2 = rot ? q2[0] : 1'($urandom);
    if (o == OP_INIT) begin
      m1 = d1; m2 = d2;
    end else begin
      m1 = {sin1, m1[N1-1:1]};
      m2 = {sin2, m2[N2-1:1]};
    end
    @(posedge clk); #1;
    checks++;
    if (q1 !== m1 || q2 !== m2) begin
      failures++;
      $display("FAIL op=%s q1=%h exp %h q2=%h exp %h", o.name(), q1, m1, q2, m2);
    end
  endtask

  initial begin
    logic [N1-1:0] ld1;
    logic [N2-1:0] ld2;
    // random mix of loads and shifts
    step(OP_INIT, 0);
    for (int i = 0; i < 500; i++)
      step(($urandom % 4 == 0) ? OP_INIT : OP_STEP, 0);
    // rotation restores the register after N steps
    step(OP_INIT, 0);
    ld1 = q1;
    for (int i = 0; i < N1; i++) step(OP_STEP, 1);
    checks++;
    if (q1 !== ld1) begin failures++; $display("FAIL rotate N1 %h %h", q1, ld1); end
    step(OP_INIT, 0);
    ld2 = q2;
    for (int i = 0; i < N2; i++) step(OP_STEP, 1);
    checks++;
    if (q2 !== ld2) begin failures++; $display("FAIL rotate N2 %h %h", q2, ld2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
