// tb_step_counter: after OP_INIT the counter must keep zk low for N-1
// OP_STEP clocks and raise it on the N-th step cycle, i.e. zk marks the last
// of exactly N steps. Checked at N = 8 and N = 5, over several runs, and with
// a reload in the middle of a count.
module tb_step_counter;
  import serial_adder_pkg::*;

  localparam int N1 = 8;
  localparam int N2 = 5;

  logic clk = 0;
  always #5 clk = ~clk;

  opcode_t op;
  logic zk1, zk2;
  int checks = 0, failures = 0;

  step_counter #(.N(N1)) dut1 (.clk, .op, .zk(zk1));
  step_counter #(.N(N2)) dut2 (.clk, .op, .zk(zk2));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load, then take `steps` step cycles; in step cycle j (1-based) zk must be
  // high exactly when j == n.
  task automatic run(input int steps);
    @(negedge clk); op = OP_INIT;
    for (int j = 1; j <= steps; j++) begin
      @(negedge clk); op = OP_STEP;
      #1;
      checks++;
      if (zk1 !== (j == N1)) begin
        failures++; $display("FAIL N=%0d step %0d zk=%b", N1, j, zk1);
      end
      if (j <= N2) begin
        checks++;
        if (zk2 !== (j == N2)) begin
          failures++; $display("FAIL N=%0d step %0d zk=%b", N2, j, zk2);
        end
      end
    end
  endtask

  initial begin
    op = OP_INIT;
    repeat (3) run(N1);
    run(3);          // interrupted count, then a full one
    run(N1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
