// tb_control_unit: random stimulus on st and zk, with the state predicted by
// the excitation table (STA stays on st = 0, goes to STB on st = 1; STB stays
// on zk = 0, returns to STA on zk = 1). After every clock op must equal the
// predicted state bit and rdy its inverse. Reset is applied at random too.
// Every table row is counted and must be exercised.
module tb_control_unit;
  import serial_adder_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, st, zk, rdy;
  opcode_t op;
  state_t  m;
  int checks = 0, failures = 0;
  int row[4];
  int resets_in_stb = 0;

  control_unit dut (.clk, .rst, .st, .zk, .op, .rdy);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; st = 0; zk = 0; m = STA;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) rst = ($urandom % 50 == 0);
      st = 1'($urandom);
      zk = ($urandom % 4 == 0);
      if (rst) begin
        if (m == STB) resets_in_stb++;
        m = STA;
      end else if (m == STA) begin
        row[st ? 1 : 0]++;
        m = st ? STB : STA;
      end else begin
        row[zk ? 3 : 2]++;
        m = zk ? STA : STB;
      end
      @(posedge clk); #1;
      checks++;
      if (op !== opcode_t'(m) || rdy !== (m == STA)) begin
        failures++;
        $display("FAIL cycle %0d exp state %s op=%b rdy=%b", i, m.name(), op, rdy);
      end
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (row[r] == 0) begin failures++; $display("FAIL table row %0d never used", r); end
    end
    checks++;
    if (resets_in_stb == 0) begin failures++; $display("FAIL no reset from STB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
