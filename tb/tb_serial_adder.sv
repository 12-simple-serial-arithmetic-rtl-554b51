// tb_serial_adder: end-to-end test of the bit-serial adder processor at its
// default width. Every pair of N-bit operands is added (all 2^(2N) pairs when
// N <= 8, random pairs otherwise) through the start/ready protocol:
//   - the processor must leave ready within one clock of st and stay busy for
//     exactly N clocks (one per bit);
//   - in the first ready clock a must equal aa + bb mod 2^N and b must equal bb
//     (register B restored by rotation).
// Mechanisms that must each occur at least once, counted only for additions
// that came out right: waiting in STA with st = 0, a carry passed from one
// bit step to the next, a carry out of the MSB dropped,
// 2's complement overflow, st held high so the next add starts from the
// single ready clock, and a reset that aborts an addition in progress.
module tb_serial_adder;

  localparam int N = 8;  // must match the processor's default width

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst, st, rdy;
  logic [N-1:0] aa, bb, a, b;
  int checks = 0, failures = 0;
  int n_wait = 0, n_carry = 0, n_cout = 0, n_ovf = 0, n_b2b = 0, n_abort = 0;
  int n_adds = 0;

  serial_adder dut (.clk, .rst, .st, .aa, .bb, .a, .b, .rdy);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // One addition. keep_st leaves st high throughout, so the following call
  // starts the next addition from the single ready clock.
  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y, input bit keep_st);
    logic [N-1:0] exp;
    logic [N:0]   wide;
    int busy;
    exp  = x + y;
    wide = {1'b0, x} + {1'b0, y};
    @(negedge clk);
    check(rdy === 1'b1, "not ready before start");
    aa = x; bb = y; st = 1'b1;
    @(posedge clk); #1;
    check(rdy === 1'b0, "did not start");
    busy = 1;
    @(negedge clk);
    if (!keep_st) st = 1'b0; else n_b2b++;
    aa = N'($urandom); bb = N'($urandom);   // ignored while busy
    forever begin
      @(posedge clk); #1;
      if (rdy) break;
      busy++;
      if (busy > N + 2) break;
    end
    check(busy == N, $sformatf("busy for %0d clocks, expected %0d", busy, N));
    check(a === exp, $sformatf("%h + %h gave %h, expected %h", x, y, a, exp));
    check(b === y, $sformatf("B not restored: %h, expected %h", b, y));
    // mechanisms count only when the sum that needed them came out right
    if (a === exp) begin
      if ((x ^ y ^ exp) != 0) n_carry++;  // a carry entered some bit
      if (wide[N]) n_cout++;
      if (x[N-1] == y[N-1] && exp[N-1] != x[N-1]) n_ovf++;
    end
    n_adds++;
  endtask

  // Idle clocks with st = 0: the processor must stay ready.
  task automatic idle(input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      st = 1'b0; aa = N'($urandom); bb = N'($urandom);
      @(posedge clk); #1;
      check(rdy === 1'b1, "left STA without start");
      n_wait++;
    end
  endtask

  // Start an addition and reset it part way; it must return to ready and the
  // next addition must be correct.
  task automatic abort(input int after);
    @(negedge clk);
    aa = N'($urandom); bb = N'($urandom); st = 1'b1;
    @(negedge clk);
    st = 1'b0;
    repeat (after) @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;
    check(rdy === 1'b1, "reset did not return to ready");
    @(negedge clk);
    rst = 1'b0;
    n_abort++;
  endtask

  initial begin
    rst = 1'b1; st = 1'b0; aa = '0; bb = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    idle(3);
    add('1, N'(1), 1'b0);                    // carry through every bit, dropped
    add({1'b0, {(N-1){1'b1}}}, N'(1), 1'b0); // largest positive + 1: overflow
    abort(N / 2);
    add({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, 1'b1); // -2^(N-1) twice
    if (N <= 8) begin
      for (int x = 0; x < (1 << N); x++)
        for (int y = 0; y < (1 << N); y++)
          add(N'(x), N'(y), bit'(y % 3 == 0));
    end else begin
      for (int i = 0; i < 20000; i++)
        add(N'($urandom), N'($urandom), bit'($urandom % 3 == 0));
    end
    idle(2);
    abort(1);
    add(N'(3), N'(5), 1'b0);

    $display("additions=%0d wait=%0d carry=%0d carry_out=%0d overflow=%0d back_to_back=%0d abort=%0d",
             n_adds, n_wait, n_carry, n_cout, n_ovf, n_b2b, n_abort);
    check(n_wait  > 0, "never waited in STA");
    check(n_carry > 0, "no carry between bits");
    check(n_cout  > 0, "no carry out dropped");
    check(n_ovf   > 0, "no 2's complement overflow");
    check(n_b2b   > 0, "no back-to-back start");
    check(n_abort > 0, "no reset during an addition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
