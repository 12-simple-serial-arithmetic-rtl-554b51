// tb_serial_adder_datapath: drives the datapath's single opcode by hand, one
// OP_INIT clock then N OP_STEP clocks, for random and corner-case operands.
// After the N-th step A must hold aa + bb (mod 2^N) and B must hold bb again;
// zk must be high in the N-th step cycle only. Run at N = 8 and N = 4.
module tb_serial_adder_datapath;
  import serial_adder_pkg::*;

  localparam int N = 8;
  localparam int M = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  opcode_t      op;
  logic [N-1:0] aa, bb, a, b;
  logic [M-1:0] aa4, bb4, a4, b4;
  logic         zk, zk4;
  int checks = 0, failures = 0;

  serial_adder_datapath #(.N(N)) dut (.clk, .op, .aa, .bb, .a, .b, .zk);
  serial_adder_datapath #(.N(M)) dut4 (.clk, .op, .aa(aa4), .bb(bb4), .a(a4), .b(b4), .zk(zk4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] exp8;
    logic [M-1:0] exp4;
    exp8 = x + y;
    exp4 = x[M-1:0] + y[M-1:0];
    @(negedge clk);
    op = OP_INIT; aa = x; bb = y; aa4 = x[M-1:0]; bb4 = y[M-1:0];
    for (int j = 1; j <= N; j++) begin
      @(negedge clk);
      op = OP_STEP;
      aa = N'($urandom); bb = N'($urandom);   // inputs are ignored while stepping
      #1;
      checks++;
      if (zk !== (j == N)) begin failures++; $display("FAIL zk step %0d", j); end
      if (j == M) begin
        @(posedge clk); #1;
        checks++;
        if (a4 !== exp4 || b4 !== y[M-1:0]) begin
          failures++; $display("FAIL N=4 %h+%h a=%h b=%h", x[M-1:0], y[M-1:0], a4, b4);
        end
      end
    end
    @(posedge clk); #1;
    checks++;
    if (a !== exp8 || b !== y) begin
      failures++; $display("FAIL %h+%h a=%h exp %h b=%h", x, y, a, exp8, b);
    end
  endtask

  initial begin
    op = OP_INIT; aa = '0; bb = '0; aa4 = '0; bb4 = '0;
    add(8'h00, 8'h00);
    add(8'hFF, 8'h01);
    add(8'h7F, 8'h01);
    add(8'h80, 8'h80);
    add(8'hFF, 8'hFF);
    add(8'h55, 8'hAA);
    for (int i = 0; i < 300; i++) add(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
