// serial_adder: simple bit-serial arithmetic processor computing A = A + B.
//
// The processor adds two N-bit 2's complement numbers one bit per clock. It
// consists of a two-state control unit and a datapath (shift registers A and
// B, carry register C, one-bit full adder, step counter); the single opcode
// from the control unit equals its state bit.
//
// Timing: while rdy = 1 (state STA) the datapath loads aa, bb on every clock.
// When st = 1 is seen at a clock edge the unit becomes busy (rdy = 0) for
// exactly N clocks, one bit each. In the clock after that rdy = 1 again and
// a = aa + bb (mod 2^N), valid for that one clock only: at its end A is
// reloaded from aa, as all opcodes follow the state. If st is still high the
// next addition starts at once. Overflow is not flagged. Register B is
// brought out as b; it equals bb again when the sum is valid.
//
// Structure, algorithm and control follow the source design; the width
// default, reset style and rdy output are choices of this implementation.
module serial_adder
  import serial_adder_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         st,
  input  logic [N-1:0] aa,
  input  logic [N-1:0] bb,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         rdy
);

  opcode_t op;
  logic    zk;

  control_unit u_cu (
    .clk, .rst, .st, .zk, .op, .rdy
  );

  serial_adder_datapath #(.N(N)) u_dp (
    .clk, .op, .aa, .bb, .a, .b, .zk
  );

  // Handshake rule: a start seen while ready makes the processor busy for
  // exactly N clocks, after which it is ready again.
  a_busy_n_clocks: assert property (
    @(posedge clk) disable iff (rst)
      (rdy && st) |=> (!rdy) [*N] ##1 rdy
  ) else $error("serial_adder: busy period differs from N clocks");

endmodule
