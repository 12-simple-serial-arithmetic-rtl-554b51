// serial_adder_datapath: datapath of the bit-serial adder A = A + B.
//
// Registers A and B hold the operands with the bit under work in position 0.
// Each step the full adder adds A[0], B[0] and the carry c; the sum bit is
// shifted into the MSB of A, B rotates (its LSB re-enters its MSB) and the
// carry out is stored in C. After N steps A holds the N-bit 2's complement
// sum (modulo 2^N) and B holds its original value again. The step counter
// raises zk during the last step.
//
// A single opcode op drives every block: OP_INIT loads A <= aa, B <= bb,
// clears C and loads the counter; OP_STEP performs one bit step. All results
// are registered at the rising clock edge.
// The structure is the source design's; the register widths default to N = 8.
module serial_adder_datapath
  import serial_adder_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  opcode_t      op,
  input  logic [N-1:0] aa,
  input  logic [N-1:0] bb,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         zk
);

  logic s, d, c;

  shift_reg #(.N(N)) u_reg_a (
    .clk, .op, .d(aa), .sin(s),    .q(a)
  );

  shift_reg #(.N(N)) u_reg_b (
    .clk, .op, .d(bb), .sin(b[0]), .q(b)
  );

  full_adder u_add (
    .a(a[0]), .b(b[0]), .ci(c), .s(s), .co(d)
  );

  carry_reg u_reg_c (
    .clk, .op, .d(d), .q(c)
  );

  step_counter #(.N(N)) u_cnt (
    .clk, .op, .zk
  );

endmodule
