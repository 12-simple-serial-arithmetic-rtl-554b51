// serial_adder_pkg: types shared by the bit-serial adder processor.
//
// The processor has a two-state controller (STA: wait for start and
// initialise the datapath, STB: add one bit per clock). Every datapath block
// performs exactly one operation in each state, so a single opcode bit, equal
// to the state bit, drives all of them: OP_INIT in STA, OP_STEP in STB.
// That one-bit opcode scheme follows the source design; the names are ours.
package serial_adder_pkg;

  // Controller state; the encoding is the state register STT itself.
  typedef enum logic {
    STA = 1'b0,  // idle / initialise datapath
    STB = 1'b1   // add one bit per clock
  } state_t;

  // Opcode sent to every datapath block.
  //   shift register : OP_INIT = parallel load, OP_STEP = shift right
  //   carry register : OP_INIT = clear,         OP_STEP = load carry
  //   step counter   : OP_INIT = load n-1,      OP_STEP = count down
  typedef enum logic {
    OP_INIT = 1'b0,
    OP_STEP = 1'b1
  } opcode_t;

endpackage
