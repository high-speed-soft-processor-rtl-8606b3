// octavo_pkg: shared types and constants of the Octavo soft-processor.
//
// Octavo is an 8-thread, fixed round-robin, fully pipelined soft-processor
// with 36-bit words and three 1024-word memories (I, A and B). Every
// instruction is one word holding a 4-bit opcode and three 10-bit memory
// addresses: D (destination), A (first source, read from memory A) and
// B (second source, read from memory B). The word layout and the opcode
// encoding follow the processor's published instruction format; the three
// conditional-branch encodings above JZE (JNZ, JPO, JNE) and the I/O window
// layout are this design's own choices.
package octavo_pkg;

  localparam int WORD_W    = 36;   // data word width
  localparam int ADDR_W    = 10;   // operand address width (1024 words)
  localparam int OP_W      = 4;    // opcode width
  localparam int THREADS   = 8;    // hardware threads
  localparam int TID_W     = 3;    // thread id width
  localparam int IO_PORTS  = 8;    // memory-mapped I/O ports per A/B memory

  // I/O windows in the shared 10-bit address space. Reading operand A at an
  // address in the A window reads an A-memory input port; reading operand B
  // in the B window reads a B-memory input port. A write to D in a window
  // drives the matching output port (and the RAM word underneath).
  localparam logic [ADDR_W-1:0] IO_BASE_A = ADDR_W'(1024 - 2*IO_PORTS); // 1008
  localparam logic [ADDR_W-1:0] IO_BASE_B = ADDR_W'(1024 - IO_PORTS);   // 1016

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [TID_W-1:0]  tid_t;

  typedef enum logic [OP_W-1:0] {
    OP_XOR = 4'b0000,
    OP_AND = 4'b0001,
    OP_OR  = 4'b0010,
    OP_SUB = 4'b0011,
    OP_ADD = 4'b0100,
    OP_U5  = 4'b0101,   // unused, reserved for expansion
    OP_U6  = 4'b0110,
    OP_U7  = 4'b0111,
    OP_MHS = 4'b1000,   // multiply, high word signed
    OP_MLS = 4'b1001,   // multiply, low word
    OP_MHU = 4'b1010,   // multiply, high word unsigned
    OP_JMP = 4'b1011,   // PC <- D
    OP_JZE = 4'b1100,   // if (A == 0)  PC <- D
    OP_JNZ = 4'b1101,   // if (A != 0)  PC <- D
    OP_JPO = 4'b1110,   // if (A >= 0)  PC <- D   (sign bit clear)
    OP_JNE = 4'b1111    // if (A <  0)  PC <- D   (sign bit set)
  } opcode_e;

  // Instruction word: bits [35:34] spare, [33:30] OP, [29:20] D,
  // [19:10] A, [9:0] B.
  typedef struct packed {
    logic [1:0] spare;
    opcode_e    op;
    addr_t      d;
    addr_t      a;
    addr_t      b;
  } instr_t;

  // Does this opcode write its result R to address D?
  function automatic logic op_writes(opcode_e op);
    return (op inside {OP_XOR, OP_AND, OP_OR, OP_SUB, OP_ADD,
                       OP_MHS, OP_MLS, OP_MHU});
  endfunction

  // Is this opcode a flow-control instruction?
  function automatic logic op_is_branch(opcode_e op);
    return (op inside {OP_JMP, OP_JZE, OP_JNZ, OP_JPO, OP_JNE});
  endfunction

  // Assemble one instruction word.
  function automatic word_t mk_instr(opcode_e op, addr_t d, addr_t a, addr_t b);
    instr_t i;
    i.spare = '0;
    i.op    = op;
    i.d     = d;
    i.a     = a;
    i.b     = b;
    return word_t'(i);
  endfunction

endpackage
