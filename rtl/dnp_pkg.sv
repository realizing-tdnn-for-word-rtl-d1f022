// Shared types and constants of the DNP-II processing element and the EMIND-II array.
//
// The word size (16 bits) and the memory sizes (256-word program memory, 128-word input
// memory, 512-word weight memory) are the chip's published figures. The instruction
// encoding, the register count, the accumulator width and the link format are this
// design's own choices: the chip's instruction set was never published in detail, so a
// small 16-bit instruction set was defined that covers the functions the PE is said to
// have (multiply-accumulate, ALU, address counters, repeat counter, subroutine call,
// four-way communication through the I/O port-pair register IOPR).
//
// Instruction formats (bit 15..12 = opcode):
//   OP_MISC  0  [11:8] sub: 0 NOP, 1 HALT, 2 RET, 3 SETIOPR (IOPR <= R[2:0]),
//                4 MOVA (A[5:4] <= R[2:0])
//   OP_LDI   1  R[11:9] <= sign-extended imm[8:0]
//   OP_ALU   2  R[11:9] <= R[11:9] op R[8:6], op = [3:0] (alu_op_e)
//   OP_LDW   3  R[11:9] <= W[ea]     ea from A[8:7], mode [6:5], index register [4:2]
//   OP_STW   4  W[ea]   <= R[11:9]
//   OP_LDX   5  R[11:9] <= X[ea]
//   OP_STX   6  X[ea]   <= R[11:9]
//   OP_MAC   7  ACC (+)= X[A[11:10], mode [7:6]] * W[A[9:8], mode [5:4]]; bit 0 = start
//                a new sum (the product replaces the accumulator)
//   OP_LDA   8  A[11:10] <= imm[9:0]
//   OP_ACC   9  [8:7] sub: 0 R[11:9] <= sat16(ACC >>> [4:0]), 1 ACC <= R[11:9], 2 ACC <= 0
//   OP_SEND 10  send R[11:9] on the output port of IOPR pair [1:0]
//   OP_RECV 11  R[11:9] <= word from the input port of IOPR pair [1:0]
//   OP_RPT  12  execute the next instruction imm[7:0] times (0 counts as 1)
//   OP_JMP  13  PC <= [7:0]
//   OP_CALL 14  push PC, PC <= [7:0]
//   OP_DJNZ 15  R[11:9] <= R[11:9]-1; jump to [7:0] if the result is not zero
// Address modes: 0 plain, 1 post-increment, 2 post-decrement, 3 indexed (A + R[index]).
package dnp_pkg;

  localparam int unsigned WORD_W   = 16;
  localparam int unsigned ACC_W    = 40;
  localparam int unsigned NREGS    = 8;
  localparam int unsigned NAREGS   = 4;
  localparam int unsigned PMEM_WORDS = 256;
  localparam int unsigned XMEM_WORDS = 128;
  localparam int unsigned WMEM_WORDS = 512;
  localparam int unsigned ADDR_W   = 9;   // wide enough for the 512-word weight memory
  localparam int unsigned PC_W     = 8;
  localparam int unsigned STACK_DEPTH = 4;

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [3:0] {
    OP_MISC = 4'd0, OP_LDI = 4'd1, OP_ALU = 4'd2, OP_LDW = 4'd3,
    OP_STW  = 4'd4, OP_LDX = 4'd5, OP_STX = 4'd6, OP_MAC = 4'd7,
    OP_LDA  = 4'd8, OP_ACC = 4'd9, OP_SEND = 4'd10, OP_RECV = 4'd11,
    OP_RPT  = 4'd12, OP_JMP = 4'd13, OP_CALL = 4'd14, OP_DJNZ = 4'd15
  } opcode_e;

  typedef enum logic [3:0] {
    MISC_NOP = 4'd0, MISC_HALT = 4'd1, MISC_RET = 4'd2, MISC_SETIOPR = 4'd3, MISC_MOVA = 4'd4
  } misc_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_OR  = 4'd3,
    ALU_XOR = 4'd4, ALU_NOT = 4'd5, ALU_SHL = 4'd6, ALU_SHR = 4'd7,
    ALU_SHRL = 4'd8, ALU_MOV = 4'd9
  } alu_op_e;

  typedef enum logic [1:0] {
    AM_PLAIN = 2'd0, AM_INC = 2'd1, AM_DEC = 2'd2, AM_INDEX = 2'd3
  } amode_e;

  typedef enum logic [1:0] {
    ACC_TO_REG = 2'd0, REG_TO_ACC = 2'd1, ACC_CLEAR = 2'd2
  } accop_e;

  // Link directions of a PE. Row index grows to the north, column index to the east.
  typedef enum logic [1:0] { DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3 } dir_e;

  // Host access targets.
  typedef enum logic [1:0] { MEM_P = 2'd0, MEM_X = 2'd1, MEM_W = 2'd2 } memsel_e;

  // Forward half of a link: two-phase request (one toggle per word) and bundled data.
  typedef struct packed {
    logic  req;
    word_t data;
  } link_fwd_t;

  // Host access bus of one PE.
  typedef struct packed {
    logic              we;
    memsel_e           mem;
    logic [ADDR_W-1:0] addr;
    word_t             wdata;
  } host_req_t;

endpackage
