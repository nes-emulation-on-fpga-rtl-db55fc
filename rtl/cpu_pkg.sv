// Shared types of the 6502-compatible CPU: ALU operations, operand selects,
// addressing modes and the per-opcode control vector produced by the decoder.
// The ALU operation set (add, xor, or, and, shift left, shift right, hold)
// follows the design description; the encodings are this design's own.
package cpu_pkg;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_XOR, ALU_OR, ALU_AND, ALU_SHL, ALU_SHR, ALU_HOLD
  } alu_op_e;

  // ALU source 1
  typedef enum logic [2:0] {S1_A, S1_X, S1_Y, S1_S, S1_DI} src1_e;
  // ALU source 2 (before the optional inversion)
  typedef enum logic [1:0] {S2_DI, S2_ZERO, S2_FF} src2_e;
  // ALU carry in
  typedef enum logic [1:0] {CI_0, CI_1, CI_C} cin_e;
  // register written back from the ALU result
  typedef enum logic [2:0] {D_NONE, D_A, D_X, D_Y, D_S, D_P} dst_e;

  typedef enum logic [4:0] {
    M_IMP, M_IMM, M_ZP, M_ZPX, M_ZPY, M_ABS, M_ABX, M_ABY, M_IZX, M_IZY,
    M_JMP, M_JMPI, M_JSR, M_RTS, M_RTI, M_BRK, M_PUSH, M_PULL, M_BR
  } mode_e;

  typedef enum logic [1:0] {AC_NONE, AC_READ, AC_WRITE, AC_RMW} access_e;

  // flag set/clear instructions (CLC, SEC, ...)
  typedef enum logic [2:0] {F_NONE, F_C, F_I, F_V, F_D} flagop_e;

  typedef struct packed {
    mode_e     mode;
    access_e   access;
    logic      exec;       // instruction has an ALU/write-back step
    alu_op_e   op;
    src1_e     src1;
    src2_e     src2;
    logic      inv2;       // invert ALU source 2 (subtract / compare)
    cin_e      cin;
    dst_e      dst;
    logic      set_nz;
    logic      set_c;
    logic      set_v;
    logic      bit_op;     // BIT: N,V from the operand
    flagop_e   flag_op;
    logic      flag_val;
    logic [1:0] store;     // register stored by a write: 0 A, 1 X, 2 Y
    logic      push_p;     // PHP (else PHA)
    logic [1:0] br_flag;   // branch condition flag: 0 N, 1 V, 2 C, 3 Z
    logic      br_val;
  } ctrl_t;

endpackage
