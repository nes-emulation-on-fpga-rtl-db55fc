// Testbench of the instruction decoder: checks the addressing mode, access kind
// and main control fields of a set of opcodes against the 6502 opcode map, and
// that undocumented opcodes decode as implied no-ops.
`include "tb_check.svh"
module tb_cpu_decoder;
  import cpu_pkg::*;
  `TB_COUNTERS
  logic [7:0] opc;
  ctrl_t c;
  cpu_decoder dut (.opcode(opc), .ctrl(c));
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)
  task automatic t(input logic [7:0] o, input mode_e m, input access_e ac, input dst_e d, input string n);
    opc = o; #1;
    `CHECK(c.mode == m && c.access == ac && c.dst == d,
           $sformatf("%s (%h): mode %s access %s dst %s", n, o, c.mode.name(), c.access.name(), c.dst.name()))
  endtask
  initial begin
    t(8'hA9, M_IMM, AC_READ, D_A, "LDA #");
    t(8'hA5, M_ZP,  AC_READ, D_A, "LDA zp");
    t(8'hB5, M_ZPX, AC_READ, D_A, "LDA zp,X");
    t(8'hAD, M_ABS, AC_READ, D_A, "LDA abs");
    t(8'hBD, M_ABX, AC_READ, D_A, "LDA abs,X");
    t(8'hB9, M_ABY, AC_READ, D_A, "LDA abs,Y");
    t(8'hA1, M_IZX, AC_READ, D_A, "LDA (zp,X)");
    t(8'hB1, M_IZY, AC_READ, D_A, "LDA (zp),Y");
    t(8'h8D, M_ABS, AC_WRITE, D_NONE, "STA abs");
    t(8'h96, M_ZPY, AC_WRITE, D_NONE, "STX zp,Y");
    t(8'hB6, M_ZPY, AC_READ, D_X, "LDX zp,Y");
    t(8'hBE, M_ABY, AC_READ, D_X, "LDX abs,Y");
    t(8'hBC, M_ABX, AC_READ, D_Y, "LDY abs,X");
    t(8'h0E, M_ABS, AC_RMW, D_NONE, "ASL abs");
    t(8'h0A, M_IMP, AC_NONE, D_A, "ASL A");
    t(8'hFE, M_ABX, AC_RMW, D_NONE, "INC abs,X");
    t(8'hCA, M_IMP, AC_NONE, D_X, "DEX");
    t(8'h88, M_IMP, AC_NONE, D_Y, "DEY");
    t(8'hAA, M_IMP, AC_NONE, D_X, "TAX");
    t(8'h9A, M_IMP, AC_NONE, D_S, "TXS");
    t(8'h4C, M_JMP, AC_NONE, D_NONE, "JMP abs");
    t(8'h6C, M_JMPI, AC_NONE, D_NONE, "JMP ind");
    t(8'h20, M_JSR, AC_NONE, D_NONE, "JSR");
    t(8'h60, M_RTS, AC_NONE, D_NONE, "RTS");
    t(8'h40, M_RTI, AC_NONE, D_NONE, "RTI");
    t(8'h00, M_BRK, AC_NONE, D_NONE, "BRK");
    t(8'h48, M_PUSH, AC_NONE, D_NONE, "PHA");
    t(8'h28, M_PULL, AC_NONE, D_P, "PLP");
    t(8'hF0, M_BR, AC_NONE, D_NONE, "BEQ");
    t(8'h2C, M_ABS, AC_READ, D_NONE, "BIT abs");
    t(8'hE0, M_IMM, AC_READ, D_NONE, "CPX #");
    t(8'hEA, M_IMP, AC_NONE, D_NONE, "NOP");
    t(8'h02, M_IMP, AC_NONE, D_NONE, "undocumented");
    opc = 8'hE9; #1; `CHECK(c.inv2 && c.cin == CI_C && c.set_v, "SBC subtracts with borrow")
    opc = 8'hC9; #1; `CHECK(c.inv2 && c.cin == CI_1 && c.set_c && !c.set_v, "CMP")
    opc = 8'h6A; #1; `CHECK(c.op == ALU_SHR && c.cin == CI_C, "ROR A")
    opc = 8'h2C; #1; `CHECK(c.bit_op && c.op == ALU_AND, "BIT")
    opc = 8'h78; #1; `CHECK(c.flag_op == F_I && c.flag_val, "SEI")
    opc = 8'hB0; #1; `CHECK(c.br_flag == 2'd2 && c.br_val, "BCS")
    opc = 8'h9D; #1; `CHECK(c.store == 2'd0 && c.access == AC_WRITE, "STA abs,X")
    opc = 8'h8C; #1; `CHECK(c.store == 2'd2, "STY abs")
    `TB_DONE
  end
endmodule
