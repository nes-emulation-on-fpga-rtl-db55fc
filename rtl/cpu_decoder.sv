// Instruction decoder of the 6502-compatible CPU.
// Takes the opcode byte and produces the instruction's control vector: the
// addressing mode (which selects the cycle sequence run by the sequencer), the
// kind of memory access, the ALU sources, operation and carry in, the register
// written back, which flags are updated, and branch / stack / store details.
// Decoding uses the regular aaa-bbb-cc layout of the 6502 opcode map.
// All documented opcodes are decoded; decimal mode is not supported (the flag
// exists but ADC/SBC are binary) and undocumented opcodes execute as 2-cycle
// NOPs, as the design description allows. Purely combinational.
module cpu_decoder
  import cpu_pkg::*;
(
  input  logic [7:0] opcode,
  output ctrl_t      ctrl
);
  logic [2:0] a, b;
  logic [1:0] c;
  assign a = opcode[7:5];
  assign b = opcode[4:2];
  assign c = opcode[1:0];

  always_comb begin
    ctrl = '0;
    ctrl.mode   = M_IMP;
    ctrl.access = AC_NONE;
    ctrl.op     = ALU_HOLD;
    ctrl.src1   = S1_A;
    ctrl.src2   = S2_DI;
    ctrl.cin    = CI_0;
    ctrl.dst    = D_NONE;
    ctrl.flag_op = F_NONE;

    unique case (c)
      // ---------------- group 1: ORA AND EOR ADC STA LDA CMP SBC ----------
      2'b01: begin
        unique case (b)
          3'd0: ctrl.mode = M_IZX;
          3'd1: ctrl.mode = M_ZP;
          3'd2: ctrl.mode = M_IMM;
          3'd3: ctrl.mode = M_ABS;
          3'd4: ctrl.mode = M_IZY;
          3'd5: ctrl.mode = M_ZPX;
          3'd6: ctrl.mode = M_ABY;
          default: ctrl.mode = M_ABX;
        endcase
        ctrl.access = AC_READ;
        ctrl.exec   = 1'b1;
        ctrl.set_nz = 1'b1;
        ctrl.dst    = D_A;
        unique case (a)
          3'd0: ctrl.op = ALU_OR;
          3'd1: ctrl.op = ALU_AND;
          3'd2: ctrl.op = ALU_XOR;
          3'd3: begin ctrl.op = ALU_ADD; ctrl.cin = CI_C; ctrl.set_c = 1'b1; ctrl.set_v = 1'b1; end
          3'd4: begin // STA
            ctrl.access = AC_WRITE; ctrl.exec = 1'b0; ctrl.set_nz = 1'b0;
            ctrl.dst = D_NONE; ctrl.store = 2'd0;
            if (b == 3'd2) begin ctrl.mode = M_IMP; ctrl.access = AC_NONE; end
          end
          3'd5: begin ctrl.op = ALU_ADD; ctrl.src1 = S1_DI; ctrl.src2 = S2_ZERO; end
          3'd6: begin ctrl.op = ALU_ADD; ctrl.inv2 = 1'b1; ctrl.cin = CI_1; ctrl.set_c = 1'b1; ctrl.dst = D_NONE; end
          default: begin ctrl.op = ALU_ADD; ctrl.inv2 = 1'b1; ctrl.cin = CI_C; ctrl.set_c = 1'b1; ctrl.set_v = 1'b1; end
        endcase
      end
      // ---------------- group 2: ASL ROL LSR ROR STX LDX DEC INC + implied ----
      2'b10: begin
        if (a < 3'd4) begin
          // shifts and rotates
          ctrl.exec = 1'b1; ctrl.set_nz = 1'b1; ctrl.set_c = 1'b1;
          ctrl.op   = a[1] ? ALU_SHR : ALU_SHL;
          ctrl.cin  = a[0] ? CI_C : CI_0;
          unique case (b)
            3'd1: begin ctrl.mode = M_ZP;  ctrl.access = AC_RMW; ctrl.src1 = S1_DI; end
            3'd2: begin ctrl.mode = M_IMP; ctrl.src1 = S1_A; ctrl.dst = D_A; end
            3'd3: begin ctrl.mode = M_ABS; ctrl.access = AC_RMW; ctrl.src1 = S1_DI; end
            3'd5: begin ctrl.mode = M_ZPX; ctrl.access = AC_RMW; ctrl.src1 = S1_DI; end
            3'd7: begin ctrl.mode = M_ABX; ctrl.access = AC_RMW; ctrl.src1 = S1_DI; end
            default: ctrl = ctrl_nop();
          endcase
        end else if (a == 3'd4) begin
          // STX, TXA, TXS
          unique case (b)
            3'd1: begin ctrl.mode = M_ZP;  ctrl.access = AC_WRITE; ctrl.store = 2'd1; end
            3'd3: begin ctrl.mode = M_ABS; ctrl.access = AC_WRITE; ctrl.store = 2'd1; end
            3'd5: begin ctrl.mode = M_ZPY; ctrl.access = AC_WRITE; ctrl.store = 2'd1; end
            3'd2: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_X; ctrl.src2 = S2_ZERO;
                        ctrl.dst = D_A; ctrl.set_nz = 1'b1; end
            3'd6: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_X; ctrl.src2 = S2_ZERO;
                        ctrl.dst = D_S; end
            default: ctrl = ctrl_nop();
          endcase
        end else if (a == 3'd5) begin
          // LDX, TAX, TSX
          ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_DI; ctrl.src2 = S2_ZERO;
          ctrl.dst = D_X; ctrl.set_nz = 1'b1; ctrl.access = AC_READ;
          unique case (b)
            3'd0: ctrl.mode = M_IMM;
            3'd1: ctrl.mode = M_ZP;
            3'd3: ctrl.mode = M_ABS;
            3'd5: ctrl.mode = M_ZPY;
            3'd7: ctrl.mode = M_ABY;
            3'd2: begin ctrl.mode = M_IMP; ctrl.access = AC_NONE; ctrl.src1 = S1_A; end
            3'd6: begin ctrl.mode = M_IMP; ctrl.access = AC_NONE; ctrl.src1 = S1_S; end
            default: ctrl = ctrl_nop();
          endcase
        end else begin
          // DEC (a=6) / INC (a=7), DEX, NOP
          ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.set_nz = 1'b1; ctrl.src1 = S1_DI;
          ctrl.src2 = (a == 3'd6) ? S2_FF : S2_ZERO;
          ctrl.cin  = (a == 3'd6) ? CI_0 : CI_1;
          ctrl.access = AC_RMW;
          unique case (b)
            3'd1: ctrl.mode = M_ZP;
            3'd3: ctrl.mode = M_ABS;
            3'd5: ctrl.mode = M_ZPX;
            3'd7: ctrl.mode = M_ABX;
            3'd2: begin
              if (a == 3'd6) begin // DEX
                ctrl.mode = M_IMP; ctrl.access = AC_NONE; ctrl.src1 = S1_X; ctrl.dst = D_X;
              end else ctrl = ctrl_nop(); // NOP ($EA)
            end
            default: ctrl = ctrl_nop();
          endcase
        end
      end
      // ---------------- group 0: control, branches, X/Y compare/load/store ----
      2'b00: begin
        if (b == 3'd4) begin
          ctrl.mode    = M_BR;
          ctrl.br_flag = a[2:1];
          ctrl.br_val  = a[0];
        end else if (b == 3'd6) begin
          // flag instructions and TYA
          unique case (a)
            3'd0: begin ctrl.flag_op = F_C; ctrl.flag_val = 1'b0; end
            3'd1: begin ctrl.flag_op = F_C; ctrl.flag_val = 1'b1; end
            3'd2: begin ctrl.flag_op = F_I; ctrl.flag_val = 1'b0; end
            3'd3: begin ctrl.flag_op = F_I; ctrl.flag_val = 1'b1; end
            3'd4: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_Y; ctrl.src2 = S2_ZERO;
                        ctrl.dst = D_A; ctrl.set_nz = 1'b1; end
            3'd5: begin ctrl.flag_op = F_V; ctrl.flag_val = 1'b0; end
            3'd6: begin ctrl.flag_op = F_D; ctrl.flag_val = 1'b0; end
            default: begin ctrl.flag_op = F_D; ctrl.flag_val = 1'b1; end
          endcase
          ctrl.exec = ctrl.exec | (ctrl.flag_op != F_NONE);
        end else if (b == 3'd2) begin
          // stack and Y/X increment instructions
          unique case (a)
            3'd0: begin ctrl.mode = M_PUSH; ctrl.push_p = 1'b1; end
            3'd1: begin ctrl.mode = M_PULL; ctrl.exec = 1'b1; ctrl.dst = D_P; end
            3'd2: begin ctrl.mode = M_PUSH; end
            3'd3: begin ctrl.mode = M_PULL; ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_DI;
                        ctrl.src2 = S2_ZERO; ctrl.dst = D_A; ctrl.set_nz = 1'b1; end
            3'd4: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_Y; ctrl.src2 = S2_FF;
                        ctrl.dst = D_Y; ctrl.set_nz = 1'b1; end                // DEY
            3'd5: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_A; ctrl.src2 = S2_ZERO;
                        ctrl.dst = D_Y; ctrl.set_nz = 1'b1; end                // TAY
            3'd6: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_Y; ctrl.src2 = S2_ZERO;
                        ctrl.cin = CI_1; ctrl.dst = D_Y; ctrl.set_nz = 1'b1; end // INY
            default: begin ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_X; ctrl.src2 = S2_ZERO;
                        ctrl.cin = CI_1; ctrl.dst = D_X; ctrl.set_nz = 1'b1; end // INX
          endcase
        end else if (a <= 3'd3 && b == 3'd0) begin
          unique case (a)
            3'd0: ctrl.mode = M_BRK;
            3'd1: ctrl.mode = M_JSR;
            3'd2: ctrl.mode = M_RTI;
            default: ctrl.mode = M_RTS;
          endcase
        end else if (a == 3'd2 && b == 3'd3) begin
          ctrl.mode = M_JMP;
        end else if (a == 3'd3 && b == 3'd3) begin
          ctrl.mode = M_JMPI;
        end else if (a == 3'd1 && (b == 3'd1 || b == 3'd3)) begin
          // BIT
          ctrl.mode = (b == 3'd1) ? M_ZP : M_ABS; ctrl.access = AC_READ; ctrl.exec = 1'b1;
          ctrl.op = ALU_AND; ctrl.bit_op = 1'b1;
        end else if (a == 3'd4 && (b == 3'd1 || b == 3'd3 || b == 3'd5)) begin
          // STY
          ctrl.mode = (b == 3'd1) ? M_ZP : (b == 3'd3) ? M_ABS : M_ZPX;
          ctrl.access = AC_WRITE; ctrl.store = 2'd2;
        end else if (a == 3'd5 && b != 3'd4 && b != 3'd6 && b != 3'd2) begin
          // LDY
          ctrl.access = AC_READ; ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.src1 = S1_DI;
          ctrl.src2 = S2_ZERO; ctrl.dst = D_Y; ctrl.set_nz = 1'b1;
          unique case (b)
            3'd0: ctrl.mode = M_IMM;
            3'd1: ctrl.mode = M_ZP;
            3'd3: ctrl.mode = M_ABS;
            3'd5: ctrl.mode = M_ZPX;
            default: ctrl.mode = M_ABX;
          endcase
        end else if ((a == 3'd6 || a == 3'd7) && (b == 3'd0 || b == 3'd1 || b == 3'd3)) begin
          // CPY / CPX
          ctrl.mode = (b == 3'd0) ? M_IMM : (b == 3'd1) ? M_ZP : M_ABS;
          ctrl.access = AC_READ; ctrl.exec = 1'b1; ctrl.op = ALU_ADD; ctrl.inv2 = 1'b1;
          ctrl.cin = CI_1; ctrl.set_nz = 1'b1; ctrl.set_c = 1'b1;
          ctrl.src1 = (a == 3'd6) ? S1_Y : S1_X;
        end else begin
          ctrl = ctrl_nop();
        end
      end
      default: ctrl = ctrl_nop();
    endcase
  end

  function automatic ctrl_t ctrl_nop();
    ctrl_t n;
    n = '0;
    n.mode = M_IMP; n.access = AC_NONE; n.op = ALU_HOLD; n.src1 = S1_A; n.src2 = S2_DI;
    n.cin = CI_0; n.dst = D_NONE; n.flag_op = F_NONE;
    return n;
  endfunction
endmodule
