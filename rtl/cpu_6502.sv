// 6502-compatible CPU core (the NES CPU without decimal mode).
//
// Architectural state: 16-bit PC, A, X, Y, stack pointer S and the status
// flags N V B D I Z C. The datapath moves values through a registered ALU
// (cpu_alu); the decoder (cpu_decoder) turns the opcode into a control vector
// and the addressing mode selects a fixed sequence of bus cycles (the
// micro-sequence held in the `state` machine below). Every cycle is a bus cycle:
// the CPU either reads or writes.
//
// Memory timing: `addr`, `we` and `dout` are driven combinationally from the
// state during a CPU cycle; the memory registers the read data at the end of
// that cycle, so `din` holds it during the following cycle. This is the
// one-cycle memory delay that replaces the 6502's two-phase clock.
//
// Overlap: an instruction whose last bus cycle is a read (loads, logic,
// arithmetic, compares, implied register ops) performs its ALU step during the
// opcode fetch of the next instruction and writes the result back at the end
// of the next instruction's decode cycle, exactly like the original part, so
// every documented instruction takes its documented number of cycles.
//
// Interrupts: NMI is edge triggered, IRQ level triggered and masked by I. They
// are sampled at the start of an opcode fetch; the fetch is then discarded and
// the 7-cycle BRK sequence runs with the NMI ($FFFA) or IRQ ($FFFE) vector.
// Reset loads PC from $FFFC/$FFFD (reset sequence shortened to 2 reads).
//
// Interface: ce is the CPU clock enable (master/12); rdy = 0 freezes the core
// (used by OAM DMA). Own choices: address arithmetic uses a dedicated adder
// rather than the ALU; interrupt polling is at the start of the fetch cycle.
module cpu_6502
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        rdy,
  input  logic        nmi,
  input  logic        irq,
  input  logic [7:0]  din,
  output logic [15:0] addr,
  output logic        we,
  output logic [7:0]  dout,
  output logic        sync     // high during an opcode fetch cycle
);
  typedef enum logic [5:0] {
    RST0, RST1, RST2,
    FETCH, DECODE,
    ZP, ZPI, MEM, ABS0, ABS1, ABX0, ABX1,
    IZX0, IZX1, IZX2, IZY0, IZY1, IND0, IND1,
    JSR0, JSR1, JSR2, JSR3, RTS0, RTS1, RTS2, RTS3,
    RTI0, RTI1, RTI2, RTI3, BRK0, BRK1, BRK2, BRK3, BRK4,
    PUSH, PULL0, PULL1, BR, BR2, RMW1, RMW2
  } state_e;

  state_e      state;
  logic [15:0] pc;
  logic [7:0]  a_r, x_r, y_r, s_r;
  logic        fn, fv, fd, fi, fz, fc;
  logic [15:0] ad;          // effective address
  logic [7:0]  ba;          // zero-page pointer
  logic        carry;       // page crossing carry of indexed modes
  logic        pcsel;       // next fetch takes its address from {din, ad[7:0]}
  logic        intr;        // current sequence is a hardware interrupt
  logic        nmi_sel;     // interrupt vector is NMI
  logic        nmi_prev, nmi_pend;
  ctrl_t       cw, cw_new;

  // execute / write-back pipeline
  logic        wb_valid;
  ctrl_t       wb_cw;
  logic [7:0]  wb_di;

  // ALU
  alu_op_e     alu_op;
  logic [7:0]  alu_a, alu_b;
  logic        alu_inv, alu_cin;
  logic [7:0]  alu_out;
  logic        alu_c, alu_z, alu_v;
  logic        alu_en;

  cpu_decoder u_dec (.opcode(din), .ctrl(cw_new));

  cpu_alu u_alu (
    .clk, .rst, .en(alu_en), .op(alu_op), .src1(alu_a), .src2(alu_b),
    .src2_invert(alu_inv), .c_in(alu_cin),
    .alu_out, .c_out(alu_c), .z_out(alu_z), .v_out(alu_v)
  );

  logic [7:0] idx;
  logic       int_now;
  logic       take_br;
  logic [15:0] br_target;
  logic [7:0] status;

  assign status = {fn, fv, 1'b1, 1'b1, fd, fi, fz, fc};
  assign idx = (cw.mode == M_ZPY || cw.mode == M_ABY || cw.mode == M_IZY) ? y_r : x_r;
  assign int_now = nmi_pend || (irq && !fi);

  always_comb begin
    unique case (cw.br_flag)
      2'd0: take_br = (fn == cw.br_val);
      2'd1: take_br = (fv == cw.br_val);
      2'd2: take_br = (fc == cw.br_val);
      default: take_br = (fz == cw.br_val);
    endcase
  end
  assign br_target = pc + {{8{din[7]}}, din};

  // a fetch happens in FETCH and in a not-taken branch cycle
  logic is_fetch;
  assign is_fetch = (state == FETCH) || (state == BR && !take_br);
  assign sync = is_fetch;

  logic [7:0] store_val;
  always_comb begin
    unique case (cw.store)
      2'd1: store_val = x_r;
      2'd2: store_val = y_r;
      default: store_val = a_r;
    endcase
  end

  logic [15:0] vec;
  assign vec = nmi_sel ? 16'hFFFA : (state == RST1 || state == RST2 || state == RST0) ? 16'hFFFC : 16'hFFFE;

  // ---------------- bus outputs -------------------------------------------
  logic final_access;   // this cycle is the operand access of the instruction
  always_comb begin
    addr = pc;
    we   = 1'b0;
    dout = din;
    final_access = 1'b0;
    unique case (state)
      RST0:   addr = pc;
      RST1:   addr = 16'hFFFC;
      RST2:   addr = 16'hFFFD;
      FETCH:  addr = pcsel ? {din, ad[7:0]} : pc;
      DECODE: addr = pc;
      ZP:     begin addr = {8'h00, din}; final_access = 1'b1; end
      ZPI:    addr = {8'h00, din};
      MEM:    begin addr = ad; final_access = 1'b1; end
      ABS0:   addr = pc;
      ABS1:   begin addr = {din, ad[7:0]}; final_access = 1'b1; end
      ABX0:   addr = pc;
      ABX1:   begin addr = {din, ad[7:0]};
                    final_access = (cw.access == AC_READ) && !carry; end
      IZX0:   addr = {8'h00, din};
      IZX1:   addr = {8'h00, ba};
      IZX2:   addr = {8'h00, ba + 8'd1};
      IZY0:   addr = {8'h00, din};
      IZY1:   addr = {8'h00, ba + 8'd1};
      IND0:   addr = {din, ad[7:0]};
      IND1:   addr = {ad[15:8], ad[7:0] + 8'd1};
      JSR0:   addr = {8'h01, s_r};
      JSR1:   begin addr = {8'h01, s_r}; we = 1'b1; dout = pc[15:8]; end
      JSR2:   begin addr = {8'h01, s_r}; we = 1'b1; dout = pc[7:0]; end
      JSR3:   addr = pc;
      RTS0, RTS1, RTS2, RTI0, RTI1, RTI2, RTI3, PULL0, PULL1: addr = {8'h01, s_r};
      RTS3:   addr = {din, ad[7:0]};
      BRK0:   begin addr = {8'h01, s_r}; we = 1'b1; dout = pc[15:8]; end
      BRK1:   begin addr = {8'h01, s_r}; we = 1'b1; dout = pc[7:0]; end
      BRK2:   begin addr = {8'h01, s_r}; we = 1'b1; dout = {status[7:6], 1'b1, !intr, status[3:0]}; end
      BRK3:   addr = vec;
      BRK4:   addr = vec + 16'd1;
      PUSH:   begin addr = {8'h01, s_r}; we = 1'b1;
                    dout = cw.push_p ? {status[7:6], 2'b11, status[3:0]} : a_r; end
      BR:     addr = pc;
      BR2:    addr = {pc[15:8], ad[7:0]};
      RMW1:   begin addr = ad; we = 1'b1; dout = din; end
      RMW2:   begin addr = ad; we = 1'b1; dout = alu_out; end
      default: ;
    endcase
    if (final_access && cw.access == AC_WRITE) begin
      we   = 1'b1;
      dout = store_val;
    end
  end

  // ---------------- ALU control -------------------------------------------
  // Execute step: in the fetch cycle after a read-type instruction, or in RMW1.
  logic do_exec;
  assign do_exec = (state == FETCH && cw.exec && cw.access != AC_RMW && cw.mode != M_PUSH
                    && !pcsel) || (state == RMW1);

  always_comb begin
    alu_en  = ce && rdy && do_exec;
    alu_op  = cw.op;
    unique case (cw.src1)
      S1_X:  alu_a = x_r;
      S1_Y:  alu_a = y_r;
      S1_S:  alu_a = s_r;
      S1_DI: alu_a = din;
      default: alu_a = a_r;
    endcase
    unique case (cw.src2)
      S2_ZERO: alu_b = 8'h00;
      S2_FF:   alu_b = 8'hFF;
      default: alu_b = din;
    endcase
    alu_inv = cw.inv2;
    unique case (cw.cin)
      CI_1:    alu_cin = 1'b1;
      CI_C:    alu_cin = fc;
      default: alu_cin = 1'b0;
    endcase
  end

  // ---------------- sequencer -------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RST0;
      pc       <= 16'h0000;
      a_r      <= 8'h00; x_r <= 8'h00; y_r <= 8'h00; s_r <= 8'hFD;
      {fn, fv, fd, fz, fc} <= '0;
      fi       <= 1'b1;
      cw       <= ctrl_nop();
      ad       <= '0; ba <= '0; carry <= 1'b0; pcsel <= 1'b0;
      intr     <= 1'b0; nmi_sel <= 1'b0;
      nmi_prev <= 1'b0; nmi_pend <= 1'b0;
      wb_valid <= 1'b0; wb_cw <= ctrl_nop(); wb_di <= '0;
    end else if (ce && rdy) begin
      nmi_prev <= nmi;
      if (nmi && !nmi_prev) nmi_pend <= 1'b1;

      // -------- write-back of the previous execute step ---------------------
      wb_valid <= 1'b0;
      if (wb_valid) begin
        unique case (wb_cw.dst)
          D_A: a_r <= alu_out;
          D_X: x_r <= alu_out;
          D_Y: y_r <= alu_out;
          D_S: s_r <= alu_out;
          D_P: {fn, fv, fd, fi, fz, fc} <= {wb_di[7:6], wb_di[3:0]};
          default: ;
        endcase
        if (wb_cw.set_nz) begin fn <= alu_out[7]; fz <= alu_z; end
        if (wb_cw.set_c)  fc <= alu_c;
        if (wb_cw.set_v)  fv <= alu_v;
        if (wb_cw.bit_op) begin fz <= alu_z; fn <= wb_di[7]; fv <= wb_di[6]; end
        unique case (wb_cw.flag_op)
          F_C: fc <= wb_cw.flag_val;
          F_I: fi <= wb_cw.flag_val;
          F_V: fv <= wb_cw.flag_val;
          F_D: fd <= wb_cw.flag_val;
          default: ;
        endcase
      end
      if (do_exec) begin
        wb_valid <= 1'b1;
        wb_cw    <= cw;
        wb_di    <= din;
      end

      unique case (state)
        RST0: state <= RST1;
        RST1: state <= RST2;
        RST2: begin ad[7:0] <= din; pcsel <= 1'b1; state <= FETCH; end

        FETCH, BR: begin
          if (state == BR && take_br) begin
            // taken branch: dummy read of the next opcode, add the offset
            pc[7:0] <= br_target[7:0];
            ad[7:0] <= br_target[7:0];
            if (br_target[15:8] != pc[15:8]) begin
              ad[15:8] <= br_target[15:8];
              state    <= BR2;
            end else state <= FETCH;
          end else begin
            pcsel <= 1'b0;
            if (int_now) begin
              intr    <= 1'b1;
              nmi_sel <= nmi_pend;
              nmi_pend <= 1'b0;
              if (pcsel) pc <= {din, ad[7:0]};
            end else begin
              intr <= 1'b0;
              pc   <= (pcsel ? {din, ad[7:0]} : pc) + 16'd1;
            end
            state <= DECODE;
          end
        end

        DECODE: begin
          cw <= intr ? ctrl_brk() : cw_new;
          if (intr) state <= BRK0;
          else begin
            unique case (cw_new.mode)
              M_IMP:  state <= FETCH;
              M_IMM:  begin pc <= pc + 16'd1; state <= FETCH; end
              M_ZP:   begin pc <= pc + 16'd1; state <= ZP; end
              M_ZPX, M_ZPY: begin pc <= pc + 16'd1; state <= ZPI; end
              M_ABS, M_JMP, M_JMPI: begin pc <= pc + 16'd1; state <= ABS0; end
              M_ABX, M_ABY: begin pc <= pc + 16'd1; state <= ABX0; end
              M_IZX:  begin pc <= pc + 16'd1; state <= IZX0; end
              M_IZY:  begin pc <= pc + 16'd1; state <= IZY0; end
              M_JSR:  begin pc <= pc + 16'd1; state <= JSR0; end
              M_RTS:  state <= RTS0;
              M_RTI:  state <= RTI0;
              M_BRK:  begin pc <= pc + 16'd1; state <= BRK0; end
              M_PUSH: state <= PUSH;
              M_PULL: state <= PULL0;
              M_BR:   begin pc <= pc + 16'd1; state <= BR; end
              default: state <= FETCH;
            endcase
          end
        end

        // ---- operand access cycles (ZP, MEM, ABS1, final ABX1) ----
        ZP, MEM, ABS1: begin
          if (state == ZP)   ad <= {8'h00, din};
          if (state == ABS1) ad <= {din, ad[7:0]};
          state <= (cw.access == AC_RMW) ? RMW1 : FETCH;
        end
        ZPI:  begin ad <= {8'h00, din + idx}; state <= MEM; end
        ABS0: begin
          pc <= pc + 16'd1;
          ad[7:0] <= din;
          unique case (cw.mode)
            M_JMP:  begin pcsel <= 1'b1; state <= FETCH; end
            M_JMPI: state <= IND0;
            default: state <= ABS1;
          endcase
        end
        ABX0: begin
          pc <= pc + 16'd1;
          {carry, ad[7:0]} <= {1'b0, din} + {1'b0, idx};
          state <= ABX1;
        end
        ABX1: begin
          ad[15:8] <= din + {7'd0, carry};
          if (cw.access == AC_READ && !carry) state <= FETCH;
          else state <= MEM;
        end
        IZX0: begin ba <= din + x_r; state <= IZX1; end
        IZX1: state <= IZX2;
        IZX2: begin ad[7:0] <= din; state <= ABS1; end
        IZY0: begin ba <= din; state <= IZY1; end
        IZY1: begin {carry, ad[7:0]} <= {1'b0, din} + {1'b0, y_r}; state <= ABX1; end
        IND0: begin ad <= {din, ad[7:0]}; state <= IND1; end
        IND1: begin ad[7:0] <= din; pcsel <= 1'b1; state <= FETCH; end

        JSR0: begin ad[7:0] <= din; state <= JSR1; end
        JSR1: begin s_r <= s_r - 8'd1; state <= JSR2; end
        JSR2: begin s_r <= s_r - 8'd1; state <= JSR3; end
        JSR3: begin pcsel <= 1'b1; state <= FETCH; end

        RTS0: begin s_r <= s_r + 8'd1; state <= RTS1; end
        RTS1: begin s_r <= s_r + 8'd1; state <= RTS2; end
        RTS2: begin ad[7:0] <= din; state <= RTS3; end
        RTS3: begin pc <= {din, ad[7:0]} + 16'd1; state <= FETCH; end

        RTI0: begin s_r <= s_r + 8'd1; state <= RTI1; end
        RTI1: begin s_r <= s_r + 8'd1; state <= RTI2; end
        RTI2: begin
          {fn, fv, fd, fi, fz, fc} <= {din[7:6], din[3:0]};
          s_r <= s_r + 8'd1; state <= RTI3;
        end
        RTI3: begin ad[7:0] <= din; pcsel <= 1'b1; state <= FETCH; end

        BRK0: begin s_r <= s_r - 8'd1; state <= BRK1; end
        BRK1: begin s_r <= s_r - 8'd1; state <= BRK2; end
        BRK2: begin s_r <= s_r - 8'd1; fi <= 1'b1; state <= BRK3; end
        BRK3: state <= BRK4;
        BRK4: begin ad[7:0] <= din; pcsel <= 1'b1; intr <= 1'b0; nmi_sel <= 1'b0; state <= FETCH; end

        PUSH:  begin s_r <= s_r - 8'd1; state <= FETCH; end
        PULL0: begin s_r <= s_r + 8'd1; state <= PULL1; end
        PULL1: state <= FETCH;

        BR2:  begin pc <= ad; state <= FETCH; end
        RMW1: state <= RMW2;
        RMW2: state <= FETCH;
        default: state <= FETCH;
      endcase
    end
  end

  function automatic ctrl_t ctrl_nop();
    ctrl_t n;
    n = '0;
    n.mode = M_IMP; n.access = AC_NONE; n.op = ALU_HOLD; n.src1 = S1_A; n.src2 = S2_DI;
    n.cin = CI_0; n.dst = D_NONE; n.flag_op = F_NONE;
    return n;
  endfunction

  function automatic ctrl_t ctrl_brk();
    ctrl_t n;
    n = ctrl_nop();
    n.mode = M_BRK;
    return n;
  endfunction
endmodule
