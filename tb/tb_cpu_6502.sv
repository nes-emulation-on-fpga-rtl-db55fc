// Self-checking testbench of the 6502-compatible CPU core.
// Runs a short program (loads, stores, ADC/SBC, PHP/PLA, a counted loop with
// BNE, JSR/RTS, INC, ASL, absolute-indexed with and without page crossing,
// (zp),Y, (zp,X) and taken branches that cross a page in both directions) from a 64 KB memory model with the one-cycle read delay,
// then raises NMI and IRQ. It checks the values stored in memory (worked out
// by hand from the 6502 instruction set) and the number of cycles each
// instruction takes (the documented 6502 cycle counts), and the 7-cycle
// interrupt entry.
module tb_cpu_6502;
  logic clk = 0, rst = 1, ce = 0;
  logic nmi = 0, irq = 0;
  logic [7:0] din, dout;
  logic [15:0] addr;
  logic we, sync;
  logic [7:0] mem [0:65535];
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_exp;
  logic [15:0] exp_pc [0:63];
  int exp_cyc [0:63];
  logic [15:0] sync_pc [0:255];
  int sync_t [0:255];
  int nsync = 0;

  cpu_6502 dut (.clk, .rst, .ce, .rdy(1'b1), .nmi, .irq, .din, .addr, .we, .dout, .sync);

  always #5 clk = ~clk;
  // CPU clock enable every 3rd clock, to exercise the enable
  int div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    ce  <= (div == 1);
  end
  // synchronous memory: data of a read is available in the next CPU cycle
  always_ff @(posedge clk) if (ce) begin
    if (we) mem[addr] <= dout;
    din <= mem[addr];
  end
  always_ff @(posedge clk) if (ce && !rst) begin
    cyc <= cyc + 1;
    if (sync && nsync < 256) begin
      sync_pc[nsync] <= addr; sync_t[nsync] <= cyc; nsync <= nsync + 1;
    end
    if (we && addr == 16'h020B) irq <= 1'b0;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    din = 8'h00;
    mem[16'h8000] = 8'hA2;
    mem[16'h8001] = 8'hFF;
    mem[16'h8002] = 8'h9A;
    mem[16'h8003] = 8'hA9;
    mem[16'h8004] = 8'h05;
    mem[16'h8005] = 8'h85;
    mem[16'h8006] = 8'h10;
    mem[16'h8007] = 8'hA9;
    mem[16'h8008] = 8'h03;
    mem[16'h8009] = 8'h18;
    mem[16'h800A] = 8'h65;
    mem[16'h800B] = 8'h10;
    mem[16'h800C] = 8'h8D;
    mem[16'h800D] = 8'h00;
    mem[16'h800E] = 8'h02;
    mem[16'h800F] = 8'h38;
    mem[16'h8010] = 8'hE9;
    mem[16'h8011] = 8'h0A;
    mem[16'h8012] = 8'h8D;
    mem[16'h8013] = 8'h01;
    mem[16'h8014] = 8'h02;
    mem[16'h8015] = 8'h08;
    mem[16'h8016] = 8'h68;
    mem[16'h8017] = 8'h8D;
    mem[16'h8018] = 8'h02;
    mem[16'h8019] = 8'h02;
    mem[16'h801A] = 8'hA0;
    mem[16'h801B] = 8'h00;
    mem[16'h801C] = 8'hC8;
    mem[16'h801D] = 8'hC0;
    mem[16'h801E] = 8'h05;
    mem[16'h801F] = 8'hD0;
    mem[16'h8020] = 8'hFB;
    mem[16'h801C] = 8'hC8;
    mem[16'h801D] = 8'hC0;
    mem[16'h801E] = 8'h05;
    mem[16'h801F] = 8'hD0;
    mem[16'h8020] = 8'hFB;
    mem[16'h801C] = 8'hC8;
    mem[16'h801D] = 8'hC0;
    mem[16'h801E] = 8'h05;
    mem[16'h801F] = 8'hD0;
    mem[16'h8020] = 8'hFB;
    mem[16'h801C] = 8'hC8;
    mem[16'h801D] = 8'hC0;
    mem[16'h801E] = 8'h05;
    mem[16'h801F] = 8'hD0;
    mem[16'h8020] = 8'hFB;
    mem[16'h801C] = 8'hC8;
    mem[16'h801D] = 8'hC0;
    mem[16'h801E] = 8'h05;
    mem[16'h801F] = 8'hD0;
    mem[16'h8020] = 8'hFB;
    mem[16'h8021] = 8'h8C;
    mem[16'h8022] = 8'h03;
    mem[16'h8023] = 8'h02;
    mem[16'h8024] = 8'h20;
    mem[16'h8025] = 8'h00;
    mem[16'h8026] = 8'h88;
    mem[16'h8800] = 8'hA9;
    mem[16'h8801] = 8'h42;
    mem[16'h8802] = 8'h60;
    mem[16'h8027] = 8'h8D;
    mem[16'h8028] = 8'h04;
    mem[16'h8029] = 8'h02;
    mem[16'h802A] = 8'hEE;
    mem[16'h802B] = 8'h04;
    mem[16'h802C] = 8'h02;
    mem[16'h802D] = 8'h0A;
    mem[16'h802E] = 8'h8D;
    mem[16'h802F] = 8'h05;
    mem[16'h8030] = 8'h02;
    mem[16'h8031] = 8'hA2;
    mem[16'h8032] = 8'h03;
    mem[16'h8033] = 8'hBD;
    mem[16'h8034] = 8'h00;
    mem[16'h8035] = 8'h02;
    mem[16'h8036] = 8'h8D;
    mem[16'h8037] = 8'h06;
    mem[16'h8038] = 8'h02;
    mem[16'h8039] = 8'hA9;
    mem[16'h803A] = 8'h00;
    mem[16'h803B] = 8'h85;
    mem[16'h803C] = 8'h20;
    mem[16'h803D] = 8'hA9;
    mem[16'h803E] = 8'h02;
    mem[16'h803F] = 8'h85;
    mem[16'h8040] = 8'h21;
    mem[16'h8041] = 8'hA0;
    mem[16'h8042] = 8'h01;
    mem[16'h8043] = 8'hB1;
    mem[16'h8044] = 8'h20;
    mem[16'h8045] = 8'h8D;
    mem[16'h8046] = 8'h07;
    mem[16'h8047] = 8'h02;
    mem[16'h8048] = 8'hA2;
    mem[16'h8049] = 8'hFF;
    mem[16'h804A] = 8'hBD;
    mem[16'h804B] = 8'h01;
    mem[16'h804C] = 8'h01;
    mem[16'h804D] = 8'h8D;
    mem[16'h804E] = 8'h08;
    mem[16'h804F] = 8'h02;
    mem[16'h8050] = 8'hA2;
    mem[16'h8051] = 8'h1E;
    mem[16'h8052] = 8'hA1;
    mem[16'h8053] = 8'h02;
    mem[16'h8054] = 8'h8D;
    mem[16'h8055] = 8'h0A;
    mem[16'h8056] = 8'h02;
    // taken branches that cross a page, forwards and backwards
    mem[16'h8057] = 8'h4C;
    mem[16'h8058] = 8'hFB;
    mem[16'h8059] = 8'h80;
    mem[16'h80FB] = 8'hA9;
    mem[16'h80FC] = 8'h00;
    mem[16'h80FD] = 8'hF0;
    mem[16'h80FE] = 8'h10;
    mem[16'h810F] = 8'h38;
    mem[16'h8110] = 8'hB0;
    mem[16'h8111] = 8'hE0;
    mem[16'h80F2] = 8'h58;
    mem[16'h80F3] = 8'h4C;
    mem[16'h80F4] = 8'hF3;
    mem[16'h80F5] = 8'h80;
// expected: address, cycles
    n_exp = 61;
    exp_pc[0] = 16'h8000; exp_cyc[0] = 2; // LDX #$FF
    exp_pc[1] = 16'h8002; exp_cyc[1] = 2; // TXS
    exp_pc[2] = 16'h8003; exp_cyc[2] = 2; // LDA #5
    exp_pc[3] = 16'h8005; exp_cyc[3] = 3; // STA $10
    exp_pc[4] = 16'h8007; exp_cyc[4] = 2; // LDA #3
    exp_pc[5] = 16'h8009; exp_cyc[5] = 2; // CLC
    exp_pc[6] = 16'h800A; exp_cyc[6] = 3; // ADC $10
    exp_pc[7] = 16'h800C; exp_cyc[7] = 4; // STA $0200
    exp_pc[8] = 16'h800F; exp_cyc[8] = 2; // SEC
    exp_pc[9] = 16'h8010; exp_cyc[9] = 2; // SBC #10
    exp_pc[10] = 16'h8012; exp_cyc[10] = 4; // STA $0201
    exp_pc[11] = 16'h8015; exp_cyc[11] = 3; // PHP
    exp_pc[12] = 16'h8016; exp_cyc[12] = 4; // PLA
    exp_pc[13] = 16'h8017; exp_cyc[13] = 4; // STA $0202
    exp_pc[14] = 16'h801A; exp_cyc[14] = 2; // LDY #0
    exp_pc[15] = 16'h801C; exp_cyc[15] = 2; // INY
    exp_pc[16] = 16'h801D; exp_cyc[16] = 2; // CPY #5
    exp_pc[17] = 16'h801F; exp_cyc[17] = 3; // BNE loop
    exp_pc[18] = 16'h801C; exp_cyc[18] = 2; // INY
    exp_pc[19] = 16'h801D; exp_cyc[19] = 2; // CPY #5
    exp_pc[20] = 16'h801F; exp_cyc[20] = 3; // BNE loop
    exp_pc[21] = 16'h801C; exp_cyc[21] = 2; // INY
    exp_pc[22] = 16'h801D; exp_cyc[22] = 2; // CPY #5
    exp_pc[23] = 16'h801F; exp_cyc[23] = 3; // BNE loop
    exp_pc[24] = 16'h801C; exp_cyc[24] = 2; // INY
    exp_pc[25] = 16'h801D; exp_cyc[25] = 2; // CPY #5
    exp_pc[26] = 16'h801F; exp_cyc[26] = 3; // BNE loop
    exp_pc[27] = 16'h801C; exp_cyc[27] = 2; // INY
    exp_pc[28] = 16'h801D; exp_cyc[28] = 2; // CPY #5
    exp_pc[29] = 16'h801F; exp_cyc[29] = 2; // BNE loop
    exp_pc[30] = 16'h8021; exp_cyc[30] = 4; // STY $0203
    exp_pc[31] = 16'h8024; exp_cyc[31] = 6; // JSR $8800
    exp_pc[32] = 16'h8800; exp_cyc[32] = 2; // LDA #$42 (sub)
    exp_pc[33] = 16'h8802; exp_cyc[33] = 6; // RTS
    exp_pc[34] = 16'h8027; exp_cyc[34] = 4; // STA $0204
    exp_pc[35] = 16'h802A; exp_cyc[35] = 6; // INC $0204
    exp_pc[36] = 16'h802D; exp_cyc[36] = 2; // ASL A
    exp_pc[37] = 16'h802E; exp_cyc[37] = 4; // STA $0205
    exp_pc[38] = 16'h8031; exp_cyc[38] = 2; // LDX #3
    exp_pc[39] = 16'h8033; exp_cyc[39] = 4; // LDA $0200,X
    exp_pc[40] = 16'h8036; exp_cyc[40] = 4; // STA $0206
    exp_pc[41] = 16'h8039; exp_cyc[41] = 2; // LDA #0
    exp_pc[42] = 16'h803B; exp_cyc[42] = 3; // STA $20
    exp_pc[43] = 16'h803D; exp_cyc[43] = 2; // LDA #2
    exp_pc[44] = 16'h803F; exp_cyc[44] = 3; // STA $21
    exp_pc[45] = 16'h8041; exp_cyc[45] = 2; // LDY #1
    exp_pc[46] = 16'h8043; exp_cyc[46] = 5; // LDA ($20),Y
    exp_pc[47] = 16'h8045; exp_cyc[47] = 4; // STA $0207
    exp_pc[48] = 16'h8048; exp_cyc[48] = 2; // LDX #$FF
    exp_pc[49] = 16'h804A; exp_cyc[49] = 5; // LDA $0101,X
    exp_pc[50] = 16'h804D; exp_cyc[50] = 4; // STA $0208
    exp_pc[51] = 16'h8050; exp_cyc[51] = 2; // LDX #$1E
    exp_pc[52] = 16'h8052; exp_cyc[52] = 6; // LDA ($02,X)
    exp_pc[53] = 16'h8054; exp_cyc[53] = 4; // STA $020A
    exp_pc[54] = 16'h8057; exp_cyc[54] = 3; // JMP $80FB
    exp_pc[55] = 16'h80FB; exp_cyc[55] = 2; // LDA #0
    exp_pc[56] = 16'h80FD; exp_cyc[56] = 4; // BEQ $810F (taken, page cross)
    exp_pc[57] = 16'h810F; exp_cyc[57] = 2; // SEC
    exp_pc[58] = 16'h8110; exp_cyc[58] = 4; // BCS $80F2 (taken, page cross)
    exp_pc[59] = 16'h80F2; exp_cyc[59] = 2; // CLI
    exp_pc[60] = 16'h80F3; exp_cyc[60] = 3; // JMP self
    // vectors and handlers
    mem[16'hFFFC] = 8'h00; mem[16'hFFFD] = 8'h80;
    mem[16'hFFFA] = 8'h00; mem[16'hFFFB] = 8'h90;
    mem[16'hFFFE] = 8'h00; mem[16'hFFFF] = 8'h91;
    // NMI: PHA; LDA #$77; STA $0209; PLA; RTI
    mem[16'h9000] = 8'h48; mem[16'h9001] = 8'hA9; mem[16'h9002] = 8'h77;
    mem[16'h9003] = 8'h8D; mem[16'h9004] = 8'h09; mem[16'h9005] = 8'h02;
    mem[16'h9006] = 8'h68; mem[16'h9007] = 8'h40;
    // IRQ: LDA #$99; STA $020B; RTI
    mem[16'h9100] = 8'hA9; mem[16'h9101] = 8'h99;
    mem[16'h9102] = 8'h8D; mem[16'h9103] = 8'h0B; mem[16'h9104] = 8'h02;
    mem[16'h9105] = 8'h40;
    repeat (10) @(posedge clk);
    rst = 0;
    // run into the idle loop
    wait (nsync > n_exp + 2);
    repeat (30) @(posedge clk);
    nmi = 1;
    wait (mem[16'h0209] == 8'h77);
    repeat (300) @(posedge clk);
    nmi = 0;
    irq = 1;
    wait (mem[16'h020B] == 8'h99);
    repeat (300) @(posedge clk);

    // instruction cycle counts
    for (int i = 0; i < n_exp; i++) begin
      check($sformatf("pc of instr %0d", i), sync_pc[i], exp_pc[i]);
      check($sformatf("cycles of instr %0d at %h", i, exp_pc[i]), sync_t[i+1] - sync_t[i], exp_cyc[i]);
    end
    // interrupt entry: 7 cycles from the discarded fetch to the handler
    for (int i = 1; i < nsync; i++) begin
      if (sync_pc[i] == 16'h9000) check("NMI entry cycles", sync_t[i] - sync_t[i-1], 7);
      if (sync_pc[i] == 16'h9100) check("IRQ entry cycles", sync_t[i] - sync_t[i-1], 7);
    end
    check("ADC", mem[16'h0200], 8'h08);
    check("SBC", mem[16'h0201], 8'hFE);
    check("PHP/PLA flags", mem[16'h0202], 8'hB4);
    check("loop count", mem[16'h0203], 8'h05);
    check("JSR/RTS + INC", mem[16'h0204], 8'h43);
    check("ASL A", mem[16'h0205], 8'h84);
    check("abs,X", mem[16'h0206], 8'h05);
    check("(zp),Y", mem[16'h0207], 8'hFE);
    check("abs,X page cross", mem[16'h0208], 8'h08);
    check("(zp,X)", mem[16'h020A], 8'h08);
    check("NMI handler", mem[16'h0209], 8'h77);
    check("IRQ handler", mem[16'h020B], 8'h99);
    check("stack pointer restored", dut.s_r, 8'hFF);
    check("back in idle loop", dut.pc[15:8], 8'h80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
