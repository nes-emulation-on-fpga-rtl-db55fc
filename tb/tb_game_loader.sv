// Testbench of the game loader with an asynchronous SRAM model holding two
// games in slots 3 and 9 (different header flags). The loader's output is
// captured into PRG/CHR arrays; the test checks that every byte matches the
// slot contents, that the flags are delivered, that busy covers the whole
// copy, that the copy time is three cycles per word, and that a load-key press
// loads the newly selected slot.
`include "tb_check.svh"
module tb_game_loader;
  `TB_COUNTERS
  logic clk = 0, rst = 1, key = 0;
  logic [3:0] sel = 4'd3;
  logic [19:0] sa; logic [15:0] dq; logic oe_n;
  logic pwe, cwe, fwe, busy; logic [14:0] la; logic [7:0] ld; logic [1:0] lf;
  logic [7:0] prg [32768];
  logic [7:0] chr [8192];
  logic [1:0] flags;
  game_loader dut (.clk, .rst, .game_sel(sel), .load_key(key), .sram_addr(sa), .sram_dq(dq),
    .sram_oe_n(oe_n), .ld_prg_we(pwe), .ld_chr_we(cwe), .ld_addr(la), .ld_data(ld),
    .ld_flags_we(fwe), .ld_flags(lf), .busy);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 1000000)
  // SRAM contents: header word in word 0 of the slot, data elsewhere a hash of the address
  function automatic logic [15:0] sram_word(logic [19:0] a);
    if (a[15:0] == 16'h0000) return (a[19:16] == 4'd3) ? 16'h0002 : 16'h0001;
    return 16'(a * 16'd40503 + (a >> 7));
  endfunction
  assign dq = oe_n ? 16'hzzzz : sram_word(sa);
  always @(posedge clk) begin
    if (pwe) prg[la] = ld;
    if (cwe) chr[la[12:0]] = ld;
    if (fwe) flags = lf;
  end
  task automatic check_slot(input int s, input int cycles);
    int bad = 0;
    for (int i = 0; i < 32768; i++) begin
      logic [15:0] w = sram_word(20'({s[3:0], 16'h0100 + 16'(i / 2)}));
      if (prg[i] != (i[0] ? w[15:8] : w[7:0])) bad++;
    end
    for (int i = 0; i < 8192; i++) begin
      logic [15:0] w = sram_word(20'({s[3:0], 16'h4100 + 16'(i / 2)}));
      if (chr[i] != (i[0] ? w[15:8] : w[7:0])) bad++;
    end
    `CHECK(bad == 0, $sformatf("slot %0d: %0d wrong bytes", s, bad))
    `CHECK(flags == ((s == 3) ? 2'b10 : 2'b01), $sformatf("slot %0d flags %b", s, flags))
    `CHECK(cycles >= 3 * 20480 && cycles <= 3 * 20480 + 4, $sformatf("load took %0d cycles", cycles))
  endtask
  initial begin
    int c;
    foreach (prg[i]) prg[i] = 0;
    foreach (chr[i]) chr[i] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    `CHECK(busy, "loading starts after reset")
    c = 0; while (busy) begin @(posedge clk); #1 c++; end
    check_slot(3, c);
    repeat (10) @(posedge clk);
    `CHECK(!busy && oe_n, "idle after the copy, SRAM output disabled")
    sel = 4'd9; key = 1; @(posedge clk); #1;
    c = 0; while (busy) begin @(posedge clk); #1 c++; end
    key = 0;
    check_slot(9, c);
    `TB_DONE
  end
endmodule
