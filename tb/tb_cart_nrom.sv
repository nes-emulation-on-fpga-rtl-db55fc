// Testbench of the NROM cartridge: loads random PRG and CHR contents through
// the load port, then checks CPU reads at $8000-$FFFF for 32 KB and 16 KB
// (mirrored) programs, both CHR read ports, and the header flags.
`include "tb_check.svh"
module tb_cart_nrom;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce_cpu = 0;
  logic [15:0] cpu_addr = 16'h8000; logic [7:0] prg_rdata;
  logic [12:0] ca = 0, cb = 0; logic [7:0] da, db;
  logic pwe = 0, cwe = 0, fwe = 0; logic [14:0] la = 0; logic [7:0] ld = 0; logic [1:0] lf = 0;
  logic mirror_v, prg16;
  logic [7:0] prg_ref [32768];
  logic [7:0] chr_ref [8192];
  cart_nrom dut (.clk, .rst, .ce_cpu, .cpu_addr, .prg_rdata, .chr_addr_a(ca), .chr_rdata_a(da),
    .chr_addr_b(cb), .chr_rdata_b(db), .ld_prg_we(pwe), .ld_chr_we(cwe), .ld_addr(la), .ld_data(ld),
    .ld_flags_we(fwe), .ld_flags(lf), .mirror_v, .prg16);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 1000000)
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32768; i++) begin
      prg_ref[i] = 8'($urandom); pwe = 1; la = 15'(i); ld = prg_ref[i]; @(posedge clk); #1;
    end
    pwe = 0;
    for (int i = 0; i < 8192; i++) begin
      chr_ref[i] = 8'($urandom); cwe = 1; la = 15'(i); ld = chr_ref[i]; @(posedge clk); #1;
    end
    cwe = 0;
    for (int m = 0; m < 2; m++) begin
      fwe = 1; lf = 2'(m * 2 + 1); @(posedge clk); #1 fwe = 0;
      `CHECK(prg16 == m[0] && mirror_v == 1'b1, "header flags")
      for (int i = 0; i < 2000; i++) begin
        cpu_addr = 16'($urandom) | 16'h8000; ce_cpu = 1;
        @(posedge clk); #1 ce_cpu = 0;
        `CHECK(prg_rdata == prg_ref[m ? (cpu_addr & 16'h3FFF) : (cpu_addr & 16'h7FFF)],
               $sformatf("PRG read %h prg16=%0d", cpu_addr, m))
      end
    end
    // PRG output only changes on the CPU enable
    cpu_addr = 16'h8000; ce_cpu = 1; @(posedge clk); #1 ce_cpu = 0;
    cpu_addr = 16'h8001; @(posedge clk); #1;
    `CHECK(prg_rdata == prg_ref[0], "PRG data held between CPU enables")
    for (int i = 0; i < 2000; i++) begin
      ca = 13'($urandom); cb = 13'($urandom); @(posedge clk); #1;
      `CHECK(da == chr_ref[ca] && db == chr_ref[cb], "CHR read ports")
    end
    `TB_DONE
  end
endmodule
