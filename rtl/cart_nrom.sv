// Mapper-0 (NROM) cartridge held in block RAM.
// PRG: 32 KB at CPU $8000-$FFFF; with prg16 set a 16 KB program appears twice.
// CHR: 8 KB pattern memory at PPU $0000-$1FFF with two read ports (background
// renderer and sprite renderer / register interface). Both memories are
// filled through the load port by the game loader while the console is held
// in reset. `mirror_v` (vertical nametable mirroring) and `prg16` are the
// header bits of the loaded game. Reads are registered: PRG on the CPU
// enable, CHR on every master clock. Sizes are the NROM ones (own knowledge).
module cart_nrom (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_cpu,
  // CPU side
  input  logic [15:0] cpu_addr,
  output logic [7:0]  prg_rdata,
  // PPU side
  input  logic [12:0] chr_addr_a,
  output logic [7:0]  chr_rdata_a,
  input  logic [12:0] chr_addr_b,
  output logic [7:0]  chr_rdata_b,
  // load port (game loader)
  input  logic        ld_prg_we,
  input  logic        ld_chr_we,
  input  logic [14:0] ld_addr,
  input  logic [7:0]  ld_data,
  input  logic        ld_flags_we,
  input  logic [1:0]  ld_flags,     // {prg16, mirror_v}
  output logic        mirror_v,
  output logic        prg16
);
  logic [7:0] prg [0:32767];
  logic [7:0] chr [0:8191];
  logic [14:0] pa;

  initial begin
    for (int i = 0; i < 32768; i++) prg[i] = 8'h00;
    for (int i = 0; i < 8192; i++)  chr[i] = 8'h00;
  end

  assign pa = {cpu_addr[14] & ~prg16, cpu_addr[13:0]};

  always_ff @(posedge clk) begin
    if (ld_prg_we) prg[ld_addr] <= ld_data;
    if (ce_cpu) prg_rdata <= prg[pa];
  end
  always_ff @(posedge clk) begin
    if (ld_chr_we) chr[ld_addr[12:0]] <= ld_data;
    chr_rdata_a <= chr[chr_addr_a];
  end
  always_ff @(posedge clk) chr_rdata_b <= chr[chr_addr_b];

  always_ff @(posedge clk) begin
    if (rst) begin
      mirror_v <= 1'b0; prg16 <= 1'b0;
    end else if (ld_flags_we) begin
      {prg16, mirror_v} <= ld_flags;
    end
  end
endmodule
