// Synchronous single-port RAM (block RAM), used for the 2 KB CPU work RAM.
// A read or write takes place on a clock edge where ce is high; read data is
// registered and so appears in the following CPU cycle, which is the
// one-cycle memory delay the CPU core is built around. Size from the design
// description (2 KB); the initial contents are cleared.
module nes_ram #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [0:(1<<AW)-1];
  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = 8'h00;
  end
  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end
endmodule
