// OAM DMA engine ($4014).
// A CPU write of page number YY starts a copy of CPU addresses $YY00-$YYFF to
// the PPU's OAMDATA register ($2004). The CPU is halted (rdy low) from the
// next cycle on. One alignment cycle is spent, plus one more if the DMA starts
// on an odd CPU cycle, then 256 read/write pairs follow: 513 or 514 CPU cycles
// in all, as the design requires. Because read data arrives one cycle after the
// address, the byte read in one cycle is written to $2004 in the next.
// Own choice: the CPU is halted on any cycle, not only on read cycles.
module oam_dma (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        wr_4014,     // CPU writes $4014 in this cycle
  input  logic [7:0]  wdata,
  output logic        active,      // DMA owns the bus; CPU halted
  output logic [15:0] addr,
  output logic        we           // this cycle writes $2004
);
  typedef enum logic [1:0] {IDLE, ALIGN, RD, WR} st_e;
  st_e        st;
  logic [7:0] page, idx;
  logic       odd;        // CPU cycle parity
  logic       extra;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; page <= '0; idx <= '0; odd <= 1'b0; extra <= 1'b0;
    end else if (ce) begin
      odd <= ~odd;
      unique case (st)
        IDLE: if (wr_4014) begin
          page <= wdata; idx <= '0; st <= ALIGN;
          extra <= ~odd;            // the next cycle is odd: one more wait
        end
        ALIGN: if (extra) extra <= 1'b0; else st <= RD;
        RD:    st <= WR;
        WR: begin
          idx <= idx + 8'd1;
          st  <= (idx == 8'hFF) ? IDLE : RD;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign active = (st != IDLE);
  assign addr   = (st == WR) ? 16'h2004 : {page, idx};
  assign we     = (st == WR);
endmodule
