// Game loader: copies one game from the board SRAM into the cartridge block
// RAMs. The SRAM (16-bit words, 1 M words = 2 MB) holds up to 16 games, one per
// 128 KB slot; the slot is chosen by four switches. After reset, and again on
// each press of the load key, the loader holds the console in reset, reads the
// selected slot and writes its PRG and CHR bytes into the block RAMs, then
// releases the console, which starts from the game's reset vector.
// Slot layout (this design's choice): word 0 holds the header flags
// {prg16, mirror_v} in bits 1:0; PRG bytes start at word $0100 (16 K words,
// low byte first); CHR bytes start at word $4100 (4 K words).
// SRAM timing: one master clock (46 ns) per read, ample for a 10 ns SRAM; each
// word takes three cycles (address, low byte, high byte).
module game_loader #(
  parameter int unsigned SLOTS     = 16,
  parameter int unsigned PRG_WORDS = 16384,
  parameter int unsigned CHR_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [$clog2(SLOTS)-1:0] game_sel,
  input  logic        load_key,       // synchronised, active high
  // SRAM (read only)
  output logic [19:0] sram_addr,
  input  logic [15:0] sram_dq,
  output logic        sram_oe_n,
  // cartridge load port
  output logic        ld_prg_we,
  output logic        ld_chr_we,
  output logic [14:0] ld_addr,
  output logic [7:0]  ld_data,
  output logic        ld_flags_we,
  output logic [1:0]  ld_flags,
  output logic        busy            // console held in reset
);
  localparam int unsigned SLOT_WORDS_LOG2 = 20 - $clog2(SLOTS);
  localparam logic [15:0] PRG_BASE = 16'h0100;
  localparam logic [15:0] CHR_BASE = 16'h0100 + 16'(PRG_WORDS);

  typedef enum logic [2:0] {IDLE, FLAGS, ADDR, LO, HI} st_e;
  st_e         st;
  logic        chr_phase;
  logic [15:0] word;
  logic [15:0] q;
  logic        key_q;
  logic [$clog2(SLOTS)-1:0] slot;

  logic [15:0] base;
  assign base      = chr_phase ? CHR_BASE : PRG_BASE;
  assign sram_addr = (st == FLAGS) ? {slot, {SLOT_WORDS_LOG2{1'b0}}}
                                   : {slot, SLOT_WORDS_LOG2'(base + word)};
  assign sram_oe_n = (st == IDLE);
  assign busy      = (st != IDLE) || ld_prg_we || ld_chr_we;   // until the last byte is written

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= FLAGS; chr_phase <= 1'b0; word <= '0; q <= '0; key_q <= 1'b0;
      slot <= game_sel;
      ld_prg_we <= 1'b0; ld_chr_we <= 1'b0; ld_addr <= '0; ld_data <= '0;
      ld_flags_we <= 1'b0; ld_flags <= '0;
    end else begin
      key_q       <= load_key;
      ld_prg_we   <= 1'b0;
      ld_chr_we   <= 1'b0;
      ld_flags_we <= 1'b0;
      unique case (st)
        IDLE: if (load_key && !key_q) begin
          slot <= game_sel; st <= FLAGS; chr_phase <= 1'b0; word <= '0;
        end
        FLAGS: begin
          ld_flags <= sram_dq[1:0]; ld_flags_we <= 1'b1; st <= ADDR;
        end
        ADDR: begin q <= sram_dq; st <= LO; end
        LO: begin
          ld_addr <= {word[13:0], 1'b0}; ld_data <= q[7:0];
          ld_prg_we <= !chr_phase; ld_chr_we <= chr_phase; st <= HI;
        end
        HI: begin
          ld_addr <= {word[13:0], 1'b1}; ld_data <= q[15:8];
          ld_prg_we <= !chr_phase; ld_chr_we <= chr_phase;
          st <= ADDR;
          if (!chr_phase && word == 16'(PRG_WORDS - 1)) begin
            chr_phase <= 1'b1; word <= '0;
          end else if (chr_phase && word == 16'(CHR_WORDS - 1)) begin
            st <= IDLE; word <= '0;
          end else word <= word + 16'd1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
