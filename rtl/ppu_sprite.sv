// Sprite pixel unit.
// Evaluation: during visible line L (starting at dot 1) a master-clock state
// machine scans the 64 OAM entries and copies the first MAX_SPR sprites whose
// rows cover line L+1 into a secondary list (Y difference, tile, attributes,
// X). A further sprite in range sets the overflow flag (the original part's
// buggy overflow search is not reproduced). Sprite 0's presence is remembered.
// Fetch: from dot 257 the pattern bytes of each listed sprite are read from the
// CHR memory (row chosen by the Y difference, vertical and horizontal flip and
// 8x16 mode applied) and moved into the active registers used on line L+1.
// Pixel: for the requested x the first active sprite (lowest OAM index) with a
// non-transparent pixel at x wins; outputs sp_pixel = {palette, colour},
// its priority bit (1 = behind background) and whether it is sprite 0.
// Sprites are never shown on line 0, as in the original part.
module ppu_sprite #(
  parameter int unsigned MAX_SPR = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_ppu,
  input  logic [8:0]  line,
  input  logic [8:0]  dot,
  input  logic        rendering,
  input  logic        spr_table,     // PPUCTRL[3]
  input  logic        spr_16,        // PPUCTRL[5]
  // OAM port A
  output logic [7:0]  oam_addr,
  input  logic [7:0]  oam_rdata,
  // CHR port B (while fetching)
  output logic        fetching,
  output logic [12:0] chr_addr,
  input  logic [7:0]  chr_rdata,
  // pixel query
  input  logic [7:0]  x,
  output logic [3:0]  sp_pixel,
  output logic        sp_priority,
  output logic        sp_zero,
  output logic        overflow       // pulse: overflow found
);
  localparam int unsigned SW = $clog2(MAX_SPR + 1);

  // secondary list built by evaluation
  logic [3:0]  s_row  [MAX_SPR];
  logic [7:0]  s_tile [MAX_SPR];
  logic [7:0]  s_attr [MAX_SPR];
  logic [7:0]  s_x    [MAX_SPR];
  logic [SW-1:0] s_cnt;
  logic        s_zero;

  // active registers for the line being drawn
  logic [7:0]  a_lo   [MAX_SPR];
  logic [7:0]  a_hi   [MAX_SPR];
  logic [7:0]  a_attr [MAX_SPR];
  logic [7:0]  a_x    [MAX_SPR];
  logic [MAX_SPR-1:0] a_valid;
  logic        a_zero;

  // ---------------- evaluation ----------------
  typedef enum logic [2:0] {E_IDLE, E_Y, E_CHK, E_B1, E_B2, E_B3, E_DONE} est_e;
  est_e       est;
  logic [5:0] n;
  logic [8:0] diff;
  logic [4:0] h;
  logic       in_range;
  logic [7:0] fy;          // Y byte of the sprite being checked
  logic [1:0] fb;          // byte index being requested

  assign h        = spr_16 ? 5'd16 : 5'd8;
  assign diff     = line - {1'b0, fy};
  assign in_range = (line >= {1'b0, fy}) && (diff < {4'd0, h});

  // ---------------- fetch ----------------
  typedef enum logic [1:0] {F_IDLE, F_LO, F_HI, F_DONE} fst_e;
  fst_e       fst;
  logic [SW-1:0] fi;
  logic [7:0] f_lo [MAX_SPR];
  logic [7:0] f_hi [MAX_SPR];

  always_comb begin
    oam_addr = {n, fb};
  end

  // pattern address of list entry fi
  logic [3:0]  row;
  logic [7:0]  ftile;
  logic        ftable;
  always_comb begin
    row    = s_attr[fi[$clog2(MAX_SPR)-1:0]][7] ? ((spr_16 ? 4'd15 : 4'd7) - s_row[fi[$clog2(MAX_SPR)-1:0]])
                                                 : s_row[fi[$clog2(MAX_SPR)-1:0]];
    ftile  = s_tile[fi[$clog2(MAX_SPR)-1:0]];
    ftable = spr_table;
    if (spr_16) begin
      ftable = ftile[0];
      ftile  = {ftile[7:1], row[3]};
    end
    chr_addr = {ftable, ftile, fst == F_HI, row[2:0]};
  end
  assign fetching = (fst == F_LO || fst == F_HI);

  function automatic logic [7:0] rev(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev[i] = b[7-i];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      est <= E_IDLE; n <= '0; fb <= '0; fy <= '0; s_cnt <= '0; s_zero <= 1'b0;
      fst <= F_IDLE; fi <= '0; a_valid <= '0; a_zero <= 1'b0; overflow <= 1'b0;
      for (int i = 0; i < MAX_SPR; i++) begin
        s_row[i] <= '0; s_tile[i] <= '0; s_attr[i] <= '0; s_x[i] <= '0;
        a_lo[i] <= '0; a_hi[i] <= '0; a_attr[i] <= '0; a_x[i] <= '0;
        f_lo[i] <= '0; f_hi[i] <= '0;
      end
    end else begin
      overflow <= 1'b0;
      // ---- evaluation state machine (master clock) ----
      unique case (est)
        E_IDLE: if (ce_ppu && rendering && line < 9'd240 && dot == 9'd0) begin
          n <= '0; fb <= 2'd0; s_cnt <= '0; s_zero <= 1'b0; est <= E_Y;
        end
        E_Y:   est <= E_CHK;                 // OAM read of Y in flight
        E_CHK: begin
          fy <= oam_rdata;
          est <= E_B1;
        end
        E_B1: begin
          if (in_range) begin
            if (s_cnt == SW'(MAX_SPR)) begin
              overflow <= 1'b1; est <= E_DONE;
            end else begin
              s_row[s_cnt[$clog2(MAX_SPR)-1:0]] <= diff[3:0];
              if (n == 6'd0) s_zero <= 1'b1;
              fb <= 2'd1; est <= E_B2;
            end
          end else if (n == 6'd63) est <= E_DONE;
          else begin n <= n + 6'd1; fb <= 2'd0; est <= E_Y; end
        end
        E_B2: begin fb <= 2'd2; est <= E_B3; end
        E_B3: begin
          // bytes arrive one cycle after their address
          if (fb == 2'd2) begin s_tile[s_cnt[$clog2(MAX_SPR)-1:0]] <= oam_rdata; fb <= 2'd3; end
          else if (fb == 2'd3) begin s_attr[s_cnt[$clog2(MAX_SPR)-1:0]] <= oam_rdata; fb <= 2'd0; end
          else begin
            s_x[s_cnt[$clog2(MAX_SPR)-1:0]] <= oam_rdata;
            s_cnt <= s_cnt + 1'b1;
            if (n == 6'd63) est <= E_DONE;
            else begin n <= n + 6'd1; est <= E_Y; end
          end
        end
        E_DONE: if (ce_ppu && dot == 9'd340) est <= E_IDLE;
        default: est <= E_IDLE;
      endcase

      // ---- pattern fetch (from dot 257) ----
      unique case (fst)
        F_IDLE: if (ce_ppu && dot == 9'd256 && line < 9'd240) begin fi <= '0; fst <= F_LO; end
        F_LO: begin
          if (fi > '0 && fi <= SW'(MAX_SPR))
            f_hi[fi[$clog2(MAX_SPR)-1:0] - 1'b1] <= chr_rdata;
          if (fi == SW'(MAX_SPR)) fst <= F_DONE;
          else fst <= F_HI;
        end
        F_HI: begin
          f_lo[fi[$clog2(MAX_SPR)-1:0]] <= chr_rdata;
          fi <= fi + 1'b1;
          fst <= F_LO;
        end
        F_DONE: begin
          for (int i = 0; i < MAX_SPR; i++) begin
            a_lo[i]   <= s_attr[i][6] ? rev(f_lo[i]) : f_lo[i];
            a_hi[i]   <= s_attr[i][6] ? rev(f_hi[i]) : f_hi[i];
            a_attr[i] <= s_attr[i];
            a_x[i]    <= s_x[i];
            a_valid[i] <= rendering && (SW'(i) < s_cnt);
          end
          a_zero <= s_zero;
          fst <= F_IDLE;
        end
        default: fst <= F_IDLE;
      endcase
      // nothing is drawn on the line after the last visible one / before line 0
      if (ce_ppu && line == 9'd261 && dot == 9'd340) a_valid <= '0;
    end
  end

  // ---------------- pixel selection ----------------
  always_comb begin
    sp_pixel    = 4'd0;
    sp_priority = 1'b0;
    sp_zero     = 1'b0;
    for (int i = MAX_SPR - 1; i >= 0; i--) begin
      logic [8:0] off;
      logic [2:0] b;
      off = {1'b0, x} - {1'b0, a_x[i]};
      b   = 3'd7 - off[2:0];
      if (a_valid[i] && off < 9'd8 && {a_hi[i][b], a_lo[i][b]} != 2'b00) begin
        sp_pixel    = {a_attr[i][1:0], a_hi[i][b], a_lo[i][b]};
        sp_priority = a_attr[i][5];
        sp_zero     = (i == 0) && a_zero;
      end
    end
  end
endmodule
