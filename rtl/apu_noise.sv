// APU noise channel ($400C-$400F).
//   r0: length halt / envelope loop[5], constant volume[4], V[3:0]
//   r2: mode[7], period index[3:0];  r3: length index[7:3]
// A 15-bit linear feedback shift register (seeded with 1) shifts whenever the
// timer, reloaded from the NTSC noise period table, expires; the feedback is
// bit 0 xor bit 1, or bit 0 xor bit 6 in mode 1 (short, 93-step sequence). The
// output is the envelope volume while LFSR bit 0 is 0 and the length counter is
// non-zero. The timer counts CPU cycles with the tabled period.
module apu_noise
  import apu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       quarter,
  input  logic       half,
  input  logic       enable,
  input  logic [7:0] r0, r2, r3,
  input  logic       w3,
  output logic [3:0] sample,
  output logic       len_active
);
  logic [14:0] lfsr;
  logic [11:0] timer;
  logic [7:0]  len;
  logic [3:0]  volume;
  logic        fb;

  apu_envelope u_env (
    .clk, .rst, .ce, .quarter, .restart(w3), .loop(r0[5]), .const_vol(r0[4]),
    .v(r0[3:0]), .volume
  );

  assign fb         = lfsr[0] ^ (r2[7] ? lfsr[6] : lfsr[1]);
  assign sample     = (!lfsr[0] && len != 8'd0) ? volume : 4'd0;
  assign len_active = (len != 8'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr <= 15'd1; timer <= '0; len <= '0;
    end else if (ce) begin
      if (timer == 12'd0) begin
        timer <= noise_period(r2[3:0]) - 12'd1;
        lfsr  <= {fb, lfsr[14:1]};
      end else timer <= timer - 12'd1;
      if (half && !r0[5] && len != 8'd0) len <= len - 8'd1;
      if (w3 && enable) len <= length_table(r3[7:3]);
      if (!enable) len <= 8'd0;
    end
  end
endmodule
