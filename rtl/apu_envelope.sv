// Envelope generator shared by the pulse and noise channels. On a quarter-frame
// clock after a restart it loads decay level 15; otherwise a divider of period
// V+1 decrements the decay level, which wraps to 15 when the loop flag is set.
// The output volume is V itself in constant-volume mode, else the decay level.
module apu_envelope (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       quarter,
  input  logic       restart,      // write to the channel's fourth register
  input  logic       loop,
  input  logic       const_vol,
  input  logic [3:0] v,
  output logic [3:0] volume
);
  logic       start;
  logic [3:0] div, decay;
  always_ff @(posedge clk) begin
    if (rst) begin
      start <= 1'b0; div <= '0; decay <= '0;
    end else if (ce) begin
      if (restart) start <= 1'b1;
      if (quarter) begin
        if (start || restart) begin
          start <= 1'b0; decay <= 4'd15; div <= v;
        end else if (div == 4'd0) begin
          div <= v;
          if (decay != 4'd0) decay <= decay - 4'd1;
          else if (loop) decay <= 4'd15;
        end else div <= div - 4'd1;
      end
    end
  end
  assign volume = const_vol ? v : decay;
endmodule
