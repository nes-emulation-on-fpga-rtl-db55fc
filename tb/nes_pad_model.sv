// Behavioural model of an original NES controller (a 4021 shift register):
// while latch is high the buttons are loaded; each rising clock edge shifts the
// next button to the data pin. Data is active low. Order: A, B, Select,
// Start, Up, Down, Left, Right (buttons[0] first).
module nes_pad_model (
  input  logic       latch,
  input  logic       clk,
  input  logic [7:0] buttons,
  output logic       data
);
  logic [7:0] sr = 8'h00;
  always @(posedge clk or posedge latch) begin
    if (latch) sr <= buttons;
    else sr <= {1'b1, sr[7:1]};
  end
  always_comb if (latch) data = ~buttons[0]; else data = ~sr[0];
endmodule
