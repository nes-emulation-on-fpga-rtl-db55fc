// Controller port of the 2A03 for two original NES controllers on GPIO.
// Writing bit 0 of $4016 drives the shared latch (strobe) line of both pads.
// A read of $4016 (pad 1) or $4017 (pad 2) returns the pad's serial data in
// bit 0 and then pulses that pad's clock line for one CPU cycle, which shifts
// the pad's next button onto its data line. Pad data is active low (a pressed
// button pulls the line low), so bit 0 reads 1 for a pressed button. Upper
// bits return $40, the usual open-bus value at these addresses. The register
// map is the NES one; the pin polarity handling is this design's.
module nes_ctrl_if (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       sel,          // $4016 / $4017 selected this cycle
  input  logic       a0,           // 0: $4016, 1: $4017
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       pad_latch,
  output logic       pad1_clk,
  output logic       pad2_clk,
  input  logic       pad1_data,
  input  logic       pad2_data
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pad_latch <= 1'b0; pad1_clk <= 1'b0; pad2_clk <= 1'b0; rdata <= 8'h40;
    end else if (ce) begin
      pad1_clk <= 1'b0;
      pad2_clk <= 1'b0;
      if (sel && we && !a0) pad_latch <= wdata[0];
      if (sel && !we) begin
        rdata <= {7'b0100000, a0 ? ~pad2_data : ~pad1_data};
        if (!a0) pad1_clk <= 1'b1; else pad2_clk <= 1'b1;
      end
    end
  end
endmodule
