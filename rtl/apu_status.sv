// APU status register ($4015).
// Write: bits 3:0 enable noise, triangle, pulse 2 and pulse 1 (bit 4, the DMC
// enable, is accepted but there is no DMC). A cleared enable forces the
// channel's length counter to zero. Read: bits 3:0 report which length
// counters are non-zero, bit 6 the frame interrupt flag; the read also clears
// that flag (clr_frame_irq). Read data is registered on the CPU enable.
module apu_status (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       sel,         // $4015 selected
  input  logic       we,
  input  logic [7:0] wdata,
  input  logic [3:0] len_active,  // {noise, triangle, pulse2, pulse1}
  input  logic       frame_irq,
  output logic [3:0] enables,
  output logic [7:0] rdata,
  output logic       clr_frame_irq
);
  always_ff @(posedge clk) begin
    if (rst) begin
      enables <= '0; rdata <= '0;
    end else if (ce && sel) begin
      if (we) enables <= wdata[3:0];
      else    rdata   <= {1'b0, frame_irq, 2'b00, len_active};
    end
  end
  assign clr_frame_irq = ce && sel && !we;
endmodule
