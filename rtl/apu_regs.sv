// APU register array ($4000-$4013). CPU writes land in an array of registers;
// the channels see a second, registered copy and a one-cycle write strobe per
// register, so they observe a write one CPU cycle after it happened. This is
// the APU's deliberate decoupling from the CPU; the frame counter ($4017) and
// status ($4015) registers are written directly and are not held here.
// Interface: sel/addr/we/wdata are the CPU bus in the cycle of the write;
// regs_q holds the 20 registers, wr_q[i] pulses (one CPU enable long) after a
// write to $4000+i.
module apu_regs (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       sel,
  input  logic [4:0] addr,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] regs_q [20],
  output logic [19:0] wr_q
);
  logic [7:0]  regs [20];
  logic [19:0] wr;
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 20; i++) begin regs[i] <= '0; regs_q[i] <= '0; end
      wr <= '0; wr_q <= '0;
    end else if (ce) begin
      wr <= '0;
      if (sel && we && addr < 5'd20) begin
        regs[addr] <= wdata;
        wr[addr]   <= 1'b1;
      end
      regs_q <= regs;
      wr_q   <= wr;
    end
  end
endmodule
