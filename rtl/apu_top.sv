// Audio processing unit: register array, status register, frame counter,
// two pulse channels, triangle, noise and the non-linear mixer. The DMC channel
// is not present (its mixer input is 0 and its status bits read 0).
// CPU interface: $4000-$4013 go through the delayed register array, $4015 is
// the status register, $4017 goes straight to the frame counter. The pulse and
// noise timers run on APU cycles (every second CPU cycle), the triangle timer
// on every CPU cycle. irq is the frame counter interrupt. `sample` is the
// mixed 16-bit output, updated once per CPU cycle, for the audio codec.
module apu_top (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        sel,
  input  logic [4:0]  addr,       // CPU address bits 4:0 within $4000-$401F
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        irq,
  output logic [15:0] sample,
  output logic [3:0]  ch_pulse1,
  output logic [3:0]  ch_pulse2,
  output logic [3:0]  ch_triangle,
  output logic [3:0]  ch_noise
);
  logic [7:0]  r [20];
  logic [19:0] w;
  logic        apu_cycle;
  logic        quarter, half;
  logic [3:0]  enables, len_active;
  logic        clr_irq;

  always_ff @(posedge clk) begin
    if (rst) apu_cycle <= 1'b0;
    else if (ce) apu_cycle <= ~apu_cycle;
  end

  apu_regs u_regs (.clk, .rst, .ce, .sel, .addr, .we, .wdata, .regs_q(r), .wr_q(w));

  apu_status u_status (
    .clk, .rst, .ce, .sel(sel && addr == 5'h15), .we, .wdata, .len_active,
    .frame_irq(irq), .enables, .rdata, .clr_frame_irq(clr_irq)
  );

  apu_frame_counter u_fc (
    .clk, .rst, .ce, .wr_4017(sel && we && addr == 5'h17), .wdata, .clr_irq,
    .quarter, .half, .irq
  );

  apu_pulse #(.CHANNEL(1)) u_p1 (
    .clk, .rst, .ce, .apu_cycle, .quarter, .half, .enable(enables[0]),
    .r0(r[0]), .r1(r[1]), .r2(r[2]), .r3(r[3]), .w1(w[1]), .w2(w[2]), .w3(w[3]),
    .sample(ch_pulse1), .len_active(len_active[0])
  );
  apu_pulse #(.CHANNEL(2)) u_p2 (
    .clk, .rst, .ce, .apu_cycle, .quarter, .half, .enable(enables[1]),
    .r0(r[4]), .r1(r[5]), .r2(r[6]), .r3(r[7]), .w1(w[5]), .w2(w[6]), .w3(w[7]),
    .sample(ch_pulse2), .len_active(len_active[1])
  );
  apu_triangle u_tri (
    .clk, .rst, .ce, .quarter, .half, .enable(enables[2]),
    .r0(r[8]), .r2(r[10]), .r3(r[11]), .w3(w[11]),
    .sample(ch_triangle), .len_active(len_active[2])
  );
  apu_noise u_noise (
    .clk, .rst, .ce, .quarter, .half, .enable(enables[3]),
    .r0(r[12]), .r2(r[14]), .r3(r[15]), .w3(w[15]),
    .sample(ch_noise), .len_active(len_active[3])
  );
  apu_mixer u_mix (
    .clk, .rst, .ce, .pulse1(ch_pulse1), .pulse2(ch_pulse2), .triangle(ch_triangle),
    .noise(ch_noise), .dmc(7'd0), .sample
  );
endmodule
