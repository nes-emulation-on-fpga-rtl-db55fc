// Non-linear APU mixer as two lookup tables, standing in for the NES's
// resistor-network DACs so that a single DAC (the board's audio codec) can play
// the result. The pulse pair is looked up by p1+p2 (0..30) and the
// triangle/noise/DMC group by 3*t + 2*n + d (0..202), using the usual fits of
// the NES output stage:
//   pulse(n) = 95.52 / (8128/n + 100)
//   tnd(n)   = 163.67 / (24329/n + 100)
// Both tables are computed at elaboration and scaled so that their sum spans
// 0..OUT_MAX. The DMC input exists for completeness and is tied to 0 by the
// APU, which has no DMC. The output is registered on the CPU enable.
module apu_mixer #(
  parameter int unsigned OUT_BITS = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic [3:0]          pulse1,
  input  logic [3:0]          pulse2,
  input  logic [3:0]          triangle,
  input  logic [3:0]          noise,
  input  logic [6:0]          dmc,
  output logic [OUT_BITS-1:0] sample
);
  localparam real FULL = 95.52 / (8128.0 / 30.0 + 100.0) + 163.67 / (24329.0 / 202.0 + 100.0);
  localparam real OUT_MAX = (2.0 ** OUT_BITS) - 1.0;

  typedef logic [OUT_BITS-1:0] lut_t;

  function automatic lut_t pulse_entry(input int n);
    real r;
    if (n == 0) return '0;
    r = 95.52 / (8128.0 / real'(n) + 100.0);
    return lut_t'(int'(r / FULL * OUT_MAX));
  endfunction
  function automatic lut_t tnd_entry(input int n);
    real r;
    if (n == 0) return '0;
    r = 163.67 / (24329.0 / real'(n) + 100.0);
    return lut_t'(int'(r / FULL * OUT_MAX));
  endfunction

  lut_t pulse_lut [31];
  lut_t tnd_lut   [203];
  initial begin
    for (int i = 0; i < 31; i++)  pulse_lut[i] = pulse_entry(i);
    for (int i = 0; i < 203; i++) tnd_lut[i]   = tnd_entry(i);
  end

  logic [4:0] pidx;
  logic [7:0] tidx;
  logic [OUT_BITS:0] sum;
  assign pidx = 5'(pulse1) + 5'(pulse2);
  assign tidx = 8'(3 * triangle) + 8'(2 * noise) + 8'(dmc);
  assign sum  = {1'b0, pulse_lut[pidx]} + {1'b0, tnd_lut[tidx]};

  always_ff @(posedge clk) begin
    if (rst) sample <= '0;
    else if (ce) sample <= sum[OUT_BITS] ? '1 : sum[OUT_BITS-1:0];
  end
endmodule
