// 8-bit ALU of the 6502-compatible CPU.
// Operations: add (with carry in), xor, or, and, shift left, shift right and
// hold. Source 2 can be inverted, which together with carry in = 1 gives
// subtraction and comparison. Shift left takes its new bit 0 from carry in and
// shift right its new bit 7 from carry in, so ROL/ROR/ASL/LSR share the two ops.
// As in the design description, the ALU is not combinational: every output is
// registered on a clock-enabled edge, and HOLD (or en = 0) keeps them steady.
// Interface: en is the CPU clock enable; results appear one CPU cycle after
// the operands are presented.
module cpu_alu
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  alu_op_e    op,
  input  logic [7:0] src1,
  input  logic [7:0] src2,
  input  logic       src2_invert,
  input  logic       c_in,
  output logic [7:0] alu_out,
  output logic       c_out,
  output logic       z_out,
  output logic       v_out
);
  logic [7:0] b;
  logic [8:0] sum;
  logic [7:0] r;
  logic       c, v;

  always_comb begin
    b   = src2_invert ? ~src2 : src2;
    sum = {1'b0, src1} + {1'b0, b} + {8'd0, c_in};
    r   = alu_out;
    c   = c_out;
    v   = v_out;
    unique case (op)
      ALU_ADD: begin r = sum[7:0]; c = sum[8];
                     v = (src1[7] == b[7]) && (sum[7] != src1[7]); end
      ALU_XOR: r = src1 ^ b;
      ALU_OR:  r = src1 | b;
      ALU_AND: r = src1 & b;
      ALU_SHL: begin r = {src1[6:0], c_in}; c = src1[7]; end
      ALU_SHR: begin r = {c_in, src1[7:1]}; c = src1[0]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      alu_out <= '0; c_out <= 1'b0; z_out <= 1'b1; v_out <= 1'b0;
    end else if (en && op != ALU_HOLD) begin
      alu_out <= r;
      c_out   <= c;
      v_out   <= v;
      z_out   <= (r == 8'd0);
    end
  end
endmodule
