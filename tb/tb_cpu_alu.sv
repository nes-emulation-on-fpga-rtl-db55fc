// Testbench of the registered ALU: random operands for every operation,
// compared with a reference model of the 6502 arithmetic written here; checks
// that results appear only after the clock edge and that HOLD keeps them.
`include "tb_check.svh"
module tb_cpu_alu;
  import cpu_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1, en = 0;
  alu_op_e op;
  logic [7:0] a, b, out;
  logic inv, cin, c, z, v;
  cpu_alu dut (.clk, .rst, .en, .op, .src1(a), .src2(b), .src2_invert(inv), .c_in(cin),
               .alu_out(out), .c_out(c), .z_out(z), .v_out(v));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  initial begin
    logic [7:0] bb, er; logic ec, ev; int s;
    op = ALU_ADD; a = 0; b = 0; inv = 0; cin = 0;
    repeat (2) @(posedge clk);
    rst = 0; en = 1;
    for (int i = 0; i < 2000; i++) begin
      a = 8'($urandom); b = 8'($urandom); inv = 1'($urandom); cin = 1'($urandom);
      op = alu_op_e'($urandom_range(0, 5));
      bb = inv ? ~b : b;
      ec = c; ev = v;
      case (op)
        ALU_ADD: begin s = int'(a) + int'(bb) + int'(cin); er = 8'(s); ec = s > 255;
                       ev = (a[7] == bb[7]) && (er[7] != a[7]); end
        ALU_XOR: er = a ^ bb;
        ALU_OR:  er = a | bb;
        ALU_AND: er = a & bb;
        ALU_SHL: begin er = {a[6:0], cin}; ec = a[7]; end
        default: begin er = {cin, a[7:1]}; ec = a[0]; end
      endcase
      @(posedge clk); #1;
      `CHECK(out == er, $sformatf("%s %h %h inv%0d cin%0d -> %h exp %h", op.name(), a, b, inv, cin, out, er))
      `CHECK(c == ec && v == ev && z == (er == 0), $sformatf("flags of %s", op.name()))
    end
    // hold keeps the outputs
    er = out;
    op = ALU_HOLD; a = 8'h55; b = 8'h11;
    @(posedge clk); #1;
    `CHECK(out == er, "HOLD keeps result")
    op = ALU_ADD; en = 0;
    @(posedge clk); #1;
    `CHECK(out == er, "disabled ALU keeps result")
    `TB_DONE
  end
endmodule
