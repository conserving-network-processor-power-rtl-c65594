// tb_alu: self-checking test of the 32-bit PE ALU.
// Applies directed corner operands and random operands to every operation and
// compares y with a reference computed here. The ALU is combinational and must
// settle within the cycle (one-cycle latency), so results are checked one
// clock period after the operands change.
module tb_alu;
  import np_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_e op;
  logic [31:0] a, b, y;

  alu #(.W(32)) dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_NOT: return ~x;
      ALU_XOR: return x ^ z;
      ALU_ADD: return 32'(64'(x) + 64'(z));
      ALU_SUB: return 32'(64'(x) + 64'(~z) + 64'd1);
      default: return '0;
    endcase
  endfunction

  task automatic apply(alu_op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z;
    @(posedge clk);
    checks++;
    if (y !== ref_alu(o, x, z)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, ref_alu(o, x, z));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[6] = '{ALU_AND, ALU_OR, ALU_NOT, ALU_XOR, ALU_ADD, ALU_SUB};
    foreach (ops[i]) begin
      apply(ops[i], 32'hFFFF_FFFF, 32'h0000_0001);
      apply(ops[i], 32'h0000_0000, 32'h0000_0001);
      apply(ops[i], 32'h8000_0000, 32'h8000_0000);
      apply(ops[i], 32'h1234_5678, 32'h0F0F_0F0F);
    end
    // explicit values worked out by hand
    op = ALU_ADD; a = 32'hFFFF_FFFF; b = 32'd2; @(posedge clk);
    checks++; if (y !== 32'd1) begin failures++; $display("FAIL add wrap"); end
    op = ALU_SUB; a = 32'd3; b = 32'd5; @(posedge clk);
    checks++; if (y !== 32'hFFFF_FFFE) begin failures++; $display("FAIL sub borrow"); end
    op = ALU_NOT; a = 32'h0F0F_0000; b = 32'hFFFF_FFFF; @(posedge clk);
    checks++; if (y !== 32'hF0F0_FFFF) begin failures++; $display("FAIL not"); end
    for (int i = 0; i < 3000; i++)
      apply(ops[$urandom_range(5)], $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
