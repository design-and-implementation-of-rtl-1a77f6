// tb_alu: self-checking test of the ALU's arithmetic and logic units.
//
// Drives every arithmetic and logic operation code with corner operands
// (0, 1, all ones, 0x8000) and random ones, and compares X and Y with a
// reference computed here in 64-bit arithmetic and truncated to 32 bits.
module tb_alu;
  import mpsoc_pkg::*;

  logic [15:0] a, b;
  arith_op_e   aop;
  logic_op_e   lop;
  logic [31:0] x, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.a, .b, .aop, .lop, .x, .y);

  function automatic logic [31:0] ref_x(logic [15:0] a, logic [15:0] b, logic [2:0] op);
    longint ua = longint'(a), ub = longint'(b);
    longint r;
    case (op)
      3'd0: r = ua + ub;
      3'd1: r = ua - ub;
      3'd2: r = ua * ub;
      3'd3: r = ua + 1;
      3'd4: r = ua - 1;
      3'd5: r = ub + 1;
      3'd6: r = ub - 1;
      default: r = ua;
    endcase
    return r[31:0];
  endfunction

  function automatic logic [31:0] ref_y(logic [15:0] a, logic [15:0] b, logic [1:0] op);
    case (op)
      2'd0: return {16'h0, a & b};
      2'd1: return {16'h0, a | b};
      2'd2: return {16'h0, a ^ b};
      default: return {16'hFFFF, ~a};
    endcase
  endfunction

  task automatic check_one(logic [15:0] ta, logic [15:0] tb_, logic [2:0] ao, logic [1:0] lo);
    a = ta; b = tb_; aop = arith_op_e'(ao); lop = logic_op_e'(lo);
    #1;
    checks++;
    if (x !== ref_x(ta, tb_, ao) || y !== ref_y(ta, tb_, lo)) begin
      failures++;
      $display("FAIL a=%h b=%h aop=%0d lop=%0d x=%h (exp %h) y=%h (exp %h)",
               ta, tb_, ao, lo, x, ref_x(ta, tb_, ao), y, ref_y(ta, tb_, lo));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [4] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000};
    for (int op = 0; op < 8; op++)
      foreach (corner[i]) foreach (corner[j])
        check_one(corner[i], corner[j], 3'(op), 2'(op));
    for (int n = 0; n < 2000; n++)
      check_one(16'($urandom), 16'($urandom), 3'($urandom), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
