// tb_processor: self-checking test of one processor (ALU, control unit and
// PIPO register together).
// Operands and 6-bit select lines change on the falling edge; after the next
// rising edge P_OUT must equal the reference result of that operation,
// so the one-cycle latency is checked on every vector. Reset must clear P_OUT.
module tb_processor;
  import mpsoc_pkg::*;

  logic        clk = 0, rst;
  logic [15:0] a, b;
  proc_sel_t   sel;
  logic [31:0] p_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  processor dut (.clk, .rst, .a, .b, .sel, .p_out);

  // Reference: sel = {unit, lop[1:0], aop[2:0]}.
  function automatic logic [31:0] ref_out(logic [15:0] a, logic [15:0] b, logic [5:0] s);
    longint ua = longint'(a), ub = longint'(b), r;
    logic [31:0] za = {16'h0, a}, zb = {16'h0, b};
    if (s[5]) begin
      case (s[2:0])
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
    end
    case (s[4:3])
      2'd0: return za & zb;
      2'd1: return za | zb;
      2'd2: return za ^ zb;
      default: return ~za;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] s;
    rst = 1; a = 16'h1234; b = 16'h5678; sel = proc_sel_t'(6'b100000);
    @(posedge clk); #1;
    checks++;
    if (p_out !== 0) begin failures++; $display("FAIL reset p_out=%h", p_out); end
    @(negedge clk) rst = 0;
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; b = $urandom;
      s = (n < 64) ? 6'(n) : 6'($urandom);
      sel = proc_sel_t'(s);
      @(posedge clk); #1;
      checks++;
      if (p_out !== ref_out(a, b, s)) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b p_out=%h exp %h", a, b, s, p_out, ref_out(a, b, s));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
