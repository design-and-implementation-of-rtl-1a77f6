// tb_control_mux: self-checking test of a 4:1 control multiplexer.
// For random pairs of bus requests and all four grant codes: 01 must pass
// master 0 of the pair, 10 master 1, and 00 and 11 the idle (zero) request.
module tb_control_mux;
  import mpsoc_pkg::*;
  logic     g_lo, g_hi;
  bus_req_t in0, in1, out, expv;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  control_mux dut (.g_lo, .g_hi, .in0, .in1, .out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      in0 = bus_req_t'(45'({$urandom, $urandom}));
      in1 = bus_req_t'(45'({$urandom, $urandom}));
      {g_hi, g_lo} = 2'(n);
      case (n % 4)
        1: expv = in0;
        2: expv = in1;
        default: expv = '0;
      endcase
      #1;
      checks++;
      if (out !== expv) begin
        failures++; $display("FAIL g=%b%b out=%h exp %h", g_hi, g_lo, out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
