// tb_flag_mux: self-checking test of control multiplexer 3 and its flag.
// Grants are driven one-hot or idle in random order. A reference flag is
// set by GNT0/GNT1, cleared by GNT2/GNT3 and otherwise kept; the output must
// be the first input when that flag is 1 and the second when it is 0, in
// the same cycle as the grant. Reset must clear the flag.
module tb_flag_mux;
  import mpsoc_pkg::*;
  logic       clk = 0, rst;
  logic [3:0] gnt;
  bus_req_t   in_lo, in_hi, out;
  logic       flag, ref_flag;
  int checks = 0, failures = 0;
  int n_set = 0, n_clr = 0, n_hold = 0;
  always #5 clk = ~clk;

  flag_mux dut (.clk, .rst, .gnt, .in_lo, .in_hi, .out, .flag);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; gnt = 0; in_lo = '0; in_hi = '0;
    @(posedge clk);
    @(negedge clk) rst = 0;
    ref_flag = 0;
    #1 checks++;
    if (flag !== 0) begin failures++; $display("FAIL flag after reset=%b", flag); end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      case ($urandom_range(4))
        0: gnt = 4'b0001;
        1: gnt = 4'b0010;
        2: gnt = 4'b0100;
        3: gnt = 4'b1000;
        default: gnt = 4'b0000;
      endcase
      in_lo = bus_req_t'(45'({$urandom, $urandom}));
      in_hi = bus_req_t'(45'({$urandom, $urandom}));
      if (gnt[0] || gnt[1]) begin ref_flag = 1; n_set++; end
      else if (gnt[2] || gnt[3]) begin ref_flag = 0; n_clr++; end
      else n_hold++;
      #1;
      checks++;
      if (flag !== ref_flag || out !== (ref_flag ? in_lo : in_hi)) begin
        failures++;
        $display("FAIL gnt=%b flag=%b exp %b", gnt, flag, ref_flag);
      end
    end
    if (n_set == 0 || n_clr == 0 || n_hold == 0) begin
      failures++; $display("FAIL a flag case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
