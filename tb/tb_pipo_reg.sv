// tb_pipo_reg: self-checking test of the 32-bit PIPO register.
// Checks that reset clears P_OUT, that P_OUT shows exactly the P_IN of the
// previous rising edge (one cycle of latency) and that it does not change
// between edges.
module tb_pipo_reg;
  logic        clk = 0, rst;
  logic [31:0] p_in, p_out, prev;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pipo_reg dut (.clk, .rst, .p_in, .p_out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; p_in = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    checks++;
    if (p_out !== 32'h0) begin failures++; $display("FAIL reset p_out=%h", p_out); end
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      prev = p_in;
      p_in = $urandom;
      checks++;  // input changed mid-cycle: output must not follow yet
      #1 if (p_out !== (n == 0 ? 32'h0 : prev)) begin
        failures++; $display("FAIL between edges p_out=%h", p_out);
      end
      @(posedge clk); #1;
      checks++;
      if (p_out !== p_in) begin
        failures++; $display("FAIL load p_out=%h exp %h", p_out, p_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
