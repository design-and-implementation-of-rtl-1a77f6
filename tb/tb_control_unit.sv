// tb_control_unit: self-checking test of the processor's 2:1 control unit.
// Random X and Y, both select levels; P_IN must equal X when unit_sel is 1
// and Y when it is 0.
module tb_control_unit;
  logic        unit_sel;
  logic [31:0] x, y, p_in;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  control_unit dut (.unit_sel, .x, .y, .p_in);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      x = $urandom; y = $urandom; unit_sel = n[0];
      #1;
      checks++;
      if (p_in !== (n[0] ? x : y)) begin
        failures++;
        $display("FAIL sel=%0b x=%h y=%h p_in=%h", unit_sel, x, y, p_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
