// tb_addr_decoder: self-checking test of the 2:4 address decoder.
// All slave numbers with valid high and low and random data: exactly the
// addressed slave is enabled and gets the data, the others get zero, and
// nothing is enabled without a bus owner.
module tb_addr_decoder;
  import mpsoc_pkg::*;
  logic             valid;
  logic [1:0]       slv;
  logic [31:0]      data;
  logic [3:0]       slv_en;
  logic [3:0][31:0] slv_data;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  addr_decoder dut (.valid, .slv, .data, .slv_en, .slv_data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      valid = (n % 8) < 4;
      slv = 2'(n);
      data = $urandom;
      #1;
      for (int s = 0; s < 4; s++) begin
        bit hit;
        hit = valid && (slv == 2'(s));
        checks++;
        if (slv_en[s] !== hit || slv_data[s] !== (hit ? data : 32'h0)) begin
          failures++;
          $display("FAIL valid=%b slv=%0d slave %0d en=%b data=%h", valid, slv, s, slv_en[s], slv_data[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
