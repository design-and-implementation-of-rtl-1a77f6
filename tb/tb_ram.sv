// tb_ram: self-checking test of the RAM slave at its full default size.
// Writes random words (rd_wr = 0) to random in-range addresses while
// keeping a reference copy, then reads (rd_wr = 1) and compares; checks that
// read data appears one cycle after the read and then holds, that nothing
// is written or read while en is low, and that addresses at or above DEPTH
// read as zero and are not written.
module tb_ram;
  localparam int DEPTH = 768;
  logic        clk = 0, en, rd_wr;
  logic [9:0]  addr;
  logic [31:0] din, dout, held;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ram dut (.clk, .en, .rd_wr, .addr, .data_in(din), .data_out(dout));

  task automatic write(int ad, logic [31:0] d, bit enable = 1);
    @(negedge clk);
    en = enable; rd_wr = 0; addr = 10'(ad); din = d;
    @(posedge clk);
    if (enable && ad < DEPTH) begin model[ad] = d; end
  endtask

  task automatic read_check(int ad);
    logic [31:0] expv;
    @(negedge clk);
    en = 1; rd_wr = 1; addr = 10'(ad); din = $urandom;
    @(posedge clk); #1;
    expv = (ad < DEPTH) ? model[ad] : 32'h0;
    checks++;
    if (dout !== expv) begin
      failures++; $display("FAIL read addr=%0d dout=%h exp %h", ad, dout, expv);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ad;
    en = 0; rd_wr = 1; addr = 0; din = 0;
    // fill every word, then read every word back
    for (int i = 0; i < DEPTH; i++) write(i, $urandom);
    for (int i = 0; i < DEPTH; i++) read_check(i);
    // random mix
    for (int n = 0; n < 3000; n++) begin
      ad = $urandom_range(DEPTH - 1);
      if ($urandom_range(1)) write(ad, $urandom); else read_check(ad);
    end
    // write with en low must not land
    write(5, 32'hA5A5_0000 ^ model[5], 0);
    read_check(5);
    // read output holds while idle and while en is low
    read_check(7);
    held = dout;
    @(negedge clk) en = 0; rd_wr = 1; addr = 9;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dout !== held) begin failures++; $display("FAIL dout changed with en low"); end
    @(negedge clk) en = 1; rd_wr = 0; addr = 9; din = ~model[9];
    @(posedge clk); model[9] = din; #1;
    checks++;
    if (dout !== held) begin failures++; $display("FAIL dout changed on a write"); end
    // out-of-range: ignored write, zero read, no aliasing onto low words
    write(DEPTH, 32'hFFFF_FFFF);
    write(1023, 32'hFFFF_FFFF);
    read_check(DEPTH);
    read_check(1023);
    read_check(DEPTH - 512);
    read_check(1023 - 512);
    read_check(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
