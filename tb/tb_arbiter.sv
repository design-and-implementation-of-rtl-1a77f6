// tb_arbiter: self-checking test of the fixed-priority arbiter.
// Requests change on the falling edge; after each rising edge the grant
// must be the one-hot code of the lowest-numbered active request of that
// edge (REQ0 highest), or zero with no request. Covers all 16 request
// patterns, reset, and a low-priority master losing the bus to a
// higher-priority one at the next edge.
// A second arbiter built with ROUND_ROBIN = 1 runs on the same requests and
// is checked against a round-robin reference that starts its search just
// after the last master it granted.
module tb_arbiter;
  logic       clk = 0, rst;
  logic [3:0] req, gnt, gnt_rr;
  int         rr_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  arbiter dut (.clk, .rst, .req, .gnt);
  arbiter #(.ROUND_ROBIN(1'b1)) dut_rr (.clk, .rst, .req, .gnt(gnt_rr));

  function automatic logic [3:0] rr(logic [3:0] r, int last);
    for (int k = 1; k <= 4; k++)
      if (r[(last + k) % 4]) return 4'(1 << ((last + k) % 4));
    return 4'b0000;
  endfunction

  function automatic logic [3:0] prio(logic [3:0] r);
    if (r[0]) return 4'b0001;
    if (r[1]) return 4'b0010;
    if (r[2]) return 4'b0100;
    if (r[3]) return 4'b1000;
    return 4'b0000;
  endfunction

  task automatic step(logic [3:0] r);
    @(negedge clk) req = r;
    @(posedge clk); #1;
    checks++;
    if (gnt !== prio(r)) begin
      failures++; $display("FAIL req=%b gnt=%b exp %b", r, gnt, prio(r));
    end
    checks++;
    if (gnt_rr !== rr(r, rr_last)) begin
      failures++; $display("FAIL round robin req=%b gnt=%b exp %b", r, gnt_rr, rr(r, rr_last));
    end
    for (int i = 0; i < 4; i++) if (rr(r, rr_last)[i]) begin rr_last = i; break; end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; req = 4'hF;
    @(posedge clk); #1;
    checks++;
    if (gnt !== 0) begin failures++; $display("FAIL reset gnt=%b", gnt); end
    @(negedge clk) rst = 0;
    rr_last = 3;
    for (int r = 0; r < 16; r++) step(4'(r));
    // pre-emption: master 3 holds the bus, master 1 arrives
    step(4'b1000); step(4'b1010); step(4'b1000);
    for (int n = 0; n < 500; n++) step(4'($urandom));
    // all four requesting: fixed priority keeps master 0, round robin
    // serves 0, 1, 2, 3 in turn
    for (int n = 0; n < 8; n++) step(4'b1111);
    // reset in mid-operation
    @(negedge clk) rst = 1; req = 4'b0100;
    @(posedge clk); #1;
    checks++;
    if (gnt !== 0) begin failures++; $display("FAIL reset gnt=%b", gnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
