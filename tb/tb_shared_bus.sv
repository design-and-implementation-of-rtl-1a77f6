// tb_shared_bus: self-checking test of the complete shared bus.
// Random request patterns and random bus requests from four masters.
// After each rising edge the reference grant is the lowest-numbered request
// of that edge; the slave side must then carry exactly that master's
// address, rd/wr and data, with only the addressed slave enabled, or no
// enable at all when nobody requested. Also checks the flag and counts that
// every master won the bus, that contention happened and that every slave
// was addressed.
module tb_shared_bus;
  import mpsoc_pkg::*;
  logic                  clk = 0, rst;
  logic [3:0]            req, gnt;
  bus_req_t [3:0]        mreq;
  logic                  flag;
  logic [3:0]            slv_en;
  logic                  slv_rd_wr;
  logic [9:0]            slv_addr;
  logic [3:0][31:0]      slv_data;
  int checks = 0, failures = 0;
  int won [4] = '{default: 0};
  int hit [4] = '{default: 0};
  int contention = 0;
  always #5 clk = ~clk;

  shared_bus dut (.clk, .rst, .req, .mreq, .gnt, .flag, .slv_en, .slv_rd_wr, .slv_addr, .slv_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, s;
    logic ref_flag;
    logic [3:0] exp_en;
    logic [3:0][31:0] exp_data;
    rst = 1; req = 0; mreq = '0;
    @(posedge clk);
    @(negedge clk) rst = 0;
    ref_flag = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req = 4'($urandom);
      if ($urandom_range(3) == 0) req = 4'(1 << $urandom_range(3));
      if ($countones(req) > 1) contention++;
      @(posedge clk);
      // new master contents for the granted cycle
      for (int i = 0; i < 4; i++) mreq[i] = bus_req_t'(45'({$urandom, $urandom}));
      #1;
      m = -1;
      for (int i = 3; i >= 0; i--) if (req[i]) m = i;
      checks++;
      if (gnt !== (m < 0 ? 4'b0 : 4'(1 << m))) begin
        failures++; $display("FAIL req=%b gnt=%b", req, gnt);
      end
      if (m == 0 || m == 1) ref_flag = 1;
      else if (m >= 2) ref_flag = 0;
      exp_en = '0; exp_data = '0;
      if (m >= 0) begin
        won[m]++;
        s = int'(mreq[m].addr[11:10]);
        hit[s]++;
        exp_en[s] = 1'b1;
        exp_data[s] = mreq[m].data;
      end
      checks++;
      if (slv_en !== exp_en || slv_data !== exp_data || flag !== ref_flag) begin
        failures++; $display("FAIL m=%0d slv_en=%b exp %b flag=%b", m, slv_en, exp_en, flag);
      end
      if (m >= 0) begin
        checks++;
        if (slv_addr !== mreq[m].addr[9:0] || slv_rd_wr !== mreq[m].rd_wr) begin
          failures++; $display("FAIL m=%0d addr=%h rd_wr=%b", m, slv_addr, slv_rd_wr);
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (won[i] == 0 || hit[i] == 0) begin
        failures++; $display("FAIL master %0d never won or slave %0d never hit", i, i);
      end
    end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention"); end
    $display("won %0d %0d %0d %0d, contention %0d", won[0], won[1], won[2], won[3], contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
