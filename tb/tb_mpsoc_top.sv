// tb_mpsoc_top: end-to-end self-checking test of the four-master,
// four-slave shared-bus MPSoC at its default size (768-word RAMs).
//
// Each master runs its own list of operations. For one operation it sets
// its operands, select lines, bus address and rd/wr, waits one cycle for its
// PIPO register to hold the result, raises its request and keeps everything
// steady until it sees its grant; during the granted cycle it drops the
// request, and moves on after that cycle ends. A write stores the reference
// result of the processor's operation in a reference copy of the four RAMs;
// a read expects the reference word on that slave's DTOUT one cycle after
// the grant. Every cycle the grant is checked against fixed priority over
// the previous edge's requests, and the bus flag against its set/clear rule.
//
// The first operations replay the operands and request order printed in
// the simulation figure of the design description (processor 1 requests
// alone, the bus goes idle, then processor 2 requests); where the results
// are written is this test's own choice.
//
// Counted mechanisms, each of which must occur: a grant to every master,
// contention (several requests at once), a waiting master, flag set and
// flag clear, an idle bus cycle, writes and reads on every slave, both ALU
// units, and reads and writes above the RAM depth.
module tb_mpsoc_top;
  import mpsoc_pkg::*;

  localparam int DEPTH = 768;
  localparam int OPS   = 400;   // operations per master after the replay

  logic clk = 0, rst;
  logic      [3:0][15:0] a, b;
  proc_sel_t [3:0]       sel;
  logic      [3:0]       req;
  logic      [3:0][11:0] addr;
  logic      [3:0]       rd_wr;
  logic      [3:0][31:0] p_out;
  logic      [3:0]       gnt;
  logic                  flag;
  logic      [3:0][31:0] dtout;

  mpsoc_top dut (.clk, .rst, .a, .b, .sel, .req, .addr, .rd_wr, .p_out, .gnt, .flag, .dtout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference memory
  logic [31:0] model   [4][1024];
  bit          written [4][1024];

  // mechanism counters
  int n_grant [4] = '{default: 0};
  int n_wr    [4] = '{default: 0};
  int n_rd    [4] = '{default: 0};
  int n_contention = 0, n_wait = 0, n_flag_set = 0, n_flag_clr = 0, n_idle = 0;
  int n_arith = 0, n_logic = 0, n_oor_wr = 0, n_oor_rd = 0;

  // per-master sequencer
  typedef enum logic [1:0] {S_SETUP, S_SETTLE, S_REQ, S_DONE} mstate_e;
  mstate_e     st     [4];
  int          op_cnt [4];
  logic [31:0] exp_res[4];

  // read checks pending after the current edge
  bit          rd_pend;
  int          rd_slv;
  logic [31:0] rd_exp;

  // figure replay: operands of processors 1..4 (a0..a3, b0..b3)
  localparam logic [15:0] FIG_A [4] = '{16'b1100001101011110, 16'b1100001100011110,
                                        16'b1000101100001010, 16'b0011001111011110};
  localparam logic [15:0] FIG_B [4] = '{16'b1110010011010011, 16'b1010010010000011,
                                        16'b1001110001011111, 16'b1101011011010011};

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

  // pick and drive a new operation for master m
  task automatic setup_op(int m);
    int s, w;
    bit do_read;
    logic [5:0] sv;
    a[m] = 16'($urandom); b[m] = 16'($urandom);
    sv = 6'($urandom);
    s = $urandom_range(3);
    w = $urandom_range(DEPTH - 1);
    do_read = $urandom_range(2) == 0;
    if ($urandom_range(40) == 0) w = DEPTH + $urandom_range(1023 - DEPTH);
    if (do_read && w < DEPTH && !written[s][w]) begin
      // read something known instead
      for (int k = 0; k < DEPTH; k++) if (written[s][k]) begin w = k; break; end
      if (!written[s][w]) do_read = 0;
    end
    sel[m]   = proc_sel_t'(sv);
    addr[m]  = {2'(s), 10'(w)};
    rd_wr[m] = do_read;
    exp_res[m] = ref_out(a[m], b[m], sv);
    if (sv[5]) n_arith++; else n_logic++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] req_at_edge;
    logic       ref_flag;
    int         winner, s, w;
    bit         all_done;

    rst = 1; req = 0; rd_wr = '1; addr = '0; a = '0; b = '0; sel = '0;
    rd_pend = 0;
    foreach (st[m]) begin st[m] = S_SETUP; op_cnt[m] = 0; end
    repeat (2) @(posedge clk);
    #1 checks++;
    if (gnt !== 0 || flag !== 0 || p_out !== '0) begin
      failures++; $display("FAIL reset state gnt=%b flag=%b", gnt, flag);
    end

    // ---- replay of the figure's stimulus -------------------------------
    // all four processors get the printed operands with select 111000
    // (this design: arithmetic unit, add); processor 1 then processor 2
    // write their sums to slaves 1 and 2, word 0.
    @(negedge clk) rst = 0;
    for (int m = 0; m < 4; m++) begin
      a[m] = FIG_A[m]; b[m] = FIG_B[m]; sel[m] = proc_sel_t'(6'b111000);
      addr[m] = {2'(m), 10'd0}; rd_wr[m] = 0;
    end
    @(negedge clk) req = 4'b0001;
    @(negedge clk);
    checks++;
    if (gnt !== 4'b0001) begin failures++; $display("FAIL replay grant 0 gnt=%b", gnt); end
    req = 4'b0000;
    @(negedge clk);
    checks++;
    if (gnt !== 4'b0000) begin failures++; $display("FAIL replay idle gnt=%b", gnt); end
    req = 4'b0010;
    @(negedge clk);
    checks++;
    if (gnt !== 4'b0010) begin failures++; $display("FAIL replay grant 1 gnt=%b", gnt); end
    req = 4'b0000;
    model[0][0] = 32'(FIG_A[0]) + 32'(FIG_B[0]); written[0][0] = 1;
    model[1][0] = 32'(FIG_A[1]) + 32'(FIG_B[1]); written[1][0] = 1;
    // read both back through master 3
    for (int k = 0; k < 2; k++) begin
      @(negedge clk) addr[3] = {2'(k), 10'd0}; rd_wr[3] = 1; req = 4'b1000;
      @(negedge clk) req = 4'b0000;
      @(negedge clk);
      checks++;
      if (dtout[k] !== model[k][0]) begin
        failures++; $display("FAIL replay read slave %0d dtout=%h exp %h", k, dtout[k], model[k][0]);
      end
    end
    n_grant[0]++; n_grant[1]++; n_grant[3] += 2; n_wr[0]++; n_wr[1]++; n_rd[0]++; n_rd[1]++;

    // ---- random traffic from all four masters --------------------------
    ref_flag = flag;
    forever begin
      @(posedge clk);
      req_at_edge = req;
      #1;
      // pending read from the granted cycle that just ended
      if (rd_pend) begin
        checks++;
        if (dtout[rd_slv] !== rd_exp) begin
          failures++; $display("FAIL read slave %0d dtout=%h exp %h", rd_slv, dtout[rd_slv], rd_exp);
        end
        rd_pend = 0;
      end
      @(negedge clk);
      // grant of this cycle must follow fixed priority over req_at_edge
      winner = -1;
      for (int i = 3; i >= 0; i--) if (req_at_edge[i]) winner = i;
      checks++;
      if (gnt !== (winner < 0 ? 4'b0 : 4'(1 << winner))) begin
        failures++; $display("FAIL req=%b gnt=%b", req_at_edge, gnt);
      end
      if ($countones(req_at_edge) > 1) n_contention++;
      if (winner < 0) n_idle++;
      if (winner == 0 || winner == 1) begin
        if (!ref_flag) n_flag_set++;
        ref_flag = 1;
      end else if (winner >= 2) begin
        if (ref_flag) n_flag_clr++;
        ref_flag = 0;
      end
      checks++;
      if (flag !== ref_flag) begin failures++; $display("FAIL flag=%b exp %b", flag, ref_flag); end

      // the winner's transaction happens during this cycle
      if (winner >= 0 && st[winner] == S_REQ) begin
        s = int'(addr[winner][11:10]);
        w = int'(addr[winner][9:0]);
        n_grant[winner]++;
        if (rd_wr[winner]) begin
          rd_pend = 1; rd_slv = s;
          rd_exp = (w < DEPTH) ? model[s][w] : 32'h0;
          n_rd[s]++;
          if (w >= DEPTH) n_oor_rd++;
        end else begin
          if (w < DEPTH) begin model[s][w] = exp_res[winner]; written[s][w] = 1; end
          else n_oor_wr++;
          n_wr[s]++;
        end
        req[winner] = 0;
        st[winner] = S_DONE;        // keep address steady through this cycle
        op_cnt[winner]++;
      end
      for (int m = 0; m < 4; m++) begin
        if (st[m] == S_REQ && req[m] && m != winner) n_wait++;
      end

      // advance the other masters
      all_done = 1;
      for (int m = 0; m < 4; m++) begin
        unique case (st[m])
          S_DONE:   if (m != winner) st[m] = S_SETUP;
          S_SETUP:  if (op_cnt[m] < OPS) begin setup_op(m); st[m] = S_SETTLE; end
          S_SETTLE: if ($urandom_range(2) != 0) begin req[m] = 1; st[m] = S_REQ; end
          S_REQ:    ;
        endcase
        if (op_cnt[m] < OPS || st[m] != S_SETUP) all_done = 0;
      end
      if (all_done && !rd_pend) break;
    end

    // ---- every mechanism must have happened ----------------------------
    $display("grants %0d %0d %0d %0d, writes/slave %0d %0d %0d %0d, reads/slave %0d %0d %0d %0d",
             n_grant[0], n_grant[1], n_grant[2], n_grant[3],
             n_wr[0], n_wr[1], n_wr[2], n_wr[3], n_rd[0], n_rd[1], n_rd[2], n_rd[3]);
    $display("contention %0d, waiting %0d, flag set %0d, flag clear %0d, idle %0d",
             n_contention, n_wait, n_flag_set, n_flag_clr, n_idle);
    $display("arith %0d, logic %0d, out-of-range writes %0d, reads %0d",
             n_arith, n_logic, n_oor_wr, n_oor_rd);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_grant[i] == 0 || n_wr[i] == 0 || n_rd[i] == 0) begin
        failures++; $display("FAIL master/slave %0d: a grant, write or read never happened", i);
      end
    end
    checks++;
    if (n_contention == 0 || n_wait == 0 || n_flag_set == 0 || n_flag_clr == 0 ||
        n_idle == 0 || n_arith == 0 || n_logic == 0 || n_oor_wr == 0 || n_oor_rd == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
