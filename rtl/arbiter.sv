// arbiter: the shared bus's arbiter, fixed priority by default.
//
// Four request lines REQ0..REQ3 come in, four grant lines GNT0..GNT3 go
// out, with its own clock and reset, as the design description gives it.
// The description calls the scheme "round robin based" but also says three
// times that the priorities are static: REQ0 (processor 1) highest, REQ3
// (processor 4) lowest. The default, ROUND_ROBIN = 0, follows the fixed
// priorities. ROUND_ROBIN = 1 builds the round-robin reading instead: the
// search for a request starts just after the last master granted, so every
// requester is served within N grants.
//
// Timing, this design's choice: the grant is registered. On every rising
// edge the winner among the active requests is granted for the next cycle,
// and the decision is taken afresh each cycle, so with fixed priority a
// higher-priority request takes the bus from a lower one at the next edge.
// With no request, no grant. Reset (synchronous, active high) clears all
// grants and points the round-robin search at REQ0. At most one grant is
// ever high.
module arbiter #(
  parameter int unsigned N           = 4,
  parameter bit          ROUND_ROBIN = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  gnt_next;
  logic [IW-1:0] last;      // index of the last master granted

  // Fixed: lowest index wins. Round robin: first index after `last` wins,
  // wrapping around.
  always_comb begin
    int unsigned idx;
    gnt_next = '0;
    for (int unsigned k = N; k > 0; k--) begin
      if (ROUND_ROBIN) idx = (32'(last) + k) % N;
      else             idx = k - 1;
      if (req[idx]) gnt_next = N'(1) << idx;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt  <= '0;
      last <= IW'(N - 1);
    end else begin
      gnt <= gnt_next;
      for (int unsigned i = 0; i < N; i++)
        if (gnt_next[i]) last <= IW'(i);
    end
  end

  a_gnt_onehot0: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt))
    else $error("arbiter: more than one grant");
  a_gnt_has_req: assert property (@(posedge clk) disable iff (rst)
                                  |gnt_next |-> |req)
    else $error("arbiter: grant without request");

endmodule
