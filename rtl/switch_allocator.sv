// switch_allocator: switch allocation for the crossbar inputs.
//
// Each input port can send one flit per cycle through the crossbar, but it
// has NUM_VC queues. A queue is a candidate when its packet owns an output
// port, it has a flit, and that output can take a flit now. For every input
// port the allocator picks one candidate queue, round robin, so queues of
// the same input take turns. Output conflicts cannot occur because an
// output port is owned by one packet at a time.
//
// The switch-allocation stage follows the five-stage router figure; the
// round-robin policy is this design's choice.
//
// Timing: combinational from cand to gnt; the round-robin pointers advance
// at the clock edge after a grant.
module switch_allocator #(
  parameter int unsigned NIN    = 5,
  parameter int unsigned NUM_VC = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] cand    [NIN],
  output logic [NIN-1:0]    gnt_valid,
  output logic [$clog2(NUM_VC > 1 ? NUM_VC : 2)-1:0] gnt_vc [NIN]
);

  localparam int unsigned VW = $clog2(NUM_VC > 1 ? NUM_VC : 2);

  for (genvar p = 0; p < NIN; p++) begin : g_in
    logic [NUM_VC-1:0] g;
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n, .req(cand[p]), .advance(1'b1), .gnt(g)
    );
    assign gnt_valid[p] = |g;
    always_comb begin
      gnt_vc[p] = '0;
      for (int v = 0; v < NUM_VC; v++)
        if (g[v]) gnt_vc[p] = VW'(v);
    end
  end

endmodule
