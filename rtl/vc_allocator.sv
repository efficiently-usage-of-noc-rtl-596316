// vc_allocator: virtual-channel allocator and output VC state of a router.
//
// Requesters are the input queues (NREQ of them) whose front flit is a head
// that has not yet been given an output. Each names the output port its
// route computation chose. For every output port the allocator keeps the
// output VC state: whether a packet currently owns the port and, as a credit
// counter, how many queues of the downstream input port are free (NUM_VC
// after reset). A free output with at least one credit grants one of its
// requesters, round robin; the grant takes one credit and makes the winner
// the owner until release (its tail flit has been switched). Each credit_in
// pulse returns one downstream queue.
//
// Allocation in parallel with route computation, and the link to the
// output VC states and incoming credits, follow the five-stage router
// figure; holding an output port from head to tail and the round-robin
// policy are this design's choices.
//
// Timing: grant is combinational from req in the same cycle; ownership and
// credits update at the following clock edge.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NREQ   = 10,  // NPORTS * NUM_VC
  parameter int unsigned NOUT   = 5,
  parameter int unsigned NUM_VC = 2    // credits per output after reset
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NREQ-1:0]         req,
  input  logic [PORT_W-1:0]       req_port [NREQ],
  output logic [NREQ-1:0]         grant,
  input  logic [NOUT-1:0]         release_out,   // owner's tail has left
  input  logic [NOUT-1:0]         credit_in,     // a downstream queue freed
  output logic [NOUT-1:0]         out_owned,
  output logic [NOUT-1:0]         out_has_credit
);

  localparam int unsigned CRW = $clog2(NUM_VC + 1);
  logic [CRW-1:0] credits [NOUT];
  logic [NREQ-1:0] oreq [NOUT];
  logic [NREQ-1:0] ognt [NOUT];
  logic [NOUT-1:0] ofire;

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    always_comb begin
      for (int r = 0; r < NREQ; r++)
        oreq[o][r] = req[r] && (req_port[r] == PORT_W'(o));
    end
    assign out_has_credit[o] = (credits[o] != '0);
    assign ofire[o] = !out_owned[o] && out_has_credit[o] && (|oreq[o]);

    rr_arbiter #(.N(NREQ)) u_arb (
      .clk, .rst_n,
      .req(oreq[o] & {NREQ{!out_owned[o] && out_has_credit[o]}}),
      .advance(ofire[o]),
      .gnt(ognt[o])
    );
  end

  always_comb begin
    grant = '0;
    for (int o = 0; o < NOUT; o++) grant |= ognt[o];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_owned <= '0;
      for (int o = 0; o < NOUT; o++) credits[o] <= CRW'(NUM_VC);
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        if (ofire[o])
          out_owned[o] <= 1'b1;
        else if (release_out[o])
          out_owned[o] <= 1'b0;
        case ({ofire[o], credit_in[o]})
          2'b10:   credits[o] <= credits[o] - 1'b1;
          2'b01:   credits[o] <= credits[o] + 1'b1;
          default: ;
        endcase
      end
    end
  end

  // No output may ever hold more credits than there are downstream queues.
  for (genvar o = 0; o < NOUT; o++) begin : g_chk
    a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                     credits[o] <= CRW'(NUM_VC));
  end

endmodule
