// router_ctrl: control logic of the virtual-channel router.
//
// It runs the first stages of the router pipeline for every input queue:
//   LRC + VCA  When a queue shows a head flit, its output port is computed
//              (XY routing from the destination in the head flit) and, in
//              the same cycle, the queue asks the VC allocator for that
//              output. The route is kept until the tail has left.
//   SA         A queue that owns its output, has a flit, and whose output
//              serializer is ready and not already being fed, is a
//              candidate; the switch allocator picks one per input port.
//              The chosen flit is popped (rd_en/rd_vc) and the crossbar
//              select of its output is registered (sel/sel_valid) for the
//              switch-traversal stage in the next cycle.
// When the tail flit is switched, the output is released and the queue's
// route is cleared.
//
// The stage order (LRC in parallel with VCA, then SA, ST, LT) follows the
// five-stage router figure. The interface and the per-output select
// registers (sel_n, sel_e, ... in the waveforms) are this design's
// reading; select widths and arbitration are its own choices.
//
// Timing: a head flit visible at a queue front in cycle t is allocated in
// cycle t, wins SA in cycle t+1 at the earliest, and its select is valid in
// cycle t+2.
module router_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 2,
  parameter id_t         MY_ID  = '0,
  parameter int unsigned MESH_X = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // queue status per input port
  input  logic [NUM_VC-1:0] vc_nonempty [NPORTS],
  input  flit_t             vc_front    [NPORTS][NUM_VC],
  input  logic [NUM_VC-1:0] vc_head     [NPORTS],
  input  logic [NUM_VC-1:0] vc_tail     [NPORTS],
  // queue read
  output logic [NPORTS-1:0] rd_en,
  output logic [$clog2(NUM_VC > 1 ? NUM_VC : 2)-1:0] rd_vc [NPORTS],
  // outputs
  input  logic [NPORTS-1:0] out_ready,    // serializer idle
  input  logic [NPORTS-1:0] credit_in,    // downstream queue released
  output logic [PORT_W-1:0] sel       [NPORTS],
  output logic [NPORTS-1:0] sel_valid
);

  localparam int unsigned VW   = $clog2(NUM_VC > 1 ? NUM_VC : 2);
  localparam int unsigned NREQ = NPORTS * NUM_VC;

  // per-queue route state
  logic [NUM_VC-1:0] alloc [NPORTS];
  port_e             route [NPORTS][NUM_VC];
  port_e             route_now [NPORTS][NUM_VC];

  // VC allocation
  logic [NREQ-1:0]   va_req, va_gnt;
  logic [PORT_W-1:0] va_port [NREQ];
  logic [NPORTS-1:0] release_out, out_owned, out_has_credit;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        route_now[p][v]       = alloc[p][v] ? route[p][v]
                                            : xy_route(MY_ID, head_dest(vc_front[p][v]), MESH_X);
        va_req[p*NUM_VC + v]  = vc_head[p][v] && !alloc[p][v];
        va_port[p*NUM_VC + v] = route_now[p][v];
      end
    end
  end

  vc_allocator #(.NREQ(NREQ), .NOUT(NPORTS), .NUM_VC(NUM_VC)) u_va (
    .clk, .rst_n,
    .req(va_req), .req_port(va_port), .grant(va_gnt),
    .release_out, .credit_in,
    .out_owned, .out_has_credit
  );

  // switch allocation
  logic [NUM_VC-1:0] sa_cand [NPORTS];
  logic [NPORTS-1:0] sa_gv;
  logic [VW-1:0]     sa_vc [NPORTS];

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NUM_VC; v++)
        sa_cand[p][v] = alloc[p][v] && vc_nonempty[p][v]
                        && out_ready[route[p][v]] && !sel_valid[route[p][v]];
  end

  switch_allocator #(.NIN(NPORTS), .NUM_VC(NUM_VC)) u_sa (
    .clk, .rst_n, .cand(sa_cand), .gnt_valid(sa_gv), .gnt_vc(sa_vc)
  );

  assign rd_en = sa_gv;
  assign rd_vc = sa_vc;

  always_comb begin
    release_out = '0;
    for (int p = 0; p < NPORTS; p++)
      if (sa_gv[p] && vc_tail[p][sa_vc[p]])
        release_out[route[p][sa_vc[p]]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_valid <= '0;
      for (int o = 0; o < NPORTS; o++) sel[o] <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        alloc[p] <= '0;
        for (int v = 0; v < NUM_VC; v++) route[p][v] <= P_L;
      end
    end else begin
      sel_valid <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          if (va_gnt[p*NUM_VC + v]) begin
            alloc[p][v] <= 1'b1;
            route[p][v] <= route_now[p][v];
          end
        end
        if (sa_gv[p]) begin
          sel[route[p][sa_vc[p]]]       <= PORT_W'(p);
          sel_valid[route[p][sa_vc[p]]] <= 1'b1;
          if (vc_tail[p][sa_vc[p]]) alloc[p][sa_vc[p]] <= 1'b0;
        end
      end
    end
  end

endmodule
