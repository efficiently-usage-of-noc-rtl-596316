// noc_2x2: a mesh of virtual-channel routers, by default the 2x2 array
// with cores 0 to 3.
//
// Router r has ID r (L_ID) and sits at column r % MESH_X, row r / MESH_X.
// Columns are counted towards the west and rows towards the south, so in
// the 2x2 array router 1 is west of router 0, router 2 south of router 0
// and router 3 south of router 1. Neighbouring routers are joined by a
// serial link (data bit plus enable) in each direction and a credit wire
// against each link. Ports at the edge of the mesh are left unconnected:
// their inputs are tied off and XY routing never sends traffic there.
//
// Each core attaches to the local port of its router through the core_*
// ports: it sends flits bit-serially on core_flit_en_in/core_flit_in,
// receives them on core_flit_en_out/core_flit_out, may start a packet only
// while it holds a credit (NUM_VC after reset, one more per pulse on
// core_credit_out) and pulses core_credit_in once for each packet it has
// fully received.
//
// The 2x2 arrangement, cores 0-3 and router IDs follow the document; the
// placement of router 1 to the west of router 0 is read from the waveform
// of a core0-to-core3 transfer (router 0 west output, then router 1 south
// output). Generalising to MESH_X x MESH_Y is this design's choice.
module noc_2x2
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 2,
  parameter int unsigned MESH_Y = 2,
  parameter int unsigned NUM_VC = 2,
  parameter int unsigned DEPTH  = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [MESH_X*MESH_Y-1:0]   core_flit_en_in,
  input  logic [MESH_X*MESH_Y-1:0]   core_flit_in,
  output logic [MESH_X*MESH_Y-1:0]   core_flit_en_out,
  output logic [MESH_X*MESH_Y-1:0]   core_flit_out,
  input  logic [MESH_X*MESH_Y-1:0]   core_credit_in,
  output logic [MESH_X*MESH_Y-1:0]   core_credit_out
);

  localparam int unsigned NR = MESH_X * MESH_Y;

  logic [NPORTS-1:0] en_in  [NR];
  logic [NPORTS-1:0] d_in   [NR];
  logic [NPORTS-1:0] en_out [NR];
  logic [NPORTS-1:0] d_out  [NR];
  logic [NPORTS-1:0] cr_in  [NR];
  logic [NPORTS-1:0] cr_out [NR];

  for (genvar r = 0; r < NR; r++) begin : g_r
    localparam int unsigned X = r % MESH_X;
    localparam int unsigned Y = r / MESH_X;

    // local port
    assign en_in[r][P_L]    = core_flit_en_in[r];
    assign d_in[r][P_L]     = core_flit_in[r];
    assign cr_in[r][P_L]    = core_credit_in[r];
    assign core_flit_en_out[r] = en_out[r][P_L];
    assign core_flit_out[r]    = d_out[r][P_L];
    assign core_credit_out[r]  = cr_out[r][P_L];

    // west neighbour: column X+1, joined to its east port
    if (X + 1 < MESH_X) begin : g_w
      assign en_in[r][P_W] = en_out[r+1][P_E];
      assign d_in[r][P_W]  = d_out[r+1][P_E];
      assign cr_in[r][P_W] = cr_out[r+1][P_E];
    end else begin : g_w_edge
      assign en_in[r][P_W] = 1'b0;
      assign d_in[r][P_W]  = 1'b0;
      assign cr_in[r][P_W] = 1'b0;
    end
    // east neighbour: column X-1, joined to its west port
    if (X > 0) begin : g_e
      assign en_in[r][P_E] = en_out[r-1][P_W];
      assign d_in[r][P_E]  = d_out[r-1][P_W];
      assign cr_in[r][P_E] = cr_out[r-1][P_W];
    end else begin : g_e_edge
      assign en_in[r][P_E] = 1'b0;
      assign d_in[r][P_E]  = 1'b0;
      assign cr_in[r][P_E] = 1'b0;
    end
    // south neighbour: row Y+1, joined to its north port
    if (Y + 1 < MESH_Y) begin : g_s
      assign en_in[r][P_S] = en_out[r+MESH_X][P_N];
      assign d_in[r][P_S]  = d_out[r+MESH_X][P_N];
      assign cr_in[r][P_S] = cr_out[r+MESH_X][P_N];
    end else begin : g_s_edge
      assign en_in[r][P_S] = 1'b0;
      assign d_in[r][P_S]  = 1'b0;
      assign cr_in[r][P_S] = 1'b0;
    end
    // north neighbour: row Y-1, joined to its south port
    if (Y > 0) begin : g_n
      assign en_in[r][P_N] = en_out[r-MESH_X][P_S];
      assign d_in[r][P_N]  = d_out[r-MESH_X][P_S];
      assign cr_in[r][P_N] = cr_out[r-MESH_X][P_S];
    end else begin : g_n_edge
      assign en_in[r][P_N] = 1'b0;
      assign d_in[r][P_N]  = 1'b0;
      assign cr_in[r][P_N] = 1'b0;
    end

    vc_router #(
      .NUM_VC(NUM_VC), .DEPTH(DEPTH), .MY_ID(id_t'(r)), .MESH_X(MESH_X)
    ) u_router (
      .clk, .rst_n,
      .flit_en_in(en_in[r]), .flit_in(d_in[r]),
      .flit_en_out(en_out[r]), .flit_out(d_out[r]),
      .credit_in(cr_in[r]), .credit_out(cr_out[r])
    );
  end

endmodule
