// vc_router: five-port virtual-channel router with serial links.
//
// Ports are local (the core), north, east, south and west (index order
// L, N, E, S, W). Every link is one data bit plus an enable per direction,
// and a credit wire back. A flit arrives bit-serially into the port's
// serial-in buffer (QW: queue write), is written into a free virtual-channel
// queue of that input, has its route computed and an output allocated
// (LRC/VCA), wins switch allocation (SA), crosses the crossbar into the
// output register (ST) and is sent bit-serially by the output serializer
// (LT). Body and tail flits skip LRC/VCA. A packet that is blocked in one
// queue does not stop a packet in another queue of the same input.
//
// Flow control is credit based at packet level: credit_out[p] pulses when a
// queue of input p is released (its tail has been switched); an output may
// start a packet only while it holds a credit. Each output holds NUM_VC
// credits after reset.
//
// The five-stage organisation, the 8-bit serial buffers, the link signal
// pairs and the credit wires follow the document; NUM_VC, DEPTH and the
// packet format (see noc_pkg) are this design's choices.
//
// Timing (no contention): the last bit of a head flit arrives in cycle t;
// the first bit of the flit leaves on the output link in cycle t+5.
module vc_router
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 2,
  parameter int unsigned DEPTH  = 16,
  parameter id_t         MY_ID  = '0,
  parameter int unsigned MESH_X = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] flit_en_in,
  input  logic [NPORTS-1:0] flit_in,
  output logic [NPORTS-1:0] flit_en_out,
  output logic [NPORTS-1:0] flit_out,
  input  logic [NPORTS-1:0] credit_in,    // from the receiver of each output
  output logic [NPORTS-1:0] credit_out    // to the sender of each input
);

  localparam int unsigned VW = $clog2(NUM_VC > 1 ? NUM_VC : 2);

  logic [NPORTS-1:0] buf_valid, buf_ack;
  flit_t             buf_data    [NPORTS];
  logic [NUM_VC-1:0] vc_nonempty [NPORTS];
  flit_t             vc_front    [NPORTS][NUM_VC];
  logic [NUM_VC-1:0] vc_head     [NPORTS];
  logic [NUM_VC-1:0] vc_tail     [NPORTS];
  logic [NUM_VC-1:0] vc_owned    [NPORTS];
  logic [NPORTS-1:0] rd_en;
  logic [VW-1:0]     rd_vc       [NPORTS];
  flit_t             xin_data    [NPORTS];
  logic [PORT_W-1:0] sel         [NPORTS];
  logic [NPORTS-1:0] sel_valid, out_valid, out_ready;
  flit_t             out_data    [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    ser_in_buffer #(.W(FLIT_W)) u_buf (
      .clk, .rst_n,
      .en(flit_en_in[p]), .s_in(flit_in[p]),
      .rd_ack(buf_ack[p]), .valid(buf_valid[p]), .s_out(buf_data[p])
    );

    vc_input_port #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n,
      .in_valid(buf_valid[p]), .in_flit(buf_data[p]), .in_ack(buf_ack[p]),
      .vc_nonempty(vc_nonempty[p]), .vc_front(vc_front[p]),
      .vc_head(vc_head[p]), .vc_tail(vc_tail[p]), .vc_owned(vc_owned[p]),
      .rd_en(rd_en[p]), .rd_vc(rd_vc[p]),
      .credit_out(credit_out[p])
    );

    // switch-traversal register: the flit that won SA at this input
    always_ff @(posedge clk) begin
      if (!rst_n)        xin_data[p] <= '0;
      else if (rd_en[p]) xin_data[p] <= vc_front[p][rd_vc[p]];
    end

    ser_out #(.W(FLIT_W)) u_out (
      .clk, .rst_n,
      .load(out_valid[p]), .din(out_data[p]), .ready(out_ready[p]),
      .flit_en_out(flit_en_out[p]), .flit_out(flit_out[p])
    );
  end

  router_ctrl #(.NUM_VC(NUM_VC), .MY_ID(MY_ID), .MESH_X(MESH_X)) u_ctrl (
    .clk, .rst_n,
    .vc_nonempty, .vc_front, .vc_head, .vc_tail,
    .rd_en, .rd_vc,
    .out_ready, .credit_in,
    .sel, .sel_valid
  );

  crossbar #(.NP(NPORTS)) u_xbar (
    .in_data(xin_data), .sel, .sel_valid,
    .out_data, .out_valid
  );

endmodule
