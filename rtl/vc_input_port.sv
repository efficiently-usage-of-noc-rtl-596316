// vc_input_port: the parallel virtual-channel queues of one router input.
//
// The port holds NUM_VC queues side by side. Each queue carries one packet
// at a time: when a head flit arrives, it goes into the lowest-numbered
// queue that is free, and the body flits that follow go into that same
// queue. A queue is released when the tail flit of its packet is read out,
// and a one-cycle pulse on credit_out then tells the upstream sender that
// one more queue is available. Because a queue (DEPTH flits) holds a
// whole packet (up to MAX_PKT = 16 flits), a sender that only starts a
// packet when it holds a credit can never overflow a queue.
//
// For each queue the port shows whether it has a flit, the front flit, and
// whether that flit is the head or the tail of the packet, so that the
// controller can route, allocate and switch the queues independently: a
// packet blocked in one queue does not hold up the packet in another.
//
// The parallel queues and "a free queue takes the data while another is
// busy" follow the document; the one-packet-per-queue rule, the lowest-free
// choice and the queue-released credit are this design's choices.
//
// Timing: in_ack is combinational (equal to in_valid); a flit written in
// cycle t is visible at the front of its empty queue in cycle t+1.
module vc_input_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 2,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // write side, from the serial-in buffer
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ack,
  // per-queue status towards the controller
  output logic [NUM_VC-1:0] vc_nonempty,
  output flit_t             vc_front [NUM_VC],
  output logic [NUM_VC-1:0] vc_head,
  output logic [NUM_VC-1:0] vc_tail,
  output logic [NUM_VC-1:0] vc_owned,     // queue holds (part of) a packet
  // read side
  input  logic              rd_en,
  input  logic [$clog2(NUM_VC > 1 ? NUM_VC : 2)-1:0] rd_vc,
  // flow control towards the upstream sender
  output logic              credit_out
);

  localparam int unsigned VW = $clog2(NUM_VC > 1 ? NUM_VC : 2);

  logic [NUM_VC-1:0] push, pop, empty, full;

  // write-side state
  logic             wr_active;
  logic [VW-1:0]    wr_vc;
  logic [LEN_W-1:0] wr_left;
  // read-side state per queue
  logic [NUM_VC-1:0] rd_inpkt;
  logic [LEN_W-1:0]  rd_left [NUM_VC];

  // lowest free queue for a new packet
  logic [VW-1:0] free_vc;
  logic          free_any;
  always_comb begin
    free_vc  = '0;
    free_any = 1'b0;
    for (int v = NUM_VC - 1; v >= 0; v--) begin
      if (!vc_owned[v]) begin
        free_vc  = VW'(v);
        free_any = 1'b1;
      end
    end
  end

  logic [VW-1:0] tgt_vc;
  assign tgt_vc = wr_active ? wr_vc : free_vc;
  assign in_ack = in_valid;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_q
    assign push[v] = in_valid && (tgt_vc == VW'(v));
    assign pop[v]  = rd_en && (rd_vc == VW'(v));

    vc_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push(push[v]), .din(in_flit),
      .pop(pop[v]),   .dout(vc_front[v]),
      .empty(empty[v]), .full(full[v])
    );

    assign vc_nonempty[v] = !empty[v];
    assign vc_head[v]     = !empty[v] && !rd_inpkt[v];
    assign vc_tail[v]     = !empty[v] && (rd_inpkt[v] ? (rd_left[v] == LEN_W'(1))
                                                      : (head_len(vc_front[v]) == '0));
  end

  logic [NUM_VC-1:0] release_vc;
  assign release_vc = pop & vc_tail;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_active  <= 1'b0;
      wr_vc      <= '0;
      wr_left    <= '0;
      vc_owned   <= '0;
      rd_inpkt   <= '0;
      credit_out <= 1'b0;
      for (int v = 0; v < NUM_VC; v++) rd_left[v] <= '0;
    end else begin
      // write side
      if (in_valid) begin
        if (!wr_active) begin
          if (head_len(in_flit) != '0) begin
            wr_active <= 1'b1;
            wr_vc     <= free_vc;
            wr_left   <= head_len(in_flit);
          end
        end else begin
          wr_left <= wr_left - 1'b1;
          if (wr_left == LEN_W'(1)) wr_active <= 1'b0;
        end
      end
      // read side
      for (int v = 0; v < NUM_VC; v++) begin
        if (pop[v]) begin
          if (!rd_inpkt[v]) begin
            if (head_len(vc_front[v]) != '0) begin
              rd_inpkt[v] <= 1'b1;
              rd_left[v]  <= head_len(vc_front[v]);
            end
          end else begin
            rd_left[v] <= rd_left[v] - 1'b1;
            if (rd_left[v] == LEN_W'(1)) rd_inpkt[v] <= 1'b0;
          end
        end
      end
      // ownership: claimed by an arriving head, released by a departing tail
      for (int v = 0; v < NUM_VC; v++) begin
        if (release_vc[v])
          vc_owned[v] <= 1'b0;
        else if (in_valid && !wr_active && free_vc == VW'(v))
          vc_owned[v] <= 1'b1;
      end
      credit_out <= |release_vc;
    end
  end

  // A queue must be able to hold the longest packet.
  initial a_depth: assert (DEPTH >= MAX_PKT);

  // A packet may only start when the sender holds a credit for a free queue.
  a_free_queue: assert property (@(posedge clk) disable iff (!rst_n)
                                 (in_valid && !wr_active) |-> free_any);

endmodule
