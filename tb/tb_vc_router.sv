// tb_vc_router: self-checking test of one five-port router.
//
// The router is the centre node (ID 4) of a 3x3 mesh, so XY routing uses
// all five outputs: destination 4 is local, 3 and 0 east, 5 west, 1 north,
// 7 south. A link model on every port sends packets (only while it holds a
// credit from the router's credit_out) and receives them with its own
// deserializer, returning a credit per complete packet. Each packet must
// leave, complete, on the port the testbench's own routing table names.
// A directed head-of-line test withholds the west output's credits so that
// a packet for it waits in one queue of the north input, and checks that a
// later packet from the same input to the south output gets past it.
// A 16-flit packet checks the streaming rate of one flit per 11 cycles.
// An isolated packet checks the pipeline latency: the first bit of a flit
// leaves 5 cycles after the cycle its last bit arrived.
module tb_vc_router;
  import noc_pkg::*;
  localparam int NP = 5;
  localparam int MAXF = 16;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] flit_en_in = '0, flit_in = '0, flit_en_out, flit_out;
  logic [NP-1:0] credit_in = '0, credit_out;
  int checks = 0, failures = 0;

  vc_router #(.NUM_VC(2), .DEPTH(16), .MY_ID(4'd4), .MESH_X(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  typedef struct packed {
    logic [4:0]        n;
    logic [MAXF*8-1:0] f;
  } pkt_t;

  // expected output port for each destination used (L=0 N=1 E=2 S=3 W=4)
  function automatic int exp_port(int dst);
    case (dst)
      4: return 0;
      1: return 1;
      0, 3, 6: return 2;
      7: return 3;
      5, 2, 8: return 4;
      default: return -1;
    endcase
  endfunction

  pkt_t expq [NP][$];
  bit   hold_credit [NP];
  int   pend_cr [NP];     // credits waiting to be returned, one pulse per cycle
  int   recv_port [NP];
  int sent_cnt = 0, recv_cnt = 0;
  int credits [NP];
  int tagseq [NP];
  longint cyc = 0;
  longint last_in_cyc = -1, first_out_cyc = -1;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) for (int p = 0; p < NP; p++) if (credit_out[p]) credits[p]++;

  task automatic send_pkt(int p, int dst, int nbody);
    pkt_t pk;
    flit_t fl;
    while (credits[p] == 0) @(negedge clk);
    credits[p]--;
    pk = '0;
    pk.n = 5'(nbody + 1);
    pk.f[7:0] = make_head(id_t'(dst), LEN_W'(nbody));
    for (int i = 1; i <= nbody; i++)
      pk.f[8*i +: 8] = (i == 1) ? flit_t'({3'(p), 5'(tagseq[p])}) : flit_t'($urandom);
    tagseq[p]++;
    expq[exp_port(dst)].push_back(pk);
    sent_cnt++;
    for (int i = 0; i <= nbody; i++) begin
      fl = pk.f[8*i +: 8];
      for (int b = 0; b < 8; b++) begin
        flit_en_in[p] = 1'b1;
        flit_in[p] = fl[b];
        @(negedge clk);
        if (i == 0 && b == 7) last_in_cyc = ($time - 5) / 10;   // edge that sampled the last bit
      end
      flit_en_in[p] = 1'b0;
      flit_in[p] = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  for (genvar p = 0; p < NP; p++) begin : g_cr
    initial begin
      pend_cr[p] = 0;
      forever begin
        @(negedge clk);
        credit_in[p] = 1'b0;
        if (pend_cr[p] > 0 && !hold_credit[p]) begin
          credit_in[p] = 1'b1;
          pend_cr[p]--;
        end
      end
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_rx
    initial begin
      flit_t sh;
      int nb, k, left;
      pkt_t pk;
      nb = 0; left = -1; pk = '0; sh = '0; k = 0;
      forever begin
        @(posedge clk);
        if (rst_n && flit_en_out[p]) begin
          if (nb == 0 && left < 0 && first_out_cyc < 0) first_out_cyc = $time / 10;
          sh = {flit_out[p], sh[7:1]};
          nb++;
          if (nb == 8) begin
            nb = 0;
            if (left < 0) begin
              pk = '0;
              pk.f[7:0] = sh;
              pk.n = 5'(head_len(sh)) + 5'd1;
              left = int'(head_len(sh));
              k = 1;
            end else begin
              pk.f[8*k +: 8] = sh;
              k++;
              left--;
            end
            if (left == 0) begin
              int idx;
              idx = -1;
              foreach (expq[p][j]) if (idx < 0 && expq[p][j] == pk) idx = j;
              checks++;
              if (idx < 0) fail($sformatf("port %0d sent an unexpected packet %h", p, pk));
              else expq[p].delete(idx);
              recv_cnt++;
              recv_port[p]++;
              left = -1;
              fork
                begin
                  repeat ($urandom_range(1, 30)) @(negedge clk);
                  pend_cr[p]++;
                end
              join_none
            end
          end
        end
      end
    end
  end

  // spacing of frame starts on the south output while one long packet streams
  longint lastrise = -1;
  logic   prev_en_s = 1'b0;
  int     n_spacing = 0, bad_spacing = 0;
  bit     measure_rate = 0;
  always @(posedge clk) begin
    if (measure_rate && flit_en_out[3] && !prev_en_s) begin
      if (lastrise >= 0) begin
        n_spacing++;
        if ($time / 10 - lastrise != 11) bad_spacing++;
      end
      lastrise = $time / 10;
    end
    prev_en_s = flit_en_out[3];
  end

  initial begin
    #3000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int recv_base_w, recv_base_s;
  int dsts [9] = '{4, 1, 0, 3, 6, 7, 5, 2, 8};
  task automatic traffic(int p);
    for (int n = 0; n < 30; n++)
      send_pkt(p, dsts[$urandom_range(0, 8)], $urandom_range(0, 7));
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin credits[p] = 2; tagseq[p] = 0; hold_credit[p] = 0; recv_port[p] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // isolated packet north input -> south output: latency
    send_pkt(1, 7, 0);
    wait (recv_cnt == 1);
    checks++;
    // first bit is sampled 5 edges after the edge that sampled the last input bit
    if (first_out_cyc - last_in_cyc != 5)
      fail($sformatf("router latency %0d edges, expected 5", first_out_cyc - last_in_cyc));
    $display("router latency: %0d cycles from last bit in to first bit out", first_out_cyc - last_in_cyc);
    // streaming rate: a 16-flit packet leaves at one flit per 11 cycles
    // (8 bits, 1 idle cycle, switch allocation and traversal)
    measure_rate = 1;
    send_pkt(1, 7, 15);
    wait (recv_cnt == 2);
    measure_rate = 0;
    checks++;
    if (n_spacing != 15 || bad_spacing != 0)
      fail($sformatf("streaming rate: %0d of %0d flit spacings not 11 cycles", bad_spacing, n_spacing));
    // one packet to every output
    foreach (dsts[i]) send_pkt(0, dsts[i], 1);
    wait (recv_cnt == sent_cnt);
    repeat (40) @(negedge clk);   // all credits back
    recv_base_w = recv_port[4];
    recv_base_s = recv_port[3];
    // head-of-line test: the west output runs out of credits, a packet for
    // it waits in a queue of the north input, and a later packet from the
    // same input to the south output must overtake it
    hold_credit[4] = 1;
    send_pkt(2, 5, 2);
    send_pkt(2, 5, 2);
    wait (recv_port[4] >= 2 + recv_base_w);
    send_pkt(1, 5, 3);            // blocked: no credit on the west output
    send_pkt(1, 7, 3);            // must pass it
    wait (recv_port[3] >= 1 + recv_base_s);
    repeat (40) @(negedge clk);
    checks++;
    if (recv_port[4] != 2 + recv_base_w) fail("west output sent a packet without a credit");
    checks++;
    if (dut.vc_owned[1] == 0 || dut.vc_nonempty[1] == 0) fail("blocked packet no longer waits in a queue of the north input");
    $display("head-of-line test: south packet overtook the blocked west packet");
    hold_credit[4] = 0;
    wait (recv_cnt == sent_cnt);
    // random traffic on all inputs at once
    fork
      traffic(0); traffic(1); traffic(2); traffic(3); traffic(4);
    join
    wait (recv_cnt == sent_cnt);
    repeat (50) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (expq[p].size() != 0) fail($sformatf("%0d packets never left port %0d", expq[p].size(), p));
      checks++;
      if (credits[p] != 2) fail($sformatf("input %0d ends with %0d credits", p, credits[p]));
    end
    $display("packets sent %0d received %0d", sent_cnt, recv_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
