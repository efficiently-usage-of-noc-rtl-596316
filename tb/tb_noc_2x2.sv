// tb_noc_2x2: end-to-end test of the 2x2 virtual-channel network at its
// default parameters (4 routers, 2 queues of 16 flits per input).
//
// Each core is modelled at its serial local link: it sends packets only
// while it holds a credit, sends each flit LSB first with en framing, and
// receives flits with its own deserializer, returning a credit after each
// complete packet (sometimes late, to back up the network). Every packet
// carries a unique tag, and a scoreboard checks that each one arrives,
// complete and unchanged, at the core named in its head flit.
//
// Phases: (0) a single-flit packet core0 -> core3 in an idle network, with
// the cycles to router 0's local queue (9), to the credit back at core 0
// (11) and to its arrival at core 3 (43) checked, (1) one packet
// core0 -> core1 and core0 -> core2 in an idle network, with its head
// latency checked against the pipeline (7 + 12 cycles per router),
// (2) core0 -> core3 likewise (three routers), (3) random all-to-all
// traffic, (4) cores 0-2 all sending to core 3 while it returns credits slowly.
// Counted mechanisms, each of which must happen at least once: parallel
// queue use at an input, one queue bypassing a blocked one, VC allocation
// held back for lack of credit, an output owned by another packet, two
// queues of one input competing in switch allocation, credit pulses.
module tb_noc_2x2;
  import noc_pkg::*;
  localparam int NR = 4;
  localparam int MAXF = 16;

  logic clk = 0, rst_n = 0;
  logic [NR-1:0] core_flit_en_in = '0, core_flit_in = '0;
  logic [NR-1:0] core_flit_en_out, core_flit_out;
  logic [NR-1:0] core_credit_in = '0, core_credit_out;
  int checks = 0, failures = 0;

  noc_2x2 dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  // ---------------- packets and scoreboard
  typedef struct packed {
    logic [4:0]        n;         // number of flits, 1..16
    logic [MAXF*8-1:0] f;         // flit i in bits [8i+7:8i]
  } pkt_t;

  pkt_t expq [NR][$];
  int   sent_cnt = 0, recv_cnt = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- per-core models
  int  credits [NR];
  bit  slow_ack = 0;
  int  ack_delay_max = 0;
  longint head_recv_cyc [NR];

  task automatic send_flit(int c, flit_t f, int gap);
    for (int i = 0; i < 8; i++) begin
      core_flit_en_in[c] = 1'b1;
      core_flit_in[c]    = f[i];
      @(negedge clk);
    end
    core_flit_en_in[c] = 1'b0;
    core_flit_in[c]    = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  int tagseq [NR];
  task automatic send_pkt(int c, int dst, int nbody);
    pkt_t p;
    flit_t fl;
    while (credits[c] == 0) @(negedge clk);
    credits[c]--;
    p = '0;
    p.n = 5'(nbody + 1);
    fl = make_head(id_t'(dst), LEN_W'(nbody));
    p.f[7:0] = fl;
    for (int i = 1; i <= nbody; i++) begin
      if (i == 1) fl = flit_t'({2'(c), 6'(tagseq[c])});
      else        fl = flit_t'($urandom);
      p.f[8*i +: 8] = fl;
    end
    tagseq[c]++;
    expq[dst].push_back(p);
    sent_cnt++;
    for (int i = 0; i <= nbody; i++)
      send_flit(c, p.f[8*i +: 8], $urandom_range(0, 2));
  endtask

  // credit returns from the routers' local inputs
  always @(posedge clk) begin
    if (rst_n) for (int c = 0; c < NR; c++) if (core_credit_out[c]) credits[c]++;
  end

  // credit returns of the cores, at most one pulse per cycle
  int pend_cr [NR];
  for (genvar c = 0; c < NR; c++) begin : g_cr
    initial begin
      pend_cr[c] = 0;
      forever begin
        @(negedge clk);
        core_credit_in[c] = 1'b0;
        if (pend_cr[c] > 0) begin
          core_credit_in[c] = 1'b1;
          pend_cr[c]--;
        end
      end
    end
  end

  for (genvar c = 0; c < NR; c++) begin : g_rx
    // receiver: own deserializer, packet reassembly, scoreboard lookup
    initial begin
      flit_t sh;
      int nb, k, left;
      pkt_t p;
      nb = 0; left = -1; p = '0; sh = '0; k = 0;
      forever begin
        @(posedge clk);
        if (rst_n && core_flit_en_out[c]) begin
          sh = {core_flit_out[c], sh[7:1]};
          nb++;
          if (nb == 8) begin
            nb = 0;
            if (left < 0) begin
              p = '0;
              p.f[7:0] = sh;
              p.n = 5'(head_len(sh)) + 5'd1;
              left = int'(head_len(sh));
              k = 1;
              head_recv_cyc[c] = $time / 10;
              checks++;
              if (int'(head_dest(sh)) != c) fail($sformatf("core %0d got head for %0d", c, head_dest(sh)));
            end else begin
              p.f[8*k +: 8] = sh;
              k++;
              left--;
            end
            if (left == 0) begin
              int idx;
              idx = -1;
              foreach (expq[c][j]) if (idx < 0 && expq[c][j] == p) idx = j;
              checks++;
              if (idx < 0) fail($sformatf("core %0d received an unexpected packet %h", c, p));
              else expq[c].delete(idx);
              recv_cnt++;
              left = -1;
              fork
                begin
                  automatic int d = slow_ack ? $urandom_range(0, ack_delay_max) : 0;
                  repeat (d) @(negedge clk);
                  pend_cr[c]++;
                end
              join_none
            end
          end
        end
      end
    end
  end

  // ---------------- mechanism counters (probes into the routers)
  int n_parallel = 0, n_bypass = 0, n_credit_block = 0, n_owned_block = 0;
  int n_sa_conflict = 0, n_credit_pulse = 0;

  for (genvar r = 0; r < NR; r++) begin : g_mon
    for (genvar p = 0; p < NPORTS; p++) begin : g_p
      always @(posedge clk) if (rst_n) begin
        if (&dut.g_r[r].u_router.vc_owned[p]) n_parallel++;
        if (dut.g_r[r].u_router.rd_en[p] &&
            dut.g_r[r].u_router.vc_nonempty[p][!dut.g_r[r].u_router.rd_vc[p]] &&
            !dut.g_r[r].u_router.u_ctrl.alloc[p][!dut.g_r[r].u_router.rd_vc[p]])
          n_bypass++;
        if (&dut.g_r[r].u_router.u_ctrl.sa_cand[p]) n_sa_conflict++;
        if (dut.g_r[r].u_router.credit_out[p]) n_credit_pulse++;
      end
    end
    always @(posedge clk) if (rst_n) begin
      for (int q = 0; q < NPORTS * 2; q++) begin
        int o;
        o = int'(dut.g_r[r].u_router.u_ctrl.va_port[q]);
        if (dut.g_r[r].u_router.u_ctrl.va_req[q]) begin
          if (dut.g_r[r].u_router.u_ctrl.out_owned[o]) n_owned_block++;
          else if (!dut.g_r[r].u_router.u_ctrl.out_has_credit[o]) n_credit_block++;
        end
      end
    end
  end

  // ---------------- watchdog
  initial begin
    #3000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Table-style latencies of a single-flit packet core0 -> core3, counted
  // from the clock edge that samples its first bit: stored in router 0's
  // local queue (8 bits + 1 queue write), credit back at core 0 (queue
  // write, VC allocation, switch allocation, credit register), head at
  // core 3 (7 + 12 per router).
  task automatic table_latencies();
    longint t0, t_q, t_cr;
    t_q = -1; t_cr = -1;
    head_recv_cyc[3] = -1;
    @(negedge clk);
    t0 = $time / 10;
    fork
      send_pkt(0, 3, 0);
      begin
        while (t_q < 0 || t_cr < 0) begin
          @(posedge clk);
          if (t_q < 0 && dut.g_r[0].u_router.vc_nonempty[0] != 0) t_q = $time / 10 - t0;
          if (t_cr < 0 && core_credit_out[0]) t_cr = $time / 10 - t0;
        end
      end
    join
    wait (head_recv_cyc[3] >= 0);
    $display("core0 local to router %0d cycles, credit path %0d cycles, core0 to core3 %0d cycles",
             t_q, t_cr, head_recv_cyc[3] - t0);
    checks++; if (t_q != 9)   fail($sformatf("local-to-router latency %0d, expected 9", t_q));
    checks++; if (t_cr != 11) fail($sformatf("credit path latency %0d, expected 11", t_cr));
    checks++; if (head_recv_cyc[3] - t0 != 7 + 36) fail("single-flit core0 to core3 latency");
    wait (expq[3].size() == 0);
    repeat (20) @(negedge clk);
  endtask

  task automatic random_traffic(int c);
    for (int n = 0; n < 25; n++) begin
      int d;
      d = $urandom_range(0, NR - 2);
      if (d >= c) d++;
      send_pkt(c, d, $urandom_range(0, 6));
    end
  endtask

  task automatic hotspot_traffic(int c);
    for (int n = 0; n < 12; n++) send_pkt(c, 3, $urandom_range(2, 8));
  endtask

  task automatic latency_test(int src, int dst, int routers);
    longint t0;
    int lat;
    head_recv_cyc[dst] = -1;
    @(negedge clk);
    t0 = $time / 10;        // first bit is sampled at the coming edge
    send_pkt(src, dst, 1);
    wait (head_recv_cyc[dst] >= 0);
    lat = int'(head_recv_cyc[dst] - t0);
    checks++;
    if (lat != 7 + 12 * routers)
      fail($sformatf("head latency core%0d->core%0d %0d cycles, expected %0d", src, dst, lat, 7 + 12 * routers));
    $display("head latency core%0d -> core%0d: %0d cycles (%0d routers)", src, dst, lat, routers);
    wait (expq[dst].size() == 0);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NR; c++) begin credits[c] = 2; tagseq[c] = 0; head_recv_cyc[c] = -1; end
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // phases 1 and 2: isolated packets, latency
    table_latencies();
    latency_test(0, 1, 2);
    latency_test(0, 2, 2);
    latency_test(0, 3, 3);

    // phase 3: random traffic from all cores
    fork
      random_traffic(0);
      random_traffic(1);
      random_traffic(2);
      random_traffic(3);
    join
    wait (recv_cnt == sent_cnt);

    // phase 4: hotspot towards core 3 with slow credit return
    slow_ack = 1; ack_delay_max = 60;
    fork
      hotspot_traffic(0);
      hotspot_traffic(1);
      hotspot_traffic(2);
    join
    wait (recv_cnt == sent_cnt);
    repeat (100) @(negedge clk);

    checks++;
    if (recv_cnt != sent_cnt) fail("packets lost");
    for (int c = 0; c < NR; c++) begin
      checks++;
      if (expq[c].size() != 0) fail($sformatf("%0d packets for core %0d never arrived", expq[c].size(), c));
      checks++;
      if (credits[c] != 2) fail($sformatf("core %0d holds %0d credits at the end", c, credits[c]));
    end
    $display("packets sent %0d received %0d", sent_cnt, recv_cnt);
    $display("parallel-queue cycles %0d, bypasses %0d, credit blocks %0d, owner blocks %0d, SA conflicts %0d, credit pulses %0d",
             n_parallel, n_bypass, n_credit_block, n_owned_block, n_sa_conflict, n_credit_pulse);
    checks++; if (n_parallel == 0)     fail("parallel queues never used");
    checks++; if (n_bypass == 0)       fail("no queue ever bypassed a blocked one");
    checks++; if (n_credit_block == 0) fail("VC allocation never waited for a credit");
    checks++; if (n_owned_block == 0)  fail("no output was ever contended");
    checks++; if (n_sa_conflict == 0)  fail("switch allocation never had to choose");
    checks++; if (n_credit_pulse == 0) fail("no credit was ever returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
