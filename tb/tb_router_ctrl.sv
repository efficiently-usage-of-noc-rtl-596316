// tb_router_ctrl: self-checking test of the router controller.
//
// The controller of the centre router (ID 4) of a 3x3 mesh is driven by
// models of its input queues, its five output serializers (busy for 9
// cycles after each flit) and the downstream credit wires. Packets are
// placed in free queues at random. Checks: every popped flit is selected
// onto an output in the next cycle, its head onto the port the testbench's
// routing table names; an output carries one packet at a time, head to
// tail, in order; nothing is switched into a busy output; no output starts
// more packets than it holds credits; a head flit that finds everything
// free is switched 2 cycles after it reaches the queue front; every packet
// gets through.
module tb_router_ctrl;
  import noc_pkg::*;
  localparam int NP = 5, NV = 2;

  logic clk = 0, rst_n = 0;
  logic [NV-1:0] vc_nonempty [NP];
  flit_t         vc_front    [NP][NV];
  logic [NV-1:0] vc_head     [NP];
  logic [NV-1:0] vc_tail     [NP];
  logic [NP-1:0] rd_en;
  logic [0:0]    rd_vc [NP];
  logic [NP-1:0] out_ready, credit_in = '0;
  logic [PORT_W-1:0] sel [NP];
  logic [NP-1:0] sel_valid;
  int checks = 0, failures = 0;

  router_ctrl #(.NUM_VC(NV), .MY_ID(4'd4), .MESH_X(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

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

  // queue models
  flit_t q [NP][NV][$];
  int    qleft [NP][NV];       // flits of the front packet still to read (0: front is a head)
  bit    qown [NP][NV];
  // output models
  int    busy [NP];
  int    ocred [NP];
  int    oown_p [NP], oown_v [NP], oleft [NP];
  int    pend_credit [NP][$];
  // flits popped last cycle, expected on an output this cycle
  bit    exp_v [NP];
  flit_t exp_f [NP];
  int    exp_port_of [NP];
  int    exp_vc [NP];
  int    delivered = 0, injected = 0, lat_checked = 0;

  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++) begin
        vc_nonempty[p][v] = q[p][v].size() > 0;
        vc_front[p][v]    = (q[p][v].size() > 0) ? q[p][v][0] : '0;
        vc_head[p][v]     = (q[p][v].size() > 0) && (qleft[p][v] == 0);
        vc_tail[p][v]     = (q[p][v].size() > 0) &&
                            ((qleft[p][v] == 0) ? (head_len(q[p][v][0]) == 0) : (qleft[p][v] == 1));
      end
    for (int o = 0; o < NP; o++) out_ready[o] = (busy[o] == 0);
  end

  initial begin
    #3000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dsts [9] = '{4, 1, 0, 3, 6, 7, 5, 2, 8};

  initial begin
    int front_since [NP][NV];
    bit snap_en [NP];
    int snap_vc [NP];
    for (int p = 0; p < NP; p++) begin
      exp_v[p] = 0; busy[p] = 0; ocred[p] = NV; oown_p[p] = -1;
      for (int v = 0; v < NV; v++) begin qleft[p][v] = 0; qown[p][v] = 0; front_since[p][v] = -1; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // downstream credit returns
      for (int o = 0; o < NP; o++) begin
        credit_in[o] = 0;
        if (pend_credit[o].size() > 0 && pend_credit[o][0] <= cyc) begin
          void'(pend_credit[o].pop_front());
          credit_in[o] = 1;
        end
      end
      #1;
      // ---- check last cycle's pops against this cycle's selects
      for (int o = 0; o < NP; o++) begin
        bit want;
        want = 0;
        for (int p = 0; p < NP; p++) if (exp_v[p] && exp_port_of[p] == o) want = 1;
        checks++;
        if (sel_valid[o] != want) fail($sformatf("output %0d sel_valid %0b expected %0b", o, sel_valid[o], want));
      end
      for (int p = 0; p < NP; p++) if (exp_v[p]) begin
        int o;
        o = exp_port_of[p];
        checks++;
        if (!sel_valid[o] || int'(sel[o]) != p) fail($sformatf("flit from input %0d not selected on output %0d", p, o));
        if (busy[o] != 0) fail($sformatf("output %0d fed while busy", o));
        busy[o] = 9;
      end
      for (int p = 0; p < NP; p++) begin snap_en[p] = rd_en[p]; snap_vc[p] = int'(rd_vc[p]); end
      @(posedge clk);
      #1;
      // ---- this cycle's pops
      for (int p = 0; p < NP; p++) exp_v[p] = 0;
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NV; v++) begin
          if (q[p][v].size() > 0 && qleft[p][v] == 0 && front_since[p][v] < 0) front_since[p][v] = cyc;
        end
        if (snap_en[p]) begin
          int v, o;
          flit_t f;
          v = int'(snap_vc[p]);
          checks++;
          if (q[p][v].size() == 0) begin fail("pop of an empty queue"); continue; end
          f = q[p][v].pop_front();
          if (qleft[p][v] == 0) begin
            // head flit: route, ownership, credit
            o = exp_port(int'(head_dest(f)));
            checks++;
            if (oown_p[o] >= 0) fail($sformatf("output %0d taken while owned", o));
            checks++;
            if (ocred[o] == 0) fail($sformatf("output %0d started a packet without credit", o));
            // isolated-case latency: front in cycle t, popped in t+1
            if (front_since[p][v] >= 0 && cyc - front_since[p][v] == 1) lat_checked++;
            front_since[p][v] = -1;
            ocred[o]--;
            oown_p[o] = p; oown_v[o] = v; oleft[o] = head_len(f) + 1;
            qleft[p][v] = head_len(f) + 1;
          end else begin
            o = -1;
            for (int k = 0; k < NP; k++) if (oown_p[k] == p && oown_v[k] == v) o = k;
            checks++;
            if (o < 0) begin fail("body flit without an owned output"); continue; end
          end
          qleft[p][v]--;
          oleft[o]--;
          exp_v[p] = 1; exp_f[p] = f; exp_port_of[p] = o; exp_vc[p] = v;
          if (oleft[o] == 0) begin
            oown_p[o] = -1;
            qown[p][v] = 0;
            delivered++;
            pend_credit[o].push_back(cyc + $urandom_range(12, 40));
          end
        end
      end
      for (int o = 0; o < NP; o++) begin
        if (busy[o] > 0) busy[o]--;
        if (credit_in[o]) ocred[o]++;
      end
      // ---- place new packets in free queues (only in the first part)
      if (cyc < 5000 && $urandom_range(0, 9) == 0) begin
        int p, v;
        p = $urandom_range(0, NP - 1);
        v = qown[p][0] ? (qown[p][1] ? -1 : 1) : 0;
        if (v >= 0) begin
          int nb;
          nb = $urandom_range(0, 4);
          qown[p][v] = 1;
          q[p][v].push_back(make_head(id_t'(dsts[$urandom_range(0, 8)]), LEN_W'(nb)));
          for (int i = 0; i < nb; i++) q[p][v].push_back(flit_t'($urandom));
          injected++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (delivered != injected) fail($sformatf("%0d packets injected, %0d delivered", injected, delivered));
    checks++;
    if (lat_checked == 0) fail("no head was ever switched 1 cycle after reaching the queue front");
    $display("packets %0d delivered %0d, heads switched without delay %0d", injected, delivered, lat_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
