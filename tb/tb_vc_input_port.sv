// tb_vc_input_port: self-checking test of the parallel VC queues.
// Packets of random length are written while queues are read in random
// order. A reference model in the testbench keeps its own per-queue flit
// lists, ownership and credit count; it checks which queue each packet
// lands in (lowest free), the front flit and its head/tail marks, the
// credit pulse on every released queue, and that a second packet is
// accepted and can be read while the first one is still unread (bypass).
module tb_vc_input_port;
  import noc_pkg::*;
  localparam int NV = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  flit_t in_flit = '0;
  logic in_ack;
  logic [NV-1:0] vc_nonempty, vc_head, vc_tail, vc_owned;
  flit_t vc_front [NV];
  logic rd_en = 0;
  logic [0:0] rd_vc = '0;
  logic credit_out;
  int checks = 0, failures = 0;

  vc_input_port #(.NUM_VC(NV), .DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // reference model
  flit_t mq [NV][$];
  bit    mown [NV];
  int    mleft [NV];    // flits still to read of the packet at the front
  int    credits;
  int    wr_q, wr_left; // packet being written
  int    bypass_seen = 0, credit_pulses = 0, exp_credit_pulses = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // credit pulses counted on every clock
  always @(posedge clk) if (rst_n && credit_out) credit_pulses++;

  initial begin
    int sent_pkts;
    flit_t f;
    credits = NV; wr_left = 0; wr_q = -1; sent_pkts = 0;
    for (int v = 0; v < NV; v++) begin mown[v] = 0; mleft[v] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("empty after reset", vc_nonempty, 0);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // ---- choose this cycle's write
      in_valid = 0;
      if (wr_left > 0 && $urandom_range(0, 3) != 0) begin
        f = flit_t'($urandom);
        in_valid = 1; in_flit = f;
      end else if (wr_left == 0 && credits > 0 && $urandom_range(0, 4) == 0 && cyc < 3600) begin
        logic [3:0] len;
        len = (sent_pkts < 2) ? 4'd3 : 4'($urandom_range(0, 15));
        f = make_head(id_t'($urandom), len);
        in_valid = 1; in_flit = f;
      end
      // ---- choose this cycle's read (model-driven, random queue)
      rd_en = 0;
      begin
        int cand [$];
        cand.delete();
        for (int v = 0; v < NV; v++) if (mq[v].size() > 0) cand.push_back(v);
        // hold off reading for a while at the start to force the bypass case
        if (cand.size() > 0 && (cyc > 60) && $urandom_range(0, 2) == 0) begin
          int v;
          v = cand[$urandom_range(0, cand.size() - 1)];
          rd_en = 1; rd_vc = 1'(v);
        end
      end
      #1;
      // ---- compare the outputs with the model before the edge
      check("in_ack", in_ack, in_valid);
      for (int v = 0; v < NV; v++) begin
        check($sformatf("nonempty %0d", v), vc_nonempty[v], mq[v].size() > 0);
        if (mq[v].size() > 0) begin
          check($sformatf("front %0d", v), vc_front[v], mq[v][0]);
          check($sformatf("head %0d", v), vc_head[v], mleft[v] == 0);
          check($sformatf("tail %0d", v), vc_tail[v],
                mleft[v] == 0 ? (head_len(mq[v][0]) == 0) : (mleft[v] == 1));
        end
      end
      if (mq[0].size() > 0 && mq[1].size() > 0 && mleft[0] == 0 && mleft[1] == 0) bypass_seen++;
      // ---- update the model
      // a queue released by this cycle's read is not yet free for this cycle's write
      if (in_valid) begin
        if (wr_left == 0) begin
          int q;
          q = -1;
          for (int v = NV - 1; v >= 0; v--) if (!mown[v]) q = v;
          check("a queue is free", q >= 0, 1);
          mown[q] = 1; credits--; sent_pkts++;
          wr_q = q; wr_left = head_len(in_flit);
          mq[q].push_back(in_flit);
        end else begin
          mq[wr_q].push_back(in_flit);
          wr_left--;
        end
      end
      if (rd_en) begin
        int v;
        v = int'(rd_vc);
        if (mleft[v] == 0) mleft[v] = head_len(mq[v][0]) + 1;
        mleft[v]--;
        void'(mq[v].pop_front());
        if (mleft[v] == 0) begin
          mown[v] = 0; credits++; exp_credit_pulses++;
        end
      end
      @(negedge clk);
    end
    in_valid = 0; rd_en = 0;
    repeat (3) @(negedge clk);
    check("credit pulses", credit_pulses, exp_credit_pulses);
    checks++;
    if (bypass_seen == 0) begin failures++; $display("FAIL two packets never held together"); end
    checks++;
    if (exp_credit_pulses < 20) begin failures++; $display("FAIL too few packets"); end
    $display("packets completed %0d, cycles with both queues holding a packet %0d",
             exp_credit_pulses, bypass_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
