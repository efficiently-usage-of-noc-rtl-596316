// tb_switch_allocator: self-checking test of the switch allocator.
// Random candidate sets for 5 inputs x 2 VCs; checks that each input gets
// at most one grant, only to a candidate, and that two competing queues of
// one input alternate (round robin).
module tb_switch_allocator;
  localparam int NIN = 5, NV = 2;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0] cand [NIN];
  logic [NIN-1:0] gnt_valid;
  logic [0:0] gnt_vc [NIN];
  int checks = 0, failures = 0;

  switch_allocator #(.NIN(NIN), .NUM_VC(NV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mptr [NIN];

  initial begin
    int last [NIN];
    for (int p = 0; p < NIN; p++) begin cand[p] = '0; mptr[p] = 0; last[p] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      for (int p = 0; p < NIN; p++)
        cand[p] = (cyc < 20) ? 2'b11 : NV'($urandom);
      #1;
      for (int p = 0; p < NIN; p++) begin
        int ev;
        ev = -1;
        for (int k = 0; k < NV; k++) begin
          int v;
          v = (mptr[p] + k) % NV;
          if (cand[p][v] && ev < 0) ev = v;
        end
        check("grant valid", gnt_valid[p], ev >= 0);
        if (ev >= 0) begin
          check("granted vc", gnt_vc[p], ev);
          if (cyc < 20 && last[p] >= 0) check("alternates", gnt_vc[p] != last[p], 1);
          last[p] = ev;
          mptr[p] = (ev + 1) % NV;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
