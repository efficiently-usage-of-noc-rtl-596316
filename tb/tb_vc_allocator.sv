// tb_vc_allocator: self-checking test of the VC allocator.
// Random requests, releases and credit returns; a reference model keeps
// per-output ownership, credit counts and round-robin pointers and predicts
// every grant. Also counts that outputs were refused for lack of credit and
// for being owned, and that a released output is granted again.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NREQ = 10, NOUT = 5, NV = 2;
  logic clk = 0, rst_n = 0;
  logic [NREQ-1:0] req = '0, grant;
  logic [PORT_W-1:0] req_port [NREQ];
  logic [NOUT-1:0] release_out = '0, credit_in = '0, out_owned, out_has_credit;
  int checks = 0, failures = 0;

  vc_allocator #(.NREQ(NREQ), .NOUT(NOUT), .NUM_VC(NV)) dut (.*);

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

  bit mown [NOUT];
  int mcred [NOUT];
  int mptr [NOUT];
  int no_credit_blocks = 0, owned_blocks = 0, regrants = 0;
  bit was_released [NOUT];

  initial begin
    logic [NREQ-1:0] exp_g;
    for (int o = 0; o < NOUT; o++) begin mown[o] = 0; mcred[o] = NV; mptr[o] = 0; was_released[o] = 0; end
    for (int r = 0; r < NREQ; r++) req_port[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      req = NREQ'($urandom) & NREQ'($urandom);
      for (int r = 0; r < NREQ; r++) req_port[r] = PORT_W'($urandom_range(0, NOUT - 1));
      for (int o = 0; o < NOUT; o++) begin
        release_out[o] = mown[o] && ($urandom_range(0, 5) == 0);
        credit_in[o]   = (mcred[o] < NV) && ($urandom_range(0, 7) == 0);
      end
      #1;
      // model
      exp_g = '0;
      for (int o = 0; o < NOUT; o++) begin
        bit any_req;
        any_req = 0;
        for (int r = 0; r < NREQ; r++) if (req[r] && req_port[r] == o) any_req = 1;
        if (any_req && mown[o]) owned_blocks++;
        if (any_req && !mown[o] && mcred[o] == 0) no_credit_blocks++;
        if (any_req && !mown[o] && mcred[o] > 0) begin
          for (int k = 0; k < NREQ; k++) begin
            int r;
            r = (mptr[o] + k) % NREQ;
            if (req[r] && req_port[r] == o) begin
              exp_g[r] = 1;
              mptr[o] = (r + 1) % NREQ;
              break;
            end
          end
        end
      end
      check("grant", grant, exp_g);
      for (int o = 0; o < NOUT; o++) begin
        check("owned", out_owned[o], mown[o]);
        check("has credit", out_has_credit[o], mcred[o] > 0);
      end
      // state update
      for (int o = 0; o < NOUT; o++) begin
        bit g;
        g = 0;
        for (int r = 0; r < NREQ; r++) if (exp_g[r] && req_port[r] == o) g = 1;
        if (g) begin
          mown[o] = 1; mcred[o]--;
          if (was_released[o]) regrants++;
        end else if (release_out[o]) begin
          mown[o] = 0; was_released[o] = 1;
        end
        if (credit_in[o]) mcred[o]++;
      end
      @(negedge clk);
    end
    checks++;
    if (no_credit_blocks == 0 || owned_blocks == 0 || regrants == 0) begin
      failures++;
      $display("FAIL a case never happened: no-credit %0d owned %0d regrant %0d",
               no_credit_blocks, owned_blocks, regrants);
    end
    $display("blocked for credit %0d, blocked by owner %0d, regrants %0d",
             no_credit_blocks, owned_blocks, regrants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
