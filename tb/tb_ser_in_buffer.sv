// tb_ser_in_buffer: self-checking test of the serial-in flit buffer.
// Sends the bit pattern 1,0,0,1,1,0,0,0 and checks s_out after every bit
// (80, 40, 20, 90, C8, 64, 32, 19), that valid rises exactly 8 cycles after
// en, that rd_ack clears valid and s_out, then sends random flits back to
// back with rd_ack given in the cycle valid is seen.
module tb_ser_in_buffer;
  logic clk = 0, rst_n = 0, en = 0, s_in = 0, rd_ack = 0;
  logic valid;
  logic [7:0] s_out;
  int checks = 0, failures = 0;

  ser_in_buffer #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pat;
    logic [7:0] exp_shift;
    int cyc;
    logic [7:0] f;
    pat = 8'h19;  // sent LSB first: 1,0,0,1,1,0,0,0
    exp_shift = 8'h00;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle valid", valid, 0);
    // figure pattern
    cyc = 0;
    for (int i = 0; i < 8; i++) begin
      en = 1; s_in = pat[i];
      @(posedge clk); #1;
      cyc++;
      exp_shift = {pat[i], exp_shift[7:1]};
      check($sformatf("s_out after bit %0d", i), s_out, exp_shift);
      check($sformatf("valid after bit %0d", i), valid, (i == 7));
      @(negedge clk);
    end
    en = 0;
    check("final flit", s_out, 8'h19);
    check("latency 8 cycles", cyc, 8);
    // valid holds until acknowledged
    repeat (3) @(negedge clk);
    check("valid held", valid, 1);
    check("data held", s_out, 8'h19);
    rd_ack = 1;
    @(negedge clk);
    rd_ack = 0;
    check("valid cleared", valid, 0);
    check("s_out cleared", s_out, 0);
    // random flits back to back, acknowledged when valid is seen
    for (int k = 0; k < 40; k++) begin
      f = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        en = 1; s_in = f[i];
        rd_ack = valid;          // reader takes the previous flit now
        @(negedge clk);
      end
      en = 0; rd_ack = 0;
      check("valid after random flit", valid, 1);
      check("random flit data", s_out, f);
      if (k % 3 == 0) begin      // sometimes a gap with the ack on its own
        rd_ack = 1;
        @(negedge clk);
        rd_ack = 0;
        check("valid cleared by ack", valid, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
