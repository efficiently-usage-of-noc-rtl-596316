// tb_ser_out: self-checking test of the output link serializer.
// Loads flits (19h first, then random ones), checks that flit_en_out is
// high for exactly 8 cycles starting the cycle after load, that the bits
// come LSB first, that the idle gap follows and that ready returns after
// 9 cycles.
module tb_ser_out;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] din = 0;
  logic ready, flit_en_out, flit_out;
  int checks = 0, failures = 0;

  ser_out #(.W(8), .GAP(1)) dut (.*);

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
    logic [7:0] f;
    logic [7:0] got;
    int cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle ready", ready, 1);
    check("idle en", flit_en_out, 0);
    for (int k = 0; k < 30; k++) begin
      f = (k == 0) ? 8'h19 : 8'($urandom);
      load = 1; din = f;
      @(negedge clk);
      load = 0; din = 8'hxx;
      got = 0;
      for (int i = 0; i < 8; i++) begin
        check("en during frame", flit_en_out, 1);
        check("busy during frame", ready, 0);
        got[i] = flit_out;
        @(negedge clk);
      end
      check("frame data LSB first", got, f);
      check("gap en low", flit_en_out, 0);
      check("gap data low", flit_out, 0);
      check("busy during gap", ready, 0);
      @(negedge clk);
      check("ready after W+GAP", ready, 1);
      cycles = $urandom_range(0, 2);
      repeat (cycles) begin
        check("idle en low", flit_en_out, 0);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
