// tb_crossbar: self-checking test of the 5x5 crossbar with random inputs
// and selects, compared with a reference mux built in the testbench.
module tb_crossbar;
  import noc_pkg::*;
  flit_t             in_data  [5];
  logic [PORT_W-1:0] sel      [5];
  logic [4:0]        sel_valid;
  flit_t             out_data [5];
  logic [4:0]        out_valid;
  int checks = 0, failures = 0;

  crossbar #(.NP(5)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int p = 0; p < 5; p++) begin
        in_data[p] = flit_t'($urandom);
        sel[p]     = PORT_W'($urandom_range(0, 4));
      end
      sel_valid = 5'($urandom);
      if (t == 0) begin   // north<->south, east<->west, local->west
        sel[P_S] = P_N; sel[P_N] = P_S; sel[P_E] = P_W; sel[P_W] = P_L; sel[P_L] = P_E;
        sel_valid = '1;
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_valid[o] !== sel_valid[o] ||
            (sel_valid[o] && out_data[o] !== in_data[sel[o]]) ||
            (!sel_valid[o] && out_data[o] !== '0)) begin
          failures++;
          $display("FAIL t=%0d out %0d: valid %b data %h, sel %0d", t, o, out_valid[o], out_data[o], sel[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
