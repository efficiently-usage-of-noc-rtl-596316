// crossbar: the router's P:P switch.
//
// Every output port o forwards the flit of the input port named by sel[o]
// when sel_valid[o] is high; otherwise it shows no flit (zero data). Any
// input can reach any output, so the switch carries north to south, east to
// west and back, and local to all four directions, as well as traffic into
// the local port. Several outputs may select the same input.
//
// Purely combinational. The per-output select follows the crossbar
// waveforms (sel_n, sel_e, sel_s, sel_w); using a full port index as the
// select is this design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NP = 5
) (
  input  flit_t             in_data   [NP],
  input  logic [PORT_W-1:0] sel       [NP],
  input  logic [NP-1:0]     sel_valid,
  output flit_t             out_data  [NP],
  output logic [NP-1:0]     out_valid
);

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_valid[o] = sel_valid[o] && (int'(sel[o]) < NP);
      out_data[o]  = out_valid[o] ? in_data[sel[o]] : '0;
    end
  end

endmodule
