// ser_out: output link serializer of one router port.
//
// A flit offered on din with load while ready is high is captured into
// shift_reg and sent LSB first, one bit per clock, on flit_out, with
// flit_en_out high for exactly W cycles. shift_reg shifts right every bit,
// so for the flit 19h it steps 19, 0C, 06, 03, 01, 00. After the last bit
// the serializer stays busy for GAP idle cycles with flit_en_out low so
// that the receiver's buffer sees separate frames.
//
// The shift register, the LSB-first order and the en/data pair of link
// signals follow the router waveforms; the idle gap is this design's choice.
//
// Timing: the first bit appears in the cycle after load; ready returns
// W + GAP cycles after load.
module ser_out #(
  parameter int unsigned W   = 8,
  parameter int unsigned GAP = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic         ready,
  output logic         flit_en_out,
  output logic         flit_out
);

  localparam int unsigned CW = $clog2(W + GAP + 1);
  logic [W-1:0]  shift_reg;
  logic [CW-1:0] left;      // bits plus gap cycles still to go

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shift_reg <= '0;
      left      <= '0;
    end else if (load && ready) begin
      shift_reg <= din;
      left      <= CW'(W + GAP);
    end else if (left != '0) begin
      shift_reg <= shift_reg >> 1;
      left      <= left - 1'b1;
    end
  end

  assign ready       = (left == '0);
  assign flit_en_out = (left > CW'(GAP));
  assign flit_out    = flit_en_out & shift_reg[0];

  a_load_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                      load |-> ready);

endmodule
