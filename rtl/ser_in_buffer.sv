// ser_in_buffer: the router's serial-in flit buffer.
//
// While en is high, one bit of s_in is shifted in per clock at the top of
// s_out, so s_out = {s_in, s_out[W-1:1]}; the first bit sent ends up in
// s_out[0]. After W bits valid goes high and s_out holds the whole flit.
// A high rd_ack from the reader clears valid and returns s_out and the bit
// counter to zero. If en is high in the same cycle as rd_ack, that bit
// starts the next flit, so frames may follow each other back to back once
// the reader acknowledges combinationally.
//
// Ports, shift direction and the valid/rd_ack behaviour follow the
// buffer's description and waveform (s_out steps 80, 40, 20, 90, C8, 64,
// 32, 19 for the bits 1,0,0,1,1,0,0,0). The active-low reset and the
// handling of a frame arriving while valid is still unacknowledged
// (forbidden, checked by an assertion) are this design's choices.
//
// Timing: valid rises on the clock edge that samples the W-th bit, i.e.
// W cycles after the first cycle with en high (8 cycles for W = 8).
module ser_in_buffer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,    // active-low synchronous reset
  input  logic         en,       // a bit is present on s_in
  input  logic         s_in,     // serial data, first bit = flit bit 0
  input  logic         rd_ack,   // reader has taken s_out
  output logic         valid,    // s_out holds a complete flit
  output logic [W-1:0] s_out
);

  localparam int unsigned CW = $clog2(W + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_out <= '0;
      cnt   <= '0;
      valid <= 1'b0;
    end else begin
      if (rd_ack) begin
        valid <= 1'b0;
        if (en) begin
          s_out <= {s_in, {(W-1){1'b0}}};
          cnt   <= CW'(1);
        end else begin
          s_out <= '0;
          cnt   <= '0;
        end
      end else if (en && !valid) begin
        s_out <= {s_in, s_out[W-1:1]};
        if (cnt == CW'(W - 1)) begin
          cnt   <= '0;
          valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // A new frame must not start before the previous flit is acknowledged.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (valid && !rd_ack) |-> !en);

endmodule
