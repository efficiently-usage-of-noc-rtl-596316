// rr_arbiter: round-robin arbiter over N requesters.
//
// gnt is one-hot (or zero when nothing is requested) and goes to the first
// requester at or after the priority pointer. When advance is high the
// pointer moves to the requester after the one granted, so a requester
// that has just won has the lowest priority next time. Combinational from
// req to gnt; the pointer is a register.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr, win;
  logic          any;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any      = 1'b1;
        win      = IW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && any)
      ptr <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

endmodule
