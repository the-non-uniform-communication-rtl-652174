// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters. The search starts at the requester after the
// one last granted, so every persistent requester is served within N grants.
// The pointer moves only when `advance` is high, which lets a two-stage
// allocator keep a first-stage winner's priority if the second stage
// refuses it. Grant is combinational from req; the pointer is registered.
// The document arbitrates virtual channels round-robin; the pointer-update
// rule is this design's own.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // accept this cycle's grant
  output logic [N-1:0] gnt,       // one-hot, or zero when no request
  output logic [$clog2(N)-1:0] gnt_idx
);

  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int unsigned i = 0; i < N; i++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + i) % N);
      if (gnt == '0 && req[idx]) begin
        gnt[idx] = 1'b1;
        gnt_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt != '0) ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (req != '0) |-> (gnt != '0));

endmodule
