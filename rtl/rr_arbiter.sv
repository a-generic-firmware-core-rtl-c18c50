// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters (one-hot grant, plus its index). The search
// starts just after the requester granted last, so every requester is
// served within N grants. The pointer moves only when the caller signals
// that the granted request was taken (accept), so a grant stays stable
// while the winner waits for its consumer. Purely combinational grant; the
// pointer is a register.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 accept,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] last;
  logic [31:0]   idx;   // requester examined in the search loop

  always_comb begin
    idx       = '0;
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 1; k <= N; k++) begin
      idx = 32'((int'(last) + k) % N);
      if (!any && req[idx]) begin
        any         = 1'b1;
        grant[idx]  = 1'b1;
        grant_idx   = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             last <= IW'(N - 1);
    else if (accept && any) last <= grant_idx;
  end
endmodule
