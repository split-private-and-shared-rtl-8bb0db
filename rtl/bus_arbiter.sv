// Round-robin arbiter for the snooping bus.
//
// Each node raises req[i] and keeps it high for its whole bus tenure, which may hold several
// bus commands (a victim write-back followed by the fill, for instance). The arbiter grants
// one node at a time (gnt is one-hot and registered) and keeps the grant until that node
// drops its request; the next grant then goes to the first requester after the previous
// owner, so every requester is served within N tenures. One idle cycle separates two
// tenures. The document only names a shared snooping bus; the arbitration scheme is this
// design's choice.
module bus_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // most recent owner
  logic [N-1:0]  pick;
  logic [IW-1:0] pick_idx;

  always_comb begin
    logic found;
    found    = 1'b0;
    pick     = '0;
    pick_idx = last;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (!found && req[c]) begin
        found    = 1'b1;
        pick     = N'(1) << c;
        pick_idx = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= IW'(N - 1);
    end else if (gnt == '0) begin
      gnt  <= pick;
      if (pick != '0) last <= pick_idx;
    end else if ((gnt & req) == '0) begin
      gnt <= '0;   // owner finished its tenure
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("bus grant not one-hot");

endmodule
