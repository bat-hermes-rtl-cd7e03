// bat_arbiter: arbiter of an Output Interface.
//
// Up to N Output Controls raise a level request (req_i) when they hold a
// header for this output; the arbiter answers with a one-hot level grant
// (grant_o) and keeps it for as long as that request stays high, i.e. for a
// whole packet (wormhole switching). When the holder drops its request the
// grant is withdrawn on the next edge and, on the same edge, passed to the
// next requester in round-robin order starting after the previous holder.
// Timing: a request seen before an edge is granted on that edge when the
// output is free. Mutual exclusion and the level-signaling request/grant
// protocol are the published design's; that design resolves simultaneous requests
// with MUTEX cells, and the round-robin order is this design's choice.
module bat_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_i,
  output logic [N-1:0] grant_o
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;   // index of the most recent holder
  logic [N-1:0]  grant_n;
  logic [IW-1:0] last_n;

  logic [IW-1:0] idx;

  always_comb begin
    grant_n = grant_o & req_i;          // the holder keeps the output
    last_n  = last_q;
    idx     = last_q;
    if (grant_n == '0) begin
      for (int unsigned off = 1; off <= N; off++) begin
        idx = IW'((int'(last_q) + off) % N);
        if (grant_n == '0 && req_i[idx]) begin
          grant_n[idx] = 1'b1;
          last_n       = idx;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_o <= '0;
      last_q  <= IW'(N - 1);
    end else begin
      grant_o <= grant_n;
      last_q  <= last_n;
    end
  end

  property p_onehot;
    @(posedge clk) disable iff (!rst_n) $onehot0(grant_o);
  endproperty
  assert property (p_onehot);

endmodule
