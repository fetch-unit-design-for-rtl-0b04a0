// Thread selection for one cluster.
//
// Each cycle picks which thread context accesses the cluster's cache/BTB.
// 'elig' marks the threads that may be chosen (active, mapped to this cluster,
// no pending cache miss, not already being served). Selection is round-robin,
// starting after the last thread granted (the policy beyond excluding
// threads with pending misses is this design's choice). 'advance' commits the grant and moves the round-robin
// pointer; grant outputs are combinational.
module thread_select #(
  parameter int unsigned N  = 8,
  parameter int unsigned TW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  elig,
  input  logic          advance,
  output logic          gnt_v,
  output logic [TW-1:0] gnt_tid
);
  logic [TW-1:0] last;

  always_comb begin
    gnt_v   = 1'b0;
    gnt_tid = '0;
    for (int k = N; k >= 1; k--) begin
      logic [TW-1:0] t;
      t = TW'((32'(last) + k) % N);
      if (elig[t]) begin
        gnt_v   = 1'b1;
        gnt_tid = t;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  last <= TW'(N - 1);
    else if (advance && gnt_v)   last <= gnt_tid;
  end
endmodule
