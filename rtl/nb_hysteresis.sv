// Next-block field update with a 2-bit hysteresis counter.
//
// Every fetch block carries a prediction of the block fetched after it (the
// integrated BTB) and a 2-bit counter that protects that prediction from being
// replaced by a single odd outcome, which helps indirect jumps that alternate
// targets. The counter itself follows the design it builds on; the update rule
// is this design's choice:
//   correct = 1 (prediction confirmed): counter saturating +1, target kept.
//   correct = 0, target differs, counter > 0: counter -1, target kept.
//   correct = 0, target differs, counter = 0: target replaced, counter := 1.
//   correct = 0 but target equals the stored one: treated as a confirmation.
// Purely combinational.
module nb_hysteresis
  import scsmt_pkg::*;
(
  input  nb_field_t cur,      // stored field
  input  bidx_t     target,   // block index that actually followed
  input  logic      correct,  // 1: the stored prediction was confirmed
  output nb_field_t nxt       // field to write back
);
  always_comb begin
    nxt = cur;
    if (correct || cur.nb == target) begin
      if (cur.hyst != 2'd3) nxt.hyst = cur.hyst + 2'd1;
    end else if (cur.hyst != 2'd0) begin
      nxt.hyst = cur.hyst - 2'd1;
    end else begin
      nxt.nb   = target;
      nxt.hyst = 2'd1;
    end
  end
endmodule
