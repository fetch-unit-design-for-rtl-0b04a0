// Tag table of one cluster, with valid bits and two tag comparators.
//
// 512 entries, one per 4-block cache line of the cluster's array. In unified
// mode the table is one 512-set way of the 2-way cache; in split mode the same
// storage is read as two 256-set ways (the set's top bit is the way). The
// table itself does not know the mode: the caller forms the two set numbers.
// Two read ports (A, B) each compare the stored tag with a lookup tag and
// report a hit (valid and equal) combinationally. One write port installs a
// tag and sets its valid bit at the end of a line fill; 'inv' clears the
// valid bit of a line whose refill starts, so no stale block can hit. 'flush' clears every
// valid bit in one cycle, used when the fetch unit is reconfigured (the cache
// contents are then meaningless). Reset also clears the valid bits.
//
// The 512 entries and the 2x256 / 1x512 use follow the published organisation;
// the flop-based valid bits, the single-cycle flush and the port timing are
// this design's own choices.
module tag_table
  import scsmt_pkg::*;
#(
  parameter int unsigned SETS = TAG_SETS,
  parameter int unsigned TW   = TAG_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic [$clog2(SETS)-1:0] a_set,
  input  logic [TW-1:0]           a_tag,
  output logic                    a_hit,
  output logic                    a_valid,
  input  logic [$clog2(SETS)-1:0] b_set,
  input  logic [TW-1:0]           b_tag,
  output logic                    b_hit,
  output logic                    b_valid,
  input  logic                    inv,      // clear one valid bit
  input  logic [$clog2(SETS)-1:0] inv_set,
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] w_set,
  input  logic [TW-1:0]           w_tag
);
  logic [TW-1:0]   tags [SETS];
  logic [SETS-1:0] valid;

  assign a_hit   = valid[a_set] && (tags[a_set] == a_tag);
  assign b_hit   = valid[b_set] && (tags[b_set] == b_tag);
  assign a_valid = valid[a_set];
  assign b_valid = valid[b_set];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      valid <= '0;
    else if (flush)  valid <= '0;
    else begin
      if (inv) valid[inv_set] <= 1'b0;
      if (we)  valid[w_set]   <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) tags[w_set] <= w_tag;
  end
endmodule
