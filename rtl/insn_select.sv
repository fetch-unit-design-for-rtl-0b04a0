// Instruction selection: four of the eight fetched instructions to decode.
//
// With two clusters, two fetch blocks (4 instructions each) can be read per
// cycle while decode takes four. Each fetch block is seen as two aligned
// 2-instruction sub-blocks (instructions 0-1 and 2-3); the selector forwards
// up to two sub-blocks per cycle, each occupying a 2-instruction output pair,
// which is cheaper than merging single instructions at the cost of some
// combinations. Order (this design's choice): all remaining sub-blocks of the
// priority cluster in address order, then those of the other cluster. The
// priority swaps after every cycle in which both clusters offered work and
// decode accepted, except that when both blocks belong to the same thread the
// older one ('blk_old') goes first, keeping program order. Instructions before the fetch entry point are marked
// invalid by 'ivalid' but still travel in their pair.
//
// Combinational outputs; 'taken[c]' reports the sub-blocks of cluster c that
// decode accepted this cycle (only when dec_ready), so the fetch-block
// registers can retire them.
module insn_select
  import scsmt_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic      [1:0]           blk_v,        // per cluster: block register holds work
  input  logic      [1:0][1:0]      blk_rem,      // per cluster: sub-blocks still to send
  input  logic      [1:0][3:0]      blk_ivalid,   // per cluster: valid instructions
  input  tid_t      [1:0]           blk_tid,
  input  addr_t     [1:0]           blk_pc,       // block-aligned address
  input  blk_data_t [1:0]           blk_insn,
  input  logic                      blk_old,      // cluster whose block is older
  input  logic                      dec_ready,
  output logic      [3:0]           dec_v,
  output tid_t      [3:0]           dec_tid,
  output addr_t     [3:0]           dec_pc,
  output logic      [3:0][INSN_W-1:0] dec_insn,
  output logic      [1:0][1:0]      taken
);
  logic prio;   // cluster that goes first (round-robin state)
  logic first;  // cluster that goes first this cycle
  // Two blocks of one thread must leave in program order: the older first.
  assign first = (blk_v == 2'b11 && blk_tid[0] == blk_tid[1]) ? blk_old : prio;

  always_comb begin
    logic       cl [4];
    logic       sb [4];
    logic       pres [4];
    int         n;
    dec_v    = '0;
    dec_tid  = '0;
    dec_pc   = '0;
    dec_insn = '0;
    taken    = '0;
    cl[0] = first;  sb[0] = 1'b0;
    cl[1] = first;  sb[1] = 1'b1;
    cl[2] = !first; sb[2] = 1'b0;
    cl[3] = !first; sb[3] = 1'b1;
    n = 0;
    for (int k = 0; k < 4; k++) begin
      pres[k] = blk_v[cl[k]] && blk_rem[cl[k]][sb[k]];
      if (pres[k] && n < 2) begin
        for (int j = 0; j < 2; j++) begin
          dec_v[2*n+j]    = blk_ivalid[cl[k]][2*sb[k]+j];
          dec_tid[2*n+j]  = blk_tid[cl[k]];
          dec_pc[2*n+j]   = blk_pc[cl[k]] + ADDR_W'(8*sb[k] + 4*j);
          dec_insn[2*n+j] = blk_insn[cl[k]][INSN_W*(2*sb[k]+j) +: INSN_W];
        end
        if (dec_ready) taken[cl[k]][sb[k]] = 1'b1;
        n++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio <= 1'b0;
    else if (dec_ready && (blk_v[0] && blk_rem[0] != '0) && (blk_v[1] && blk_rem[1] != '0))
      prio <= !prio;
  end
endmodule
