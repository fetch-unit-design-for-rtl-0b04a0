// Shared constants and types of the clustered, reconfigurable SMT fetch unit.
//
// The geometry follows the Alpha-21264-style organisation the design builds on:
// a 64 KB instruction cache/BTB held as 4096 fetch blocks of four 32-bit
// instructions, split physically into two cluster arrays of 2048 blocks, each
// with a 512-entry tag table (one tag per 4-block line). Up to 8 hardware
// threads, 4 per cluster when the cache is split. The 32-bit address width,
// the 32-bit instruction width and the counter width are this design's own
// choices.
//
// Block index (12 bits), the same layout in both modes:
//   unified : {way(=cluster), line[8:0], blk[1:0]}   line = pc[14:6]
//   split   : {-, way, line[7:0], blk[1:0]}          line = pc[13:6]
// In both modes the array entry is idx[10:0] and the tag-table set is idx[10:2];
// the stored tag is always pc[ADDR_W-1:14] (in unified mode bit 14 is redundant).
package scsmt_pkg;

  localparam int unsigned NTHREADS    = 8;     // hardware thread contexts
  localparam int unsigned TID_W       = 3;
  localparam int unsigned NCLUSTERS   = 2;
  localparam int unsigned ADDR_W      = 32;    // byte address width (assumed)
  localparam int unsigned INSN_W      = 32;    // instruction width
  localparam int unsigned BLK_INSNS   = 4;     // instructions per fetch block
  localparam int unsigned SUBBLK      = 2;     // aligned sub-blocks per fetch block
  localparam int unsigned ARR_BLOCKS  = 2048;  // fetch blocks per cluster array
  localparam int unsigned ARR_IDX_W   = 11;
  localparam int unsigned BIDX_W      = 12;    // full block index (4096 blocks)
  localparam int unsigned TAG_SETS    = 512;   // tag entries per cluster tag table
  localparam int unsigned SET_W       = 9;
  localparam int unsigned LINE_BLOCKS = 4;     // fetch blocks per cache line
  localparam int unsigned TAG_LSB     = 14;
  localparam int unsigned TAG_W       = ADDR_W - TAG_LSB;
  localparam int unsigned RAS_DEPTH   = 16;
  localparam int unsigned CTR_W       = 32;    // performance counter width (assumed)

  typedef logic [INSN_W*BLK_INSNS-1:0] blk_data_t;
  typedef logic [BIDX_W-1:0]           bidx_t;
  typedef logic [TID_W-1:0]            tid_t;
  typedef logic [ADDR_W-1:0]           addr_t;
  typedef logic [TAG_W-1:0]            tag_t;

  // Next-block field of a fetch block: predicted next block index (whose high
  // bit is the predicted way) and its 2-bit hysteresis counter.
  typedef struct packed {
    bidx_t      nb;
    logic [1:0] hyst;
  } nb_field_t;

  // Block index of a byte address for the given mode and way.
  function automatic bidx_t pc_to_bidx(addr_t pc, logic unified, logic way);
    if (unified) return {way, pc[14:4]};
    else         return {1'b0, way, pc[13:4]};
  endfunction

  // Address predicted by a next-block field: the index bits come from the field,
  // the bits above them are carried over from the block that made the prediction.
  function automatic addr_t nb_to_pc(addr_t cur_pc, bidx_t nb, logic unified);
    if (unified) return {cur_pc[ADDR_W-1:15], nb[10:0], 4'b0000};
    else         return {cur_pc[ADDR_W-1:14], nb[9:0], 4'b0000};
  endfunction

  function automatic logic bidx_way(bidx_t b, logic unified);
    return unified ? b[11] : b[10];
  endfunction

  // Sequential successor of a block index (same predicted way).
  function automatic bidx_t bidx_seq(bidx_t b, logic unified);
    if (unified) return {b[11], b[10:0] + 11'd1};
    else         return {1'b0, b[10], b[9:0] + 10'd1};
  endfunction

endpackage
