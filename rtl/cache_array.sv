// Instruction array and next-block field memory of one cluster.
//
// 2048 fetch blocks of four instructions each, and beside every block its
// next-block field: the predicted index (and way) of the block to fetch next,
// with a 2-bit hysteresis counter. The two live in separate memories with the
// same entry numbering, as a single bank of next-block fields is the layout the
// critical next-block loop is reasoned about with.
//
// Read: 'rd_en' registers 'rd_idx'; during the following cycle 'rd_data' and
// 'rd_nb' show that entry (a synchronous-read RAM). With rd_en low the
// address register holds, so the outputs stay on the same entry.
// Fill: 'fill_we' writes a block and initialises its next-block field to
// 'fill_nb' with counter 0.
// Training: 'trn_v' reads the field at 'trn_idx' combinationally, applies the
// hysteresis rule (nb_hysteresis) and writes it back at the clock edge. Bits
// set in 'trn_keep' are taken from the stored field instead of the target
// (used to keep the predicted way when only the address is known). A fill
// to the same cycle has priority on the next-block memory; 'trn_drop' flags a
// training request lost to such a conflict.
//
// The 2048-block size, the next-block field per block and its 2-bit counter
// follow the published organisation; the port set and synchronous-read timing
// are this design's own choices.
module cache_array
  import scsmt_pkg::*;
#(
  parameter int unsigned BLOCKS = ARR_BLOCKS
) (
  input  logic                      clk,
  input  logic                      rd_en,
  input  logic [$clog2(BLOCKS)-1:0] rd_idx,
  output blk_data_t                 rd_data,
  output nb_field_t                 rd_nb,
  input  logic                      fill_we,
  input  logic [$clog2(BLOCKS)-1:0] fill_idx,
  input  blk_data_t                 fill_data,
  input  bidx_t                     fill_nb,
  input  logic                      trn_v,
  input  logic [$clog2(BLOCKS)-1:0] trn_idx,
  input  bidx_t                     trn_target,
  input  logic                      trn_correct,
  input  bidx_t                     trn_keep,     // target bits taken from the stored field
  output logic                      trn_drop
);
  localparam int unsigned IW = $clog2(BLOCKS);
  blk_data_t data_mem [BLOCKS];
  nb_field_t nb_mem   [BLOCKS];
  logic [IW-1:0] rd_q;
  nb_field_t     trn_new;

  always_ff @(posedge clk) begin
    if (rd_en) rd_q <= rd_idx;
  end

  assign rd_data = data_mem[rd_q];
  assign rd_nb   = nb_mem[rd_q];

  nb_hysteresis u_hyst (
    .cur     (nb_mem[trn_idx]),
    .target  ((trn_target & ~trn_keep) | (nb_mem[trn_idx].nb & trn_keep)),
    .correct (trn_correct),
    .nxt     (trn_new)
  );

  assign trn_drop = trn_v && fill_we;

  always_ff @(posedge clk) begin
    if (fill_we) data_mem[fill_idx] <= fill_data;
  end

  always_ff @(posedge clk) begin
    if (fill_we)    nb_mem[fill_idx] <= '{nb: fill_nb, hyst: 2'd0};
    else if (trn_v) nb_mem[trn_idx]  <= trn_new;
  end
endmodule
