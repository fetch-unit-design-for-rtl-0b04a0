// Conditional branch predictor of one cluster (tournament predictor).
//
// The single-thread predictor this design starts from combines a local
// predictor (a 1K-entry table of per-branch histories indexing a 1K-entry
// table of counters) with a global predictor (4K counters indexed by the
// global history) and a 4K-entry choice table. The tables are split in half
// statically to give one independent predictor per cluster, so each unit
// holds LHT=512 local histories, LPT=512 local counters, GPT=2048 global
// counters and CHT=2048 choice counters. Counter width (2 bits), history
// lengths (log2 of the table sizes) and per-thread global histories are this
// design's choices.
//
// Lookup ('lk_pc', 'lk_tid') is combinational: local history at pc[12:4] of
// the block address -> local counter; thread's global history -> global and
// choice counters; choice counter >= 2 selects the global prediction.
// Update ('up_v') trains all three tables and shifts the outcome into the local
// history and the thread's global history at the clock edge. After reset the
// tables are cleared by a sweep of GPT cycles ('ready' low meanwhile; updates
// are ignored until then).
module cond_bpred
  import scsmt_pkg::*;
#(
  parameter int unsigned LHT = 512,
  parameter int unsigned LPT = 512,
  parameter int unsigned GPT = 2048,
  parameter int unsigned CHT = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t lk_pc,
  input  tid_t  lk_tid,
  output logic  lk_taken,
  input  logic  up_v,
  input  addr_t up_pc,
  input  tid_t  up_tid,
  input  logic  up_taken,
  output logic  ready
);
  localparam int unsigned LHW = $clog2(LPT);   // local history length
  localparam int unsigned LIW = $clog2(LHT);
  localparam int unsigned GHW = $clog2(GPT);   // global history length
  localparam int unsigned SW  = (GHW > LIW) ? GHW : LIW;

  logic [LHW-1:0] lht [LHT];
  logic [1:0]     lpt [LPT];
  logic [1:0]     gpt [GPT];
  logic [1:0]     cht [CHT];
  logic [GHW-1:0] ghr [NTHREADS];

  logic [SW:0]    sweep;     // bit SW set when the clearing sweep is done
  assign ready = sweep[SW];

  function automatic logic [1:0] sat(logic [1:0] c, logic up);
    if (up) return (c == 2'd3) ? c : c + 2'd1;
    else    return (c == 2'd0) ? c : c - 2'd1;
  endfunction

  // lookup
  logic [LIW-1:0] lk_li;
  logic [LHW-1:0] lk_lh;
  logic           lk_lp, lk_gp;
  always_comb begin
    lk_li    = lk_pc[LIW+3:4];
    lk_lh    = lht[lk_li];
    lk_lp    = lpt[lk_lh][1];
    lk_gp    = gpt[ghr[lk_tid]][1];
    lk_taken = cht[$clog2(CHT)'(ghr[lk_tid])][1] ? lk_gp : lk_lp;
  end

  // update
  logic [LIW-1:0] up_li;
  logic [LHW-1:0] up_lh;
  logic [GHW-1:0] up_gh;
  logic           up_lp_ok, up_gp_ok;
  always_comb begin
    up_li    = up_pc[LIW+3:4];
    up_lh    = lht[up_li];
    up_gh    = ghr[up_tid];
    up_lp_ok = (lpt[up_lh][1] == up_taken);
    up_gp_ok = (gpt[up_gh][1] == up_taken);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep <= '0;
      for (int t = 0; t < NTHREADS; t++) ghr[t] <= '0;
    end else begin
      if (!ready) sweep <= sweep + 1'b1;
      else if (up_v) ghr[up_tid] <= {up_gh[GHW-2:0], up_taken};
    end
  end

  always_ff @(posedge clk) begin
    if (!ready) begin
      if (32'(sweep[SW-1:0]) < LHT) lht[sweep[LIW-1:0]] <= '0;
      if (32'(sweep[SW-1:0]) < LPT) lpt[sweep[LHW-1:0]] <= 2'd1;
      if (32'(sweep[SW-1:0]) < GPT) gpt[sweep[GHW-1:0]] <= 2'd1;
      if (32'(sweep[SW-1:0]) < CHT) cht[sweep[$clog2(CHT)-1:0]] <= 2'd1;
    end else if (up_v) begin
      lht[up_li] <= {up_lh[LHW-2:0], up_taken};
      lpt[up_lh] <= sat(lpt[up_lh], up_taken);
      gpt[up_gh] <= sat(gpt[up_gh], up_taken);
      if (up_lp_ok != up_gp_ok)
        cht[$clog2(CHT)'(up_gh)] <= sat(cht[$clog2(CHT)'(up_gh)], up_gp_ok);
    end
  end
endmodule
