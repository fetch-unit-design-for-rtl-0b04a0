// Clustered, reconfigurable fetch unit for scalable simultaneous multithreading.
//
// Up to eight hardware threads share a 64 KB instruction cache with an
// integrated next-block predictor (BTB), built as two cluster arrays of 2048
// fetch blocks (four instructions each) with one 512-entry tag table each.
// The unit runs in one of two modes, chosen by software through alloc_ctrl:
//   unified : one 2-way cache for all threads. A 12-bit block index selects
//             cluster = way by its top bit; both tag tables are compared in
//             parallel to detect a way miss (tag in the other way) or a miss.
//   split   : two independent 2-way caches of 32 KB. Threads 0,2,4,6 use
//             cluster 0 and threads 1,3,5,7 cluster 1; an 11-bit index is used
//             and each tag table is read as two 256-entry ways.
// Switching mode waits until no access or fill is in flight and then clears
// all tag valid bits: the cached contents are given up.
//
// Pipeline, per cluster (two cycles from selection to the decode port):
//   select : thread_select picks an eligible thread (active, no pending miss,
//            mapped to the cluster). The block index comes from a 3-input
//            multiplexer: the thread's PC register, the next-block field just
//            read from the own array, or (unified mode) the one just read from
//            the other array. The last two let a thread fetch back to back
//            along its next-block predictions.
//   access : array and next-block field are read (synchronous RAM), tags are
//            compared. Hit: the block goes to the cluster's fetch-block
//            register and the thread's PC register takes the predicted next
//            block. Way miss: the thread retries in the other way and the
//            next-block field that predicted the wrong way is trained. Miss:
//            the thread waits for a line fill (miss_handler, one per cluster).
//            Selection does not wait for this outcome: an access already
//            issued behind a miss, way miss or redirect of its thread is
//            squashed.
//   deliver: insn_select sends up to two aligned 2-instruction sub-blocks from
//            the two fetch-block registers to decode; a cluster whose register
//            is not drained stalls.
// Each cluster's access also looks up its conditional branch predictor; the
// prediction travels with the fetched block. Per-thread return address
// stacks, predictor updates and next-block training are driven by the decode
// and branch-resolution stages outside this unit.
//
// The geometry, the two modes, the three-input next-block multiplexer, the
// squash-on-late-miss selection and the sub-block instruction selection follow
// the published organisation. Timing, the L2 and redirect/training interfaces,
// replacement (invalid way first, else alternating) and the handling of busy
// miss handlers are this design's own choices.
// Some output bits are constant by construction: the low four bits of
// 'fb_pc' (block aligned), the low six bits of 'l2_req_addr' (line aligned).
module scsmt_fetch_unit
  import scsmt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // redirect / thread start: the thread's next fetch address
  input  logic                  redir_v,
  input  tid_t                  redir_tid,
  input  addr_t                 redir_pc,
  // next-block training from decode / branch resolution
  input  logic                  trn_v,
  input  tid_t                  trn_tid,
  input  bidx_t                 trn_bidx,     // fb_bidx of the block that predicted
  input  addr_t                 trn_target,   // address that really followed it
  input  logic                  trn_correct,
  output logic                  trn_drop,     // request lost to a port conflict
  // L2 line fills, one port per cluster
  output logic [1:0]            l2_req_v,
  output addr_t [1:0]           l2_req_addr,
  input  logic [1:0]            l2_req_ready,
  input  logic [1:0]            l2_rsp_v,
  input  blk_data_t [1:0]       l2_rsp_data,
  // to decode
  output logic [3:0]            dec_v,
  output tid_t [3:0]            dec_tid,
  output addr_t [3:0]           dec_pc,
  output logic [3:0][INSN_W-1:0] dec_insn,
  input  logic                  dec_ready,
  // fetched block of each cluster (for training and branch handling)
  output logic [1:0]            fb_v,
  output tid_t [1:0]            fb_tid,
  output bidx_t [1:0]           fb_bidx,
  output addr_t [1:0]           fb_pc,
  output logic [1:0]            fb_bp_taken,
  // conditional predictor updates, one per cluster
  input  logic [1:0]            bp_up_v,
  input  addr_t [1:0]           bp_up_pc,
  input  tid_t [1:0]            bp_up_tid,
  input  logic [1:0]            bp_up_taken,
  output logic [1:0]            bp_ready,
  // per-thread return address stacks
  input  logic [NTHREADS-1:0]   ras_push,
  input  addr_t [NTHREADS-1:0]  ras_push_addr,
  input  logic [NTHREADS-1:0]   ras_pop,
  output addr_t [NTHREADS-1:0]  ras_top,
  output logic [NTHREADS-1:0]   ras_empty,
  // thread-allocation registers and trap
  input  logic                  csr_we,
  input  logic [7:0]            csr_addr,
  input  logic [31:0]           csr_wdata,
  output logic [31:0]           csr_rdata,
  output logic                  trap,
  output logic                  mode_unified  // mode currently in force
);
  localparam int unsigned NT = NTHREADS;

  // ---------------------------------------------------------------- state
  addr_t  pc_q      [NT];   // next fetch address of each thread (PC0..PC7)
  logic   way_q     [NT];   // predicted way of that address
  logic   prev_v_q  [NT];   // the next-block field that produced pc_q is known
  bidx_t  prev_bidx [NT];   // ... and sits in this block (bit 11 = array)
  logic [NT-1:0] pend_q;    // waiting for its own line fill
  logic [NT-1:0] wait_q;    // missed while the miss handler was busy
  logic [NT-1:0] kill_q;    // squash this thread's access in the access stage
  logic   unified_q;
  logic   repl_q;           // replacement toggle

  logic  [1:0] acc_v;
  tid_t  [1:0] acc_tid;
  addr_t [1:0] acc_pc;
  bidx_t [1:0] acc_bidx;

  logic      [1:0]      fbr_v;
  logic      [1:0][1:0] fbr_rem;
  logic      [1:0][3:0] fbr_ivalid;
  tid_t      [1:0]      fbr_tid;
  addr_t     [1:0]      fbr_pc;
  bidx_t     [1:0]      fbr_bidx;
  blk_data_t [1:0]      fbr_insn;
  logic      [1:0]      fbr_bp;
  logic                 fbr_old;    // cluster whose fetch-block register is older

  // ------------------------------------------------------- configuration
  logic          cfg_unified;
  logic [NT-1:0] cfg_active;
  logic          reconf;          // mode change requested
  logic          reconf_do;       // applied this cycle
  logic [NT-1:0][2:0] ev_insn;
  logic [NT-1:0] ev_miss, ev_nbmiss;

  alloc_ctrl #(.NT(NT), .CW(CTR_W)) u_alloc (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata,
    .ev_insn, .ev_miss, .ev_nbmiss, .cfg_unified, .cfg_active, .trap
  );

  assign mode_unified = unified_q;

  // ------------------------------------------------------ memories
  blk_data_t [1:0] rd_data;
  nb_field_t [1:0] rd_nb;
  logic      [1:0] rd_en;
  logic [1:0][ARR_IDX_W-1:0] rd_idx;

  logic [1:0] mh_fill_we, mh_tag_we, mh_tag_inv, mh_busy, mh_done, mh_start;
  logic [1:0][ARR_IDX_W-1:0] mh_fill_idx;
  blk_data_t [1:0] mh_fill_data;
  bidx_t [1:0] mh_fill_nb, mh_start_bidx;
  logic [1:0][SET_W-1:0] mh_tag_set, mh_inv_set;
  tag_t [1:0] mh_tag_val;
  tid_t [1:0] mh_done_tid, mh_start_tid;
  addr_t [1:0] mh_start_addr;

  logic [1:0] at_v, at_correct;
  logic [1:0][ARR_IDX_W-1:0] at_idx;
  bidx_t [1:0] at_target, at_keep;

  logic [1:0] bp_tk;
  logic [1:0] ta_hit, ta_valid, tb_hit, tb_valid;
  logic [1:0][SET_W-1:0] tb_set;
  tag_t [1:0] tb_tag;

  for (genvar x = 0; x < 2; x++) begin : g_cl
    cache_array #(.BLOCKS(ARR_BLOCKS)) u_arr (
      .clk,
      .rd_en (rd_en[x]), .rd_idx (rd_idx[x]), .rd_data (rd_data[x]), .rd_nb (rd_nb[x]),
      .fill_we (mh_fill_we[x]), .fill_idx (mh_fill_idx[x]), .fill_data (mh_fill_data[x]),
      .fill_nb (mh_fill_nb[x]),
      .trn_v (at_v[x]), .trn_idx (at_idx[x]), .trn_target (at_target[x]),
      .trn_correct (at_correct[x]), .trn_keep (at_keep[x]), .trn_drop ()
    );

    // port A: own access in its predicted way; port B: the other way
    // (unified: the other cluster's access, split: own access, other half)
    assign tb_set[x] = unified_q ? acc_bidx[1-x][10:2]
                                 : {~acc_bidx[x][10], acc_bidx[x][9:2]};
    assign tb_tag[x] = unified_q ? acc_pc[1-x][ADDR_W-1:TAG_LSB]
                                 : acc_pc[x][ADDR_W-1:TAG_LSB];

    tag_table #(.SETS(TAG_SETS), .TW(TAG_W)) u_tag (
      .clk, .rst_n, .flush (reconf_do),
      .a_set (acc_bidx[x][10:2]), .a_tag (acc_pc[x][ADDR_W-1:TAG_LSB]),
      .a_hit (ta_hit[x]), .a_valid (ta_valid[x]),
      .b_set (tb_set[x]), .b_tag (tb_tag[x]), .b_hit (tb_hit[x]), .b_valid (tb_valid[x]),
      .inv (mh_tag_inv[x]), .inv_set (mh_inv_set[x]),
      .we (mh_tag_we[x]), .w_set (mh_tag_set[x]), .w_tag (mh_tag_val[x])
    );

    miss_handler u_mh (
      .clk, .rst_n, .unified (unified_q),
      .start (mh_start[x]), .start_tid (mh_start_tid[x]), .start_addr (mh_start_addr[x]),
      .start_bidx (mh_start_bidx[x]), .busy (mh_busy[x]),
      .l2_req_v (l2_req_v[x]), .l2_req_addr (l2_req_addr[x]), .l2_req_ready (l2_req_ready[x]),
      .l2_rsp_v (l2_rsp_v[x]), .l2_rsp_data (l2_rsp_data[x]),
      .fill_we (mh_fill_we[x]), .fill_idx (mh_fill_idx[x]), .fill_data (mh_fill_data[x]),
      .fill_nb (mh_fill_nb[x]), .tag_inv (mh_tag_inv[x]), .inv_set (mh_inv_set[x]),
      .tag_we (mh_tag_we[x]), .tag_set (mh_tag_set[x]), .tag_val (mh_tag_val[x]),
      .done (mh_done[x]), .done_tid (mh_done_tid[x])
    );

    cond_bpred u_bp (
      .clk, .rst_n, .lk_pc (acc_pc[x]), .lk_tid (acc_tid[x]), .lk_taken (bp_tk[x]),
      .up_v (bp_up_v[x]), .up_pc (bp_up_pc[x]), .up_tid (bp_up_tid[x]),
      .up_taken (bp_up_taken[x]), .ready (bp_ready[x])
    );
  end

  for (genvar t = 0; t < NT; t++) begin : g_ras
    ras #(.DEPTH(RAS_DEPTH)) u_ras (
      .clk, .rst_n, .push (ras_push[t]), .push_addr (ras_push_addr[t]), .pop (ras_pop[t]),
      .top (ras_top[t]), .empty (ras_empty[t]), .count ()
    );
  end

  // -------------------------------------------- access stage: lookup result
  function automatic logic home(tid_t t);
    return t[0];
  endfunction

  logic    [1:0] squash, hit, wmiss, miss, stall, fb_free;
  logic    [1:0] pred_way;
  logic    [1:0][1:0] sb_taken;
  bidx_t   [1:0] nb_now;        // next-block prediction just read
  logic    [1:0] nb_cl;         // cluster that prediction maps to
  addr_t   [1:0] nb_pc;

  always_comb begin
    for (int x = 0; x < 2; x++) begin
      pred_way[x] = bidx_way(acc_bidx[x], unified_q);
      squash[x]   = acc_v[x] && (kill_q[acc_tid[x]] || (redir_v && redir_tid == acc_tid[x]));
      hit[x]      = acc_v[x] && !squash[x] && ta_hit[x];
      wmiss[x]    = acc_v[x] && !squash[x] && !ta_hit[x] && (unified_q ? tb_hit[1-x] : tb_hit[x]);
      miss[x]     = acc_v[x] && !squash[x] && !ta_hit[x] && !wmiss[x];
      fb_free[x]  = !fbr_v[x] || ((fbr_rem[x] & ~sb_taken[x]) == 2'b00)
                    || (redir_v && redir_tid == fbr_tid[x]);
      stall[x]    = hit[x] && !fb_free[x];
      nb_now[x]   = rd_nb[x].nb;
      nb_cl[x]    = unified_q ? nb_now[x][11] : home(acc_tid[x]);
      nb_pc[x]    = nb_to_pc(acc_pc[x], nb_now[x], unified_q);
    end
  end

  // ---------------------------------------------------- miss handling
  logic [1:0] mh_want, mh_vway, mh_tgt;
  logic [1:0] mh_wait;    // miss could not get a handler
  always_comb begin
    mh_start      = '0;
    mh_start_tid  = '0;
    mh_start_addr = '0;
    mh_start_bidx = '0;
    mh_wait       = '0;
    for (int x = 0; x < 2; x++) begin
      logic pv, ov;
      pv = ta_valid[x];
      ov = unified_q ? tb_valid[1-x] : tb_valid[x];
      mh_vway[x] = !pv ? pred_way[x] : (!ov ? !pred_way[x] : repl_q);
      mh_tgt[x]  = unified_q ? mh_vway[x] : 1'(x);
      mh_want[x] = miss[x];
    end
    for (int x = 0; x < 2; x++) begin
      if (mh_want[x]) begin
        if (!mh_busy[mh_tgt[x]] && !mh_start[mh_tgt[x]]) begin
          mh_start[mh_tgt[x]]      = 1'b1;
          mh_start_tid[mh_tgt[x]]  = acc_tid[x];
          mh_start_addr[mh_tgt[x]] = acc_pc[x];
          mh_start_bidx[mh_tgt[x]] = unified_q ? {mh_vway[x], acc_bidx[x][10:0]}
                                               : {1'b0, mh_vway[x], acc_bidx[x][9:0]};
        end else begin
          mh_wait[x] = 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------- next-block training
  // Internal (way miss) has priority over an external request on an array.
  logic trn_arr, trn_conf;
  assign trn_arr = trn_bidx[11];
  always_comb begin
    at_v = '0; at_idx = '0; at_target = '0; at_correct = '0; at_keep = '0;
    trn_conf = 1'b0;
    for (int x = 0; x < 2; x++) begin
      if (wmiss[x] && prev_v_q[acc_tid[x]]) begin
        automatic bidx_t pb = prev_bidx[acc_tid[x]];
        automatic bidx_t tg = unified_q ? {!acc_bidx[x][11], acc_bidx[x][10:0]}
                                        : {1'b0, !acc_bidx[x][10], acc_bidx[x][9:0]};
        at_v[pb[11]]       = 1'b1;
        at_idx[pb[11]]     = pb[10:0];
        at_target[pb[11]]  = tg;
        at_correct[pb[11]] = 1'b0;
        at_keep[pb[11]]    = '0;
      end
    end
    if (trn_v) begin
      if (at_v[trn_arr]) trn_conf = 1'b1;
      else begin
        at_v[trn_arr]       = 1'b1;
        at_idx[trn_arr]     = trn_bidx[10:0];
        at_target[trn_arr]  = pc_to_bidx(trn_target, unified_q, 1'b0);
        at_correct[trn_arr] = trn_correct;
        at_keep[trn_arr]    = unified_q ? 12'h800 : 12'h400;
      end
    end
  end
  // lost to another training of the same array or to a fill writing it
  assign trn_drop = trn_v && (trn_conf || mh_fill_we[trn_arr]);

  // --------------------------------------------------- thread selection
  logic [NT-1:0] stalled_t;
  logic [NT-1:0] tcl;                 // cluster each thread would access next
  logic [1:0][NT-1:0] elig;
  logic [1:0] gnt_v;
  tid_t [1:0] gnt_tid;
  logic [1:0] sel_go;

  always_comb begin
    stalled_t  = '0;
    for (int t = 0; t < NT; t++)
      tcl[t] = unified_q ? way_q[t] : home(tid_t'(t));
    for (int x = 0; x < 2; x++) begin
      if (acc_v[x] && !squash[x]) begin
        tcl[acc_tid[x]]        = nb_cl[x];
        if (stall[x]) stalled_t[acc_tid[x]] = 1'b1;
      end
    end
    for (int x = 0; x < 2; x++)
      for (int t = 0; t < NT; t++)
        elig[x][t] = cfg_active[t] && !pend_q[t] && !wait_q[t] && !stalled_t[t]
                     && !reconf && (tcl[t] == 1'(x));
  end

  for (genvar x = 0; x < 2; x++) begin : g_sel
    thread_select #(.N(NT)) u_sel (
      .clk, .rst_n, .elig (elig[x]), .advance (sel_go[x]),
      .gnt_v (gnt_v[x]), .gnt_tid (gnt_tid[x])
    );
  end

  // the three-input next-block multiplexer
  addr_t [1:0] sel_pc;
  bidx_t [1:0] sel_bidx;
  logic  [1:0][1:0] sel_src;   // 0: PC register, 1: own next block, 2: other
  always_comb begin
    for (int x = 0; x < 2; x++) begin
      sel_go[x]  = gnt_v[x] && !stall[x];
      sel_src[x] = 2'd0;
      if (acc_v[x] && !squash[x] && acc_tid[x] == gnt_tid[x])             sel_src[x] = 2'd1;
      else if (acc_v[1-x] && !squash[1-x] && acc_tid[1-x] == gnt_tid[x])  sel_src[x] = 2'd2;
      unique case (sel_src[x])
        2'd1:    begin sel_bidx[x] = nb_now[x];   sel_pc[x] = nb_pc[x];   end
        2'd2:    begin sel_bidx[x] = nb_now[1-x]; sel_pc[x] = nb_pc[1-x]; end
        default: begin
          sel_pc[x]   = pc_q[gnt_tid[x]];
          sel_bidx[x] = pc_to_bidx(pc_q[gnt_tid[x]], unified_q, way_q[gnt_tid[x]]);
        end
      endcase
      rd_en[x]  = sel_go[x];
      rd_idx[x] = sel_bidx[x][ARR_IDX_W-1:0];
    end
  end

  // reconfiguration: drain, then switch mode and flush
  assign reconf    = (cfg_unified != unified_q);
  assign reconf_do = reconf && (acc_v == 2'b00) && (mh_busy == 2'b00);

  // --------------------------------------------------- sequential update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unified_q <= 1'b1;
      repl_q    <= 1'b0;
      pend_q    <= '0;
      wait_q    <= '0;
      kill_q    <= '0;
      acc_v     <= '0;
      acc_tid   <= '0;
      acc_pc    <= '0;
      acc_bidx  <= '0;
      fbr_v     <= '0;
      fbr_rem   <= '0;
      fbr_ivalid <= '0;
      fbr_tid   <= '0;
      fbr_pc    <= '0;
      fbr_bidx  <= '0;
      fbr_insn  <= '0;
      fbr_bp    <= '0;
      fbr_old   <= 1'b0;
      for (int t = 0; t < NT; t++) begin
        pc_q[t]      <= '0;
        way_q[t]     <= 1'b0;
        prev_v_q[t]  <= 1'b0;
        prev_bidx[t] <= '0;
      end
    end else begin
      repl_q <= !repl_q;
      kill_q <= '0;

      // lookup outcomes
      for (int x = 0; x < 2; x++) begin
        if (hit[x] && !stall[x]) begin
          pc_q[acc_tid[x]]      <= nb_pc[x];
          way_q[acc_tid[x]]     <= bidx_way(nb_now[x], unified_q);
          prev_v_q[acc_tid[x]]  <= 1'b1;
          prev_bidx[acc_tid[x]] <= unified_q ? acc_bidx[x] : {1'(x), acc_bidx[x][10:0]};
        end
        if (wmiss[x]) begin
          way_q[acc_tid[x]]  <= !pred_way[x];
          kill_q[acc_tid[x]] <= 1'b1;
        end
        if (miss[x]) begin
          kill_q[acc_tid[x]]   <= 1'b1;
          prev_v_q[acc_tid[x]] <= 1'b0;
          if (mh_wait[x]) wait_q[acc_tid[x]] <= 1'b1;
          else begin
            pend_q[acc_tid[x]] <= 1'b1;
            way_q[acc_tid[x]]  <= mh_vway[x];
          end
        end
      end
      for (int x = 0; x < 2; x++) begin
        if (mh_done[x]) begin
          pend_q[mh_done_tid[x]] <= 1'b0;
          wait_q <= '0;
        end
      end

      // redirects override everything for their thread
      if (redir_v) begin
        pc_q[redir_tid]     <= redir_pc;
        prev_v_q[redir_tid] <= 1'b0;
        kill_q[redir_tid]   <= 1'b1;
      end

      // access stage
      for (int x = 0; x < 2; x++) begin
        if (!stall[x]) begin
          acc_v[x]    <= sel_go[x];
          acc_tid[x]  <= gnt_tid[x];
          acc_pc[x]   <= sel_pc[x];
          acc_bidx[x] <= sel_bidx[x];
        end
      end

      // fetch-block registers
      for (int x = 0; x < 2; x++) begin
        if (fbr_v[x]) begin
          fbr_rem[x] <= fbr_rem[x] & ~sb_taken[x];
          if ((fbr_rem[x] & ~sb_taken[x]) == 2'b00) fbr_v[x] <= 1'b0;
        end
        if (redir_v && fbr_v[x] && fbr_tid[x] == redir_tid) fbr_v[x] <= 1'b0;
        if (hit[x] && !stall[x]) begin
          automatic logic [1:0] off = acc_pc[x][3:2];
          fbr_v[x]      <= 1'b1;
          fbr_rem[x]    <= {1'b1, (off < 2'd2)};
          fbr_ivalid[x] <= 4'b1111 << off;
          fbr_tid[x]    <= acc_tid[x];
          fbr_pc[x]     <= {acc_pc[x][ADDR_W-1:4], 4'b0000};
          fbr_bidx[x]   <= unified_q ? acc_bidx[x] : {1'(x), acc_bidx[x][10:0]};
          fbr_insn[x]   <= rd_data[x];
          fbr_bp[x]     <= bp_tk[x];
          if (fbr_v[1-x] && (fbr_rem[1-x] & ~sb_taken[1-x]) != 2'b00) fbr_old <= 1'(1-x);
        end
      end

      if (reconf_do) begin
        unified_q <= cfg_unified;
        for (int t = 0; t < NT; t++) begin
          way_q[t]    <= 1'b0;
          prev_v_q[t] <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------ instruction selection
  insn_select u_isel (
    .clk, .rst_n,
    .blk_v (fbr_v), .blk_rem (fbr_rem), .blk_ivalid (fbr_ivalid), .blk_tid (fbr_tid),
    .blk_pc (fbr_pc), .blk_insn (fbr_insn), .blk_old (fbr_old), .dec_ready,
    .dec_v, .dec_tid, .dec_pc, .dec_insn, .taken (sb_taken)
  );

  assign fb_v        = fbr_v;
  assign fb_tid      = fbr_tid;
  assign fb_bidx     = fbr_bidx;
  assign fb_pc       = fbr_pc;
  assign fb_bp_taken = fbr_bp;

  // ------------------------------------------------------------ events
  always_comb begin
    ev_insn   = '0;
    ev_miss   = '0;
    ev_nbmiss = '0;
    if (dec_ready)
      for (int j = 0; j < 4; j++)
        if (dec_v[j]) ev_insn[dec_tid[j]] = ev_insn[dec_tid[j]] + 3'd1;
    for (int x = 0; x < 2; x++) begin
      if (miss[x])  ev_miss[acc_tid[x]]   = 1'b1;
      if (wmiss[x]) ev_nbmiss[acc_tid[x]] = 1'b1;
    end
    if (trn_v && !trn_correct) ev_nbmiss[trn_tid] = 1'b1;
  end
endmodule
