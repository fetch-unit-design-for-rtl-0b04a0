// Shared versus split cache for two thread mixes, at full size.
//
// Mix 1, a large and a small thread: thread 0 loops over a 40 KB code
// footprint (2560 fetch blocks), thread 1 over a 1 KB one. Here a shared cache
// beats two private halves. In unified mode both footprints fit in the 64 KB
// 2-way cache together, so once warm the loops run with (almost) no misses.
// In split mode thread 0 has only its cluster's 32 KB, and its loop keeps
// evicting itself: a steady stream of misses every iteration.
//
// Mix 2, three conflicting threads: threads 0, 1 and 2 loop over 4 KB each,
// at addresses 32 KB apart, so all three land on the same sets of the unified
// cache. Three lines compete for two ways, so the shared cache thrashes. Split,
// threads 0 and 2 share cluster 0 (two lines for two ways) and thread 1 has
// cluster 1 alone: nothing misses once warm.
//
// Each mix runs first in unified mode, then in split mode. Each time thread 0
// completes three warm-up iterations, then one more iteration is measured.
// The test reports the i-cache miss rate per delivered instruction, as the
// published measurements do, the cycles taken and the instructions delivered
// per cycle. Besides the miss rates, it checks that the large thread's
// iteration is slower split (mix 1) and that delivery falls below four
// instructions per cycle unified (mix 2). It also checks:
//   - every delivered instruction, as the end-to-end test does;
//   - that the mode that suits the mix misses rarely;
//   - that the other mode misses far more often.
// The decode model redirects wrong-path fetches and trains the next-block
// fields. In mix 1 the loop back-jump of thread 0 leaves the 32 KB region a next-block
// field can reach, so it is redirected once per iteration in both modes.
//
// The footprints and mode comparison mirror the published two- and
// multi-thread experiments; the particular sizes, addresses and pass limits are this
// test's own choices.
module tb_workload_mix;
  import scsmt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic redir_v = 0;  tid_t redir_tid = 0;  addr_t redir_pc = 0;
  logic trn_v = 0;    tid_t trn_tid = 0;    bidx_t trn_bidx = 0;
  addr_t trn_target = 0; logic trn_correct = 0, trn_drop;
  logic [1:0] l2_req_v, l2_req_ready = 0, l2_rsp_v = 0;
  addr_t [1:0] l2_req_addr;
  blk_data_t [1:0] l2_rsp_data = '0;
  logic [3:0] dec_v; tid_t [3:0] dec_tid; addr_t [3:0] dec_pc;
  logic [3:0][31:0] dec_insn;
  logic dec_ready = 1;
  logic [1:0] fb_v, fb_bp_taken; tid_t [1:0] fb_tid; bidx_t [1:0] fb_bidx; addr_t [1:0] fb_pc;
  logic [1:0] bp_up_v = 0, bp_up_taken = 0, bp_ready;
  addr_t [1:0] bp_up_pc = '0; tid_t [1:0] bp_up_tid = '0;
  logic [7:0] ras_push = 0, ras_pop = 0, ras_empty;
  addr_t [7:0] ras_push_addr = '0, ras_top;
  logic csr_we = 0; logic [7:0] csr_addr = 0; logic [31:0] csr_wdata = 0, csr_rdata;
  logic trap, mode_unified;

  scsmt_fetch_unit dut (.*);

  int    checks = 0, failures = 0;
  localparam int NT = 3;    // threads used by the mixes
  addr_t base [NT], expc [NT];
  int    len [NT];
  bit    redir_pend [NT], last_ok [NT];
  bidx_t last_bidx [NT];
  longint good [NT], iters [NT];
  longint n_miss = 0, cycle = 0;
  int    start_q [$];

  function automatic logic [31:0] insn_at(addr_t a);
    return a ^ 32'h5EED_0000;
  endfunction
  function automatic addr_t next_pc(int t, addr_t pc);
    return (pc == base[t] + len[t] * 16 - 4) ? base[t] : pc + 4;
  endfunction

  // L2: a short, fixed latency keeps the comparison about miss counts
  for (genvar c = 0; c < 2; c++) begin : g_l2
    initial begin
      forever begin
        @(negedge clk);
        if (l2_req_v[c]) begin
          automatic addr_t a = l2_req_addr[c];
          l2_req_ready[c] = 1;
          @(negedge clk);
          l2_req_ready[c] = 0;
          repeat (3) @(negedge clk);
          for (int b = 0; b < 4; b++) begin
            automatic addr_t ba = a + 16 * b;
            l2_rsp_v[c] = 1;
            l2_rsp_data[c] = {insn_at(ba + 12), insn_at(ba + 8), insn_at(ba + 4), insn_at(ba)};
            @(negedge clk);
            l2_rsp_v[c] = 0;
          end
        end
      end
    end
  end

  // decode: check the correct path, redirect and train on the wrong one
  always @(negedge clk) begin
    redir_v = 0; trn_v = 0;
    if (rst_n && dec_ready) begin
      for (int j = 0; j < 4; j++) begin
        if (dec_v[j] && int'(dec_tid[j]) < NT) begin
          automatic int t = int'(dec_tid[j]);
          automatic addr_t pc = dec_pc[j];
          if (pc == expc[t]) begin
            checks++;
            if (dec_insn[j] !== insn_at(pc)) begin
              failures++;
              if (failures < 10) $display("FAIL insn t%0d pc %h: %h", t, pc, dec_insn[j]);
            end
            good[t]++;
            redir_pend[t] = 0;
            for (int c = 0; c < 2; c++)
              if (fb_v[c] && fb_tid[c] == tid_t'(t) && fb_pc[c] == {pc[31:4], 4'b0}) begin
                last_bidx[t] = fb_bidx[c];
                last_ok[t]   = 1;
              end
            if (pc == base[t] + len[t] * 16 - 4) iters[t]++;
            expc[t] = next_pc(t, pc);
          end else if (!redir_pend[t] && !redir_v) begin
            redir_v = 1; redir_tid = tid_t'(t); redir_pc = expc[t];
            redir_pend[t] = 1;
            if (last_ok[t]) begin
              trn_v = 1; trn_tid = tid_t'(t); trn_bidx = last_bidx[t];
              trn_target = expc[t]; trn_correct = 0;
            end
            last_ok[t] = 0;
          end
        end else if (dec_v[j]) begin
          failures++;
          $display("FAIL instruction of an idle thread %0d", dec_tid[j]);
        end
      end
    end
    if (rst_n && !redir_v && start_q.size() != 0) begin
      automatic int t = start_q.pop_front();
      redir_v = 1; redir_tid = tid_t'(t); redir_pc = base[t];
      expc[t] = base[t]; redir_pend[t] = 1; last_ok[t] = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int x = 0; x < 2; x++) if (dut.miss[x]) n_miss++;
  end

  task automatic csr_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk); csr_we = 0;
  endtask

  function automatic longint total();
    longint g = 0;
    for (int t = 0; t < NT; t++) g += good[t];
    return g;
  endfunction

  // (re)start threads 0..n-1 on the loops now in base/len
  task automatic start(int n);
    for (int t = 0; t < n; t++) start_q.push_back(t);
    while (start_q.size() != 0) @(posedge clk);
  endtask

  // three warm-up iterations of thread 0, then one measured iteration
  task automatic measure(string name, output longint mrate, output longint cyc,
                         output longint ipc1000);
    longint i0, m0, c0, g0;
    i0 = iters[0];
    while (iters[0] < i0 + 3) @(posedge clk);
    m0 = n_miss; c0 = cycle; g0 = total();
    while (iters[0] < i0 + 4) @(posedge clk);
    mrate = (n_miss - m0) * 10000 / (total() - g0);
    cyc  = cycle - c0;
    ipc1000 = (total() - g0) * 1000 / cyc;
    $display("%-16s: %0d misses, %0d instructions, %0d cycles, %0d misses per 10000 instructions, %0d.%0d%0d%0d instructions per cycle",
             name, n_miss - m0, total() - g0, cyc, mrate,
             ipc1000 / 1000, (ipc1000 / 100) % 10, (ipc1000 / 10) % 10, ipc1000 % 10);
  endtask

  initial begin
    longint mr_u, mr_s, cyc_u, cyc_s, ipc_u, ipc_s, g1;
    for (int t = 0; t < NT; t++) begin
      expc[t] = base[t]; redir_pend[t] = 1; last_ok[t] = 0; good[t] = 0; iters[t] = 0;
      last_bidx[t] = 0; base[t] = 0; len[t] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ================= mix 1: a 40 KB and a 1 KB loop
    base[0] = 32'h0004_0000;  len[0] = 2560;   // 40 KB
    base[1] = 32'h0008_4000;  len[1] = 64;     // 1 KB, on sets thread 0 uses once
    csr_write(8'h00, 32'h0000_0301);           // unified, threads 0-1
    start(2);
    g1 = good[1];
    measure("mix 1 unified", mr_u, cyc_u, ipc_u);
    checks++;
    if (good[1] - g1 < 1000) begin failures++; $display("FAIL thread 1 starved in unified mode"); end
    csr_write(8'h00, 32'h0000_0300);           // split (contents are flushed)
    g1 = good[1];
    measure("mix 1 split", mr_s, cyc_s, ipc_s);
    checks++;
    if (mode_unified) begin failures++; $display("FAIL mode not split"); end
    checks++;
    if (good[1] - g1 < 1000) begin failures++; $display("FAIL thread 1 starved in split mode"); end
    checks++;
    if (mr_u > 10) begin failures++; $display("FAIL mix 1 unified miss rate %0d per 10000", mr_u); end
    checks++;
    if (mr_s < 4 * mr_u + 40) begin
      failures++; $display("FAIL mix 1 split miss rate only %0d per 10000", mr_s);
    end
    checks++;
    if (cyc_s <= cyc_u) begin failures++; $display("FAIL mix 1 split iteration not slower"); end
    // ================= mix 2: three 4 KB loops 32 KB apart
    for (int t = 0; t < 3; t++) begin
      base[t] = 32'h0020_0000 + 32'h8000 * t;
      len[t]  = 256;
    end
    csr_write(8'h00, 32'h0000_0701);           // unified, threads 0-2
    start(3);
    measure("mix 2 unified", mr_u, cyc_u, ipc_u);
    checks++;
    if (!mode_unified) begin failures++; $display("FAIL mode not unified"); end
    csr_write(8'h00, 32'h0000_0700);           // split
    start(3);
    measure("mix 2 split", mr_s, cyc_s, ipc_s);
    checks++;
    if (mr_s > 10) begin failures++; $display("FAIL mix 2 split miss rate %0d per 10000", mr_s); end
    checks++;
    if (mr_u < 4 * mr_s + 40) begin
      failures++; $display("FAIL mix 2 unified miss rate only %0d per 10000", mr_u);
    end
    checks++;
    if (ipc_u >= ipc_s) begin failures++; $display("FAIL mix 2 unified delivers as fast as split"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
