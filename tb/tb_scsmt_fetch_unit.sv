// End-to-end test of the fetch unit at its full size.
//
// Around the unit sit an L2 model (one per cluster; random request latency and
// beat gaps; the instruction word at address a is insn_at(a)) and a decode
// model. Every thread runs a loop: LEN sequential fetch blocks from its base
// address whose last instruction jumps back to the base (threads 2-7 to the
// third instruction of the first block, so fetch blocks arrive fragmented). The decode model
// knows each thread's next correct address; a delivered instruction at that
// address must carry insn_at(address); one at any other address is wrong path
// and makes the model redirect the thread and train the next-block field of
// the block holding the last correct instruction (as branch resolution would).
// It also trains the conditional predictor with the loop branch and drives a
// return address stack.
//
// Phases: (A) unified mode, one thread: after warm-up the loop must run with
// no miss and no redirect at four instructions per cycle; (B) unified, two
// threads whose loops map to the same sets; (C) switch to split mode, four
// threads; (D) eight threads; (E) back to unified. Each mechanism of the unit
// is counted and must occur: hits, way misses, misses and fills, squashed
// accesses, fetch-block stalls, the own and other next-block multiplexer
// inputs, both clusters delivering in one cycle, reconfiguration, waits for a
// busy miss handler, next-block training, the allocation trap, predictor and
// RAS use.
//
// The thread counts and the two modes exercised are the published ones; the
// programs, latencies and rate check are this test's own.
module tb_scsmt_fetch_unit;
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

  localparam int LEN = 24;   // fetch blocks per loop
  int checks = 0, failures = 0, cycle = 0;
  addr_t base [8], expc [8];
  bit    redir_pend [8], last_ok [8];
  bidx_t last_bidx [8];
  longint good [8];
  int    redirects = 0, redirects_a = 0, misses_a = 0, good_a = 0;
  int    n_hit = 0, n_wmiss = 0, n_miss = 0, n_squash = 0, n_stall = 0, n_own = 0, n_other = 0,
         n_dual = 0, n_reconf = 0, n_wait = 0, n_trn = 0, n_trap = 0, n_bp = 0, n_ras = 0,
         n_fill = 0;
  bit    measure_a = 0;
  int    start_q [$];

  function automatic logic [31:0] insn_at(addr_t a);
    return a ^ 32'hC0DE_0000;
  endfunction
  // threads 2..7 jump into the middle of their first block
  function automatic addr_t loop_target(int t);
    return (t < 2) ? base[t] : base[t] + 8;
  endfunction
  function automatic addr_t next_pc(int t, addr_t pc);
    return (pc == base[t] + LEN * 16 - 4) ? loop_target(t) : pc + 4;
  endfunction

  // ------------------------------------------------------------ L2 model
  for (genvar c = 0; c < 2; c++) begin : g_l2
    initial begin
      forever begin
        @(negedge clk);
        if (l2_req_v[c]) begin
          automatic addr_t a = l2_req_addr[c];
          repeat ($urandom_range(0, 3)) @(negedge clk);
          l2_req_ready[c] = 1;
          @(negedge clk);
          l2_req_ready[c] = 0;
          repeat ($urandom_range(2, 6)) @(negedge clk);
          for (int b = 0; b < 4; b++) begin
            automatic addr_t ba = a + 16 * b;
            l2_rsp_v[c] = 1;
            l2_rsp_data[c] = {insn_at(ba + 12), insn_at(ba + 8), insn_at(ba + 4), insn_at(ba)};
            @(negedge clk);
            l2_rsp_v[c] = 0;
            if ($urandom_range(0, 3) == 0) @(negedge clk);
          end
        end
      end
    end
  end

  // ------------------------------------------------------- decode model
  always @(negedge clk) begin
    redir_v = 0; trn_v = 0; bp_up_v = 0;
    if (rst_n && dec_ready) begin
      for (int j = 0; j < 4; j++) begin
        if (dec_v[j]) begin
          automatic int t = dec_tid[j];
          automatic addr_t pc = dec_pc[j];
          if (pc == expc[t]) begin
            checks++;
            if (dec_insn[j] !== insn_at(pc)) begin
              failures++;
              if (failures < 10) $display("FAIL insn t%0d pc %h: %h", t, pc, dec_insn[j]);
            end
            good[t]++;
            if (measure_a) good_a++;
            redir_pend[t] = 0;
            for (int c = 0; c < 2; c++)
              if (fb_v[c] && fb_tid[c] == t && fb_pc[c] == {pc[31:4], 4'b0}) begin
                last_bidx[t] = fb_bidx[c];
                last_ok[t]   = 1;
              end
            if (pc == base[t] + LEN * 16 - 4 && t < 2) begin
              bp_up_v[t]     = 1;  // the loop branch, resolved taken
              bp_up_pc[t]    = {pc[31:4], 4'b0};
              bp_up_tid[t]   = tid_t'(t);
              bp_up_taken[t] = 1;
            end
            expc[t] = next_pc(t, pc);
          end else if (!redir_pend[t] && !redir_v) begin
            redir_v = 1; redir_tid = tid_t'(t); redir_pc = expc[t];
            redir_pend[t] = 1;
            redirects++;
            if (measure_a) redirects_a++;
            if (last_ok[t]) begin
              trn_v = 1; trn_tid = tid_t'(t); trn_bidx = last_bidx[t];
              trn_target = expc[t]; trn_correct = 0;
              n_trn++;
            end
            last_ok[t] = 0;
          end
        end
      end
    end
    if (rst_n && !redir_v && start_q.size() != 0) begin
      automatic int t = start_q.pop_front();
      redir_v = 1; redir_tid = tid_t'(t); redir_pc = base[t];
      expc[t] = base[t]; redir_pend[t] = 1; last_ok[t] = 0;
    end
  end

  // ------------------------------------------------- mechanism counters
  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int x = 0; x < 2; x++) begin
      if (dut.hit[x])    n_hit++;
      if (dut.wmiss[x])  n_wmiss++;
      if (dut.miss[x])   n_miss++;
      if (dut.squash[x]) n_squash++;
      if (dut.stall[x])  n_stall++;
      if (dut.sel_go[x] && dut.sel_src[x] == 2'd1) n_own++;
      if (dut.sel_go[x] && dut.sel_src[x] == 2'd2) n_other++;
      if (dut.mh_wait[x]) n_wait++;
      if (dut.mh_done[x]) n_fill++;
      if (fb_v[x] && fb_bp_taken[x] && fb_pc[x] == base[x] + (LEN - 1) * 16) n_bp++;
    end
    if (measure_a && (dut.miss != 0)) misses_a++;
    if (dec_ready && dut.sb_taken[0] != 0 && dut.sb_taken[1] != 0) n_dual++;
    if (dut.reconf_do) n_reconf++;
    if (trap) n_trap++;
  end

  // ------------------------------------------------------------ helpers
  task automatic csr_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk); csr_we = 0;
  endtask
  task automatic start_thread(int t);
    // the decode model issues the start redirect on a free cycle
    start_q.push_back(t);
    while (start_q.size() != 0) @(posedge clk);
  endtask
  task automatic run(int n, int ready_pct);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #1 dec_ready = ($urandom_range(0, 99) < ready_pct);
    end
    @(posedge clk); #1 dec_ready = 1;
  endtask

  // --------------------------------------------------------------- main
  initial begin
    longint g0 [8];
    for (int t = 0; t < 8; t++) begin
      // threads 0/1 share sets (32 KB apart); the others are spread out
      base[t] = (t < 2) ? 32'h0004_0000 + 32'h8000 * t : 32'h0010_0000 + 32'h0001_0440 * t;
      expc[t] = base[t]; redir_pend[t] = 1; last_ok[t] = 0; good[t] = 0; last_bidx[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // trap after the first three i-cache misses of thread 0
    csr_write(8'h04, 32'h0000_0100);
    csr_write(8'h01, 32'd3);
    csr_write(8'h03, 32'h2);
    // ---- phase A: unified, one thread
    csr_write(8'h00, 32'h0000_0101);
    start_thread(0);
    run(1500, 100);
    checks++;
    if (n_trap == 0) begin failures++; $display("FAIL no trap"); end
    csr_write(8'h03, 32'h1);
    measure_a = 1;
    g0[0] = good[0];
    run(400, 100);
    measure_a = 0;
    checks += 3;
    if (redirects_a != 0) begin failures++; $display("FAIL steady loop redirected %0d times", redirects_a); end
    if (misses_a != 0)    begin failures++; $display("FAIL steady loop missed %0d times", misses_a); end
    // 4 instructions per cycle once the loop is cached and its jump learned
    if (good_a < 4 * 400 - 16) begin failures++; $display("FAIL single-thread rate %0d insns in 400 cycles", good_a); end
    $display("phase A: %0d instructions in 400 cycles, %0d redirects", good_a, redirects_a);
    // ---- phase B: unified, two threads on the same sets
    csr_write(8'h00, 32'h0000_0301);
    start_thread(1);
    for (int k = 0; k < 8; k++) begin
      ras_push[3] = 1; ras_push_addr[3] = 32'h100 * k; @(negedge clk); ras_push[3] = 0;
    end
    checks++;
    if (ras_top[3] !== 32'h700) begin failures++; $display("FAIL ras top %h", ras_top[3]); end
    ras_pop[3] = 1; @(negedge clk); ras_pop[3] = 0;
    checks++;
    if (ras_top[3] !== 32'h600) failures++; else n_ras++;
    for (int t = 0; t < 8; t++) g0[t] = good[t];
    run(3000, 80);
    for (int t = 0; t < 2; t++) begin
      checks++;
      if (good[t] - g0[t] < 500) begin failures++; $display("FAIL phase B thread %0d made %0d", t, good[t] - g0[t]); end
    end
    // ---- phase C: split mode, four threads
    csr_write(8'h00, 32'h0000_0F00);
    for (int t = 2; t < 4; t++) start_thread(t);
    for (int t = 0; t < 8; t++) g0[t] = good[t];
    run(4000, 90);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (good[t] - g0[t] < 400) begin failures++; $display("FAIL phase C thread %0d made %0d", t, good[t] - g0[t]); end
    end
    checks++;
    if (mode_unified) begin failures++; $display("FAIL mode not split"); end
    // ---- phase D: eight threads
    csr_write(8'h00, 32'h0000_FF00);
    for (int t = 4; t < 8; t++) start_thread(t);
    for (int t = 0; t < 8; t++) g0[t] = good[t];
    run(6000, 95);
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (good[t] - g0[t] < 200) begin failures++; $display("FAIL phase D thread %0d made %0d", t, good[t] - g0[t]); end
    end
    // ---- phase E: back to unified, two threads
    csr_write(8'h00, 32'h0000_0301);
    for (int t = 0; t < 8; t++) g0[t] = good[t];
    run(3000, 100);
    checks += 2;
    if (!mode_unified) begin failures++; $display("FAIL mode not unified"); end
    if (good[0] - g0[0] < 300 || good[1] - g0[1] < 300) begin failures++; $display("FAIL phase E progress"); end
    // ---- counters read back through the allocation registers
    csr_addr = 8'h10; #1;
    checks++;
    if (csr_rdata == 0) begin failures++; $display("FAIL insn counter of thread 0 is 0"); end
    // ---- every mechanism must have happened
    begin
      int m [string];
      m["hit"] = n_hit; m["way miss"] = n_wmiss; m["miss"] = n_miss; m["fill"] = n_fill;
      m["squash"] = n_squash; m["stall"] = n_stall; m["own next-block"] = n_own;
      m["other next-block"] = n_other; m["dual-cluster delivery"] = n_dual;
      m["reconfiguration"] = n_reconf; m["busy miss handler"] = n_wait;
      m["next-block training"] = n_trn; m["trap"] = n_trap; m["predicted-taken loop branch"] = n_bp;
      m["ras"] = n_ras; m["redirect"] = redirects;
      foreach (m[k]) begin
        checks++;
        $display("  %-28s %0d", k, m[k]);
        if (m[k] == 0) begin failures++; $display("FAIL mechanism never seen: %s", k); end
      end
    end
    checks++;
    if (n_reconf < 2) begin failures++; $display("FAIL reconfigurations %0d", n_reconf); end
    for (int t = 0; t < 8; t++) $display("  thread %0d: %0d instructions", t, good[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
