// Self-checking test of one cluster's tournament predictor: after the
// clearing sweep (its length is checked), random updates from several
// threads on a handful of branches; every cycle the lookup is compared with an
// independent model of the local/global/choice tables. A loop branch is also
// learned to the point where it is predicted correctly.
//
// The table sizes checked are the halved tables of the published predictor;
// index bits and history handling follow this design's own choices.
module tb_cond_bpred;
  import scsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t lk_pc = 0, up_pc = 0;
  tid_t lk_tid = 0, up_tid = 0;
  logic lk_taken, up_v = 0, up_taken = 0, ready;
  logic [8:0]  m_lht [512];
  logic [1:0]  m_lpt [512];
  logic [1:0]  m_gpt [2048];
  logic [1:0]  m_cht [2048];
  logic [10:0] m_ghr [8];
  int checks = 0, failures = 0, cyc = 0, correct_late = 0;

  cond_bpred dut (.*);
  always #5 clk = ~clk;

  function automatic logic [1:0] sat(logic [1:0] c, logic up);
    return up ? ((c == 3) ? c : c + 1) : ((c == 0) ? c : c - 1);
  endfunction
  function automatic logic model(addr_t pc, tid_t t);
    logic [8:0] lh = m_lht[pc[12:4]];
    logic [10:0] g = m_ghr[t];
    return m_cht[g][1] ? m_gpt[g][1] : m_lpt[lh][1];
  endfunction

  initial begin
    for (int i = 0; i < 512; i++) begin m_lht[i] = 0; m_lpt[i] = 1; end
    for (int i = 0; i < 2048; i++) begin m_gpt[i] = 1; m_cht[i] = 1; end
    for (int i = 0; i < 8; i++) m_ghr[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!ready) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc < 2040 || cyc > 2050) begin failures++; $display("FAIL sweep %0d cycles", cyc); end
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      lk_pc = {20'h0, 9'($urandom_range(0, 7)), 3'b0}; lk_tid = 3'($urandom_range(0, 3));
      up_v = 1;
      up_tid = 3'($urandom_range(0, 3));
      up_pc = {19'h0, 9'($urandom_range(0, 7)), 4'b0};
      // branch 0 is a loop: taken 3 times then not taken
      up_taken = (up_pc[12:4] == 0) ? (i % 4 != 3) : 1'($urandom);
      if (i > 4000) begin up_pc = 0; up_tid = 0; lk_pc = 0; lk_tid = 0; up_taken = (i % 4 != 3); end
      #1;
      checks++;
      if (lk_taken !== model(lk_pc, lk_tid)) begin failures++; $display("FAIL lookup at %0d", i); end
      if (i > 5000 && lk_taken == up_taken) correct_late++;
      @(posedge clk);
      begin
        automatic logic [8:0] li = up_pc[12:4];
        automatic logic [8:0] lh = m_lht[li];
        automatic logic [10:0] g = m_ghr[up_tid];
        automatic logic lok = (m_lpt[lh][1] == up_taken), gok = (m_gpt[g][1] == up_taken);
        m_lpt[lh] = sat(m_lpt[lh], up_taken);
        m_gpt[g]  = sat(m_gpt[g], up_taken);
        if (lok != gok) m_cht[g] = sat(m_cht[g], gok);
        m_lht[li] = {lh[7:0], up_taken};
        m_ghr[up_tid] = {g[9:0], up_taken};
      end
    end
    checks++;
    if (correct_late < 950) begin failures++; $display("FAIL loop not learned: %0d", correct_late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
