// Self-checking test of the thread-allocation registers: control register,
// per-thread event counting against a model, the programmable sum/difference
// and its trap (raised one cycle after the sum reaches the threshold, cleared
// by software), counter clear, the cycle counter, and aging (every counter
// halved each period).
//
// The expected values come from the register map of this design; the
// counter-sum trap and the aging follow the published allocation scheme.
module tb_alloc_ctrl;
  import scsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic csr_we = 0;
  logic [7:0] csr_addr = 0;
  logic [31:0] csr_wdata = 0, csr_rdata;
  logic [7:0][2:0] ev_insn = '0;
  logic [7:0] ev_miss = 0, ev_nbmiss = 0;
  logic cfg_unified, trap;
  logic [7:0] cfg_active;
  longint m [24];
  int checks = 0, failures = 0;

  alloc_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d;
    @(posedge clk); #1 csr_we = 0;
  endtask
  task automatic chk(logic [7:0] a, longint e, string what);
    csr_addr = a; #1;
    checks++;
    if (csr_rdata !== 32'(e)) begin failures++; $display("FAIL %s: %0d vs %0d", what, csr_rdata, e); end
  endtask
  task automatic events(int n, bit model_on);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      for (int t = 0; t < 8; t++) begin
        ev_insn[t] = 3'($urandom_range(0, 4)); ev_miss[t] = ($urandom_range(0, 7) == 0);
        ev_nbmiss[t] = ($urandom_range(0, 5) == 0);
      end
      @(posedge clk);
      for (int t = 0; t < 8; t++) begin
        m[t] += ev_insn[t]; m[8+t] += ev_miss[t]; m[16+t] += ev_nbmiss[t];
      end
    end
    @(negedge clk); ev_insn = '0; ev_miss = 0; ev_nbmiss = 0;
  endtask

  initial begin
    for (int i = 0; i < 24; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++; if (!cfg_unified || cfg_active != 0 || trap) failures++;
    wr(8'h00, 32'h0000_5500);
    checks++; if (cfg_unified || cfg_active != 8'h55) begin failures++; $display("FAIL ctrl"); end
    chk(8'h00, 32'h5500, "ctrl read");
    events(300, 1);
    for (int i = 0; i < 24; i++) chk(8'(8'h10 + i), m[i], "counter");
    // sum = misses of thread 3 - misses of thread 5, trap at 1000 (never), then at sum itself
    wr(8'h04, 32'(1) << 11);
    wr(8'h05, 32'(1) << 13);
    chk(8'h07, m[11] - m[13], "sum");
    wr(8'h01, 32'd1000);
    wr(8'h03, 32'h2);
    repeat (3) @(posedge clk);
    checks++; if (trap) failures++;
    // threshold on insns of thread 0
    wr(8'h04, 32'h1);
    wr(8'h05, 32'h0);
    wr(8'h01, 32'(m[0] + 10));
    #1; checks++; if (trap) failures++;
    @(negedge clk); ev_insn[0] = 3'd4; @(posedge clk); m[0] += 4; #1;  // sum = m0 - 6
    @(negedge clk); ev_insn[0] = 3'd4; @(posedge clk); m[0] += 4; #1;  // sum = m0 - 2
    checks++; if (trap) begin failures++; $display("FAIL early trap"); end
    @(negedge clk); ev_insn[0] = 3'd2; @(posedge clk); m[0] += 2; #1;  // sum reaches threshold
    @(negedge clk); ev_insn[0] = 3'd0;
    @(posedge clk); #1;
    checks++; if (!trap) begin failures++; $display("FAIL no trap"); end
    wr(8'h03, 32'h1);   // clear, disable
    checks++; if (trap) failures++;
    // clear counters
    wr(8'h06, 0);
    for (int i = 0; i < 24; i++) m[i] = 0;
    chk(8'h10, 0, "cleared");
    chk(8'h08, 0, "cycles cleared");
    repeat (37) @(posedge clk);
    chk(8'h08, 37, "cycles");
    // aging: period 100 cycles
    events(40, 1);
    wr(8'h02, 32'd100);
    repeat (50) @(posedge clk);
    for (int i = 0; i < 24; i++) chk(8'(8'h10 + i), m[i], "before aging");
    repeat (60) @(posedge clk);
    for (int i = 0; i < 24; i++) chk(8'(8'h10 + i), m[i] / 2, "aged");
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
