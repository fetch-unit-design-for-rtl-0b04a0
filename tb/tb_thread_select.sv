// Self-checking test of thread selection: random eligibility masks, checking
// that the grant is the first eligible thread after the previous grant
// (round-robin) and that no grant is given when nobody is eligible.
//
// Round-robin is this design's own selection policy; the published design
// leaves the policy open.
module tb_thread_select;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] elig = '0;
  logic advance = 0, gnt_v;
  logic [2:0] gnt_tid;
  int checks = 0, failures = 0;
  int last = N - 1;
  int count [N];

  thread_select #(.N(N)) dut (.clk, .rst_n, .elig, .advance, .gnt_v, .gnt_tid);
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < N; t++) count[t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int exp;
      @(negedge clk);
      elig = (i % 50 == 7) ? '0 : N'($urandom);
      if (i > 2000) elig = 8'hff;
      advance = ($urandom_range(0, 9) != 0);
      #1;
      exp = -1;
      for (int k = 1; k <= N; k++) if (exp < 0 && elig[(last + k) % N]) exp = (last + k) % N;
      checks++;
      if ((exp < 0) ? gnt_v : (!gnt_v || gnt_tid != exp)) begin
        failures++; $display("FAIL elig=%b last=%0d got %0d/%0d exp %0d", elig, last, gnt_v, gnt_tid, exp);
      end
      @(posedge clk);
      if (advance && exp >= 0) begin last = exp; count[exp]++; end
    end
    // with everyone eligible the last 1000 grants are shared evenly
    for (int t = 0; t < N; t++) begin
      checks++;
      if (count[t] < 100) begin failures++; $display("FAIL thread %0d starved", t); end
    end
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
