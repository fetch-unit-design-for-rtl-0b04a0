// Self-checking test of the line-fill engine: random line misses in both
// modes, an L2 model with random request acceptance and beat gaps, checking
// the request address, the victim invalidation, the four block writes and
// their sequential next-block fields, the tag write and 'done'. Also checks
// the fill takes request + 4 beats (5 cycles with an L2 that never waits).
//
// Line and block sizes follow the published geometry; the L2 handshake and
// the fall-through next-block initialisation are this design's own choices.
module tb_miss_handler;
  import scsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic unified = 1, start = 0, busy;
  tid_t start_tid = 0, done_tid;
  addr_t start_addr = 0, l2_req_addr;
  bidx_t start_bidx = 0, fill_nb;
  logic l2_req_v, l2_req_ready = 0, l2_rsp_v = 0;
  blk_data_t l2_rsp_data = 0, fill_data;
  logic fill_we, tag_inv, tag_we, done;
  logic [10:0] fill_idx;
  logic [8:0] inv_set, tag_set;
  tag_t tag_val;
  int checks = 0, failures = 0;

  miss_handler dut (.*);
  always #5 clk = ~clk;

  function automatic blk_data_t l2_word(addr_t a);
    return {a ^ 32'h1111_0000, a ^ 32'h2222_0000, a ^ 32'h3333_0000, a ^ 32'h4444_0000};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      addr_t a; bidx_t b; int beats, cyc; logic fast;
      fast = (n % 4 == 0);
      @(negedge clk);
      unified = (n < 100);
      a = $urandom; b = pc_to_bidx(a, unified, 1'($urandom));
      start = 1; start_tid = 3'(n); start_addr = a; start_bidx = b;
      #1;
      checks++;
      if (!tag_inv || inv_set != b[10:2]) begin failures++; $display("FAIL inv"); end
      @(posedge clk); @(negedge clk);
      start = 0;
      cyc = 0;
      // request phase
      while (!(l2_req_v && (fast || $urandom_range(0, 2) == 0))) begin
        @(negedge clk); cyc++;
        if (cyc > 50) break;
      end
      checks++;
      if (l2_req_addr != {a[31:6], 6'b0} || !busy) begin failures++; $display("FAIL req"); end
      l2_req_ready = 1;
      @(posedge clk); @(negedge clk);
      l2_req_ready = 0;
      beats = 0; cyc = 1;
      while (beats < 4) begin
        if (fast || $urandom_range(0, 1) == 0) begin
          bidx_t cb;
          l2_rsp_v = 1; l2_rsp_data = l2_word({a[31:6], 2'(beats), 4'b0});
          cb = {b[11:2], 2'(beats)};
          #1;
          checks++;
          if (!fill_we || fill_idx != cb[10:0] || fill_data != l2_rsp_data || fill_nb != bidx_seq(cb, unified)) begin
            failures++; $display("FAIL beat %0d", beats); end
          checks++;
          if ((beats == 3) != (tag_we && done) || (tag_we && (tag_set != b[10:2] || tag_val != a[31:14] || done_tid != 3'(n)))) begin
            failures++; $display("FAIL tag"); end
          beats++;
        end else begin
          l2_rsp_v = 0; #1;
          checks++;
          if (fill_we) failures++;
        end
        @(posedge clk); @(negedge clk); cyc++;
      end
      l2_rsp_v = 0;
      #1;
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
      if (fast) begin checks++; if (cyc != 5) begin failures++; $display("FAIL fill took %0d", cyc); end end
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
