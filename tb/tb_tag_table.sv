// Self-checking test of a tag table: random tag writes, invalidations and
// flushes, with both read ports compared against an array model each cycle.
//
// The table size and split use follow the published design; the flush and
// invalidate timing checked are this design's own choices.
module tb_tag_table;
  import scsmt_pkg::*;
  localparam int S = 512;
  logic clk = 0, rst_n = 0;
  logic flush = 0, inv = 0, we = 0;
  logic [8:0] a_set = 0, b_set = 0, inv_set = 0, w_set = 0;
  tag_t a_tag = 0, b_tag = 0, w_tag = 0;
  logic a_hit, a_valid, b_hit, b_valid;
  tag_t m_tag [S];
  bit   m_val [S];
  int checks = 0, failures = 0, hits = 0;

  tag_table dut (.clk, .rst_n, .flush, .a_set, .a_tag, .a_hit, .a_valid,
                 .b_set, .b_tag, .b_hit, .b_valid, .inv, .inv_set, .we, .w_set, .w_tag);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < S; i++) m_val[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) == 0); w_set = 9'($urandom_range(0, 63)); w_tag = tag_t'($urandom_range(0, 3));
      inv = ($urandom_range(0, 15) == 0); inv_set = 9'($urandom_range(0, 63));
      flush = (i == 3000);
      a_set = 9'($urandom_range(0, 63)); a_tag = tag_t'($urandom_range(0, 3));
      b_set = 9'($urandom_range(0, 63)); b_tag = tag_t'($urandom_range(0, 3));
      #1;
      checks += 2;
      if (a_hit !== (m_val[a_set] && m_tag[a_set] == a_tag) || a_valid !== m_val[a_set]) begin
        failures++; $display("FAIL A set %0d", a_set); end
      if (b_hit !== (m_val[b_set] && m_tag[b_set] == b_tag) || b_valid !== m_val[b_set]) begin
        failures++; $display("FAIL B set %0d", b_set); end
      if (a_hit) hits++;
      @(posedge clk);
      if (flush) for (int k = 0; k < S; k++) m_val[k] = 0;
      else begin
        if (inv) m_val[inv_set] = 0;
        if (we) begin m_val[w_set] = 1; m_tag[w_set] = w_tag; end
      end
    end
    checks++;
    if (hits < 100) failures++;
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
