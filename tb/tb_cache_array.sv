// Self-checking test of a cluster array: fills, synchronous reads (the entry
// registered in one cycle appears in the next, and holds while rd_en is low)
// and next-block training through the hysteresis rule, against a model.
//
// The hysteresis rule checked is the two-bit counter scheme of the published
// design; read timing and port priorities are this design's own choices.
module tb_cache_array;
  import scsmt_pkg::*;
  localparam int B = 2048;
  logic clk = 0;
  logic rd_en = 0, fill_we = 0, trn_v = 0, trn_correct = 0, trn_drop;
  logic [10:0] rd_idx = 0, fill_idx = 0, trn_idx = 0;
  blk_data_t rd_data, fill_data = '0;
  nb_field_t rd_nb;
  bidx_t fill_nb = '0, trn_target = '0, trn_keep = '0;
  blk_data_t m_data [B];
  nb_field_t m_nb [B];
  bit        m_ok [B];
  int checks = 0, failures = 0, replaced = 0;
  logic [10:0] rd_q = 0;

  cache_array dut (.clk, .rd_en, .rd_idx, .rd_data, .rd_nb, .fill_we, .fill_idx, .fill_data,
                   .fill_nb, .trn_v, .trn_idx, .trn_target, .trn_correct, .trn_keep, .trn_drop);
  always #5 clk = ~clk;

  function automatic nb_field_t rule(nb_field_t c, bidx_t tg, logic ok);
    nb_field_t n = c;
    if (ok || c.nb == tg) n.hyst = (c.hyst == 3) ? 2'd3 : c.hyst + 2'd1;
    else if (c.hyst != 0) n.hyst = c.hyst - 2'd1;
    else begin n.nb = tg; n.hyst = 2'd1; end
    return n;
  endfunction

  initial begin
    for (int i = 0; i < B; i++) m_ok[i] = 0;
    // fill 64 entries spread over the array
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      fill_we = 1; fill_idx = 11'(i * 32 + 5); fill_data = {$urandom, $urandom, $urandom, $urandom};
      fill_nb = 12'($urandom);
      @(posedge clk);
      m_data[fill_idx] = fill_data; m_nb[fill_idx].nb = fill_nb; m_nb[fill_idx].hyst = 2'd0; m_ok[fill_idx] = 1;
    end
    @(negedge clk); fill_we = 0;
    for (int i = 0; i < 4000; i++) begin
      int e;
      @(negedge clk);
      e = $urandom_range(0, 63) * 32 + 5;
      rd_en = ($urandom_range(0, 3) != 0); rd_idx = 11'(e);
      trn_v = ($urandom_range(0, 1) == 0); trn_idx = 11'($urandom_range(0, 63) * 32 + 5);
      trn_target = 12'($urandom_range(0, 3)); trn_correct = ($urandom_range(0, 3) == 0);
      trn_keep = ($urandom_range(0, 3) == 0) ? 12'h800 : 12'h000;
      @(posedge clk);
      if (trn_v) begin
        automatic nb_field_t o = m_nb[trn_idx];
        automatic bidx_t tg = (trn_target & ~trn_keep) | (o.nb & trn_keep);
        m_nb[trn_idx] = rule(o, tg, trn_correct);
        if (m_nb[trn_idx].nb != o.nb) replaced++;
      end
      if (rd_en) rd_q = rd_idx;
      #1;
      checks += 2;
      if (rd_data !== m_data[rd_q]) begin failures++; $display("FAIL data @%0d", rd_q); end
      if (rd_nb !== m_nb[rd_q]) begin failures++; $display("FAIL nb @%0d %p vs %p", rd_q, rd_nb, m_nb[rd_q]); end
    end
    checks++;
    if (replaced < 20) failures++;
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
