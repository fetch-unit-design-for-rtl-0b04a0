// Self-checking test of instruction selection: random fetch-block contents,
// remaining sub-block masks and decode back-pressure. An independent model
// orders the offered sub-blocks (priority cluster first, the older block of a
// shared thread first) and checks the four decode slots and the 'taken' masks.
//
// The aligned 2-instruction sub-block selection follows the published design;
// the alternating priority and the older-block-first rule are this design's.
module tb_insn_select;
  import scsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] blk_v;
  logic [1:0][1:0] blk_rem, taken;
  logic [1:0][3:0] blk_ivalid;
  tid_t [1:0] blk_tid;
  addr_t [1:0] blk_pc;
  blk_data_t [1:0] blk_insn;
  logic blk_old, dec_ready;
  logic [3:0] dec_v;
  tid_t [3:0] dec_tid;
  addr_t [3:0] dec_pc;
  logic [3:0][31:0] dec_insn;
  int checks = 0, failures = 0, merged = 0;
  logic prio = 0;

  insn_select dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic first; int n;
      logic [3:0] e_v; tid_t e_tid [4]; addr_t e_pc [4]; logic [31:0] e_in [4];
      logic [1:0][1:0] e_tk;
      @(negedge clk);
      for (int c = 0; c < 2; c++) begin
        blk_v[c] = ($urandom_range(0, 4) != 0);
        blk_rem[c] = 2'($urandom_range(0, 3));
        blk_ivalid[c] = 4'($urandom);
        blk_tid[c] = 3'($urandom_range(0, 2));
        blk_pc[c] = {$urandom, 4'b0} ;
        blk_insn[c] = {$urandom, $urandom, $urandom, $urandom};
      end
      blk_old = 1'($urandom);
      dec_ready = ($urandom_range(0, 4) != 0);
      #1;
      first = (blk_v == 2'b11 && blk_tid[0] == blk_tid[1]) ? blk_old : prio;
      n = 0; e_v = 0; e_tk = '0;
      for (int j = 0; j < 4; j++) begin e_tid[j] = 0; e_pc[j] = 0; e_in[j] = 0; end
      for (int k = 0; k < 4; k++) begin
        automatic int c = (k < 2) ? first : !first;
        automatic int s = k % 2;
        if (blk_v[c] && blk_rem[c][s] && n < 2) begin
          for (int j = 0; j < 2; j++) begin
            e_v[2*n+j] = blk_ivalid[c][2*s+j];
            e_tid[2*n+j] = blk_tid[c];
            e_pc[2*n+j] = blk_pc[c] + 8*s + 4*j;
            e_in[2*n+j] = blk_insn[c][32*(2*s+j) +: 32];
          end
          if (dec_ready) e_tk[c][s] = 1;
          n++;
        end
      end
      checks++;
      if (dec_v !== e_v || taken !== e_tk) begin failures++; $display("FAIL v %b/%b taken %b/%b", dec_v, e_v, taken, e_tk); end
      for (int j = 0; j < 4; j++) if (e_v[j]) begin
        checks++;
        if (dec_tid[j] !== e_tid[j] || dec_pc[j] !== e_pc[j] || dec_insn[j] !== e_in[j]) begin
          failures++; $display("FAIL slot %0d", j); end
      end
      if (e_tk[0] != 0 && e_tk[1] != 0) merged++;
      @(posedge clk);
      if (dec_ready && blk_v[0] && blk_rem[0] != 0 && blk_v[1] && blk_rem[1] != 0) prio = !prio;
    end
    checks++;
    if (merged < 100) failures++;
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
