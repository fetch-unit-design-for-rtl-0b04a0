// Self-checking test of the next-block hysteresis rule: every stored counter
// value, with matching and different targets, confirmed or not, against the
// rule written out independently below.
//
// The rule checked (count up when confirmed, count down on a wrong target,
// replace only at zero) is this design's reading of the two-bit hysteresis
// counter of the published design.
module tb_nb_hysteresis;
  import scsmt_pkg::*;
  nb_field_t cur, nxt;
  bidx_t     target;
  logic      correct;
  int checks = 0, failures = 0;

  nb_hysteresis dut (.cur, .target, .correct, .nxt);

  initial begin
    for (int h = 0; h < 4; h++)
      for (int same = 0; same < 2; same++)
        for (int c = 0; c < 2; c++) begin
          bidx_t e_nb; logic [1:0] e_h;
          cur.nb  = 12'h3a5;
          cur.hyst = 2'(h);
          target  = same ? 12'h3a5 : 12'h0c1;
          correct = 1'(c);
          #1;
          if (c == 1 || same == 1) begin e_nb = 12'h3a5; e_h = (h == 3) ? 2'd3 : 2'(h + 1); end
          else if (h > 0)          begin e_nb = 12'h3a5; e_h = 2'(h - 1); end
          else                     begin e_nb = 12'h0c1; e_h = 2'd1; end
          checks++;
          if (nxt.nb !== e_nb || nxt.hyst !== e_h) begin
            failures++;
            $display("FAIL h=%0d same=%0d c=%0d got %h/%0d exp %h/%0d", h, same, c, nxt.nb, nxt.hyst, e_nb, e_h);
          end
        end
    // replacement takes a second misprediction when the counter was 1
    cur = '{nb: 12'h111, hyst: 2'd1}; target = 12'h222; correct = 1'b0; #1;
    checks++; if (nxt.nb !== 12'h111) failures++;
    cur = nxt; #1;
    checks++; if (nxt.nb !== 12'h222) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
