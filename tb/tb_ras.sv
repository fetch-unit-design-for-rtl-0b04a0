// Self-checking test of one return address stack: random pushes and pops
// against a queue model with the same depth and circular overwrite.
//
// The 16-entry per-thread stack size follows the published design; the
// circular overwrite on overflow is this design's own choice.
module tb_ras;
  import scsmt_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  addr_t push_addr = '0, top;
  logic empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  addr_t model [$];
  int overflows = 0;

  ras #(.DEPTH(D)) dut (.clk, .rst_n, .push, .push_addr, .pop, .top, .empty, .count);
  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (count != model.size()) begin failures++; $display("FAIL count %0d vs %0d", count, model.size()); end
    if (model.size() > 0) begin
      checks++;
      if (top !== model[$]) begin failures++; $display("FAIL top %h vs %h", top, model[$]); end
    end
    checks++;
    if (empty != (model.size() == 0)) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check();
    for (int i = 0; i < 2000; i++) begin
      automatic int r = $urandom_range(0, 99);
      push = (i < 300) ? (r < 70) : (r < 45);
      pop  = (r >= 40 && r < 90) && !(push && r < 42);
      push_addr = $urandom;
      @(posedge clk);
      if (push && pop) begin
        if (model.size() > 0) void'(model.pop_back());
        model.push_back(push_addr);
      end else if (push) begin
        if (model.size() == D) begin void'(model.pop_front()); overflows++; end
        model.push_back(push_addr);
      end else if (pop && model.size() > 0) void'(model.pop_back());
      @(negedge clk);
      push = 0; pop = 0;
      check();
    end
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL no overflow exercised"); end
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
