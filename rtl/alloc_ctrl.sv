// Thread-allocation support: configuration, per-thread event counters, trap.
//
// Thread allocation (unified versus two-cluster mode, and which thread runs in
// which cluster) is decided by a supervisor trap handler; this block is its
// hardware side. It holds the control register (mode and active-thread mask)
// and, per thread, three event counters: instructions delivered to decode (the
// IPC measure), i-cache misses and next-block (BTB) mispredictions. A trap is
// raised when a programmable sum/difference of counters reaches a
// programmable signed threshold: counter i is added when bit i of POS is set
// and subtracted when bit i of NEG is set. An aging mechanism halves every
// counter each AGE cycles so old behaviour fades and allocation decisions do
// not ping-pong. The encoding of the sum, the halving and the register map
// are this design's choices.
//
// Register map (32-bit words, 'csr_addr'):
//   0x00 CTRL   [0] unified mode, [15:8] active-thread mask
//   0x01 THRESH signed trap threshold
//   0x02 AGE    aging period in cycles (0 = off)
//   0x03 STATUS [0] trap pending (write 1 to clear), [1] trap enable (rw)
//   0x04 POS    [23:0] counters added to the sum
//   0x05 NEG    [23:0] counters subtracted from the sum
//   0x06 CLEAR  write: all counters to 0
//   0x07 SUM    read: current sum
//   0x08 CYCLES read: cycles counted alongside the event counters (aged and
//               cleared with them), the denominator of a thread's IPC
//   0x10 + 8*e + t : counter of event e (0 insns, 1 misses, 2 nb mispredictions), thread t
// Writes take effect at the clock edge; reads are combinational. Reset gives
// unified mode, no active thread, trap disabled.
module alloc_ctrl
  import scsmt_pkg::*;
#(
  parameter int unsigned NT = NTHREADS,
  parameter int unsigned CW = CTR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             csr_we,
  input  logic [7:0]       csr_addr,
  input  logic [31:0]      csr_wdata,
  output logic [31:0]      csr_rdata,
  // events, per thread, per cycle
  input  logic [NT-1:0][2:0] ev_insn,     // instructions delivered (0..4)
  input  logic [NT-1:0]    ev_miss,
  input  logic [NT-1:0]    ev_nbmiss,
  output logic             cfg_unified,
  output logic [NT-1:0]    cfg_active,
  output logic             trap
);
  localparam int unsigned NC = 3 * NT;
  logic [CW-1:0]        ctr [NC];
  logic [CW-1:0]        cycles;
  logic signed [31:0]   thresh;
  logic [31:0]          age_period, age_cnt;
  logic [NC-1:0]        pos, neg;
  logic                 trap_en;
  logic signed [CW+7:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < NC; i++) begin
      if (pos[i]) sum = sum + $signed({8'b0, ctr[i]});
      if (neg[i]) sum = sum - $signed({8'b0, ctr[i]});
    end
  end

  always_comb begin
    csr_rdata = '0;
    unique case (csr_addr)
      8'h00: csr_rdata = {16'b0, 8'(cfg_active), 7'b0, cfg_unified};
      8'h01: csr_rdata = thresh;
      8'h02: csr_rdata = age_period;
      8'h03: csr_rdata = {30'b0, trap_en, trap};
      8'h04: csr_rdata = 32'(pos);
      8'h05: csr_rdata = 32'(neg);
      8'h07: csr_rdata = 32'(sum);
      8'h08: csr_rdata = 32'(cycles);
      default:
        if (csr_addr >= 8'h10 && csr_addr < 8'(8'h10 + NC)) csr_rdata = 32'(ctr[5'(csr_addr - 8'h10)]);
    endcase
  end

  logic age_now;
  assign age_now = (age_period != 0) && (age_cnt + 1 >= age_period);

  // counter value after this cycle's aging, and this cycle's increment
  logic [NC-1:0][CW-1:0] ctr_aged;
  logic [NC-1:0][2:0]    ctr_inc;
  always_comb begin
    for (int t = 0; t < NT; t++) begin
      ctr_inc[t]      = ev_insn[t];
      ctr_inc[NT+t]   = {2'b0, ev_miss[t]};
      ctr_inc[2*NT+t] = {2'b0, ev_nbmiss[t]};
    end
    for (int i = 0; i < NC; i++) ctr_aged[i] = age_now ? (ctr[i] >> 1) : ctr[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_unified <= 1'b1;
      cfg_active  <= '0;
      thresh      <= '0;
      age_period  <= '0;
      age_cnt     <= '0;
      pos         <= '0;
      neg         <= '0;
      trap_en     <= 1'b0;
      trap        <= 1'b0;
      for (int i = 0; i < NC; i++) ctr[i] <= '0;
      cycles      <= '0;
    end else begin
      // counters: events, aging, clear
      for (int i = 0; i < NC; i++) ctr[i] <= ctr_aged[i] + CW'(ctr_inc[i]);
      cycles <= (age_now ? (cycles >> 1) : cycles) + 1'b1;
      age_cnt <= age_now ? '0 : age_cnt + 1;
      if (trap_en && sum >= $signed({{(CW+8-32){thresh[31]}}, thresh})) trap <= 1'b1;
      if (csr_we) begin
        unique case (csr_addr)
          8'h00: begin cfg_unified <= csr_wdata[0]; cfg_active <= csr_wdata[8 +: NT]; end
          8'h01: thresh     <= csr_wdata;
          8'h02: begin age_period <= csr_wdata; age_cnt <= '0; end
          8'h03: begin
            trap_en <= csr_wdata[1];
            if (csr_wdata[0]) trap <= 1'b0;
          end
          8'h04: pos <= csr_wdata[NC-1:0];
          8'h05: neg <= csr_wdata[NC-1:0];
          8'h06: begin
            for (int i = 0; i < NC; i++) ctr[i] <= '0;
            cycles <= '0;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
