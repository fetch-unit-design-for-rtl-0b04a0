// Line-fill engine of one cluster (one outstanding miss).
//
// A thread whose access misses in both ways hands its line address, the
// thread number and the chosen victim (array entry of the line's first block,
// tag set, tag) to the handler. The handler asks L2 for the 64-byte line
// (valid/ready handshake), then takes four 128-bit beats, one fetch block
// each, in address order (the victim line is invalidated when the fill
// starts), and writes each into the cluster array together
// with a next-block field pointing at the sequential block. With the last beat
// it writes the tag (which sets the line valid) and pulses 'done' with the
// thread number so that thread may fetch again. The L2 protocol is this
// design's choice. 'busy' is high from the accepted start until 'done'.
// The beat data ('fill_data') and the victim set ('inv_set') are wired
// straight from 'l2_rsp_data' and 'start_bidx': a beat is written into the
// array in the cycle it arrives, and the victim tag is cleared in the cycle
// the fill starts, so neither passes through a register here.
module miss_handler
  import scsmt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          unified,     // current mode (for the sequential next-block)
  // start of a fill
  input  logic          start,
  input  tid_t          start_tid,
  input  addr_t         start_addr,  // any address inside the line
  input  bidx_t         start_bidx,  // block index of the line's first block (victim way)
  output logic          busy,
  // L2 side
  output logic          l2_req_v,
  output addr_t         l2_req_addr,
  input  logic          l2_req_ready,
  input  logic          l2_rsp_v,
  input  blk_data_t     l2_rsp_data,
  // array / tag writes
  output logic          fill_we,
  output logic [ARR_IDX_W-1:0] fill_idx,
  output blk_data_t     fill_data,
  output bidx_t         fill_nb,
  output logic          tag_inv,     // victim line invalidated when the fill starts
  output logic [SET_W-1:0] inv_set,
  output logic          tag_we,
  output logic [SET_W-1:0] tag_set,
  output tag_t          tag_val,
  output logic          done,
  output tid_t          done_tid
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_DATA} state_t;
  state_t     st;
  tid_t       tid_q;
  addr_t      addr_q;
  bidx_t      bidx_q;
  logic [1:0] beat;
  bidx_t      cur_bidx;

  assign busy        = (st != S_IDLE);
  assign l2_req_v    = (st == S_REQ);
  assign l2_req_addr = {addr_q[ADDR_W-1:6], 6'b0};
  assign cur_bidx    = {bidx_q[11:2], beat};

  assign fill_we   = (st == S_DATA) && l2_rsp_v;
  assign fill_idx  = cur_bidx[ARR_IDX_W-1:0];
  assign fill_data = l2_rsp_data;
  assign fill_nb   = bidx_seq(cur_bidx, unified);
  assign tag_inv   = (st == S_IDLE) && start;
  assign inv_set   = start_bidx[10:2];
  assign tag_we    = fill_we && (beat == 2'd3);
  assign tag_set   = bidx_q[10:2];
  assign tag_val   = addr_q[ADDR_W-1:TAG_LSB];
  assign done      = tag_we;
  assign done_tid  = tid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      tid_q <= '0;
      addr_q <= '0;
      bidx_q <= '0;
      beat  <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st     <= S_REQ;
          tid_q  <= start_tid;
          addr_q <= start_addr;
          bidx_q <= {start_bidx[11:2], 2'b00};
          beat   <= '0;
        end
        S_REQ:  if (l2_req_ready) st <= S_DATA;
        S_DATA: if (l2_rsp_v) begin
          beat <= beat + 2'd1;
          if (beat == 2'd3) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
