// axi_queue: AXI-Queue of the master network interface.
//
// Accepts the AXI write-address (AW), write-data (W) and read-address (AR)
// channels of the master core. AW and AR are arbitrated round-robin, one
// address per cycle, into a write-request or a read-request buffer; W beats go
// into a write-data buffer. Toward the packetizer the unit offers one request
// message at a time (msg/msg_valid/msg_ready), choosing round-robin between the
// heads of the two request buffers. A write is offered only once all its data
// beats are buffered, so its packet never waits for data inside the network.
// The data of the write just taken are then read from wd/wd_valid/wd_ready.
// All buffers are 8 entries deep, the queue size of the design description.
// The channel arbitration follows the description; the round-robin order and
// the complete-data rule for writes are this design's choices.
module axi_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_a_t      aw,
  output logic        aw_ready,
  input  axi_w_t      w,
  output logic        w_ready,
  input  axi_a_t      ar,
  output logic        ar_ready,
  output req_msg_t    msg,
  output logic        msg_valid,
  input  logic        msg_ready,
  output logic [31:0] wd,
  output logic        wd_valid,
  input  logic        wd_ready
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  req_msg_t rq_dout, wq_dout, in_msg;
  logic rq_full, rq_empty, wq_full, wq_empty, wd_full, wd_empty;
  logic [CW-1:0] rq_cnt, wq_cnt, wd_cnt;

  // address channel arbitration: bit 0 = write, bit 1 = read
  logic [1:0] in_req, in_gnt, out_req, out_gnt;
  logic       in_idx, out_idx, in_any, out_any;

  assign in_req = {ar.valid && !rq_full, aw.valid && !wq_full};
  rr_arbiter #(.N(2)) u_in_arb (
    .clk, .rst_n, .req(in_req), .advance(1'b1), .grant(in_gnt), .grant_idx(in_idx), .any(in_any)
  );
  assign aw_ready = in_gnt[0];
  assign ar_ready = in_gnt[1];

  always_comb begin
    in_msg          = '0;
    in_msg.is_write = in_gnt[0];
    in_msg.tid      = in_gnt[0] ? aw.id   : ar.id;
    in_msg.addr     = in_gnt[0] ? aw.addr : ar.addr;
    in_msg.len      = in_gnt[0] ? aw.len  : ar.len;
  end

  ni_fifo #(.W($bits(req_msg_t)), .DEPTH(DEPTH)) u_wq (
    .clk, .rst_n, .push(in_gnt[0]), .din(in_msg), .pop(msg_valid && msg_ready && out_gnt[0]),
    .dout(wq_dout), .full(wq_full), .empty(wq_empty), .count(wq_cnt)
  );
  ni_fifo #(.W($bits(req_msg_t)), .DEPTH(DEPTH)) u_rq (
    .clk, .rst_n, .push(in_gnt[1]), .din(in_msg), .pop(msg_valid && msg_ready && out_gnt[1]),
    .dout(rq_dout), .full(rq_full), .empty(rq_empty), .count(rq_cnt)
  );
  assign w_ready = !wd_full;
  ni_fifo #(.W(32), .DEPTH(DEPTH)) u_wd (
    .clk, .rst_n, .push(w.valid && !wd_full), .din(w.data), .pop(wd_valid && wd_ready),
    .dout(wd), .full(wd_full), .empty(wd_empty), .count(wd_cnt)
  );
  assign wd_valid = !wd_empty;

  // output arbitration between the two request buffers
  assign out_req = {!rq_empty, !wq_empty && (wd_cnt >= CW'(wq_dout.len) + 1'b1)};
  rr_arbiter #(.N(2)) u_out_arb (
    .clk, .rst_n, .req(out_req), .advance(msg_ready), .grant(out_gnt), .grant_idx(out_idx),
    .any(out_any)
  );
  assign msg_valid = out_any;
  assign msg       = out_gnt[0] ? wq_dout : rq_dout;
endmodule
