// master_ni: master-side network interface.
//
// Connects an AXI master core to its router. Forward path: AXI-Queue ->
// admission by the reorder unit (which also gives the sequence number) ->
// packetizer with mapping unit -> router. The destination memory is found from
// the address (noc_pkg::map_addr). A read request reserves len+1 words of the
// reorder buffer for its response; a write reserves none. Reverse path: router
// -> Packet-Queue -> reorder unit (in-order packets pass, out-of-order packets
// wait in the reorder buffer) -> depacketizer -> AXI R/B.
//
// Network side: credit flow control. tx_link sends request flits on VC 0 while
// credits for the router's input buffer remain (BUF_DEPTH, 5 flits per VC);
// rx_link delivers response flits into the Packet-Queue and each flit leaving
// it returns a credit (tx_credit). The router therefore starts with PQ_DEPTH
// credits toward this interface.
//
// The structure follows the design description; credit flow control and the
// reservation sizes are this design's choices.
module master_ni
  import noc_pkg::*;
#(
  parameter int unsigned NX         = 5,
  parameter int unsigned NUM_SLAVES = 15,
  parameter int unsigned NODE       = 5,
  parameter int unsigned RB_DEPTH   = 48,
  parameter int unsigned RT_ROWS    = 8,
  parameter int unsigned ST_ROWS    = 4,
  parameter int unsigned PQ_DEPTH   = 8,
  parameter int unsigned BUF_DEPTH  = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  // AXI slave port toward the master core
  input  axi_a_t  aw,
  output logic    aw_ready,
  input  axi_w_t  w,
  output logic    w_ready,
  input  axi_a_t  ar,
  output logic    ar_ready,
  output axi_r_t  r,
  input  logic    r_ready,
  output axi_b_t  b,
  input  logic    b_ready,
  // router side
  output link_t   tx_link,
  input  credit_t rx_credit,
  input  link_t   rx_link,
  output credit_t tx_credit,
  // event pulses
  output logic    ev_adm_stall,
  output logic    ev_store,
  output logic    ev_release
);
  // ---------------- forward path ----------------
  req_msg_t    msg;
  logic        msg_valid, msg_ready;
  logic [31:0] wd;
  logic        wd_valid, wd_ready;

  axi_queue #(.DEPTH(8)) u_axiq (
    .clk, .rst_n, .aw, .aw_ready, .w, .w_ready, .ar, .ar_ready,
    .msg, .msg_valid, .msg_ready, .wd, .wd_valid, .wd_ready
  );

  logic             adm_ok, adm_fire, pk_msg_ready;
  logic [SEQ_W-1:0] adm_seq;
  logic [6:0]       adm_size;
  assign adm_size = msg.is_write ? 7'd0 : 7'(msg.len) + 7'd1;

  head_t hdr;
  always_comb begin
    hdr       = '0;
    hdr.dst   = map_addr(msg.addr, NX, NUM_SLAVES);
    hdr.src   = NODE_W'(NODE);
    hdr.mtype = msg.is_write ? MSG_WR_REQ : MSG_RD_REQ;
    hdr.tid   = msg.tid;
    hdr.seq   = adm_seq;
    hdr.len   = msg.len;
  end

  logic [3:0] cred;
  flit_t      pk_flit;
  logic       pk_valid, pk_ready;
  assign pk_ready = (cred != 0);

  packetizer u_pk (
    .clk, .rst_n, .hdr, .has_addr(1'b1), .addr(msg.addr),
    .ndata(msg.is_write ? 4'(msg.len) + 4'd1 : 4'd0),
    .msg_valid(msg_valid && adm_ok), .msg_ready(pk_msg_ready),
    .d(wd), .d_valid(wd_valid), .d_ready(wd_ready),
    .flit(pk_flit), .flit_valid(pk_valid), .flit_ready(pk_ready)
  );
  assign msg_ready    = pk_msg_ready && adm_ok;
  assign adm_fire     = msg_valid && msg_ready;
  assign ev_adm_stall = msg_valid && pk_msg_ready && !adm_ok;

  always_comb begin
    tx_link       = '0;
    tx_link.valid = pk_valid && pk_ready;
    tx_link.vc    = VC_REQ;
    tx_link.flit  = pk_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cred <= 4'(BUF_DEPTH);
    else cred <= cred - 4'(tx_link.valid) + 4'(rx_credit.valid && rx_credit.vc == VC_REQ);
  end

  // ---------------- reverse path ----------------
  flit_t pq_flit;
  logic  pq_full, pq_empty, pq_pop;
  logic [$clog2(PQ_DEPTH+1)-1:0] pq_cnt;

  ni_fifo #(.W($bits(flit_t)), .DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n, .push(rx_link.valid), .din(rx_link.flit), .pop(pq_pop),
    .dout(pq_flit), .full(pq_full), .empty(pq_empty), .count(pq_cnt)
  );
  assign tx_credit = '{valid: pq_pop, vc: VC_RESP};

  flit_t ru_flit;
  logic  ru_valid, ru_ready, pq_ready;

  reorder_unit #(.RB_DEPTH(RB_DEPTH), .RT_ROWS(RT_ROWS), .ST_ROWS(ST_ROWS)) u_ru (
    .clk, .rst_n,
    .adm_req(msg_valid), .adm_tid(msg.tid), .adm_size, .adm_ok, .adm_seq, .adm_fire,
    .in_flit(pq_flit), .in_valid(!pq_empty), .in_ready(pq_ready),
    .out_flit(ru_flit), .out_valid(ru_valid), .out_ready(ru_ready),
    .ev_store, .ev_release
  );
  assign pq_pop = pq_ready && !pq_empty;

  depacketizer u_dp (
    .clk, .rst_n, .flit(ru_flit), .flit_valid(ru_valid), .flit_ready(ru_ready),
    .r, .r_ready, .b, .b_ready
  );

  a_no_pq_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                     rx_link.valid |-> !pq_full);
  a_resp_vc:        assert property (@(posedge clk) disable iff (!rst_n)
                                     rx_link.valid |-> rx_link.vc == VC_RESP);
endmodule
