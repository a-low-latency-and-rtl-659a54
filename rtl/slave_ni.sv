// slave_ni: slave-side network interface with the order-sensitive memory
// controller, in front of one SDRAM.
//
// Reverse path (requests from the router): Packet-Queue -> request
// depacketizer -> os_mem_ctrl. The depacketizer reads the head flit and the
// address flit, turns them into a memory request (bank/row/column from the
// address, plus source node, T-ID and sequence number kept for the response),
// waits until the controller has room (req_ok), moves write data into the
// controller's write queue and then hands the request over.
// Forward path (responses to the router): the controller's response
// descriptors, in the order the memory serves them, pass the adapter (the
// request's source becomes the destination, this node the source, the type
// becomes a response) and the packetizer, which appends the read data.
// Response packets go on VC 1, with credits for the router's input buffer
// (BUF_DEPTH); every flit leaving the Packet-Queue returns a VC 0 credit.
//
// The order of header information is kept with each request rather than in a
// separate FIFO, because the OS controller serves requests out of arrival
// order; this is this design's reading of the header FIFO in the description.
module slave_ni
  import noc_pkg::*;
#(
  parameter int unsigned NX        = 5,
  parameter int unsigned NODE      = 0,
  parameter int unsigned PQ_DEPTH  = 8,
  parameter int unsigned BUF_DEPTH = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // router side
  input  link_t       rx_link,
  output credit_t     tx_credit,
  output link_t       tx_link,
  input  credit_t     rx_credit,
  // SDRAM
  output sd_cmd_t     sd_cmd,
  input  logic [31:0] sd_rdata,
  input  logic        sd_rvalid,
  // event pulses
  output logic        ev_hit,
  output logic        ev_empty,
  output logic        ev_conflict,
  output logic        ev_bypass,
  output logic        ev_interleave
);
  // ---------------- Packet-Queue ----------------
  flit_t pq_flit;
  logic  pq_full, pq_empty, pq_pop;
  logic [$clog2(PQ_DEPTH+1)-1:0] pq_cnt;

  ni_fifo #(.W($bits(flit_t)), .DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n, .push(rx_link.valid), .din(rx_link.flit), .pop(pq_pop),
    .dout(pq_flit), .full(pq_full), .empty(pq_empty), .count(pq_cnt)
  );
  assign tx_credit = '{valid: pq_pop, vc: VC_REQ};

  // ---------------- request depacketizer ----------------
  typedef enum logic [1:0] {D_HEAD, D_ADDR, D_DATA} dstate_t;
  dstate_t dstate;
  head_t   h_q;
  mreq_t   mreq;
  logic    req_valid, req_ok, wd_valid, wd_first, first_q;
  mreq_t   mreq_q;

  always_comb begin
    mreq          = '0;
    mreq.is_write = (h_q.mtype == MSG_WR_REQ);
    mreq.src      = h_q.src;
    mreq.tid      = h_q.tid;
    mreq.seq      = h_q.seq;
    mreq.len      = h_q.len;
    mreq.bank     = addr_bank(pq_flit.data);
    mreq.row      = addr_row(pq_flit.data);
    mreq.col      = addr_col(pq_flit.data);
  end

  always_comb begin
    pq_pop    = 1'b0;
    req_valid = 1'b0;
    wd_valid  = 1'b0;
    wd_first  = first_q;
    unique case (dstate)
      D_HEAD: pq_pop = !pq_empty;
      D_ADDR: if (!pq_empty && req_ok) begin
        pq_pop    = 1'b1;
        req_valid = !mreq.is_write;
      end
      D_DATA: if (!pq_empty) begin
        pq_pop    = 1'b1;
        wd_valid  = 1'b1;
        req_valid = pq_flit.tail;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dstate  <= D_HEAD;
      h_q     <= '0;
      mreq_q  <= '0;
      first_q <= 1'b0;
    end else begin
      unique case (dstate)
        D_HEAD: if (!pq_empty) begin
          h_q    <= flit2head(pq_flit.data);
          dstate <= D_ADDR;
        end
        D_ADDR: if (!pq_empty && req_ok) begin
          mreq_q  <= mreq;
          first_q <= 1'b1;
          dstate  <= mreq.is_write ? D_DATA : D_HEAD;
        end
        D_DATA: if (!pq_empty) begin
          first_q <= 1'b0;
          if (pq_flit.tail) dstate <= D_HEAD;
        end
        default: dstate <= D_HEAD;
      endcase
    end
  end

  // ---------------- memory controller ----------------
  rsp_t        rsp;
  logic        rsp_valid, rsp_ready, rd_valid, rd_ready;
  logic [31:0] rdata;

  os_mem_ctrl u_mc (
    .clk, .rst_n,
    .req(dstate == D_DATA ? mreq_q : mreq), .req_valid, .req_ok,
    .wd_data(pq_flit.data), .wd_valid, .wd_first,
    .sd_cmd, .sd_rdata, .sd_rvalid,
    .rsp, .rsp_valid, .rsp_ready, .rdata, .rd_valid, .rd_ready,
    .ev_hit, .ev_empty, .ev_conflict, .ev_bypass, .ev_interleave
  );

  // ---------------- adapter and packetizer ----------------
  head_t rh;
  always_comb begin
    rh       = '0;
    rh.dst   = rsp.src;
    rh.src   = NODE_W'(NODE);
    rh.mtype = rsp.is_write ? MSG_WR_RESP : MSG_RD_RESP;
    rh.tid   = rsp.tid;
    rh.seq   = rsp.seq;
    rh.len   = rsp.len;
    rh.resp  = 2'b00;
  end

  logic [3:0] cred;
  flit_t      pk_flit;
  logic       pk_valid, pk_ready;
  assign pk_ready = (cred != 0);

  packetizer u_pk (
    .clk, .rst_n, .hdr(rh), .has_addr(1'b0), .addr(32'd0),
    .ndata(rsp.is_write ? 4'd0 : 4'(rsp.len) + 4'd1),
    .msg_valid(rsp_valid), .msg_ready(rsp_ready),
    .d(rdata), .d_valid(rd_valid), .d_ready(rd_ready),
    .flit(pk_flit), .flit_valid(pk_valid), .flit_ready(pk_ready)
  );

  always_comb begin
    tx_link       = '0;
    tx_link.valid = pk_valid && pk_ready;
    tx_link.vc    = VC_RESP;
    tx_link.flit  = pk_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cred <= 4'(BUF_DEPTH);
    else cred <= cred - 4'(tx_link.valid) + 4'(rx_credit.valid && rx_credit.vc == VC_RESP);
  end

  a_no_pq_overflow: assert property (@(posedge clk) disable iff (!rst_n) rx_link.valid |-> !pq_full);
  a_req_vc:         assert property (@(posedge clk) disable iff (!rst_n) rx_link.valid |-> rx_link.vc == VC_REQ);
endmodule
