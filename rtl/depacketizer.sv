// depacketizer: turns response packets back into AXI read-data beats and
// write responses for the master core.
//
// A write-response packet (head flit only) becomes one B beat (BID = T-ID,
// BRESP from the head). For a read-response packet the head flit is consumed
// and each data flit becomes one R beat with RID/RRESP from the head and RLAST
// on the tail flit. Flits are taken only when the AXI channel they feed is
// ready, so backpressure on R or B stalls the flit stream. The function is the
// design description's; the field placement is this design's.
module depacketizer
  import noc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  flit_t  flit,
  input  logic   flit_valid,
  output logic   flit_ready,
  output axi_r_t r,
  input  logic   r_ready,
  output axi_b_t b,
  input  logic   b_ready
);
  head_t            h;
  logic             in_data;
  logic [TID_W-1:0] id_q;
  logic [1:0]       resp_q;

  assign h = flit2head(flit.data);

  always_comb begin
    r          = '0;
    b          = '0;
    flit_ready = 1'b0;
    if (!in_data) begin
      if (flit_valid && flit.head && h.mtype == MSG_WR_RESP) begin
        b.valid    = 1'b1;
        b.id       = h.tid;
        b.resp     = h.resp;
        flit_ready = b_ready;
      end else begin
        flit_ready = flit_valid && flit.head;   // read head: consumed at once
      end
    end else begin
      r.valid    = flit_valid;
      r.id       = id_q;
      r.data     = flit.data;
      r.resp     = resp_q;
      r.last     = flit.tail;
      flit_ready = r_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_data <= 1'b0;
      id_q    <= '0;
      resp_q  <= '0;
    end else if (!in_data) begin
      if (flit_valid && flit.head && h.mtype == MSG_RD_RESP && !flit.tail) begin
        in_data <= 1'b1;
        id_q    <= h.tid;
        resp_q  <= h.resp;
      end
    end else if (flit_valid && r_ready && flit.tail) begin
      in_data <= 1'b0;
    end
  end

  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
                                 (flit_valid && !in_data) |-> flit.head);
endmodule
