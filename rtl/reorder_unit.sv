// reorder_unit: in-order delivery of response packets in the master network
// interface.
//
// It holds the Status-Register/Status-Table (status_table), the Reorder-Table
// and the shared Reorder-Buffer (ll_buffer, linked-list flits).
//
// Forward path: the adm_* port is the admission of status_table; a request is
// sent only when admitted, and gets its sequence number there.
//
// Reverse path, per packet from the Packet-Queue (in_*):
//  - the head flit's (T-ID, sequence number) is checked against the expected
//    sequence number of that ID;
//  - in order: the whole packet is passed straight to the depacketizer (out_*)
//    and the status table is updated (procedure D) when the head is taken;
//  - out of order: a free Reorder-Table row gets v, T-ID, S-N, the response
//    type/length/code and the head pointer P (procedure E); the payload flits
//    go into the reorder buffer as a linked list (procedure F); the head flit
//    itself is not stored.
// While no packet is being passed or stored, the table is searched for a row
// whose S-N equals the current expected sequence number of its ID. Such a
// packet is released: its head flit is rebuilt from the row, its payload is
// read along the list, the slots are freed and procedure D runs. Releases go
// before new packets. Space is never short: admission reserved it.
//
// Timing: one flit per cycle in every state; a release starts one cycle after
// the packet that unblocked it ends. out_valid/out_ready and in_valid/in_ready
// are ordinary valid/ready handshakes.
//
// The reorder-table fields, procedures D-F and the linked-list buffer follow
// the design description; the number of table rows (8), storing the type and
// length in the row, and release-before-new priority are this design's choices.
module reorder_unit
  import noc_pkg::*;
#(
  parameter int unsigned RB_DEPTH = 48,
  parameter int unsigned RT_ROWS  = 8,
  parameter int unsigned ST_ROWS  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // admission (forward path)
  input  logic             adm_req,
  input  logic [TID_W-1:0] adm_tid,
  input  logic [6:0]       adm_size,
  output logic             adm_ok,
  output logic [SEQ_W-1:0] adm_seq,
  input  logic             adm_fire,
  // from the Packet-Queue
  input  flit_t            in_flit,
  input  logic             in_valid,
  output logic             in_ready,
  // to the depacketizer
  output flit_t            out_flit,
  output logic             out_valid,
  input  logic             out_ready,
  // event pulses (out-of-order packet stored, stored packet released)
  output logic             ev_store,
  output logic             ev_release
);
  localparam int unsigned PW = $clog2(RB_DEPTH);
  localparam int unsigned RW = $clog2(RT_ROWS);

  typedef struct packed {
    logic             v;
    logic [TID_W-1:0] tid;
    logic [SEQ_W-1:0] sn;
    logic [PW-1:0]    p;
    msg_t             mtype;
    logic [LEN_W-1:0] len;
    logic [1:0]       resp;
    logic [NODE_W-1:0] src;
  } rt_row_t;

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_STORE, S_REL} state_t;

  state_t         state;
  rt_row_t        rt [RT_ROWS];
  logic [RW-1:0]  cur_row;    // row being filled
  logic           first;      // next stored flit is the first payload flit
  logic [LEN_W:0] rel_left;   // payload flits left to release

  // status table
  logic             chk_inorder, dlv_fire;
  logic [TID_W-1:0] dlv_tid;
  logic [6:0]       dlv_size;
  logic [SEQ_W-1:0] es_vec [2**TID_W];
  logic [2**TID_W-1:0] s_reg;
  logic [7:0]       reserved;

  head_t in_head;
  assign in_head = flit2head(in_flit.data);

  status_table #(.ST_ROWS(ST_ROWS), .RB_DEPTH(RB_DEPTH), .MAX_OUT(RT_ROWS)) u_st (
    .clk, .rst_n,
    .adm_req, .adm_tid, .adm_size, .adm_ok, .adm_seq, .adm_fire,
    .chk_tid(in_head.tid), .chk_seq(in_head.seq), .chk_inorder,
    .dlv_fire, .dlv_tid, .dlv_size, .es_vec, .s_reg_o(s_reg), .reserved_o(reserved)
  );

  logic          rel_any, free_any;
  logic [RW-1:0] rel_row, free_row;

  // reorder buffer
  logic          rb_wr, rb_first, rb_rd_start, rb_rd;
  logic [PW-1:0] rb_slot;
  logic [31:0]   rb_rdata;
  logic [$clog2(RB_DEPTH+1)-1:0] rb_free;

  ll_buffer #(.W(32), .DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst_n,
    .wr_en(rb_wr), .wr_first(rb_first), .wr_data(in_flit.data), .wr_slot(rb_slot),
    .rd_start(rb_rd_start), .rd_head(rt[rel_row].p), .rd_en(rb_rd), .rd_data(rb_rdata),
    .free_cnt(rb_free)
  );

  // release search and free-row search
  always_comb begin
    rel_any  = 1'b0;
    rel_row  = '0;
    free_any = 1'b0;
    free_row = '0;
    for (int i = RT_ROWS - 1; i >= 0; i--) begin
      if (rt[i].v && rt[i].sn == es_vec[rt[i].tid]) begin
        rel_any = 1'b1;
        rel_row = RW'(i);
      end
      if (!rt[i].v) begin
        free_any = 1'b1;
        free_row = RW'(i);
      end
    end
  end

  function automatic logic [6:0] rsp_size(msg_t m, logic [LEN_W-1:0] len);
    return (m == MSG_RD_RESP) ? 7'(len) + 7'd1 : 7'd0;
  endfunction

  head_t rel_head;
  always_comb begin
    rel_head       = '0;
    rel_head.src   = rt[rel_row].src;
    rel_head.mtype = rt[rel_row].mtype;
    rel_head.tid   = rt[rel_row].tid;
    rel_head.seq   = rt[rel_row].sn;
    rel_head.len   = rt[rel_row].len;
    rel_head.resp  = rt[rel_row].resp;
  end

  // datapath control
  always_comb begin
    in_ready    = 1'b0;
    out_valid   = 1'b0;
    out_flit    = in_flit;
    dlv_fire    = 1'b0;
    dlv_tid     = in_head.tid;
    dlv_size    = rsp_size(in_head.mtype, in_head.len);
    rb_wr       = 1'b0;
    rb_first    = first;
    rb_rd_start = 1'b0;
    rb_rd       = 1'b0;
    ev_store    = 1'b0;
    ev_release  = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (rel_any) begin
          out_valid     = 1'b1;
          out_flit.head = 1'b1;
          out_flit.tail = (rt[rel_row].mtype != MSG_RD_RESP);
          out_flit.data = rel_head;
          dlv_tid       = rt[rel_row].tid;
          dlv_size      = rsp_size(rt[rel_row].mtype, rt[rel_row].len);
          // the list head is loaded while the rebuilt head flit waits; it
          // does not depend on out_ready, which keeps the read path acyclic
          rb_rd_start   = 1'b1;
          if (out_ready) begin
            dlv_fire    = 1'b1;
            ev_release  = 1'b1;
          end
        end else if (in_valid && in_flit.head) begin
          if (chk_inorder) begin
            out_valid = 1'b1;
            in_ready  = out_ready;
            dlv_fire  = out_ready;
          end else begin
            in_ready = free_any;
            ev_store = free_any;
          end
        end
      end
      S_PASS: begin
        out_valid = in_valid;
        in_ready  = out_ready;
      end
      S_STORE: begin
        in_ready = 1'b1;
        rb_wr    = in_valid;
      end
      S_REL: begin
        out_valid     = 1'b1;
        out_flit.head = 1'b0;
        out_flit.tail = (rel_left == 1);
        out_flit.data = rb_rdata;
        rb_rd         = out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_row  <= '0;
      first    <= 1'b0;
      rel_left <= '0;
      for (int i = 0; i < int'(RT_ROWS); i++) rt[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (rel_any) begin
            if (out_ready) begin
              rt[rel_row].v <= 1'b0;
              if (rt[rel_row].mtype == MSG_RD_RESP) begin
                rel_left <= (LEN_W+1)'(rt[rel_row].len) + 1'b1;
                state    <= S_REL;
              end
            end
          end else if (in_valid && in_flit.head) begin
            if (chk_inorder) begin
              if (out_ready && !in_flit.tail) state <= S_PASS;
            end else if (free_any) begin
              // procedure E
              rt[free_row].v     <= 1'b1;
              rt[free_row].tid   <= in_head.tid;
              rt[free_row].sn    <= in_head.seq;
              rt[free_row].p     <= rb_slot;
              rt[free_row].mtype <= in_head.mtype;
              rt[free_row].len   <= in_head.len;
              rt[free_row].resp  <= in_head.resp;
              rt[free_row].src   <= in_head.src;
              cur_row            <= free_row;
              first              <= 1'b1;
              if (!in_flit.tail) state <= S_STORE;
            end
          end
        end
        S_PASS:  if (in_valid && out_ready && in_flit.tail) state <= S_IDLE;
        S_STORE: if (in_valid) begin
          // procedure F
          if (first) rt[cur_row].p <= rb_slot;
          first <= 1'b0;
          if (in_flit.tail) state <= S_IDLE;
        end
        S_REL: if (out_ready) begin
          rel_left <= rel_left - 1'b1;
          if (rel_left == 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rb_room: assert property (@(posedge clk) disable iff (!rst_n) rb_wr |-> rb_free != 0);
  a_rt_room: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_IDLE && !rel_any && in_valid && in_flit.head && !chk_inorder)
                              |-> free_any);
endmodule
