// os_mem_ctrl: order-sensitive (OS) SDRAM memory controller of the slave
// network interface.
//
// Requests are sorted into one bank_queue per bank; the data of write requests
// are kept in a linked-list write queue (ll_buffer). Scheduling has two levels:
//  1. per bank, the row-first arbiter of bank_queue picks a request (row hit
//     with highest priority, else the highest priority); an idle bank takes
//     its pick and keeps it until it is served;
//  2. per cycle, a round-robin scheduler picks one bank whose next command is
//     allowed and puts it on the SDRAM command bus, which gives bank
//     interleaving: one bank can activate while another waits for tRCD.
// Each bank needs PRE (row conflict), ACT (row empty or after PRE) and then
// len+1 column commands RD/WR on consecutive columns, one word each. A bank
// may send ACT tRP cycles after its PRE and a column command tRCD cycles after
// its ACT; read data come back from the device tCL cycles after RD on
// sd_rdata/sd_rvalid and are simply queued, so tCL needs no counter here. The
// column commands of one request are issued back to back (the bus is held),
// so read data of different requests never interleave. Rows stay open.
//
// Request side: req_ok tells (combinationally, from req fields alone) whether
// the request's bank queue has room and, for a write, whether the write queue
// holds len+1 more words. The write data are then written with wd_valid
// (wd_first on the first word) and the request is pushed with req_valid after
// them. Response side: at the first column command a response descriptor is
// queued (rsp_*), and read words are queued (rdata/rd_valid/rd_ready); a read
// starts only when its words are sure to fit.
//
// Bank queues, write queue, row-first arbitration and round-robin bank
// scheduling follow the design description, as do tRP-tRCD-tCL = 2-2-2 and 4
// banks. Command encoding, address split and the burst-holding rule are this
// design's choices.
module os_mem_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned NBANK    = 4,
  parameter int unsigned QDEPTH   = 8,
  parameter int unsigned WQ_DEPTH = 8,
  parameter int unsigned RQ_DEPTH = 8,
  parameter int unsigned T_RP     = 2,
  parameter int unsigned T_RCD    = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // requests
  input  mreq_t       req,
  input  logic        req_valid,
  output logic        req_ok,
  input  logic [31:0] wd_data,
  input  logic        wd_valid,
  input  logic        wd_first,
  // SDRAM
  output sd_cmd_t     sd_cmd,
  input  logic [31:0] sd_rdata,
  input  logic        sd_rvalid,
  // responses
  output rsp_t        rsp,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output logic [31:0] rdata,
  output logic        rd_valid,
  input  logic        rd_ready,
  // event pulses
  output logic        ev_hit,
  output logic        ev_empty,
  output logic        ev_conflict,
  output logic        ev_bypass,
  output logic        ev_interleave
);
  localparam int unsigned BW  = $clog2(NBANK);
  localparam int unsigned WPW = $clog2(WQ_DEPTH);

  // ---------------- write queue ----------------
  logic [WPW-1:0] wq_slot, wptr_q, wq_head;
  logic           wq_rd_start, wq_rd;
  logic [31:0]    wq_rdata;
  logic [$clog2(WQ_DEPTH+1)-1:0] wq_free;

  ll_buffer #(.W(32), .DEPTH(WQ_DEPTH)) u_wq (
    .clk, .rst_n, .wr_en(wd_valid), .wr_first(wd_first), .wr_data(wd_data), .wr_slot(wq_slot),
    .rd_start(wq_rd_start), .rd_head(wq_head), .rd_en(wq_rd), .rd_data(wq_rdata),
    .free_cnt(wq_free)
  );
  always_ff @(posedge clk) begin
    if (!rst_n) wptr_q <= '0;
    else if (wd_valid && wd_first) wptr_q <= wq_slot;
  end

  mreq_t push_req;
  always_comb begin
    push_req      = req;
    push_req.wptr = 6'(wd_valid && wd_first ? wq_slot : wptr_q);
  end

  // ---------------- bank queues ----------------
  logic [NBANK-1:0] bq_full, bq_push, bq_pop, bq_sel_valid, bq_hit, bq_bypass;
  mreq_t            bq_sel [NBANK];
  logic [NBANK-1:0] open_v;
  logic [12:0]      open_row [NBANK];

  for (genvar g = 0; g < NBANK; g++) begin : g_bq
    logic [$clog2(QDEPTH+1)-1:0] cnt;
    assign bq_push[g] = req_valid && req.bank == 2'(g);
    bank_queue #(.DEPTH(QDEPTH)) u_bq (
      .clk, .rst_n, .push(bq_push[g]), .push_req, .full(bq_full[g]), .count(cnt),
      .cra_valid(open_v[g]), .cra(open_row[g]),
      .sel_valid(bq_sel_valid[g]), .sel_req(bq_sel[g]), .sel_hit(bq_hit[g]),
      .sel_bypass(bq_bypass[g]), .pop(bq_pop[g])
    );
  end

  assign req_ok = !bq_full[req.bank] &&
                  (!req.is_write || wq_free >= ($clog2(WQ_DEPTH+1))'(req.len) + 1'b1);

  // ---------------- bank machines ----------------
  logic [NBANK-1:0] act_v;          // bank holds a request being served
  mreq_t            act [NBANK];
  logic [2:0]       timer [NBANK];
  logic [NBANK-1:0] want;
  sd_op_t           want_op [NBANK];

  // read-data space and response FIFO
  logic [4:0] rd_space;
  logic       rsp_full, rsp_empty, rdf_full, rdf_empty;
  logic [$clog2(RQ_DEPTH+1)-1:0] rsp_cnt, rdf_cnt;

  // column burst in progress
  logic             burst;
  logic [BW-1:0]    burst_bank;
  logic [LEN_W:0]   beat;

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      want[b]    = 1'b0;
      want_op[b] = SD_NOP;
      if (act_v[b] && timer[b] == 0) begin
        if (!open_v[b])                     want_op[b] = SD_ACT;
        else if (open_row[b] != act[b].row) want_op[b] = SD_PRE;
        else                                want_op[b] = act[b].is_write ? SD_WR : SD_RD;
        want[b] = 1'b1;
        if (want_op[b] == SD_WR || want_op[b] == SD_RD)
          want[b] = !rsp_full &&
                    (act[b].is_write || rd_space >= 5'(act[b].len) + 5'd1);
      end
    end
  end

  logic [NBANK-1:0] gnt;
  logic [BW-1:0]    gnt_idx;
  logic             gnt_any;
  rr_arbiter #(.N(NBANK)) u_sched (
    .clk, .rst_n, .req(burst ? '0 : want), .advance(1'b1), .grant(gnt), .grant_idx(gnt_idx),
    .any(gnt_any)
  );

  // command issued this cycle
  logic          issue;
  logic [BW-1:0] ib;
  sd_op_t        iop;
  logic          col_first, col_last;
  always_comb begin
    issue = burst || gnt_any;
    ib    = burst ? burst_bank : gnt_idx;
    iop   = burst ? (act[burst_bank].is_write ? SD_WR : SD_RD) : want_op[gnt_idx];
    col_first = !burst && gnt_any && (iop == SD_RD || iop == SD_WR);
    col_last  = (iop == SD_RD || iop == SD_WR) && (beat == (LEN_W+1)'(act[ib].len));
    sd_cmd       = '0;
    sd_cmd.op    = issue ? iop : SD_NOP;
    sd_cmd.bank  = 2'(ib);
    sd_cmd.row   = act[ib].row;
    sd_cmd.col   = act[ib].col + 10'(beat);
    sd_cmd.wdata = wq_rdata;
    wq_head      = WPW'(act[ib].wptr);
    wq_rd_start  = col_first && iop == SD_WR;
    wq_rd        = issue && iop == SD_WR;
  end

  // a bank with nothing to do takes its arbiter's pick
  always_comb begin
    for (int b = 0; b < int'(NBANK); b++)
      bq_pop[b] = !act_v[b] && bq_sel_valid[b];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act_v      <= '0;
      open_v     <= '0;
      burst      <= 1'b0;
      burst_bank <= '0;
      beat       <= '0;
      for (int b = 0; b < int'(NBANK); b++) begin
        timer[b]    <= '0;
        open_row[b] <= '0;
        act[b]      <= '0;
      end
    end else begin
      for (int b = 0; b < int'(NBANK); b++) begin
        if (timer[b] != 0) timer[b] <= timer[b] - 1'b1;
        if (bq_pop[b]) begin
          act_v[b] <= 1'b1;
          act[b]   <= bq_sel[b];
        end
      end
      if (issue) begin
        unique case (iop)
          SD_PRE: begin
            open_v[ib] <= 1'b0;
            timer[ib]  <= 3'(T_RP - 1);
          end
          SD_ACT: begin
            open_v[ib]   <= 1'b1;
            open_row[ib] <= act[ib].row;
            timer[ib]    <= 3'(T_RCD - 1);
          end
          SD_RD, SD_WR: begin
            if (col_last) begin
              burst    <= 1'b0;
              beat     <= '0;
              act_v[ib] <= 1'b0;
            end else begin
              burst      <= 1'b1;
              burst_bank <= ib;
              beat       <= beat + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- responses ----------------
  rsp_t new_rsp;
  always_comb begin
    new_rsp.is_write = act[ib].is_write;
    new_rsp.src      = act[ib].src;
    new_rsp.tid      = act[ib].tid;
    new_rsp.seq      = act[ib].seq;
    new_rsp.len      = act[ib].len;
  end

  ni_fifo #(.W($bits(rsp_t)), .DEPTH(RQ_DEPTH)) u_rsp (
    .clk, .rst_n, .push(col_first), .din(new_rsp), .pop(rsp_valid && rsp_ready),
    .dout(rsp), .full(rsp_full), .empty(rsp_empty), .count(rsp_cnt)
  );
  assign rsp_valid = !rsp_empty;

  ni_fifo #(.W(32), .DEPTH(RQ_DEPTH)) u_rdf (
    .clk, .rst_n, .push(sd_rvalid), .din(sd_rdata), .pop(rd_valid && rd_ready),
    .dout(rdata), .full(rdf_full), .empty(rdf_empty), .count(rdf_cnt)
  );
  assign rd_valid = !rdf_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) rd_space <= 5'(RQ_DEPTH);
    else rd_space <= rd_space
                     - ((col_first && iop == SD_RD) ? 5'(act[ib].len) + 5'd1 : 5'd0)
                     + 5'(rd_valid && rd_ready);
  end

  // ---------------- events ----------------
  always_comb begin
    ev_hit = 1'b0; ev_empty = 1'b0; ev_conflict = 1'b0; ev_bypass = 1'b0;
    for (int b = 0; b < int'(NBANK); b++) begin
      if (bq_pop[b]) begin
        if (!open_v[b])                          ev_empty    = 1'b1;
        else if (open_row[b] == bq_sel[b].row)   ev_hit      = 1'b1;
        else                                     ev_conflict = 1'b1;
        if (bq_bypass[b]) ev_bypass = 1'b1;
      end
    end
    ev_interleave = 1'b0;
    if (issue && (iop == SD_ACT || iop == SD_PRE))
      for (int b = 0; b < int'(NBANK); b++)
        if (b != int'(ib) && act_v[b]) ev_interleave = 1'b1;
  end

  a_no_rdf_overflow: assert property (@(posedge clk) disable iff (!rst_n) sd_rvalid |-> !rdf_full);
  a_push_ok:         assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> !bq_full[req.bank]);
endmodule
