// tb_slave_ni: the testbench plays the network. It sends read and write
// request packets from several source nodes (respecting the Packet-Queue
// credits) to a slave interface with an SDRAM model, and checks every
// response packet: destination = requesting node, source = this node, T-ID,
// sequence number, type, length, read data, plus the written words in the
// device and no SDRAM timing violation.
module tb_slave_ni;
  import noc_pkg::*;
  localparam int NODE = 12, N = 500;
  logic clk = 0, rst_n = 0;
  link_t rx_link, tx_link;
  credit_t tx_credit, rx_credit;
  sd_cmd_t sd_cmd;
  logic [31:0] sd_rdata;
  logic sd_rvalid, ev_hit, ev_empty, ev_conflict, ev_bypass, ev_interleave;
  int violations, n_act, n_pre, n_col;
  int checks = 0, failures = 0;

  slave_ni #(.NODE(NODE)) dut (.*);
  sdram_model #(.ID(3)) mem (.clk, .rst_n, .cmd(sd_cmd), .rdata(sd_rdata), .rvalid(sd_rvalid),
                             .violations, .n_act, .n_pre, .n_col);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { head_t h; logic [31:0] addr; logic [31:0] wd [$]; } req_t;
  req_t out [int];         // by {src, tid, seq}
  req_t wrs [$];
  int n_rsp = 0;

  // request sender
  int cred = 8;
  always @(posedge clk) if (rst_n && tx_credit.valid) cred++;
  task automatic put(flit_t f);
    while (cred == 0) begin rx_link = '0; @(negedge clk); end
    rx_link.valid = 1; rx_link.vc = VC_REQ; rx_link.flit = f; cred--;
    @(negedge clk);
    rx_link = '0;
  endtask

  initial begin
    rx_link = '0; rx_credit = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      req_t r;
      flit_t f;
      int tag;
      r.h = '0;
      r.wd.delete();
      r.h.dst = NODE; r.h.src = 5 + (i % 10); r.h.tid = (i / 10) % 16; r.h.seq = (i / 160) % 8;
      r.h.len = $urandom_range(0, 7);
      r.h.mtype = $urandom_range(0, 2) == 0 ? MSG_WR_REQ : MSG_RD_REQ;
      if (r.h.mtype == MSG_WR_REQ)
        r.addr = {5'd0, 13'(100 + i / 64), 2'(i % 4), 10'((i % 64) / 4 * 16), 2'b00};
      else
        r.addr = {5'd0, 13'($urandom_range(0, 3)), 2'($urandom_range(0, 3)), 10'($urandom_range(0, 1000)), 2'b00};
      tag = {r.h.src, r.h.tid, r.h.seq};
      f = '{head: 1, tail: 0, data: r.h}; put(f);
      f = '{head: 0, tail: r.h.mtype == MSG_RD_REQ, data: r.addr}; put(f);
      if (r.h.mtype == MSG_WR_REQ)
        for (int k = 0; k <= int'(r.h.len); k++) begin
          f = '{head: 0, tail: k == int'(r.h.len), data: $urandom};
          r.wd.push_back(f.data);
          put(f);
        end
      out[tag] = r;
      if (r.h.mtype == MSG_WR_REQ) wrs.push_back(r);
      if ($urandom_range(0, 4) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
    end
  end

  // response receiver
  head_t cur;
  int    ctag, beat = 0;
  bit    in_pkt = 0;
  int    n_ev = 0;
  always @(posedge clk) begin
    rx_credit <= '{valid: tx_link.valid, vc: VC_RESP};
    n_ev += ev_hit + ev_conflict + ev_empty;
    if (rst_n && tx_link.valid) begin
      chk(tx_link.vc == VC_RESP, "response VC");
      if (!in_pkt) begin
        cur = flit2head(tx_link.flit.data);
        ctag = {cur.dst, cur.tid, cur.seq};
        chk(tx_link.flit.head, "head first");
        chk(out.exists(ctag), "response to a request");
        chk(cur.src == NODE_W'(NODE), "source is this node");
        if (out.exists(ctag)) begin
          chk(cur.len == out[ctag].h.len, "length");
          chk((cur.mtype == MSG_WR_RESP) == (out[ctag].h.mtype == MSG_WR_REQ), "type");
          chk(tx_link.flit.tail == (cur.mtype == MSG_WR_RESP), "write response is one flit");
        end
        beat = 0;
        in_pkt = !tx_link.flit.tail;
        if (tx_link.flit.tail) begin out.delete(ctag); n_rsp++; end
      end else begin
        logic [31:0] a;
        a = out[ctag].addr;
        chk(tx_link.flit.data == tb_pkg::mem_init(3, addr_bank(a), addr_row(a), addr_col(a) + 10'(beat)),
            "read data");
        beat++;
        chk(tx_link.flit.tail == (beat == int'(cur.len) + 1), "tail");
        if (tx_link.flit.tail) begin in_pkt = 0; out.delete(ctag); n_rsp++; end
      end
    end
  end

  initial begin
    wait (n_rsp == N);
    repeat (10) @(posedge clk);
    foreach (wrs[i])
      for (int k = 0; k < wrs[i].wd.size(); k++) begin
        logic [24:0] ad;
        ad = {addr_bank(wrs[i].addr), addr_row(wrs[i].addr), addr_col(wrs[i].addr) + 10'(k)};
        chk(mem.mem.exists(ad) && mem.mem[ad] == wrs[i].wd[k], "written word in device");
      end
    chk(violations == 0, "no SDRAM timing violation");
    chk(n_ev > 0, "requests classified as hit/empty/conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
