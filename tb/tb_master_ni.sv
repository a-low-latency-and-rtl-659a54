// tb_master_ni: the testbench is both the AXI master and the network. It
// issues random reads and writes with 4 transaction IDs; request packets are
// checked (destination from the address map, address and write data) and
// answered in a random order, so responses arrive out of order. The AXI
// R and B channels must return, per ID, in issue order with the right data
// (read data are a function of address and beat). Credits are honoured on
// both links. Out-of-order storage, release and admission refusal must occur.
module tb_master_ni;
  import noc_pkg::*;
  localparam int NX = 5, NSL = 15, NODE = 5, N = 400;
  logic clk = 0, rst_n = 0;
  axi_a_t aw, ar;
  axi_w_t w;
  axi_r_t r;
  axi_b_t b;
  logic aw_ready, w_ready, ar_ready, r_ready, b_ready;
  link_t tx_link, rx_link;
  credit_t rx_credit, tx_credit;
  logic ev_adm_stall, ev_store, ev_release;
  int checks = 0, failures = 0;

  master_ni dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] rdword(logic [31:0] a, int beat);
    return a ^ {beat[7:0], 24'h00c0de};
  endfunction

  typedef struct { logic [31:0] addr; int len; } rd_t;
  rd_t         exp_rd [16][$];
  int          exp_wr [16][$];
  logic [31:0] exp_wdata [$];
  int n_r = 0, n_b = 0, n_store = 0, n_rel = 0, n_stall = 0;

  // AXI read issue
  initial begin
    ar = '0;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      rd_t e;
      @(negedge clk);
      ar.valid = 1; ar.id = $urandom_range(0, 3); ar.addr = {$urandom} & 32'hffff_fffc;
      ar.len = $urandom_range(0, 7);
      @(posedge clk); while (!ar_ready) @(posedge clk);
      e.addr = ar.addr; e.len = ar.len;
      exp_rd[ar.id].push_back(e);
      @(negedge clk); ar.valid = 0;
    end
  end
  // AXI write issue
  initial begin
    aw = '0; w = '0;
    wait (rst_n);
    for (int i = 0; i < N / 2; i++) begin
      int len;
      len = $urandom_range(0, 7);
      @(negedge clk);
      aw.valid = 1; aw.id = $urandom_range(0, 3); aw.addr = {$urandom} & 32'hffff_fffc; aw.len = len;
      @(posedge clk); while (!aw_ready) @(posedge clk);
      exp_wr[aw.id].push_back(1);
      @(negedge clk); aw.valid = 0;
      for (int k = 0; k <= len; k++) begin
        w.valid = 1; w.data = $urandom; w.last = (k == len);
        @(posedge clk); while (!w_ready) @(posedge clk);
        exp_wdata.push_back(w.data);
        @(negedge clk); w.valid = 0;
      end
    end
  end
  // AXI response check
  always @(negedge clk) begin r_ready = $urandom_range(0, 4) != 0; b_ready = $urandom_range(0, 4) != 0; end
  int rbeat [16];
  initial for (int i = 0; i < 16; i++) rbeat[i] = 0;
  always @(posedge clk) begin
    if (rst_n && r.valid && r_ready) begin
      chk(exp_rd[r.id].size() > 0, "read response expected");
      if (exp_rd[r.id].size() > 0) begin
        chk(r.data == rdword(exp_rd[r.id][0].addr, rbeat[r.id]), "read data in ID order");
        chk(r.last == (rbeat[r.id] == exp_rd[r.id][0].len), "RLAST");
        rbeat[r.id]++;
        if (r.last) begin void'(exp_rd[r.id].pop_front()); rbeat[r.id] = 0; n_r++; end
      end
    end
    if (rst_n && b.valid && b_ready) begin
      chk(exp_wr[b.id].size() > 0, "write response expected");
      if (exp_wr[b.id].size() > 0) void'(exp_wr[b.id].pop_front());
      n_b++;
    end
    if (ev_store) n_store++;
    if (ev_release) n_rel++;
    if (ev_adm_stall) n_stall++;
  end

  // network: take request packets, return one credit per flit
  typedef struct { head_t h; logic [31:0] addr; } pend_t;
  pend_t pend [$];
  head_t cur_h;
  int    cur_k = 0;
  logic [31:0] cur_a;
  always @(posedge clk) begin
    rx_credit <= '{valid: tx_link.valid, vc: VC_REQ};
    if (rst_n && tx_link.valid) begin
      chk(tx_link.vc == VC_REQ, "request VC");
      if (tx_link.flit.head) begin
        cur_h = flit2head(tx_link.flit.data);
        cur_k = 0;
        chk(cur_h.src == NODE_W'(NODE), "source node");
      end else begin
        if (cur_k == 0) begin
          cur_a = tx_link.flit.data;
          chk(cur_h.dst == map_addr(cur_a, NX, NSL), "mapping unit destination");
        end else begin
          chk(exp_wdata.size() > 0 && tx_link.flit.data == exp_wdata[0], "write data");
          void'(exp_wdata.pop_front());
        end
        cur_k++;
        if (tx_link.flit.tail) begin
          pend_t p;
          chk(cur_k == (cur_h.mtype == MSG_WR_REQ ? int'(cur_h.len) + 2 : 1), "request length");
          p.h = cur_h; p.addr = cur_a;
          pend.push_back(p);
        end
      end
    end
  end
  // network: answer pending requests in random order
  int cred = 8;
  always @(posedge clk) if (rst_n && tx_credit.valid) cred++;
  initial begin
    rx_link = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (pend.size() > 0) begin
        int i;
        pend_t p;
        head_t h;
        i = (pend.size() > 3) ? $urandom_range(0, pend.size() - 1) : 0;
        if ($urandom_range(0, 9) == 0) i = pend.size() - 1;
        p = pend[i];
        pend.delete(i);
        h = '0; h.dst = NODE; h.src = p.h.dst; h.tid = p.h.tid; h.seq = p.h.seq; h.len = p.h.len;
        h.mtype = (p.h.mtype == MSG_WR_REQ) ? MSG_WR_RESP : MSG_RD_RESP;
        for (int k = 0; k <= (h.mtype == MSG_WR_RESP ? 0 : int'(h.len) + 1); k++) begin
          while (cred == 0) begin rx_link = '0; @(negedge clk); end
          rx_link.valid = 1; rx_link.vc = VC_RESP;
          rx_link.flit.head = (k == 0);
          rx_link.flit.tail = (h.mtype == MSG_WR_RESP) || (k == int'(h.len) + 1);
          rx_link.flit.data = (k == 0) ? 32'(h) : rdword(p.addr, k - 1);
          cred--;
          @(negedge clk);
          rx_link = '0;
        end
      end
    end
  end

  initial begin
    r_ready = 0; b_ready = 0; rx_credit = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_r == N && n_b == N / 2);
    repeat (20) @(posedge clk);
    chk(n_store > 0, "out-of-order packets stored");
    chk(n_rel > 0, "stored packets released");
    chk(n_stall > 0, "admission refused at least once");
    $display("INFO stored=%0d released=%0d admission_stalls=%0d", n_store, n_rel, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
