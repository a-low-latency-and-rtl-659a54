// tb_reorder_unit: admits requests of random transaction IDs (reads with 1..8
// words, writes), sends their response packets back in a random order while
// admitting more, with random gaps and backpressure, and checks that every ID
// receives its responses in admission order with the right header and data.
// Requires both an out-of-order store and a release to have happened.
module tb_reorder_unit;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic adm_req, adm_ok, adm_fire, in_valid, in_ready, out_valid, out_ready;
  logic [TID_W-1:0] adm_tid;
  logic [6:0] adm_size;
  logic [SEQ_W-1:0] adm_seq;
  flit_t in_flit, out_flit;
  logic ev_store, ev_release;
  int checks = 0, failures = 0, n_store = 0, n_release = 0, n_done = 0;

  reorder_unit dut (.*);
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

  function automatic logic [31:0] word(int tid, int seq, int beat);
    return {8'hd0, 4'(tid), 4'(seq), 16'(beat * 77 + tid)};
  endfunction

  typedef struct { int tid; int seq; bit wr; int len; } rsp_info_t;
  rsp_info_t pool [$];          // responses "in the network"
  rsp_info_t expq [16][$];      // per ID, in admission order
  localparam int TOTAL = 600;
  int admitted = 0;

  // admission
  always @(negedge clk) begin
    if (rst_n) begin
      adm_req  = (admitted < TOTAL) && ($urandom_range(0, 3) != 0);
      adm_tid  = $urandom_range(0, 5);
      adm_size = $urandom_range(0, 2) == 0 ? 7'd0 : 7'($urandom_range(1, 8));
      #1;
      adm_fire = adm_req && adm_ok;
    end
  end
  always @(posedge clk) begin
    if (rst_n && adm_fire) begin
      rsp_info_t r;
      r.tid = adm_tid; r.seq = adm_seq; r.wr = (adm_size == 0); r.len = adm_size;
      pool.push_back(r);
      expq[adm_tid].push_back(r);
      admitted++;
    end
    if (ev_store) n_store++;
    if (ev_release) n_release++;
  end

  // network: send pending responses in random order
  initial begin
    in_valid = 0; in_flit = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (pool.size() > 0 && $urandom_range(0, 1)) begin
        int i;
        rsp_info_t r;
        head_t h;
        i = $urandom_range(0, pool.size() - 1);
        r = pool[i];
        pool.delete(i);
        h = '0; h.tid = r.tid; h.seq = r.seq; h.len = r.wr ? 0 : r.len - 1;
        h.mtype = r.wr ? MSG_WR_RESP : MSG_RD_RESP;
        for (int k = 0; k <= (r.wr ? 0 : r.len); k++) begin
          in_valid = 1;
          in_flit.head = (k == 0);
          in_flit.tail = r.wr ? 1'b1 : (k == r.len);
          in_flit.data = (k == 0) ? 32'(h) : word(r.tid, r.seq, k - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
          in_valid = $urandom_range(0, 3) != 0;
          while (!in_valid) begin @(negedge clk); in_valid = 1; end
        end
        in_valid = 0;
      end
    end
  end

  // depacketizer side: check order and contents
  rsp_info_t cur;
  int beat = 0;
  bit in_pkt = 0;
  always @(negedge clk) out_ready = $urandom_range(0, 4) != 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (!in_pkt) begin
        head_t h;
        h = flit2head(out_flit.data);
        chk(out_flit.head, "head flit first");
        chk(expq[h.tid].size() > 0, "response expected");
        if (expq[h.tid].size() > 0) begin
          cur = expq[h.tid].pop_front();
          chk(h.seq == SEQ_W'(cur.seq), "in-order sequence number");
          chk((h.mtype == MSG_WR_RESP) == cur.wr, "response type");
          chk(out_flit.tail == cur.wr, "tail on write response head");
        end
        beat = 0;
        in_pkt = !out_flit.tail;
        if (out_flit.tail) n_done++;
      end else begin
        chk(out_flit.data == word(cur.tid, cur.seq, beat), "payload word");
        beat++;
        chk(out_flit.tail == (beat == cur.len), "tail position");
        if (out_flit.tail) begin in_pkt = 0; n_done++; end
      end
    end
  end

  initial begin
    adm_req = 0; adm_fire = 0; adm_tid = 0; adm_size = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_done == TOTAL);
    repeat (5) @(posedge clk);
    for (int t = 0; t < 16; t++) chk(expq[t].size() == 0, "nothing left");
    chk(n_store > 0, "out-of-order packets stored");
    chk(n_release > 0, "stored packets released");
    $display("INFO stored=%0d released=%0d", n_store, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
