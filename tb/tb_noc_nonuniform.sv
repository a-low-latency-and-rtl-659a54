// tb_noc_nonuniform: the whole network at its default size under non-uniform
// traffic: 70% of each master's reads and writes go to one of the two
// memories one hop away (directly above or below it), the other 30% to a
// memory chosen at random among the rest. Otherwise the same as tb_noc_top:
// AXI master models on all 10 masters, SDRAM models (with timing checks) on
// all 15 memories, per-ID order and data of every R beat and B checked, a
// read-back phase of all writes, and each mechanism (reorder store/release,
// admission stall, row hit/empty/conflict, bypass, interleave) must occur.
// It also reports the average read latency (AR handshake to last R beat).
module tb_noc_nonuniform;
  import noc_pkg::*;
  localparam int NX = 5, NY = 5;
  localparam int NM = num_masters(NX, NY), NS = num_slaves(NX, NY);
  localparam int NRD = 40, NWR = 12;

  logic clk = 0, rst_n = 0;
  axi_a_t m_aw [NM], m_ar [NM];
  axi_w_t m_w [NM];
  axi_r_t m_r [NM];
  axi_b_t m_b [NM];
  logic m_aw_ready [NM], m_w_ready [NM], m_ar_ready [NM], m_r_ready [NM], m_b_ready [NM];
  sd_cmd_t sd_cmd [NS];
  logic [31:0] sd_rdata [NS];
  logic sd_rvalid [NS];
  logic [NM-1:0] ev_store, ev_release, ev_adm_stall;
  logic [NS-1:0] ev_hit, ev_empty, ev_conflict, ev_bypass, ev_interleave;
  int violations [NS], n_act [NS], n_pre [NS], n_col [NS];
  int checks = 0, failures = 0;

  noc_top dut (.*);
  always #5 clk = ~clk;

  for (genvar k = 0; k < NS; k++) begin : g_mem
    sdram_model #(.ID(k)) u_sd (
      .clk, .rst_n, .cmd(sd_cmd[k]), .rdata(sd_rdata[k]), .rvalid(sd_rvalid[k]),
      .violations(violations[k]), .n_act(n_act[k]), .n_pre(n_pre[k]), .n_col(n_col[k])
    );
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected word of an address that was never written
  function automatic logic [31:0] init_word(logic [31:0] a, int beat);
    return tb_pkg::mem_init(int'(a[31:28]) % NS, addr_bank(a), addr_row(a),
                            addr_col(a) + 10'(beat));
  endfunction

  // memory for one request of master m: 70% one hop away, 30% elsewhere
  function automatic logic [3:0] pick_mem(int m);
    int loc, k;
    loc = (m % NX) + (m / NX) * NX + ($urandom_range(0, 1) == 1 ? NX : 0);
    if ($urandom_range(0, 9) < 7) return 4'(loc);
    do k = $urandom_range(0, NS - 1); while (k == m % NX + (m / NX) * NX || k == m % NX + (m / NX) * NX + NX);
    return 4'(k);
  endfunction

  typedef struct { logic [31:0] addr; int len; logic [31:0] d [8]; longint t0; } txn_t;
  txn_t exp_rd [NM][16][$];
  int   exp_wr [NM][16][$];
  txn_t written [NM][$];
  int   n_rdone [NM], n_bdone [NM], rbeat [NM][16];
  bit   ph1_done [NM];
  int   masters_done = 0;
  longint lat_sum = 0, lat_n = 0;

  for (genvar m = 0; m < NM; m++) begin : g_mst
    // read issue: phase 1 random reads, phase 2 read-back of own writes
    initial begin
      txn_t t;
      m_ar[m] = '0;
      wait (rst_n);
      for (int i = 0; i < NRD; i++) begin
        logic [31:0] a;
        a = '0;
        a[31:28] = pick_mem(m);
        a[26:14] = 13'($urandom_range(0, 2));
        a[13:12] = 2'($urandom_range(0, 3));
        a[11:2]  = 10'($urandom_range(0, 1000));
        t.addr = a; t.len = $urandom_range(0, 7);
        for (int b = 0; b < 8; b++) t.d[b] = init_word(a, b);
        @(negedge clk);
        m_ar[m] = '{valid: 1, id: 4'($urandom_range(0, 3)), addr: a, len: 3'(t.len)};
        @(posedge clk); while (!m_ar_ready[m]) @(posedge clk);
        t.t0 = longint'($time);
        exp_rd[m][m_ar[m].id].push_back(t);
        @(negedge clk); m_ar[m].valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      wait (n_rdone[m] == NRD && n_bdone[m] == NWR);
      repeat (400) @(posedge clk);
      ph1_done[m] = 1;
      for (int i = 0; i < written[m].size(); i++) begin
        t = written[m][i];
        @(negedge clk);
        m_ar[m] = '{valid: 1, id: 4'(i % 4), addr: t.addr, len: 3'(t.len)};
        @(posedge clk); while (!m_ar_ready[m]) @(posedge clk);
        t.t0 = longint'($time);
        exp_rd[m][m_ar[m].id].push_back(t);
        @(negedge clk); m_ar[m].valid = 0;
      end
      wait (n_rdone[m] == NRD + NWR);
      masters_done++;
    end

    // write issue into rows 16 + 4*m .. of every memory (private to master m)
    initial begin
      m_aw[m] = '0; m_w[m] = '0;
      wait (rst_n);
      for (int i = 0; i < NWR; i++) begin
        txn_t t;
        logic [31:0] a;
        a = '0;
        a[31:28] = pick_mem(m);
        a[26:14] = 13'(16 + 4 * m + $urandom_range(0, 3));
        a[13:12] = 2'($urandom_range(0, 3));
        a[11:2]  = 10'(16 * i);
        t.addr = a; t.len = $urandom_range(0, 7);
        for (int b = 0; b < 8; b++) t.d[b] = $urandom;
        @(negedge clk);
        m_aw[m] = '{valid: 1, id: 4'($urandom_range(0, 3)), addr: a, len: 3'(t.len)};
        @(posedge clk); while (!m_aw_ready[m]) @(posedge clk);
        exp_wr[m][m_aw[m].id].push_back(i);
        written[m].push_back(t);
        @(negedge clk); m_aw[m].valid = 0;
        for (int b = 0; b <= t.len; b++) begin
          m_w[m] = '{valid: 1, data: t.d[b], last: b == t.len};
          @(posedge clk); while (!m_w_ready[m]) @(posedge clk);
          @(negedge clk); m_w[m].valid = 0;
        end
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
    end

    always @(negedge clk) begin
      m_r_ready[m] = $urandom_range(0, 5) != 0;
      m_b_ready[m] = $urandom_range(0, 5) != 0;
    end

    // response check: per ID in issue order
    always @(posedge clk) begin
      if (rst_n && m_r[m].valid && m_r_ready[m]) begin
        int id;
        id = int'(m_r[m].id);
        chk(exp_rd[m][id].size() > 0, "read response expected");
        if (exp_rd[m][id].size() > 0) begin
          chk(m_r[m].data == exp_rd[m][id][0].d[rbeat[m][id]], "read data in ID order");
          chk(m_r[m].last == (rbeat[m][id] == exp_rd[m][id][0].len), "RLAST");
          rbeat[m][id]++;
          if (m_r[m].last) begin
            lat_sum += longint'($time) - exp_rd[m][id][0].t0; lat_n++;
            void'(exp_rd[m][id].pop_front()); rbeat[m][id] = 0; n_rdone[m]++;
          end
        end
      end
      if (rst_n && m_b[m].valid && m_b_ready[m]) begin
        chk(exp_wr[m][m_b[m].id].size() > 0, "write response expected");
        if (exp_wr[m][m_b[m].id].size() > 0) void'(exp_wr[m][m_b[m].id].pop_front());
        n_bdone[m]++;
      end
    end
  end

  // mechanism counters
  int n_store = 0, n_rel = 0, n_stall = 0, n_hit = 0, n_empty = 0, n_conf = 0, n_byp = 0,
      n_il = 0;
  always @(posedge clk) if (rst_n) begin
    n_store += $countones(ev_store);
    n_rel   += $countones(ev_release);
    n_stall += $countones(ev_adm_stall);
    n_hit   += $countones(ev_hit);
    n_empty += $countones(ev_empty);
    n_conf  += $countones(ev_conflict);
    n_byp   += $countones(ev_bypass);
    n_il    += $countones(ev_interleave);
  end

  initial begin
    int viol, cols;
    for (int m = 0; m < NM; m++) begin
      n_rdone[m] = 0; n_bdone[m] = 0; ph1_done[m] = 0;
      for (int i = 0; i < 16; i++) rbeat[m][i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (masters_done == NM);
    repeat (50) @(posedge clk);
    viol = 0; cols = 0;
    for (int k = 0; k < NS; k++) begin viol += violations[k]; cols += n_col[k]; end
    for (int m = 0; m < NM; m++)
      for (int i = 0; i < 16; i++) chk(exp_rd[m][i].size() == 0 && exp_wr[m][i].size() == 0,
                                       "no outstanding transaction");
    chk(viol == 0, "SDRAM timing rules kept");
    $display("INFO cycles=%0t columns=%0d store=%0d release=%0d stall=%0d hit=%0d empty=%0d conflict=%0d bypass=%0d interleave=%0d",
             $time / 10, cols, n_store, n_rel, n_stall, n_hit, n_empty, n_conf, n_byp, n_il);
    $display("INFO reads=%0d average read latency=%0d cycles", lat_n, lat_sum / (10 * lat_n));
    chk(n_store > 0, "reorder buffer store happened");
    chk(n_rel > 0, "reorder buffer release happened");
    chk(n_stall > 0, "admission stall happened");
    chk(n_hit > 0, "row hit happened");
    chk(n_empty > 0, "row empty happened");
    chk(n_conf > 0, "row conflict happened");
    chk(n_byp > 0, "bank-queue bypass happened");
    chk(n_il > 0, "bank interleaving happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
