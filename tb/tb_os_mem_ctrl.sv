// tb_os_mem_ctrl: the order-sensitive memory controller with an SDRAM model.
//  1. Latencies of a lone access (tRP-tRCD-tCL = 2-2-2): row empty takes
//     tRCD+tCL from ACT to data, row hit tCL from RD, row conflict
//     tRP+tRCD+tCL from PRE.
//  2. Four requests as in the scheduling example: 1 and 3 open rows in two
//     banks, 2 and 4 conflict with 1, 4 being in 1's row. Request 4 must be
//     served before 2 (conflict turned into a hit), 3 must overlap 1 (bank
//     interleaving), and all four finish in fewer cycles than in order.
//  3. Random reads and writes: every response matches a request, read data
//     are right, written words reach the device, no timing rule is broken,
//     and hits, empties, conflicts, priority bypasses and interleaving occur.
module tb_os_mem_ctrl;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  mreq_t req;
  logic req_valid, req_ok, wd_valid, wd_first, sd_rvalid, rsp_valid, rsp_ready, rd_valid, rd_ready;
  logic [31:0] wd_data, sd_rdata, rdata;
  sd_cmd_t sd_cmd;
  rsp_t rsp;
  logic ev_hit, ev_empty, ev_conflict, ev_bypass, ev_interleave;
  int violations, n_act, n_pre, n_col;
  int checks = 0, failures = 0;

  os_mem_ctrl dut (.*);
  sdram_model #(.ID(1)) mem (.clk, .rst_n, .cmd(sd_cmd), .rdata(sd_rdata), .rvalid(sd_rvalid),
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

  int cyc = 0;
  always @(negedge clk) cyc++;

  // command log
  typedef struct { int t; sd_cmd_t c; } log_t;
  log_t cmds [$];
  int rv_times [$];
  always @(posedge clk) begin
    if (rst_n && sd_cmd.op != SD_NOP) cmds.push_back('{cyc, sd_cmd});
    if (rst_n && sd_rvalid) rv_times.push_back(cyc);
  end
  int n_ev [5];
  always @(posedge clk) begin
    n_ev[0] += ev_hit; n_ev[1] += ev_empty; n_ev[2] += ev_conflict;
    n_ev[3] += ev_bypass; n_ev[4] += ev_interleave;
  end

  function automatic mreq_t mk(bit wr, int bank, int row, int col, int len, int tag);
    mreq_t m;
    m = '0;
    m.is_write = wr; m.bank = bank; m.row = row; m.col = col; m.len = len;
    m.src = tag[11:7]; m.tid = tag[6:3]; m.seq = tag[2:0];
    return m;
  endfunction

  // scoreboard of issued requests by tag
  mreq_t issued [int];
  mreq_t wreq [int];
  logic [31:0] wdata_of [int][$];

  task automatic send(mreq_t m, int tag);
    @(negedge clk);
    req = m; #1;
    while (!req_ok) begin @(negedge clk); #1; end
    issued[tag] = m;
    if (m.is_write) wreq[tag] = m;
    if (!m.is_write) begin
      req_valid = 1;
      @(posedge clk); #1 req_valid = 0;
    end else begin
      for (int k = 0; k <= int'(m.len); k++) begin
        wd_valid = 1; wd_first = (k == 0); wd_data = $urandom;
        wdata_of[tag].push_back(wd_data);
        req_valid = (k == int'(m.len));
        @(posedge clk); #1;
        wd_valid = 0; wd_first = 0; req_valid = 0;
        if (k != int'(m.len)) @(negedge clk);
      end
    end
  endtask

  // response side
  int n_rsp = 0;
  int order [$];
  bit rnd_ready = 0;
  always @(negedge clk) begin
    rsp_ready = !busy && (!rnd_ready || $urandom_range(0, 3) != 0);
    rd_ready  = busy && (!rnd_ready || $urandom_range(0, 3) != 0);
  end
  rsp_t cur;
  int   cur_tag, beat = 0;
  bit   busy = 0;
  always @(posedge clk) begin
    if (rst_n && !busy && rsp_valid && rsp_ready) begin
      cur = rsp; cur_tag = {rsp.src, rsp.tid, rsp.seq};
      chk(issued.exists(cur_tag), "response matches a request");
      if (issued.exists(cur_tag)) begin
        chk(issued[cur_tag].is_write == rsp.is_write && issued[cur_tag].len == rsp.len, "response fields");
        order.push_back(cur_tag);
        if (!rsp.is_write) begin busy = 1; beat = 0; end
        else begin issued.delete(cur_tag); n_rsp++; end
      end
    end else if (rst_n && busy && rd_valid && rd_ready) begin
      mreq_t m;
      m = issued[cur_tag];
      chk(rdata == tb_pkg::mem_init(1, m.bank, m.row, m.col + 10'(beat)), "read data");
      if (rdata != tb_pkg::mem_init(1, m.bank, m.row, m.col + 10'(beat))) $display("tag=%0d b=%0d row=%0d col=%0d beat=%0d got=%h", cur_tag, m.bank, m.row, m.col, beat, rdata);
      beat++;
      if (beat == int'(m.len) + 1) begin busy = 0; issued.delete(cur_tag); n_rsp++; end
    end
  end

  function automatic int find_cmd(sd_op_t op, int bank, int from);
    for (int i = from; i < cmds.size(); i++) if (cmds[i].c.op == op && cmds[i].c.bank == 2'(bank)) return i;
    return -1;
  endfunction

  initial begin
    int a, r1, p, t0, t1, i4, i2, tend;
    req = '0; req_valid = 0; wd_valid = 0; wd_first = 0; wd_data = 0;
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- 1. lone-access latencies ----
    send(mk(0, 2, 5, 8, 0, 1), 1);          // row empty
    wait (n_rsp == 1); repeat (4) @(posedge clk);
    a = find_cmd(SD_ACT, 2, 0); r1 = find_cmd(SD_RD, 2, 0);
    chk(a >= 0 && r1 >= 0 && cmds[r1].t - cmds[a].t == 2, "tRCD: ACT to RD");
    chk(rv_times.size() == 1 && rv_times[0] - cmds[a].t == 4, "row empty: tRCD+tCL to data");
    cmds.delete(); rv_times.delete();
    send(mk(0, 2, 5, 9, 0, 2), 2);          // row hit
    wait (n_rsp == 2); repeat (4) @(posedge clk);
    chk(cmds.size() == 1 && cmds[0].c.op == SD_RD, "row hit needs only RD");
    chk(rv_times.size() == 1 && rv_times[0] - cmds[0].t == 2, "row hit: tCL to data");
    cmds.delete(); rv_times.delete();
    send(mk(0, 2, 6, 9, 0, 3), 3);          // row conflict
    wait (n_rsp == 3); repeat (4) @(posedge clk);
    chk(cmds.size() == 3 && cmds[0].c.op == SD_PRE && cmds[1].c.op == SD_ACT && cmds[2].c.op == SD_RD,
        "row conflict: PRE, ACT, RD");
    chk(cmds.size() == 3 && cmds[1].t - cmds[0].t == 2, "tRP: PRE to ACT");
    chk(rv_times.size() == 1 && cmds.size() == 3 && rv_times[0] - cmds[0].t == 6,
        "row conflict: tRP+tRCD+tCL to data");
    cmds.delete(); rv_times.delete(); order.delete();

    // ---- 2. four-request example ----
    // bank 0 open on row 6? no: bank 0 is closed; request 1 opens row 10
    send(mk(0, 0, 10, 0, 0, 11), 11);       // 1: row empty, bank 0
    send(mk(0, 0, 20, 0, 0, 12), 12);       // 2: conflict with 1
    send(mk(0, 1, 30, 0, 0, 13), 13);       // 3: row empty, bank 1
    send(mk(0, 0, 10, 4, 0, 14), 14);       // 4: in 1's row
    t0 = cmds.size() > 0 ? cmds[0].t : cyc;
    wait (n_rsp == 7); repeat (4) @(posedge clk);
    t0 = cmds[0].t;
    tend = rv_times[rv_times.size() - 1];
    i4 = -1; i2 = -1;
    foreach (order[i]) begin if (order[i] == 14) i4 = i; if (order[i] == 12) i2 = i; end
    chk(i4 >= 0 && i2 >= 0 && i4 < i2, "request 4 (row hit) served before request 2");
    p = find_cmd(SD_ACT, 1, 0); a = find_cmd(SD_RD, 0, 0);
    chk(p >= 0 && a >= 0 && p < a, "bank 1 activated while bank 0 waits (interleaving)");
    $display("INFO four-request example: %0d cycles from first command to last data", tend - t0 + 1);
    chk(tend - t0 + 1 <= 14, "four requests within 14 memory cycles");

    // ---- 3. random traffic ----
    rnd_ready = 1;
    for (int i = 0; i < 600; i++) begin
      bit wr;
      wr = $urandom_range(0, 2) == 0;
      send(mk(wr, $urandom_range(0, 3), wr ? 4 + i / 128 : $urandom_range(0, 3),
              wr ? (i % 128) * 8 : $urandom_range(0, 1015), $urandom_range(0, 7), 100 + i), 100 + i);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(posedge clk);
    end
    wait (n_rsp == 607);
    repeat (10) @(posedge clk);
    // written words are in the device
    foreach (wreq[t]) begin
      mreq_t m;
      m = wreq[t];
      for (int k = 0; k <= int'(m.len); k++) begin
        logic [24:0] ad;
        ad = {m.bank, m.row, m.col + 10'(k)};
        chk(mem.mem.exists(ad) && mem.mem[ad] == wdata_of[t][k], "written word in device");
      end
    end
    chk(violations == 0, "no SDRAM timing violation");
    chk(n_ev[0] > 0 && n_ev[1] > 0 && n_ev[2] > 0, "row hits, empties and conflicts");
    chk(n_ev[3] > 0, "row-first choice over a higher priority");
    chk(n_ev[4] > 0, "bank interleaving");
    $display("INFO hit=%0d empty=%0d conflict=%0d bypass=%0d interleave=%0d", n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
