// tb_bank_queue: random pushes, pops and open rows against a reference model
// of the priority rules (new request: 7 - sequence number; every waiting
// request +1 per arrival, saturating at 15) and of the row-first choice (the
// highest-priority row hit, else the highest priority overall).
module tb_bank_queue;
  import noc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, full, cra_valid, sel_valid, sel_hit, sel_bypass, pop;
  mreq_t push_req, sel_req;
  logic [12:0] cra;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  bank_queue dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { mreq_t r; int prio; } ent_t;
  ent_t m [$];
  int tag = 0, n_hit = 0, n_bypass = 0;

  initial begin
    push = 0; pop = 0; push_req = '0; cra_valid = 0; cra = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int maxh, maxa, idx;
      bit anyh;
      @(negedge clk);
      cra_valid = $urandom_range(0, 3) != 0;
      cra = $urandom_range(0, 3);
      push = (m.size() < DEPTH) && $urandom_range(0, 1);
      push_req = '0;
      push_req.row = $urandom_range(0, 3);
      push_req.seq = $urandom_range(0, 7);
      push_req.col = tag[9:0];
      pop = (m.size() > 0) && $urandom_range(0, 1);
      #1;
      chk(count == m.size() && full == (m.size() == DEPTH), "count/full");
      chk(sel_valid == (m.size() > 0), "sel_valid");
      // reference choice
      anyh = 0; maxh = -1; maxa = -1;
      foreach (m[i]) begin
        if (cra_valid && m[i].r.row == cra) begin anyh = 1; if (m[i].prio > maxh) maxh = m[i].prio; end
        else if (m[i].prio > maxa) maxa = m[i].prio;
      end
      idx = -1;
      foreach (m[i]) if (m[i].r.col == sel_req.col) idx = i;
      if (m.size() > 0) begin
        chk(idx >= 0, "selected request is waiting");
        if (idx >= 0) begin
          if (anyh) chk(cra_valid && sel_req.row == cra && m[idx].prio == maxh, "highest-priority row hit");
          else      chk(m[idx].prio == maxa, "highest priority (no hit)");
        end
        chk(sel_hit == anyh, "sel_hit");
        chk(sel_bypass == (anyh && maxa > maxh), "sel_bypass");
        n_hit += anyh;
        n_bypass += sel_bypass;
      end
      @(posedge clk); #1;
      if (pop && idx >= 0) m.delete(idx);
      if (push) begin
        ent_t e;
        foreach (m[i]) if (m[i].prio < 15) m[i].prio++;
        e.r = push_req; e.prio = 7 - push_req.seq;
        m.push_back(e);
        tag++;
      end
      push = 0; pop = 0;
    end
    chk(n_hit > 0 && n_bypass > 0, "row hits and priority bypasses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
