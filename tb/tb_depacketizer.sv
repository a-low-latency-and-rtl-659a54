// tb_depacketizer: feeds read-response packets (1..8 data flits) and
// write-response packets and checks the AXI R beats (RID, RDATA, RRESP, RLAST)
// and B beats (BID, BRESP) under random backpressure.
module tb_depacketizer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t flit;
  logic flit_valid, flit_ready, r_ready, b_ready;
  axi_r_t r;
  axi_b_t b;
  int checks = 0, failures = 0;

  depacketizer dut (.*);
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

  axi_r_t exp_r [$];
  axi_b_t exp_b [$];

  always @(negedge clk) begin
    r_ready = $urandom_range(0, 3) != 0;
    b_ready = $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) begin
    if (rst_n && r.valid && r_ready) begin
      chk(exp_r.size() > 0 && r == exp_r[0], "R beat");
      if (exp_r.size() > 0) void'(exp_r.pop_front());
    end
    if (rst_n && b.valid && b_ready) begin
      chk(exp_b.size() > 0 && b == exp_b[0], "B beat");
      if (exp_b.size() > 0) void'(exp_b.pop_front());
    end
  end

  task automatic put(flit_t f);
    @(negedge clk);
    flit = f; flit_valid = 1;
    @(posedge clk); while (!flit_ready) @(posedge clk);
    #1 flit_valid = 0;
  endtask

  initial begin
    flit = '0; flit_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      head_t h;
      flit_t f;
      h = head_t'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        h.mtype = MSG_WR_RESP;
        exp_b.push_back('{valid: 1, id: h.tid, resp: h.resp});
        f = '{head: 1, tail: 1, data: h};
        put(f);
      end else begin
        h.mtype = MSG_RD_RESP;
        f = '{head: 1, tail: 0, data: h};
        put(f);
        for (int k = 0; k <= int'(h.len); k++) begin
          f = '{head: 0, tail: (k == int'(h.len)), data: $urandom};
          exp_r.push_back('{valid: 1, id: h.tid, data: f.data, resp: h.resp, last: f.tail});
          put(f);
        end
      end
    end
    repeat (20) @(posedge clk);
    chk(exp_r.size() == 0 && exp_b.size() == 0, "all beats out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
