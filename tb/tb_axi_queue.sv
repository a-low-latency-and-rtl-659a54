// tb_axi_queue: drives random AXI reads and writes (bursts of 1..8 beats) and
// checks that each request leaves exactly once, reads and writes each in their
// own order, with the write data following its write request, and that a
// write is offered only when all its data are buffered.
module tb_axi_queue;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_a_t aw, ar;
  axi_w_t w;
  logic aw_ready, w_ready, ar_ready, msg_valid, msg_ready, wd_valid, wd_ready;
  req_msg_t msg;
  logic [31:0] wd;
  int checks = 0, failures = 0;

  axi_queue dut (.*);
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

  localparam int N = 300;
  req_msg_t exp_rd [$], exp_wr [$];
  logic [31:0] exp_wd [$];
  int n_rd = 0, n_wr = 0, got = 0, beats_sent = 0;

  // AR driver
  initial begin
    ar = '0;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ar.valid = 1; ar.id = $urandom; ar.addr = $urandom; ar.len = $urandom;
      @(posedge clk); while (!ar_ready) @(posedge clk);
      exp_rd.push_back('{is_write: 0, tid: ar.id, addr: ar.addr, len: ar.len});
      @(negedge clk); ar.valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  end
  // AW + W driver (data sent after the address)
  initial begin
    aw = '0; w = '0;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      int len;
      len = $urandom_range(0, 7);
      @(negedge clk);
      aw.valid = 1; aw.id = $urandom; aw.addr = $urandom; aw.len = len;
      @(posedge clk); while (!aw_ready) @(posedge clk);
      exp_wr.push_back('{is_write: 1, tid: aw.id, addr: aw.addr, len: aw.len});
      @(negedge clk); aw.valid = 0;
      for (int k = 0; k <= len; k++) begin
        w.valid = 1; w.data = $urandom; w.last = (k == len);
        @(posedge clk); while (!w_ready) @(posedge clk);
        exp_wd.push_back(w.data);
        @(negedge clk); w.valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
  end

  // packetizer side
  int wd_left = 0;
  always @(negedge clk) begin
    msg_ready = (wd_left == 0) && $urandom_range(0, 2) != 0;
    wd_ready  = (wd_left > 0) && $urandom_range(0, 2) != 0;
  end
  always @(posedge clk) begin
    if (rst_n && msg_valid && msg_ready) begin
      req_msg_t e;
      got++;
      if (msg.is_write) begin
        chk(exp_wr.size() > 0, "write expected");
        e = exp_wr.pop_front();
        chk(msg == e, "write request fields/order");
        wd_left = int'(msg.len) + 1;
        n_wr++;
      end else begin
        chk(exp_rd.size() > 0, "read expected");
        e = exp_rd.pop_front();
        chk(msg == e, "read request fields/order");
        n_rd++;
      end
    end
    if (rst_n && wd_valid && wd_ready && wd_left > 0) begin
      chk(wd == exp_wd.pop_front(), "write data");
      wd_left--;
    end
  end
  // a write is only offered with its data present
  always @(posedge clk)
    if (rst_n && msg_valid && msg.is_write) begin
      checks++;
      if (dut.wd_cnt < msg.len + 1) begin failures++; $display("FAIL write offered early"); end
    end

  initial begin
    msg_ready = 0; wd_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (got == 2 * N);
    repeat (20) @(posedge clk);
    chk(n_rd == N && n_wr == N, "all requests out");
    chk(exp_wd.size() == 0, "all data out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
