// tb_packetizer: sends messages of every shape (with and without address
// flit, 0..8 data words) and checks the flit stream: head flit equal to the
// header, address flit, data words in order, tail on the last flit only; and
// that back-to-back packets leave without a gap when nothing stalls.
module tb_packetizer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  head_t hdr;
  logic has_addr, msg_valid, msg_ready, d_valid, d_ready, flit_valid, flit_ready;
  logic [31:0] addr, d;
  logic [3:0] ndata;
  flit_t flit;
  int checks = 0, failures = 0;

  packetizer dut (.*);
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

  flit_t exp_f [$];
  logic [31:0] data_q [$];
  bit stall = 1;
  int sent = 0;

  // data source
  always @(negedge clk) begin
    d_valid = data_q.size() > 0 && (!stall || $urandom_range(0, 2) != 0);
    d = data_q.size() > 0 ? data_q[0] : '0;
    flit_ready = !stall || $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) if (d_valid && d_ready) void'(data_q.pop_front());

  // sink
  int nflits = 0, first_cycle = 0, last_cycle = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && flit_valid && flit_ready) begin
      chk(exp_f.size() > 0, "flit expected");
      if (exp_f.size() > 0) chk(flit == exp_f.pop_front(), "flit");
      if (nflits == 0) first_cycle = cyc;
      last_cycle = cyc;
      nflits++;
    end
  end

  task automatic send(int nd, bit ha);
    head_t h;
    flit_t f;
    h = head_t'($urandom);
    @(negedge clk);
    hdr = h; has_addr = ha; addr = $urandom; ndata = nd; msg_valid = 1;
    f.head = 1; f.tail = !ha && nd == 0; f.data = h; exp_f.push_back(f);
    if (ha) begin f.head = 0; f.tail = (nd == 0); f.data = addr; exp_f.push_back(f); end
    for (int k = 0; k < nd; k++) begin
      f.head = 0; f.tail = (k == nd - 1); f.data = $urandom;
      exp_f.push_back(f); data_q.push_back(f.data);
    end
    @(posedge clk); while (!msg_ready) @(posedge clk);
    #1 msg_valid = 0;
  endtask

  initial begin
    msg_valid = 0; hdr = '0; has_addr = 0; addr = 0; ndata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) send($urandom_range(0, 8), $urandom_range(0, 1));
    wait (exp_f.size() == 0);
    // throughput: 10 packets of 1+1+4 flits with no stalls take 60 cycles
    stall = 0;
    repeat (2) @(posedge clk);
    nflits = 0;
    for (int i = 0; i < 10; i++) send(4, 1);
    wait (exp_f.size() == 0);
    chk(nflits == 60 && last_cycle - first_cycle == 59, "one flit per cycle, no gap between packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
