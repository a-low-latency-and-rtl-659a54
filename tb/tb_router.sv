// tb_router: the centre router of a 3 x 3 mesh (X=1, Y=1). All five inputs
// send random packets (1..10 flits, both VCs, random destinations) under
// credit flow control; the outputs return credits after random delays. Each
// packet must leave on its XY output port, on its own VC, with its flits in
// order and not mixed with another packet of the same output VC (wormhole).
// Also checks that a lone flit crosses the router in one cycle.
module tb_router;
  import noc_pkg::*;
  localparam int NX = 3, NY = 3, X = 1, Y = 1, BD = 5, NPK = 300;
  logic clk = 0, rst_n = 0;
  link_t in_link [NPORT], out_link [NPORT];
  credit_t in_credit [NPORT], out_credit [NPORT];
  int checks = 0, failures = 0;

  router #(.NX(NX), .NY(NY), .X(X), .Y(Y), .BUF_DEPTH(BD)) dut (.*);
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

  function automatic int xy_port(int dst);
    int dx, dy;
    dx = dst % NX; dy = dst / NX;
    if (dx > X) return P_E;
    if (dx < X) return P_W;
    if (dy > Y) return P_S;
    if (dy < Y) return P_N;
    return P_L;
  endfunction

  // upstream credit counters per input port and VC
  int cred [NPORT][NVC];
  always @(posedge clk)
    for (int p = 0; p < NPORT; p++)
      if (rst_n && in_credit[p].valid) cred[p][in_credit[p].vc]++;

  int sent_pk = 0, recv_pk = 0;
  typedef struct { int len; int port; bit vc; } pk_t;
  pk_t pk_info [int];

  for (genvar p = 0; p < NPORT; p++) begin : g_drv
    initial begin
      in_link[p] = '0;
      wait (rst_n);
      for (int n = 0; n < NPK / NPORT; n++) begin
        int id, len, dst;
        bit vc;
        head_t h;
        id = p * 1000 + n;
        len = $urandom_range(1, 10);
        dst = $urandom_range(0, NX * NY - 1);
        vc = $urandom_range(0, 1);
        pk_info[id] = '{len: len, port: xy_port(dst), vc: vc};
        h = '0; h.dst = dst; h.src = p; h.rsvd = 0;
        for (int k = 0; k < len; k++) begin
          @(negedge clk);
          while (cred[p][vc] == 0) @(negedge clk);
          in_link[p].valid = 1; in_link[p].vc = vc;
          in_link[p].flit.head = (k == 0);
          in_link[p].flit.tail = (k == len - 1);
          in_link[p].flit.data = (k == 0) ? {h[31:16], 16'(id)} : {16'(k), 16'(id)};
          cred[p][vc]--;
          @(posedge clk); #1 in_link[p] = '0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
        sent_pk++;
      end
    end
  end

  // sinks: check per output VC, return credits with random delay
  int cur_id [NPORT][NVC];
  int cur_k  [NPORT][NVC];
  int pend_cr [NPORT][NVC];
  always @(posedge clk) begin
    for (int o = 0; o < NPORT; o++) begin
      out_credit[o] <= '0;
      for (int v = 0; v < NVC; v++)
        if (pend_cr[o][v] > 0 && $urandom_range(0, 2) == 0) begin
          out_credit[o] <= '{valid: 1, vc: v};
          pend_cr[o][v]--;
          break;
        end
      if (rst_n && out_link[o].valid) begin
        int v, id;
        v = out_link[o].vc;
        id = out_link[o].flit.data[15:0];
        pend_cr[o][v]++;
        chk(pend_cr[o][v] <= BD, "credit respected downstream");
        if (out_link[o].flit.head) begin
          chk(cur_id[o][v] < 0, "no new head inside a packet (wormhole)");
          chk(pk_info.exists(id), "known packet");
          if (pk_info.exists(id)) begin
            chk(pk_info[id].port == o, "XY output port");
            chk(pk_info[id].vc == 1'(v), "VC kept");
          end
          cur_id[o][v] = id; cur_k[o][v] = 0;
        end else begin
          chk(id == cur_id[o][v], "flit belongs to the open packet");
          chk(out_link[o].flit.data[31:16] == 16'(cur_k[o][v]), "flit order");
        end
        cur_k[o][v]++;
        if (out_link[o].flit.tail) begin
          if (pk_info.exists(id)) chk(cur_k[o][v] == pk_info[id].len, "packet length");
          cur_id[o][v] = -1;
          recv_pk++;
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++) begin
        cred[p][v] = BD; cur_id[p][v] = -1; cur_k[p][v] = 0; pend_cr[p][v] = 0;
      end
    for (int o = 0; o < NPORT; o++) out_credit[o] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (recv_pk == NPK);
    repeat (30) @(posedge clk);
    chk(sent_pk == NPK, "all packets sent");
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++) chk(cred[p][v] == BD, "all input credits returned");
    // latency: a lone single-flit packet West -> East leaves in the next cycle
    @(negedge clk);
    in_link[P_W] = '{valid: 1, vc: 0, flit: '{head: 1, tail: 1, data: {5'd5, 11'd0, 16'd7}}};
    pk_info[7] = '{len: 1, port: P_E, vc: 0};
    @(posedge clk); #1 in_link[P_W] = '0;
    @(posedge clk); #1;
    chk(recv_pk == NPK + 1, "one cycle through the router");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
