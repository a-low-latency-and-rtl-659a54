// router: input-buffered wormhole router of the 2D mesh.
//
// Five ports (N, E, S, W, Local), two virtual channels per input port with a
// BUF_DEPTH-flit buffer each (5 flits). Request packets travel on VC 0 and
// response packets on VC 1, which keeps the two message classes from blocking
// each other (no message-dependency deadlock). Routing is XY: first along x,
// then along y (y grows toward S). A head flit may leave only when the output
// VC of its class is free; the output VC then belongs to that packet until its
// tail flit has passed (wormhole switching). Switch allocation is separable
// and round-robin: each input port picks one of its VCs that can move, then
// each output port picks one of the input ports that chose it.
// Flow control is credit based: a flit is sent only when the downstream buffer
// of its VC has room; every flit leaving an input buffer returns a credit
// upstream. A flit spends one cycle in routing/allocation/traversal once it
// is at the head of its buffer.
// Ports, VCs, buffer depth, XY routing, wormhole switching and round-robin
// arbitration follow the design description; credits and the single-cycle
// pipeline are this design's choices.
module router
  import noc_pkg::*;
#(
  parameter int unsigned NX        = 5,
  parameter int unsigned NY        = 5,
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned BUF_DEPTH = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   in_link   [NPORT],
  output credit_t in_credit [NPORT],
  output link_t   out_link  [NPORT],
  input  credit_t out_credit[NPORT]
);
  localparam int unsigned CW = $clog2(BUF_DEPTH+1);

  function automatic logic [2:0] route(logic [NODE_W-1:0] dst);
    int unsigned dx, dy;
    dx = int'(dst) % NX;
    dy = int'(dst) / NX;
    if (dx > X)      return 3'(P_E);
    else if (dx < X) return 3'(P_W);
    else if (dy > Y) return 3'(P_S);
    else if (dy < Y) return 3'(P_N);
    else             return 3'(P_L);
  endfunction

  // input buffers
  flit_t      buf_flit  [NPORT][NVC];
  logic       buf_empty [NPORT][NVC];
  logic       buf_pop   [NPORT][NVC];
  logic [2:0] route_q   [NPORT][NVC];
  logic [2:0] want_o    [NPORT][NVC];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic full;
      logic [$clog2(BUF_DEPTH+1)-1:0] cnt;
      ni_fifo #(.W($bits(flit_t)), .DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n, .push(in_link[p].valid && in_link[p].vc == 1'(v)), .din(in_link[p].flit),
        .pop(buf_pop[p][v]), .dout(buf_flit[p][v]), .full(full), .empty(buf_empty[p][v]),
        .count(cnt)
      );
    end
  end

  // output VC state and credits
  logic          ovc_busy [NPORT][NVC];
  logic [CW-1:0] credit   [NPORT][NVC];

  // stage 1: one VC per input port
  logic [NVC-1:0] elig [NPORT];
  logic [NVC-1:0] s1_gnt [NPORT];
  logic           s1_idx [NPORT];
  logic           s1_any [NPORT];
  logic [NPORT-1:0] won;

  always_comb begin
    for (int p = 0; p < int'(NPORT); p++)
      for (int v = 0; v < int'(NVC); v++) begin
        want_o[p][v] = buf_flit[p][v].head ? route(flit2head(buf_flit[p][v].data).dst)
                                           : route_q[p][v];
        elig[p][v] = !buf_empty[p][v] && credit[want_o[p][v]][v] != 0 &&
                     (!buf_flit[p][v].head || !ovc_busy[want_o[p][v]][v]);
      end
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_s1
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n, .req(elig[p]), .advance(won[p]), .grant(s1_gnt[p]), .grant_idx(s1_idx[p]),
      .any(s1_any[p])
    );
  end

  // stage 2: one input port per output port
  logic [NPORT-1:0] o_req [NPORT];
  logic [NPORT-1:0] o_gnt [NPORT];
  logic [2:0]       o_idx [NPORT];
  logic             o_any [NPORT];

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++)
      for (int p = 0; p < int'(NPORT); p++)
        o_req[o][p] = s1_any[p] && want_o[p][s1_idx[p]] == 3'(o);
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_s2
    rr_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n, .req(o_req[o]), .advance(1'b1), .grant(o_gnt[o]), .grant_idx(o_idx[o]),
      .any(o_any[o])
    );
  end

  always_comb begin
    for (int p = 0; p < int'(NPORT); p++) begin
      won[p] = 1'b0;
      for (int o = 0; o < int'(NPORT); o++)
        if (o_gnt[o][p]) won[p] = 1'b1;
    end
    for (int p = 0; p < int'(NPORT); p++)
      for (int v = 0; v < int'(NVC); v++)
        buf_pop[p][v] = won[p] && s1_idx[p] == 1'(v);
    for (int p = 0; p < int'(NPORT); p++) begin
      in_credit[p].valid = won[p];
      in_credit[p].vc    = s1_idx[p];
    end
    // crossbar
    for (int o = 0; o < int'(NPORT); o++) begin
      out_link[o].valid = o_any[o];
      out_link[o].vc    = s1_idx[o_idx[o]];
      out_link[o].flit  = buf_flit[o_idx[o]][s1_idx[o_idx[o]]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(NPORT); o++)
        for (int v = 0; v < int'(NVC); v++) begin
          ovc_busy[o][v] <= 1'b0;
          credit[o][v]   <= CW'(BUF_DEPTH);
          route_q[o][v]  <= '0;
        end
    end else begin
      for (int o = 0; o < int'(NPORT); o++)
        for (int v = 0; v < int'(NVC); v++) begin
          credit[o][v] <= credit[o][v]
                          - CW'(out_link[o].valid && out_link[o].vc == 1'(v))
                          + CW'(out_credit[o].valid && out_credit[o].vc == 1'(v));
          if (out_link[o].valid && out_link[o].vc == 1'(v)) begin
            if (out_link[o].flit.head) ovc_busy[o][v] <= !out_link[o].flit.tail;
            else if (out_link[o].flit.tail) ovc_busy[o][v] <= 1'b0;
          end
        end
      for (int p = 0; p < int'(NPORT); p++)
        if (won[p] && buf_flit[p][s1_idx[p]].head) route_q[p][s1_idx[p]] <= want_o[p][s1_idx[p]];
    end
  end
endmodule
