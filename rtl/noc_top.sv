// noc_top: NX x NY 2D-mesh network-on-chip with master and memory tiles.
//
// Every node is a router with one tile on its local port. Tiles in odd rows
// are master tiles: a master_ni with an AXI slave port for a 32-bit processor
// core. Tiles in even rows are memory tiles: a slave_ni with the
// order-sensitive memory controller and an SDRAM command/data port. The
// default 5 x 5 mesh has 10 masters and 15 memories. Requests go from masters
// to memories on VC 0, responses come back on VC 1; memory k is selected by
// address bits [31:28] modulo 15. Master m is node (2*(m/NX)+1)*NX + m%NX,
// memory k is node 2*(k/NX)*NX + k%NX.
//
// Ports are arrays indexed by master or memory number; links at the mesh edge
// are tied off. ev_* are one-cycle event pulses per tile (out-of-order packet
// stored, stored packet released, admission refused; row hit, row empty, row
// conflict, row-first bypass of priority, bank interleaving).
// Mesh size, tile counts and the router/NI structure follow the design
// description; the placement of masters and memories is this design's choice.
module noc_top
  import noc_pkg::*;
#(
  parameter  int unsigned NX = 5,
  parameter  int unsigned NY = 5,
  localparam int unsigned NM = num_masters(NX, NY),
  localparam int unsigned NS = num_slaves(NX, NY)
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI ports of the master cores
  input  axi_a_t      m_aw       [NM],
  output logic        m_aw_ready [NM],
  input  axi_w_t      m_w        [NM],
  output logic        m_w_ready  [NM],
  input  axi_a_t      m_ar       [NM],
  output logic        m_ar_ready [NM],
  output axi_r_t      m_r        [NM],
  input  logic        m_r_ready  [NM],
  output axi_b_t      m_b        [NM],
  input  logic        m_b_ready  [NM],
  // SDRAM ports of the memories
  output sd_cmd_t     sd_cmd     [NS],
  input  logic [31:0] sd_rdata   [NS],
  input  logic        sd_rvalid  [NS],
  // event pulses
  output logic [NM-1:0] ev_store,
  output logic [NM-1:0] ev_release,
  output logic [NM-1:0] ev_adm_stall,
  output logic [NS-1:0] ev_hit,
  output logic [NS-1:0] ev_empty,
  output logic [NS-1:0] ev_conflict,
  output logic [NS-1:0] ev_bypass,
  output logic [NS-1:0] ev_interleave
);
  localparam int unsigned NN = NX * NY;

  link_t   r_in   [NN][NPORT];
  link_t   r_out  [NN][NPORT];
  credit_t r_icr  [NN][NPORT];   // credits a router returns upstream
  credit_t r_ocr  [NN][NPORT];   // credits a router receives for its outputs

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned N = y * NX + x;

      router #(.NX(NX), .NY(NY), .X(x), .Y(y), .BUF_DEPTH(5)) u_r (
        .clk, .rst_n, .in_link(r_in[N]), .in_credit(r_icr[N]),
        .out_link(r_out[N]), .out_credit(r_ocr[N])
      );

      // mesh wiring
      if (y > 0) begin : g_n
        assign r_in[N][P_N]  = r_out[N-NX][P_S];
        assign r_ocr[N][P_N] = r_icr[N-NX][P_S];
      end else begin : g_n0
        assign r_in[N][P_N]  = '0;
        assign r_ocr[N][P_N] = '0;
      end
      if (y < NY - 1) begin : g_s
        assign r_in[N][P_S]  = r_out[N+NX][P_N];
        assign r_ocr[N][P_S] = r_icr[N+NX][P_N];
      end else begin : g_s0
        assign r_in[N][P_S]  = '0;
        assign r_ocr[N][P_S] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[N][P_W]  = r_out[N-1][P_E];
        assign r_ocr[N][P_W] = r_icr[N-1][P_E];
      end else begin : g_w0
        assign r_in[N][P_W]  = '0;
        assign r_ocr[N][P_W] = '0;
      end
      if (x < NX - 1) begin : g_e
        assign r_in[N][P_E]  = r_out[N+1][P_W];
        assign r_ocr[N][P_E] = r_icr[N+1][P_W];
      end else begin : g_e0
        assign r_in[N][P_E]  = '0;
        assign r_ocr[N][P_E] = '0;
      end

      // tile on the local port
      if (y % 2 == 1) begin : g_master
        localparam int unsigned M = (y / 2) * NX + x;
        master_ni #(.NX(NX), .NUM_SLAVES(NS), .NODE(N)) u_ni (
          .clk, .rst_n,
          .aw(m_aw[M]), .aw_ready(m_aw_ready[M]), .w(m_w[M]), .w_ready(m_w_ready[M]),
          .ar(m_ar[M]), .ar_ready(m_ar_ready[M]), .r(m_r[M]), .r_ready(m_r_ready[M]),
          .b(m_b[M]), .b_ready(m_b_ready[M]),
          .tx_link(r_in[N][P_L]), .rx_credit(r_icr[N][P_L]),
          .rx_link(r_out[N][P_L]), .tx_credit(r_ocr[N][P_L]),
          .ev_adm_stall(ev_adm_stall[M]), .ev_store(ev_store[M]), .ev_release(ev_release[M])
        );
      end else begin : g_slave
        localparam int unsigned S = (y / 2) * NX + x;
        slave_ni #(.NX(NX), .NODE(N)) u_ni (
          .clk, .rst_n,
          .rx_link(r_out[N][P_L]), .tx_credit(r_ocr[N][P_L]),
          .tx_link(r_in[N][P_L]), .rx_credit(r_icr[N][P_L]),
          .sd_cmd(sd_cmd[S]), .sd_rdata(sd_rdata[S]), .sd_rvalid(sd_rvalid[S]),
          .ev_hit(ev_hit[S]), .ev_empty(ev_empty[S]), .ev_conflict(ev_conflict[S]),
          .ev_bypass(ev_bypass[S]), .ev_interleave(ev_interleave[S])
        );
      end
    end
  end
endmodule
