// noc_pkg: types and constants shared by the network interfaces, the
// order-sensitive memory controller and the routers.
//
// A flit is 32 data bits plus head/tail sideband bits. The head flit carries
// the routing and ordering information of a packet (destination, source,
// message type, AXI transaction ID, sequence number, burst length, response
// code). The 32-bit flit, the 4-bit transaction ID, the 3-bit sequence number
// and the two VC classes follow the design description; the bit positions in
// the head flit are this design's own choice.
//
// Packet shapes:
//   read request   : head, address              (2 flits,  VC 0)
//   write request  : head, address, L data     (2+L flits, VC 0)
//   read response  : head, L data               (1+L flits, VC 1)
//   write response : head                       (1 flit,   VC 1)
// with L = len+1 beats, 1..8.
//
// Node numbering in an NX x NY mesh: node = y*NX + x. Masters sit in odd rows,
// memories in even rows (so each master has a memory one hop away).
package noc_pkg;

  localparam int unsigned FLIT_W = 32;
  localparam int unsigned TID_W  = 4;
  localparam int unsigned SEQ_W  = 3;
  localparam int unsigned LEN_W  = 3;   // burst length minus one
  localparam int unsigned NODE_W = 5;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned NPORT  = 5;
  localparam int unsigned NVC    = 2;

  localparam logic VC_REQ  = 1'b0;
  localparam logic VC_RESP = 1'b1;

  // router port numbering
  localparam int unsigned P_N = 0;
  localparam int unsigned P_E = 1;
  localparam int unsigned P_S = 2;
  localparam int unsigned P_W = 3;
  localparam int unsigned P_L = 4;

  typedef enum logic [1:0] {
    MSG_RD_REQ  = 2'd0,
    MSG_WR_REQ  = 2'd1,
    MSG_RD_RESP = 2'd2,
    MSG_WR_RESP = 2'd3
  } msg_t;

  typedef struct packed {
    logic [NODE_W-1:0] dst;
    logic [NODE_W-1:0] src;
    msg_t              mtype;
    logic [TID_W-1:0]  tid;
    logic [SEQ_W-1:0]  seq;
    logic [LEN_W-1:0]  len;
    logic [1:0]        resp;
    logic [7:0]        rsvd;
  } head_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // one direction of a router link
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

  typedef struct packed {
    logic valid;
    logic vc;
  } credit_t;

  // AXI channels (32-bit data, 4-bit IDs, bursts of 1..8 beats)
  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } axi_a_t;

  typedef struct packed {
    logic              valid;
    logic [FLIT_W-1:0] data;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  id;
    logic [FLIT_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic             valid;
    logic [TID_W-1:0] id;
    logic [1:0]       resp;
  } axi_b_t;

  // request message leaving the AXI-Queue
  typedef struct packed {
    logic              is_write;
    logic [TID_W-1:0]  tid;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } req_msg_t;

  // request held in a bank queue of the memory controller
  typedef struct packed {
    logic              is_write;
    logic [NODE_W-1:0] src;
    logic [TID_W-1:0]  tid;
    logic [SEQ_W-1:0]  seq;
    logic [LEN_W-1:0]  len;
    logic [1:0]        bank;
    logic [12:0]       row;
    logic [9:0]        col;
    logic [5:0]        wptr;   // head of its data in the write queue
  } mreq_t;

  // response descriptor leaving the memory controller
  typedef struct packed {
    logic              is_write;
    logic [NODE_W-1:0] src;
    logic [TID_W-1:0]  tid;
    logic [SEQ_W-1:0]  seq;
    logic [LEN_W-1:0]  len;
  } rsp_t;

  typedef enum logic [2:0] {
    SD_NOP = 3'd0,
    SD_ACT = 3'd1,
    SD_PRE = 3'd2,
    SD_RD  = 3'd3,
    SD_WR  = 3'd4
  } sd_op_t;

  typedef struct packed {
    sd_op_t      op;
    logic [1:0]  bank;
    logic [12:0] row;
    logic [9:0]  col;
    logic [31:0] wdata;
  } sd_cmd_t;

  // address map inside one memory
  function automatic logic [9:0]  addr_col (logic [ADDR_W-1:0] a); return a[11:2];  endfunction
  function automatic logic [1:0]  addr_bank(logic [ADDR_W-1:0] a); return a[13:12]; endfunction
  function automatic logic [12:0] addr_row (logic [ADDR_W-1:0] a); return a[26:14]; endfunction

  // placement: masters in odd rows, memories in even rows
  function automatic int unsigned num_slaves(int unsigned nx, int unsigned ny);
    return nx * ((ny + 1) / 2);
  endfunction
  function automatic int unsigned num_masters(int unsigned nx, int unsigned ny);
    return nx * (ny / 2);
  endfunction
  function automatic logic [NODE_W-1:0] slave_node(int unsigned k, int unsigned nx);
    return NODE_W'((2 * (k / nx)) * nx + (k % nx));
  endfunction
  function automatic logic [NODE_W-1:0] master_node(int unsigned k, int unsigned nx);
    return NODE_W'((2 * (k / nx) + 1) * nx + (k % nx));
  endfunction

  // mapping unit: memory selected by address bits [31:28] modulo the number of memories
  function automatic logic [NODE_W-1:0] map_addr(logic [ADDR_W-1:0] a, int unsigned nx,
                                                  int unsigned nslv);
    return slave_node(int'(a[31:28]) % nslv, nx);
  endfunction

  function automatic head_t flit2head(logic [FLIT_W-1:0] d);
    return head_t'(d);
  endfunction

endpackage
