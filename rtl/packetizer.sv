// packetizer: turns one message into a packet of flits.
//
// A message is a head flit's fields (hdr), optionally an address word
// (has_addr/addr) and ndata data words taken from the d/d_valid/d_ready stream.
// It leaves as: head flit, address flit (if any), data flits; the last flit
// carries the tail mark. The head flit is sent in the cycle the message is
// taken (msg_valid && msg_ready), so back-to-back packets leave with no gap;
// every later flit needs flit_ready. The master NI uses it for request packets
// (its mapping unit has already put the destination into hdr), the slave NI for
// response packets. One flit per cycle. The packet shapes are this design's
// choice; the header/data split follows the design description.
module packetizer
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  head_t       hdr,
  input  logic        has_addr,
  input  logic [31:0] addr,
  input  logic [3:0]  ndata,
  input  logic        msg_valid,
  output logic        msg_ready,
  input  logic [31:0] d,
  input  logic        d_valid,
  output logic        d_ready,
  output flit_t       flit,
  output logic        flit_valid,
  input  logic        flit_ready
);
  typedef enum logic [1:0] {S_HEAD, S_ADDR, S_DATA} state_t;
  state_t      state;
  logic [31:0] addr_q;
  logic [3:0]  left;

  always_comb begin
    flit       = '0;
    flit_valid = 1'b0;
    msg_ready  = 1'b0;
    d_ready    = 1'b0;
    unique case (state)
      S_HEAD: begin
        flit.head  = 1'b1;
        flit.tail  = !has_addr && ndata == 0;
        flit.data  = hdr;
        flit_valid = msg_valid;
        msg_ready  = flit_ready;
      end
      S_ADDR: begin
        flit.tail  = (left == 0);
        flit.data  = addr_q;
        flit_valid = 1'b1;
      end
      S_DATA: begin
        flit.tail  = (left == 1);
        flit.data  = d;
        flit_valid = d_valid;
        d_ready    = flit_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_HEAD;
      addr_q <= '0;
      left   <= '0;
    end else begin
      unique case (state)
        S_HEAD: if (msg_valid && flit_ready) begin
          addr_q <= addr;
          left   <= ndata;
          if (has_addr)       state <= S_ADDR;
          else if (ndata != 0) state <= S_DATA;
        end
        S_ADDR: if (flit_ready) state <= (left == 0) ? S_HEAD : S_DATA;
        S_DATA: if (d_valid && flit_ready) begin
          left <= left - 1'b1;
          if (left == 1) state <= S_HEAD;
        end
        default: state <= S_HEAD;
      endcase
    end
  end
endmodule
