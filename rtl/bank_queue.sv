// bank_queue: request queue of one SDRAM bank with the order-sensitive
// priority update and the row-first bank arbiter.
//
// Priority update ("input queue" process): when a request enters, it gets the
// priority (2^SEQ_W-1) - SN from its sequence number SN, so the message its
// master needs first ranks highest, and every request already waiting gains +1
// (saturating) so none starves.
// Arbiter: among the waiting requests that hit the open row (cra/cra_valid),
// the one with the highest priority is chosen; if there is no hit, the one
// with the highest priority overall. Ties go to the higher slot index.
// sel_* is combinational; pop removes the selected request at the clock edge.
// sel_bypass flags that a row hit was chosen over a request of higher priority.
//
// The two processes follow the design description. The priority could also
// be read as the sequence number itself; this design uses the reading in
// which a message with more messages ahead of it ranks lower (7 - SN).
// Slots are a flat array with valid bits (any slot can leave).
module bank_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned PRIO_W = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  mreq_t                      push_req,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic                       cra_valid,
  input  logic [12:0]                cra,
  output logic                       sel_valid,
  output mreq_t                      sel_req,
  output logic                       sel_hit,
  output logic                       sel_bypass,
  input  logic                       pop
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0]  v;
  mreq_t             q    [DEPTH];
  logic [PRIO_W-1:0] prio [DEPTH];

  logic          free_any;
  logic [IW-1:0] free_idx, sel_idx;

  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    count    = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!v[i]) begin
        free_any = 1'b1;
        free_idx = IW'(i);
      end
      count += ($clog2(DEPTH+1))'(v[i]);
    end
  end
  assign full = !free_any;

  // arbiter process
  always_comb begin
    logic              any1, any2;
    logic [PRIO_W-1:0] max1, max2;
    logic [IW-1:0]     s1, s2;
    any1 = 1'b0; any2 = 1'b0;
    max1 = '0;   max2 = '0;
    s1   = '0;   s2   = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (v[i]) begin
        if (cra_valid && q[i].row == cra) begin
          if (!any1 || prio[i] >= max1) begin
            any1 = 1'b1; max1 = prio[i]; s1 = IW'(i);
          end
        end else begin
          if (!any2 || prio[i] >= max2) begin
            any2 = 1'b1; max2 = prio[i]; s2 = IW'(i);
          end
        end
      end
    end
    sel_valid  = any1 || any2;
    sel_hit    = any1;
    sel_idx    = any1 ? s1 : s2;
    sel_req    = q[sel_idx];
    sel_bypass = any1 && any2 && (max2 > max1);
  end

  // input queue process
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      if (push) begin
        for (int i = 0; i < int'(DEPTH); i++)
          if (v[i] && prio[i] != '1) prio[i] <= prio[i] + 1'b1;
        v[free_idx]    <= 1'b1;
        q[free_idx]    <= push_req;
        prio[free_idx] <= PRIO_W'(2**SEQ_W - 1) - PRIO_W'(push_req.seq);
      end
      if (pop && sel_valid) v[sel_idx] <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
endmodule
