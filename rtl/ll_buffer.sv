// ll_buffer: shared buffer holding variable-length packets as linked lists.
//
// This is the dynamic buffer allocation of the reorder buffer: each slot holds
// one word and a pointer to the slot of the next word of the same packet, so
// packets of any length share the buffer without fixed partitions. The memory
// controller's write queue uses the same structure.
//
// Write side: wr_en stores wr_data in the lowest free slot (the Next_Free_Slot
// of a free bitmap); wr_first starts a new list and wr_slot then gives its head
// pointer. Otherwise the previous word written gets its pointer set to this
// slot, i.e. the list is linked as words arrive (equivalent to writing the
// next free slot ahead of time). A write needs free_cnt > 0.
// Read side: rd_start loads rd_head as the current pointer; then rd_data shows
// that word, and each rd_en frees it and follows its pointer. The caller knows
// the packet length. A read and a write may happen in the same cycle, and a
// list may be read while another is being written. rd_start and rd_en in the
// same cycle read the word at rd_head.
module ll_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 48
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic                       wr_first,
  input  logic [W-1:0]               wr_data,
  output logic [$clog2(DEPTH)-1:0]   wr_slot,
  input  logic                       rd_start,
  input  logic [$clog2(DEPTH)-1:0]   rd_head,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH+1)-1:0] free_cnt
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0]      data [DEPTH];
  logic [PW-1:0]     next [DEPTH];
  logic [DEPTH-1:0]  used;
  logic [PW-1:0]     tail;       // last slot written (for linking)
  logic [PW-1:0]     rd_ptr;

  // Next_Free_Slot: lowest free slot
  always_comb begin
    wr_slot = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!used[i]) wr_slot = PW'(i);
  end

  wire [PW-1:0] cur_rd = rd_start ? rd_head : rd_ptr;
  assign rd_data = data[cur_rd];

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < int'(DEPTH); i++)
      free_cnt += ($clog2(DEPTH+1))'(!used[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used   <= '0;
      tail   <= '0;
      rd_ptr <= '0;
    end else begin
      if (rd_start) rd_ptr <= rd_head;
      if (rd_en) begin
        used[cur_rd] <= 1'b0;
        rd_ptr       <= next[cur_rd];
      end
      if (wr_en) begin
        used[wr_slot] <= 1'b1;
        data[wr_slot] <= wr_data;
        if (!wr_first) next[tail] <= wr_slot;
        tail <= wr_slot;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (free_cnt != 0));
  a_read_used:   assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> used[cur_rd]);
endmodule
