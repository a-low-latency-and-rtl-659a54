// status_table: Status-Register, Status-Table and ReservedSize of the reorder
// unit in the master network interface.
//
// Forward path (admission). A request of transaction ID t asks for admission
// with the number of reorder-buffer words its response may need (adm_size).
//  - S_Reg[t] clear: first outstanding message of t. S_Reg[t] is set, the
//    sequence number is 0 (procedure A).
//  - S_Reg[t] set, no table row for t: a free row is filled with v=1, T-ID=t,
//    N-M=2, E-S=0 and the sequence number is 1 (procedure B).
//  - a row for t exists: the sequence number is N-M + E-S and N-M grows by 1
//    (procedure C).
// In every case ReservedSize grows by adm_size. Admission is refused while
// ReservedSize + adm_size would exceed the reorder buffer, while all table rows
// are taken (case B), while 2^SEQ_W messages of t are outstanding, or while
// MAX_OUT messages are outstanding in total (one Reorder-Table row each).
// adm_ok and adm_seq are combinational; adm_fire commits.
//
// Reverse path. chk_inorder tells whether (chk_tid, chk_seq) is the expected
// response (seq equal to E-S of the row, or 0 when t has no row). dlv_fire
// reports that a response of dlv_tid was handed to the depacketizer
// (procedure D): N-M-1, E-S+1, ReservedSize - dlv_size; when N-M reaches zero
// the row and the S_Reg bit are cleared; without a row only the S_Reg bit is
// cleared. es_vec gives the expected sequence number of every ID for the
// release search of the reorder table.
//
// Procedures A-D, the fields and their widths follow the design description.
// The number of rows, the total limit and the no-admission-while-delivering
// rule are this design's choices.
module status_table
  import noc_pkg::*;
#(
  parameter int unsigned ST_ROWS  = 4,
  parameter int unsigned RB_DEPTH = 48,
  parameter int unsigned MAX_OUT  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // admission
  input  logic                      adm_req,
  input  logic [TID_W-1:0]          adm_tid,
  input  logic [6:0]                adm_size,
  output logic                      adm_ok,
  output logic [SEQ_W-1:0]          adm_seq,
  input  logic                      adm_fire,
  // in-order check
  input  logic [TID_W-1:0]          chk_tid,
  input  logic [SEQ_W-1:0]          chk_seq,
  output logic                      chk_inorder,
  // delivery
  input  logic                      dlv_fire,
  input  logic [TID_W-1:0]          dlv_tid,
  input  logic [6:0]                dlv_size,
  output logic [SEQ_W-1:0]          es_vec [2**TID_W],
  output logic [2**TID_W-1:0]       s_reg_o,
  output logic [7:0]                reserved_o
);
  localparam int unsigned NID = 2**TID_W;
  localparam int unsigned RW  = (ST_ROWS > 1) ? $clog2(ST_ROWS) : 1;

  typedef struct packed {
    logic             v;
    logic [TID_W-1:0] tid;
    logic [3:0]       nm;
    logic [SEQ_W-1:0] es;
  } st_row_t;

  logic [NID-1:0]  s_reg;
  st_row_t         rows [ST_ROWS];
  logic [7:0]      reserved;
  logic [4:0]      outstanding;

  assign s_reg_o    = s_reg;
  assign reserved_o = reserved;

  // row search by transaction ID
  function automatic logic find(input logic [TID_W-1:0] t, output logic [RW-1:0] r);
    find = 1'b0;
    r    = '0;
    for (int i = 0; i < int'(ST_ROWS); i++)
      if (rows[i].v && rows[i].tid == t) begin
        find = 1'b1;
        r    = RW'(i);
      end
  endfunction

  logic          a_hit, d_hit, free_any;
  logic [RW-1:0] a_row, d_row, free_row;

  always_comb begin
    a_hit = find(adm_tid, a_row);
    d_hit = find(dlv_tid, d_row);
    free_any = 1'b0;
    free_row = '0;
    for (int i = ST_ROWS - 1; i >= 0; i--)
      if (!rows[i].v) begin
        free_any = 1'b1;
        free_row = RW'(i);
      end
  end

  // expected sequence number per ID
  always_comb begin
    for (int t = 0; t < int'(NID); t++) begin
      es_vec[t] = '0;
      for (int i = 0; i < int'(ST_ROWS); i++)
        if (rows[i].v && rows[i].tid == TID_W'(t)) es_vec[t] = rows[i].es;
    end
  end
  assign chk_inorder = (chk_seq == es_vec[chk_tid]);

  // admission decision
  always_comb begin
    adm_ok  = adm_req && !dlv_fire
              && (9'(reserved) + 9'(adm_size) <= 9'(RB_DEPTH))
              && (outstanding < 5'(MAX_OUT));
    adm_seq = '0;
    if (!s_reg[adm_tid]) begin
      adm_seq = '0;                                   // procedure A
    end else if (!a_hit) begin
      adm_seq = SEQ_W'(1);                            // procedure B
      if (!free_any) adm_ok = 1'b0;
    end else begin
      adm_seq = SEQ_W'(rows[a_row].nm) + rows[a_row].es;   // procedure C
      if (rows[a_row].nm >= 4'(2**SEQ_W)) adm_ok = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_reg       <= '0;
      reserved    <= '0;
      outstanding <= '0;
      for (int i = 0; i < int'(ST_ROWS); i++) rows[i] <= '0;
    end else begin
      if (adm_fire && adm_ok) begin
        reserved    <= reserved + 8'(adm_size);
        outstanding <= outstanding + 1'b1;
        if (!s_reg[adm_tid]) begin
          s_reg[adm_tid] <= 1'b1;
        end else if (!a_hit) begin
          rows[free_row].v   <= 1'b1;
          rows[free_row].tid <= adm_tid;
          rows[free_row].nm  <= 4'd2;
          rows[free_row].es  <= '0;
        end else begin
          rows[a_row].nm <= rows[a_row].nm + 1'b1;
        end
      end
      if (dlv_fire) begin
        reserved    <= reserved - 8'(dlv_size);
        outstanding <= outstanding - 1'b1;
        if (d_hit) begin
          rows[d_row].nm <= rows[d_row].nm - 1'b1;
          rows[d_row].es <= rows[d_row].es + 1'b1;
          if (rows[d_row].nm == 4'd1) begin
            rows[d_row].v  <= 1'b0;
            s_reg[dlv_tid] <= 1'b0;
          end
        end else begin
          s_reg[dlv_tid] <= 1'b0;
        end
      end
    end
  end

  a_dlv_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
                                      dlv_fire |-> s_reg[dlv_tid]);
endmodule
