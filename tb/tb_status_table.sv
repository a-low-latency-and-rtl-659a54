// tb_status_table: directed cases of procedures A-D (sequence numbers 0, 1,
// N-M+E-S; expected sequence; row release) and a random run against a
// reference model of per-ID outstanding messages, ReservedSize, row use and
// the total limit.
module tb_status_table;
  import noc_pkg::*;
  localparam int ST_ROWS = 4, RB_DEPTH = 48, MAX_OUT = 8, NID = 16;
  logic clk = 0, rst_n = 0;
  logic adm_req, adm_ok, adm_fire, chk_inorder, dlv_fire;
  logic [TID_W-1:0] adm_tid, chk_tid, dlv_tid;
  logic [6:0] adm_size, dlv_size;
  logic [SEQ_W-1:0] adm_seq, chk_seq;
  logic [SEQ_W-1:0] es_vec [NID];
  logic [NID-1:0] s_reg_o;
  logic [7:0] reserved_o;
  int checks = 0, failures = 0;

  status_table #(.ST_ROWS(ST_ROWS), .RB_DEPTH(RB_DEPTH), .MAX_OUT(MAX_OUT)) dut (.*);
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

  // reference model
  int          m_out [NID];      // outstanding messages
  int          m_next [NID];     // next sequence number
  int          m_es [NID];       // expected sequence number
  bit          m_row [NID];
  int          m_sizes [NID][$];
  int          m_res, m_tot;

  function automatic int rows_used();
    int n = 0;
    for (int t = 0; t < NID; t++) n += m_row[t];
    return n;
  endfunction

  function automatic bit model_ok(int t, int size);
    if (m_res + size > RB_DEPTH) return 0;
    if (m_tot >= MAX_OUT) return 0;
    if (m_out[t] >= 1 && !m_row[t] && rows_used() >= ST_ROWS) return 0;
    if (m_out[t] >= 8) return 0;
    return 1;
  endfunction

  task automatic admit(int t, int size, output bit ok, output int seq);
    @(negedge clk);
    adm_req = 1; adm_tid = t; adm_size = size; adm_fire = 1;
    #1;
    ok = adm_ok; seq = adm_seq;
    chk(adm_ok == model_ok(t, size), "admission decision");
    if (adm_ok) chk(adm_seq == SEQ_W'(m_next[t]), "sequence number");
    if (adm_ok) begin
      if (m_out[t] >= 1) m_row[t] = 1;
      m_out[t]++; m_next[t] = (m_next[t] + 1) % 8; m_res += size; m_tot++;
      m_sizes[t].push_back(size);
    end
    @(posedge clk); #1;
    adm_req = 0; adm_fire = 0;
  endtask

  task automatic deliver(int t);
    int size;
    @(negedge clk);
    chk(es_vec[t] == SEQ_W'(m_es[t]), "expected seq before delivery");
    chk_tid = t; chk_seq = m_es[t]; #1;
    chk(chk_inorder, "in-order check true");
    chk_seq = m_es[t] + 1; #1;
    chk(!chk_inorder || m_out[t] == 0, "in-order check false");
    size = m_sizes[t].pop_front();
    dlv_fire = 1; dlv_tid = t; dlv_size = size;
    @(posedge clk); #1;
    dlv_fire = 0;
    m_out[t]--; m_res -= size; m_tot--;
    m_es[t] = (m_es[t] + 1) % 8;
    if (m_out[t] == 0) begin m_row[t] = 0; m_es[t] = 0; m_next[t] = 0; end
    @(negedge clk);
    chk(s_reg_o[t] == (m_out[t] != 0), "status register bit");
    chk(reserved_o == 8'(m_res), "reserved size");
  endtask

  initial begin
    bit ok; int seq;
    adm_req = 0; adm_fire = 0; adm_tid = 0; adm_size = 0; chk_tid = 0; chk_seq = 0;
    dlv_fire = 0; dlv_tid = 0; dlv_size = 0;
    for (int t = 0; t < NID; t++) begin m_out[t] = 0; m_next[t] = 0; m_es[t] = 0; m_row[t] = 0; end
    m_res = 0; m_tot = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // directed: A, B, C
    admit(3, 4, ok, seq); chk(ok && seq == 0, "procedure A seq 0");
    @(negedge clk); chk(s_reg_o[3], "S_Reg bit set");
    admit(3, 8, ok, seq); chk(ok && seq == 1, "procedure B seq 1");
    admit(3, 2, ok, seq); chk(ok && seq == 2, "procedure C seq N-M+E-S");
    @(negedge clk); chk(reserved_o == 14, "reserved 4+8+2");
    deliver(3);
    admit(3, 1, ok, seq); chk(ok && seq == 3, "seq after one delivery");
    deliver(3); deliver(3); deliver(3);
    @(negedge clk); chk(s_reg_o == 0 && reserved_o == 0, "all released");
    // buffer limit: 6 x 8 words fit, a seventh does not
    for (int i = 0; i < 6; i++) admit(i, 8, ok, seq);
    admit(9, 1, ok, seq); chk(!ok, "refused when buffer reserved");
    for (int i = 0; i < 6; i++) deliver(i);
    // random
    for (int it = 0; it < 3000; it++) begin
      int t;
      t = $urandom_range(0, 5);
      if ($urandom_range(0, 1) && m_out[t] > 0) deliver(t);
      else admit(t, $urandom_range(0, 1) ? 0 : $urandom_range(1, 8), ok, seq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
