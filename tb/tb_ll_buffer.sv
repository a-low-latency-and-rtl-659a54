// tb_ll_buffer: stores packets of random length (1..8 words) as linked lists in
// the 48-word buffer, reads them back in random order (also while other
// packets are being written) and checks every word and the free-slot count.
module tb_ll_buffer;
  localparam int W = 32, DEPTH = 48, PW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_first, rd_start, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic [PW-1:0] wr_slot, rd_head;
  logic [$clog2(DEPTH+1)-1:0] free_cnt;
  int checks = 0, failures = 0;

  ll_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { logic [PW-1:0] head; logic [W-1:0] words [$]; } pkt_t;
  pkt_t stored [$];
  int used_words = 0;

  task automatic write_pkt(int len);
    pkt_t p;
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      wr_en = 1; wr_first = (k == 0); wr_data = $urandom;
      if (k == 0) p.head = wr_slot;
      p.words.push_back(wr_data);
      @(posedge clk); #1;
      wr_en = 0; wr_first = 0;
    end
    stored.push_back(p);
    used_words += len;
  endtask

  task automatic read_pkt(int idx);
    pkt_t p = stored[idx];
    stored.delete(idx);
    for (int k = 0; k < p.words.size(); k++) begin
      @(negedge clk);
      rd_start = (k == 0); rd_head = p.head; rd_en = 1;
      #1;
      chk(rd_data == p.words[k], "read word");
      @(posedge clk); #1;
      rd_start = 0; rd_en = 0;
    end
    used_words -= p.words.size();
  endtask

  initial begin
    wr_en = 0; wr_first = 0; wr_data = 0; rd_start = 0; rd_en = 0; rd_head = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    chk(free_cnt == DEPTH, "empty after reset");
    // fill completely with six 8-word packets (the 6 x 8 configuration)
    for (int i = 0; i < 6; i++) write_pkt(8);
    @(negedge clk);
    chk(free_cnt == 0, "full after 48 words");
    read_pkt(3); read_pkt(0);
    @(negedge clk);
    chk(free_cnt == 16, "16 free after two reads");
    // random mix
    for (int it = 0; it < 400; it++) begin
      int len;
      len = $urandom_range(1, 8);
      if (DEPTH - used_words >= len && ($urandom_range(0, 1) == 1 || stored.size() == 0))
        write_pkt(len);
      else if (stored.size() > 0)
        read_pkt($urandom_range(0, stored.size() - 1));
      @(negedge clk);
      chk(free_cnt == DEPTH - used_words, "free count");
    end
    while (stored.size() > 0) read_pkt(0);
    @(negedge clk);
    chk(free_cnt == DEPTH, "all free at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
