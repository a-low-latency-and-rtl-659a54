// tb_ni_fifo: random push/pop traffic against a queue reference; checks the
// head word, full/empty and the count every cycle.
module tb_ni_fifo;
  localparam int W = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  ni_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(count == model.size(), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) chk(dout == model[0], "head word");
      // phases: fill-biased, then drain-biased
      push = !full && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      pop  = !empty && ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      din  = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
