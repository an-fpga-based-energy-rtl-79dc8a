// tb_sync_fifo: random pushes and pops against a queue model; checks head
// data, full, empty and count every clock; the FIFO is driven into its
// full state repeatedly.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 16, DEPTH = 4;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [WIDTH-1:0] model[$];
  int checks = 0, failures = 0, n_full = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      // drive on the falling edge, check the state before it
      @(negedge clk);
      chk(int'(count) == model.size(), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) chk(dout == model[0], "head data");
      if (full) n_full++;
      din   = WIDTH'($urandom);
      wr_en = ($urandom % 100) < ((t / 250) % 2 ? 70 : 35);
      rd_en = !empty && (($urandom % 100) < ((t / 250) % 2 ? 35 : 70));
      if (full && !rd_en) wr_en = 0;
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    chk(n_full > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
