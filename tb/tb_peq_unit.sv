// tb_peq_unit: random reads into the pre-equal circuit; the bit planes are
// compared with the read's nucleotides and done must come READ_LEN+1 clocks
// after start (one to start, one per nucleotide).
module tb_peq_unit;
  localparam int unsigned R = rm_pkg::READ_LEN;
  logic clk = 0, rst = 1, clear = 0, start = 0, done;
  logic [2*R-1:0] read_seq = '0;
  logic [R-1:0] peq2, peq1;
  int checks = 0, failures = 0;

  peq_unit dut (.*);

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
    for (int t = 0; t < 20; t++) begin
      int lat = 0;
      @(negedge clk);
      for (int i = 0; i < 2 * R; i += 32) read_seq[i +: 32] = $urandom;
      if (t == 0) read_seq = '1;
      if (t == 1) read_seq = '0;
      clear = 1;
      @(negedge clk);
      clear = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 1000) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == R + 1, $sformatf("precompute took %0d clocks", lat));
      for (int i = 0; i < R; i++) begin
        chk(peq2[i] == read_seq[2*i+1] && peq1[i] == read_seq[2*i], $sformatf("bit %0d", i));
      end
    end
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
