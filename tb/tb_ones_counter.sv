// tb_ones_counter: random and corner vectors into the count-ones circuit,
// compared with a bit-by-bit count.
module tb_ones_counter;
  localparam int unsigned N = 85;
  logic [N-1:0] bits;
  logic [$clog2(N+1)-1:0] count;
  int checks = 0, failures = 0;

  ones_counter #(.N(N)) dut (.bits(bits), .count(count));

  task automatic check_vec(logic [N-1:0] v);
    int ref_cnt = 0;
    bits = v;
    #1;
    for (int i = 0; i < N; i++) ref_cnt += int'(v[i]);
    checks++;
    if (int'(count) != ref_cnt) begin
      failures++;
      $display("FAIL bits=%h count=%0d expected=%0d", v, count, ref_cnt);
    end
  endtask

  initial begin
    check_vec('0);
    check_vec('1);
    for (int i = 0; i < N; i++) check_vec(N'(1) << i);
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] v;
      for (int i = 0; i < N; i++) v[i] = ($urandom % 100) < (t % 100);
      check_vec(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
