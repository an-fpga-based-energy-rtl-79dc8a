// tb_myers_engine: streams a random section holding mutated copies of a
// read through the bit-vector engine and compares every column score with
// the dynamic-programming reference; checks the two-clock latency and gaps
// in the input stream.
module tb_myers_engine;
  import tb_ref_pkg::*;
  localparam int unsigned R = rm_pkg::READ_LEN;
  localparam int unsigned LOC_W = 11;
  localparam int unsigned SW = $clog2(R + 1);

  logic clk = 0, rst = 1, init = 0, nt_valid = 0;
  logic [R-1:0] peq2 = '0, peq1 = '0;
  logic [1:0] nt = '0;
  logic [LOC_W-1:0] nt_loc = '0;
  logic col_valid;
  logic [SW-1:0] col_score;
  logic [LOC_W-1:0] col_loc;
  int checks = 0, failures = 0;
  int expect_q[$];
  int loc_q[$];
  int issue_t[$];
  int cyc = 0;

  myers_engine #(.READ_LEN(R), .LOC_W(LOC_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    if (!rst && col_valid) begin
      chk(expect_q.size() > 0, "unexpected column");
      if (expect_q.size() > 0) begin
        int e, l, t0;
        e = expect_q.pop_front();
        l = loc_q.pop_front();
        t0 = issue_t.pop_front();
        chk(int'(col_score) == e, $sformatf("score %0d expected %0d at loc %0d", col_score, e, l));
        chk(int'(col_loc) == l, "location");
        chk(cyc - t0 == 2, $sformatf("latency %0d", cyc - t0));
      end
    end
  end

  initial begin
    nt_q_t rd, sec;
    int_q_t ref_col;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int trial = 0; trial < 4; trial++) begin
      rd = rand_seq(R);
      sec = rand_seq(60);
      for (int k = 0; k < 4; k++) begin
        nt_q_t m;
        m = mutate(rd, k + trial);
        foreach (m[i]) sec.push_back(m[i]);
        for (int i = 0; i < 20; i++) sec.push_back(2'($urandom));
      end
      ref_col = semiglobal(rd, sec);
      @(negedge clk);
      for (int i = 0; i < R; i++) begin
        peq2[i] = rd[i][1];
        peq1[i] = rd[i][0];
      end
      init = 1;
      @(negedge clk);
      init = 0;
      for (int j = 0; j < sec.size(); j++) begin
        while (trial[0] && ($urandom % 4 == 0)) begin
          nt_valid = 0;
          @(negedge clk);
        end
        nt_valid = 1;
        nt = sec[j];
        nt_loc = LOC_W'(j);
        expect_q.push_back(ref_col[j]);
        loc_q.push_back(j);
        issue_t.push_back(cyc);
        @(negedge clk);
      end
      nt_valid = 0;
      repeat (4) @(negedge clk);
      chk(expect_q.size() == 0, "all columns produced");
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
