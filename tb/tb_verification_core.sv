// tb_verification_core: loads a random section containing mutated copies
// of a read, verifies the read and compares the reported matches (every
// position with score <= e) with the dynamic-programming reference. Runs
// once with a free-running output and once with hold toggled at random,
// and checks the verification time: READ_LEN + SECTION_LEN + 7 clocks when
// never held.
module tb_verification_core;
  import tb_ref_pkg::*;
  localparam int unsigned R = 24;
  localparam int unsigned N = 160;
  localparam int unsigned LW = $clog2(N);
  localparam int unsigned SW = $clog2(R + 1);

  logic clk = 0, rst = 1, verif_reset = 0, verif_en = 0;
  logic [2*R-1:0] query_read = '0;
  logic section_update = 0;
  logic [LW-1:0] section_addr = '0;
  logic [1:0] section_din = '0;
  logic [SW-1:0] score_threshold = '0;
  logic hold = 0;
  logic valid_match, verif_done, busy;
  logic [SW-1:0] score;
  logic [LW-1:0] match_location;
  int checks = 0, failures = 0;
  int got_loc[$], got_score[$];
  int n_hold = 0;

  verification_core #(.READ_LEN(R), .SECTION_LEN(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (valid_match) begin
      got_loc.push_back(int'(match_location));
      got_score.push_back(int'(score));
    end
    if (hold && busy) n_hold++;
  end

  initial begin
    nt_q_t rd, sec;
    int_q_t ref_col;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int trial = 0; trial < 6; trial++) begin
      int e, lat, n_exp;
      e = trial % 4;
      rd = rand_seq(R);
      sec = rand_seq(10);
      for (int k = 0; k < 4; k++) begin
        nt_q_t m;
        m = mutate(rd, k);
        foreach (m[i]) sec.push_back(m[i]);
        sec = {sec, rand_seq(10)};
      end
      while (sec.size() < N) sec.push_back(2'($urandom));
      ref_col = semiglobal(rd, sec);
      // load section
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        section_update = 1;
        section_addr = LW'(j);
        section_din = sec[j];
        @(negedge clk);
      end
      section_update = 0;
      for (int i = 0; i < R; i++) query_read[2*i +: 2] = rd[i];
      score_threshold = SW'(e);
      got_loc = {};
      got_score = {};
      verif_reset = 1;
      @(negedge clk);
      verif_reset = 0;
      verif_en = 1;
      @(negedge clk);
      verif_en = 0;
      query_read = '0;             // the core must have captured the read
      lat = 1;
      while (!verif_done && lat < 10000) begin
        if (trial >= 3) hold = ($urandom % 3 == 0);
        @(negedge clk);
        lat++;
      end
      hold = 0;
      if (trial < 3) chk(lat == R + N + 7, $sformatf("verification took %0d clocks", lat));
      n_exp = 0;
      for (int j = 0; j < N; j++) begin
        if (ref_col[j] <= e) begin
          chk(n_exp < got_loc.size() && got_loc[n_exp] == j && got_score[n_exp] == ref_col[j],
              $sformatf("match at %0d score %0d", j, ref_col[j]));
          n_exp++;
        end
      end
      chk(got_loc.size() == n_exp, $sformatf("%0d matches reported, %0d expected", got_loc.size(), n_exp));
    end
    chk(n_hold > 0, "hold exercised");
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
