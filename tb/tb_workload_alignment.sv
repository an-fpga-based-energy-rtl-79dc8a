// tb_workload_alignment: alignment only, a 100-nucleotide query against a
// 2,164-nucleotide reference, at the default sizes.
//
// Filtering is switched off so the query is verified unconditionally. The
// reference is longer than one section, so it is processed as two
// overlapping sections: [0, 2047] and [116, 2163]. The reported locations
// (within e = 3) are checked against the dynamic-programming reference over
// the whole reference, and the clocks from start_search to section_end are
// counted per section: READ_LEN + SECTION_LEN + 7 for verification plus a
// few clocks of control. At 187.5 MHz one section takes about 11.6 us.
module tb_workload_alignment;
  import tb_ref_pkg::*;
  localparam int unsigned R = rm_pkg::READ_LEN, Q = rm_pkg::QGRAM_LEN, N = rm_pkg::SECTION_LEN;
  localparam int unsigned M = R - Q + 1, X = N - Q + 1;
  localparam int unsigned QW = 2 * Q, AW = $clog2(X), LW = $clog2(N);
  localparam int unsigned SW = $clog2(R + 1), CW = $clog2(M + 1);
  localparam int unsigned RIDW = rm_pkg::READ_ID_W;
  localparam int REF_LEN = 2164;
  localparam int E = 3;
  localparam int MAX_CLOCKS = R + N + 7 + 8;

  logic clk = 0, rst = 1;
  logic enable_filt_op = 0, enable_verif_op = 1, qse_en_wr = 0;
  logic [7:0] qse_en = '0;
  logic array_update = 0, array_we = 0;
  logic [AW-1:0] array_waddr = '0;
  logic [QW-1:0] array_din = '0;
  logic section_update = 0;
  logic [LW-1:0] section_addr = '0;
  logic [1:0] section_din = '0;
  logic read_fifo_we = 0;
  logic [2*R-1:0] read_fifo_din = '0;
  logic read_fifo_full;
  logic start_search = 0, reads_end = 0;
  logic [SW-1:0] score_threshold = SW'(E);
  logic [CW-1:0] count_threshold = '0;
  logic match_found, match_candidate_only, out_rd_en = 0;
  logic [SW-1:0] score;
  logic [LW-1:0] match_location;
  logic [RIDW-1:0] match_read_id;
  logic section_end, busy;

  read_mapper dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int got_score[$], got_loc[$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    out_rd_en <= 0;
    if (match_found && !out_rd_en) begin
      chk(!match_candidate_only && match_read_id == 0, "record fields");
      got_score.push_back(int'(score));
      got_loc.push_back(int'(match_location));
      out_rd_en <= 1;
    end
  end

  initial begin
    nt_q_t refg, rd, sec, ins;
    int_q_t col;
    int bases[2];
    int total_clocks;
    refg = rand_seq(REF_LEN);
    rd = mutate(refg[1500 : 1500 + R - 1], 2);
    ins = mutate(rd, 1);                      // a second, weaker copy
    for (int i = 0; i < R; i++) refg[300 + i] = ins[i];
    col = semiglobal(rd, refg);
    bases[0] = 0;
    bases[1] = REF_LEN - N;
    total_clocks = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 2; s++) begin
      int clocks, exp_n, lo;
      sec = refg[bases[s] : bases[s] + N - 1];
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        section_update = 1;
        section_addr = LW'(j);
        section_din = sec[j];
        @(negedge clk);
      end
      section_update = 0;
      got_score = {}; got_loc = {};
      read_fifo_we = 1;
      for (int i = 0; i < R; i++) read_fifo_din[2*i +: 2] = rd[i];
      @(negedge clk);
      read_fifo_we = 0;
      start_search = 1;
      reads_end = 1;
      @(negedge clk);
      start_search = 0;
      reads_end = 0;
      clocks = 1;
      while (!section_end) begin
        @(negedge clk);
        clocks++;
      end
      total_clocks += clocks;
      repeat (4) @(negedge clk);
      chk(clocks <= MAX_CLOCKS, $sformatf("section %0d took %0d clocks", s, clocks));
      // every position of this section within E, in order; a column near
      // the section start can only be compared once the read fits before it
      exp_n = 0;
      lo = (s == 0) ? 0 : R + E;
      for (int j = 0; j < N; j++) begin
        if (j >= lo && col[bases[s] + j] <= E) begin
          int k;
          k = -1;
          foreach (got_loc[i]) if (got_loc[i] == j) k = i;
          chk(k >= 0 && got_score[k] == col[bases[s] + j],
              $sformatf("section %0d location %0d score %0d", s, j, col[bases[s] + j]));
          exp_n++;
        end
      end
      foreach (got_loc[i]) chk(got_loc[i] < lo || col[bases[s] + got_loc[i]] <= E, "no extra location");
      chk(got_loc.size() >= exp_n, "record count");
      $display("section %0d: %0d locations within e=%0d, %0d clocks", s, got_loc.size(), E, clocks);
    end
    $display("whole reference: %0d clocks = %0.2f us at 187.498 MHz", total_clocks, real'(total_clocks) / 187.498);
    begin
      int best;
      best = R;
      for (int j = 1500 + R - 8; j <= 1500 + R + 8; j++) if (col[j] < best) best = col[j];
      chk(best <= E, "query found near its source position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
