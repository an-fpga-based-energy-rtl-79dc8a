// tb_workload_mapping: a scaled-down chromosome mapping run at the default
// sizes (100-nucleotide reads, 16-nucleotide q-grams, 2048-nucleotide
// sections).
//
// A random reference of three sections is cut with an overlap of R+5
// nucleotides, exactly as a host would cut a chromosome. For every edit
// distance e = 0..5 a set of reads is drawn from the reference with up to e
// substitutions or one insertion/deletion (reads like a sequencing
// simulator's), plus random reads that belong nowhere. All sections are
// processed in turn. The test checks
//   - sensitivity: every drawn read is reported at its true end position
//     with a score no larger than its number of edits;
//   - exactness: every record equals the dynamic-programming reference for
//     that read and section (nothing missing, nothing extra);
// and prints the number of reported locations per e.
module tb_workload_mapping;
  import tb_ref_pkg::*;
  localparam int unsigned R = rm_pkg::READ_LEN, Q = rm_pkg::QGRAM_LEN, N = rm_pkg::SECTION_LEN;
  localparam int unsigned M = R - Q + 1, X = N - Q + 1;
  localparam int unsigned QW = 2 * Q, AW = $clog2(X), LW = $clog2(N);
  localparam int unsigned SW = $clog2(R + 1), CW = $clog2(M + 1);
  localparam int unsigned RIDW = rm_pkg::READ_ID_W;
  localparam int OVERLAP = R + 5;
  localparam int STRIDE = N - OVERLAP;
  localparam int NSEC = 3;
  localparam int REF_LEN = STRIDE * (NSEC - 1) + N;
  localparam int READS = 40;        // drawn reads per edit distance
  localparam int RANDOM_READS = 4;

  logic clk = 0, rst = 1;
  logic enable_filt_op = 1, enable_verif_op = 1, qse_en_wr = 0;
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
  logic [SW-1:0] score_threshold = '0;
  logic [CW-1:0] count_threshold = '0;
  logic match_found, match_candidate_only, out_rd_en = 0;
  logic [SW-1:0] score;
  logic [LW-1:0] match_location;
  logic [RIDW-1:0] match_read_id;
  logic section_end, busy;

  read_mapper dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int got_id[$], got_score[$], got_loc[$];

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
      got_id.push_back(int'(match_read_id));
      got_score.push_back(int'(score));
      got_loc.push_back(int'(match_location));
      out_rd_en <= 1;
    end
  end

  initial begin
    nt_q_t refg, sec;
    nt_q_t reads[$];
    int true_end[$], true_edits[$];
    bit found_true[$];
    longint unsigned sqa[$];
    int locations[6];
    refg = rand_seq(REF_LEN);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int e = 0; e <= 5; e++) begin
      // draw reads
      reads = {}; true_end = {}; true_edits = {}; found_true = {};
      locations[e] = 0;
      for (int r = 0; r < READS; r++) begin
        nt_q_t rd;
        int p, kind, k;
        p = $urandom % (REF_LEN - R - 1);
        kind = (e == 0) ? 0 : ($urandom % 4);
        rd = refg[p : p + R - 1];
        if (kind == 1) begin             // one insertion: read ends one earlier
          int pos;
          pos = 1 + $urandom % (R - 2);
          rd.insert(pos, 2'($urandom));
          void'(rd.pop_back());
          true_end.push_back(p + R - 2);
          true_edits.push_back(1);
        end else if (kind == 2) begin    // one deletion: read ends one later
          int pos;
          pos = 1 + $urandom % (R - 2);
          rd.delete(pos);
          rd.push_back(refg[p + R]);
          true_end.push_back(p + R);
          true_edits.push_back(1);
        end else begin                   // up to e substitutions
          k = (e == 0) ? 0 : 1 + $urandom % e;
          for (int i = 0; i < k; i++) begin
            int pos;
            pos = ($urandom % R);
            rd[pos] = rd[pos] + 2'd1 + 2'($urandom % 3);
          end
          true_end.push_back(p + R - 1);
          true_edits.push_back(k);
        end
        reads.push_back(rd);
        found_true.push_back(0);
      end
      for (int r = 0; r < RANDOM_READS; r++) begin
        reads.push_back(rand_seq(R));
        true_end.push_back(-1);
        true_edits.push_back(0);
        found_true.push_back(1);
      end
      for (int s = 0; s < NSEC; s++) begin
        int base, exp_n;
        base = s * STRIDE;
        sec = refg[base : base + N - 1];
        sqa = {};
        for (int i = 0; i < X; i++) sqa.push_back(qgram_val(sec, i, Q));
        sqa.sort();
        @(negedge clk);
        score_threshold = SW'(e);
        count_threshold = CW'(R - (e + 1) * Q + 1);
        array_update = 1;
        array_we = 1;
        for (int i = 0; i < X; i++) begin
          array_waddr = AW'(i);
          array_din = QW'(sqa[i]);
          @(negedge clk);
        end
        array_we = 0;
        array_update = 0;
        for (int j = 0; j < N; j++) begin
          section_update = 1;
          section_addr = LW'(j);
          section_din = sec[j];
          @(negedge clk);
        end
        section_update = 0;
        got_id = {}; got_score = {}; got_loc = {};
        start_search = 1;
        @(negedge clk);
        start_search = 0;
        foreach (reads[r]) begin
          while (read_fifo_full) @(negedge clk);
          read_fifo_we = 1;
          for (int i = 0; i < R; i++) read_fifo_din[2*i +: 2] = reads[r][i];
          @(negedge clk);
          read_fifo_we = 0;
        end
        reads_end = 1;
        @(negedge clk);
        reads_end = 0;
        while (!section_end) @(negedge clk);
        repeat (4) @(negedge clk);
        // sensitivity
        foreach (got_id[i]) begin
          int r;
          r = got_id[i];
          if (r < reads.size() && true_end[r] == base + got_loc[i] && got_score[i] <= true_edits[r])
            found_true[r] = 1;
        end
        // exactness against the reference, for reads the filter lets through
        exp_n = 0;
        foreach (reads[r]) begin
          int cnt;
          cnt = 0;
          for (int i = 0; i < M; i++)
            if (qgram_val(reads[r], i, Q) inside {sqa}) cnt++;
          if (cnt >= int'(count_threshold)) begin
            int_q_t col;
            col = semiglobal(reads[r], sec);
            for (int j = 0; j < N; j++) begin
              if (col[j] <= e) begin
                chk(exp_n < got_id.size() && got_id[exp_n] == r && got_loc[exp_n] == j && got_score[exp_n] == col[j],
                    $sformatf("e=%0d section %0d read %0d location %0d", e, s, r, j));
                exp_n++;
              end
            end
          end
        end
        chk(exp_n == got_id.size(), $sformatf("e=%0d section %0d: %0d records, %0d expected", e, s, got_id.size(), exp_n));
        locations[e] += got_id.size();
      end
      foreach (found_true[r])
        chk(found_true[r], $sformatf("e=%0d read %0d not found at its true position", e, r));
      $display("edit distance %0d: %0d reads drawn, %0d locations reported", e, READS, locations[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
