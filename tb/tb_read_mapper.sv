// tb_read_mapper: end-to-end test of the read mapper at reduced size
// (24-nucleotide reads, 6-nucleotide q-grams, 128-nucleotide sections).
//
// The testbench plays the host. For each section it builds a random
// section, computes and sorts its q-grams, loads the sorted array and the
// encoded section, raises start_search, pushes reads (copies of section
// pieces with 0..e edits, and random reads) while honouring read_fifo_full,
// then reads_end, and pops the output FIFO, sometimes pausing long enough
// to make the verification core stall. Every output record is compared in
// order with a reference: the q-gram count decides the filter outcome and a
// dynamic-programming edit distance gives every section position within e.
// Sections cover: normal filtering and verification, a disabled search
// engine, filtering switched off (every read verified) and verification
// switched off (filter candidates only). Each mechanism is counted and a
// failure is counted for any that never happens.
module tb_read_mapper;
  import tb_ref_pkg::*;
  localparam int unsigned R = 24, Q = 6, N = 128;
  localparam int unsigned OUT_DEPTH = 8;
  localparam int unsigned M = R - Q + 1, X = N - Q + 1;
  localparam int unsigned QW = 2 * Q, AW = $clog2(X), LW = $clog2(N);
  localparam int unsigned SW = $clog2(R + 1), CW = $clog2(M + 1);
  localparam int unsigned RIDW = 20;
  localparam int NUM_SECTIONS = 4;
  localparam int READS_PER_SECTION = 12;

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

  read_mapper #(.READ_LEN(R), .QGRAM_LEN(Q), .SECTION_LEN(N), .READ_FIFO_DEPTH(4), .OUT_FIFO_DEPTH(OUT_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_reject = 0, n_verified = 0, n_candidate = 0, n_stall = 0, n_rf_full = 0;
  int n_filt_off = 0, n_qse_off = 0, n_section_end = 0, n_match = 0;
  bit pause_reader = 0;
  bit reading = 0;
  int got_id[$], got_score[$], got_loc[$];
  bit got_cand[$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // output reader
  always @(negedge clk) begin
    out_rd_en <= 0;
    if (reading && !pause_reader && match_found) begin
      got_id.push_back(int'(match_read_id));
      got_score.push_back(int'(score));
      got_loc.push_back(int'(match_location));
      got_cand.push_back(match_candidate_only);
      out_rd_en <= 1;
    end
  end
  always @(posedge clk) begin
    if (dut.v_hold && dut.u_verif.busy) n_stall++;
    if (read_fifo_full) n_rf_full++;
  end

  initial begin
    nt_q_t sec;
    nt_q_t reads[$];
    longint unsigned sqa[$];
    int e;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < NUM_SECTIONS; s++) begin
      int mode;                 // 0 normal, 1 engine disabled, 2 filter off, 3 verification off
      bit en_vec[M];
      int exp_n;
      mode = s % 4;
      e = (s % 3) + 1;
      sec = rand_seq(N);
      sqa = {};
      for (int i = 0; i < X; i++) sqa.push_back(qgram_val(sec, i, Q));
      sqa.sort();
      foreach (en_vec[i]) en_vec[i] = 1;
      // configuration
      @(negedge clk);
      enable_filt_op  = (mode != 2);
      enable_verif_op = (mode != 3);
      qse_en_wr = 1;
      qse_en = 8'hFF;
      @(negedge clk);
      if (mode == 1) begin
        qse_en = 8'h02;                   // engine 2 off
        en_vec[1] = 0;
        n_qse_off++;
        @(negedge clk);
      end
      qse_en_wr = 0;
      if (mode == 2) n_filt_off++;
      score_threshold = SW'(e);
      count_threshold = CW'(R - (e + 1) * Q + 1);   // q-gram lemma
      // load sorted q-gram array and encoded section
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
      // reads
      reads = {};
      for (int r = 0; r < READS_PER_SECTION; r++) begin
        nt_q_t rd;
        if (r % 3 == 2) rd = rand_seq(R);
        else begin
          int s0;
          s0 = $urandom % (N - R);
          rd = mutate(sec[s0 : s0 + R - 1], (r % 3 == 0) ? 0 : e);
        end
        reads.push_back(rd);
      end
      got_id = {}; got_score = {}; got_loc = {}; got_cand = {};
      reading = 1;
      start_search = 1;
      @(negedge clk);
      start_search = 0;
      fork
        begin
          for (int r = 0; r < READS_PER_SECTION; r++) begin
            while (read_fifo_full) @(negedge clk);
            read_fifo_we = 1;
            for (int i = 0; i < R; i++) read_fifo_din[2*i +: 2] = reads[r][i];
            @(negedge clk);
            read_fifo_we = 0;
          end
          reads_end = 1;
          @(negedge clk);
          reads_end = 0;
        end
        begin
          // stop reading the output for a while to force a stall
          repeat (R + 40) @(negedge clk);
          pause_reader = 1;
          repeat ((R + N + 8) * 8) @(negedge clk);
          pause_reader = 0;
        end
      join
      while (!section_end) @(negedge clk);
      n_section_end++;
      while (match_found) @(negedge clk);
      repeat (3) @(negedge clk);
      reading = 0;
      // reference
      exp_n = 0;
      for (int r = 0; r < READS_PER_SECTION; r++) begin
        int cnt;
        bit pass;
        cnt = 0;
        for (int i = 0; i < M; i++)
          if (en_vec[i] && (qgram_val(reads[r], i, Q) inside {sqa})) cnt++;
        pass = (mode == 2) || (cnt >= int'(count_threshold));
        if (mode != 2) begin
          if (pass) n_verified++; else n_reject++;
        end
        if (pass && mode == 3) begin
          n_candidate++;
          chk(exp_n < got_id.size() && got_id[exp_n] == r && got_cand[exp_n],
              $sformatf("section %0d read %0d candidate", s, r));
          exp_n++;
        end else if (pass) begin
          int_q_t col;
          col = semiglobal(reads[r], sec);
          for (int j = 0; j < N; j++) begin
            if (col[j] <= e) begin
              n_match++;
              chk(exp_n < got_id.size() && got_id[exp_n] == r && !got_cand[exp_n] &&
                  got_loc[exp_n] == j && got_score[exp_n] == col[j],
                  $sformatf("section %0d read %0d match at %0d score %0d", s, r, j, col[j]));
              exp_n++;
            end
          end
        end
      end
      chk(got_id.size() == exp_n, $sformatf("section %0d: %0d records, %0d expected", s, got_id.size(), exp_n));
    end
    $display("mechanisms: reject=%0d verified=%0d candidate=%0d matches=%0d stall_cycles=%0d read_fifo_full_cycles=%0d filter_off_sections=%0d engine_off_sections=%0d section_ends=%0d",
             n_reject, n_verified, n_candidate, n_match, n_stall, n_rf_full, n_filt_off, n_qse_off, n_section_end);
    chk(n_reject > 0, "filter rejected a read");
    chk(n_verified > 0, "filter passed a read to verification");
    chk(n_match > 0, "verification found a match");
    chk(n_stall > 0, "output backpressure stalled verification");
    chk(n_rf_full > 0, "read FIFO filled");
    chk(NUM_SECTIONS < 3 || n_filt_off > 0, "filter-off mode");
    chk(NUM_SECTIONS < 4 || n_candidate > 0, "verification-off mode");
    chk(NUM_SECTIONS < 2 || n_qse_off > 0, "engine disabled");
    chk(n_section_end == NUM_SECTIONS, "section end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
