// tb_filtering_core: small filter (24-nucleotide reads, 4-nucleotide
// q-grams, 64-nucleotide section). The section's q-grams are sorted and
// loaded; reads taken from the section (with and without edits) and random
// reads are filtered. The match count is compared with the number of the
// read's q-grams that occur in the section, verif_en with count >= threshold
// (also with the threshold set exactly to the count) and filt_done timing with floor(log2 X)+3 clocks. Then engines are
// disabled one at a time, all off and all on through the enable command.
module tb_filtering_core;
  import tb_ref_pkg::*;
  localparam int unsigned R = 24, Q = 4, N = 64;
  localparam int unsigned M = R - Q + 1, X = N - Q + 1;
  localparam int unsigned QW = 2 * Q, AW = $clog2(X), CW = $clog2(M + 1);
  localparam int MAX_LAT = $clog2(X + 1) + 2;

  logic clk = 0, rst = 1, clear_regs = 0, qse_en_wr = 0;
  logic [7:0] qse_en = '0;
  logic array_update = 0, array_we = 0;
  logic [AW-1:0] array_waddr = '0;
  logic [QW-1:0] array_din = '0;
  logic [2*R-1:0] query_read = '0;
  logic search_en = 0;
  logic [CW-1:0] count_threshold = '0;
  logic filt_done, verif_en;
  logic [CW-1:0] match_count;
  logic [M-1:0] qse_enable_vec;
  int checks = 0, failures = 0;
  longint unsigned sqa[$];
  bit enabled[M];
  int n_pass = 0, n_reject = 0;

  filtering_core #(.READ_LEN(R), .QGRAM_LEN(Q), .SECTION_LEN(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cmd(logic [7:0] v);
    @(negedge clk);
    qse_en_wr = 1;
    qse_en = v;
    @(negedge clk);
    qse_en_wr = 0;
    if (v == 8'hFF) foreach (enabled[i]) enabled[i] = 1;
    else if (v == 8'h00) foreach (enabled[i]) enabled[i] = 0;
    else enabled[v[6:0] - 1] = v[7];
    for (int i = 0; i < M; i++) chk(qse_enable_vec[i] == enabled[i], "enable vector");
  endtask

  task automatic filter(nt_q_t rd, int thr_in, bit thr_at_count);
    int thr;
    int exp_cnt, lat;
    exp_cnt = 0;
    for (int i = 0; i < M; i++) begin
      longint unsigned v;
      v = qgram_val(rd, i, Q);
      if (enabled[i] && (v inside {sqa})) exp_cnt++;
    end
    thr = thr_at_count ? exp_cnt : thr_in;   // threshold exactly met
    @(negedge clk);
    for (int i = 0; i < R; i++) query_read[2*i +: 2] = rd[i];
    count_threshold = CW'(thr);
    search_en = 1;
    @(negedge clk);
    search_en = 0;
    lat = 1;
    while (!filt_done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat <= MAX_LAT, $sformatf("filter took %0d clocks", lat));
    chk(int'(match_count) == exp_cnt, $sformatf("count %0d expected %0d", match_count, exp_cnt));
    chk(verif_en == (exp_cnt >= thr), "verif_en");
    if (verif_en) n_pass++; else n_reject++;
  endtask

  initial begin
    nt_q_t sec, rd;
    int thr;
    foreach (enabled[i]) enabled[i] = 1;
    sec = rand_seq(N);
    for (int i = 0; i < X; i++) sqa.push_back(qgram_val(sec, i, Q));
    sqa.sort();
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    array_update = 1;
    array_we = 1;
    for (int i = 0; i < X; i++) begin
      array_waddr = AW'(i);
      array_din = QW'(sqa[i]);
      @(negedge clk);
    end
    array_we = 0;
    array_update = 0;
    for (int t = 0; t < 60; t++) begin
      int e;
      e = t % 3;
      thr = R - (e + 1) * Q + 1;          // q-gram lemma threshold
      case (t % 3)
        0: rd = rand_seq(R);
        1: begin
          int s0;
          s0 = $urandom % (N - R);
          rd = sec[s0 : s0 + R - 1];
        end
        default: begin
          int s0;
          s0 = $urandom % (N - R);
          rd = mutate(sec[s0 : s0 + R - 1], 1 + $urandom % 2);
        end
      endcase
      filter(rd, thr, t % 5 == 4);
      if (t % 5 == 4) filter(rd, thr, 1);
      if (t == 20) cmd(8'h83);            // disable engine 3 (index 2)
      if (t == 25) cmd(8'h05);            // disable engine 5
      if (t == 30) cmd(8'h00);            // all off
      if (t == 35) cmd(8'h81);            // enable engine 1
      if (t == 40) cmd(8'hFF);            // all on
    end
    chk(n_pass > 0 && n_reject > 0, "both outcomes seen");
    // clear drops the result
    @(negedge clk);
    clear_regs = 1;
    @(negedge clk);
    clear_regs = 0;
    chk(!verif_en && match_count == 0, "clear");
    $display("passed %0d rejected %0d", n_pass, n_reject);
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
