// tb_qse: loads a random sorted q-gram array (full default size) into one
// search engine and searches q-grams that are present and random ones,
// comparing the flag with a linear scan and checking the search latency
// against floor(log2 X)+2 clocks. Also checks a disabled engine and clear.
module tb_qse;
  import tb_ref_pkg::*;
  localparam int unsigned Q  = rm_pkg::QGRAM_LEN;
  localparam int unsigned X  = rm_pkg::NUM_SQA;
  localparam int unsigned QW = 2 * Q;
  localparam int unsigned AW = $clog2(X);
  localparam int MAX_LAT = $clog2(X + 1) + 1;   // floor(log2 X)+2 for X not a power of two

  logic clk = 0, rst = 1;
  logic qse_en = 1, clear = 0, array_update = 0, array_we = 0, search_en = 0;
  logic [AW-1:0] array_waddr = '0;
  logic [QW-1:0] array_din = '0, query = '0;
  logic found, done;
  logic [QW-1:0] sqa[$];
  int checks = 0, failures = 0, max_seen = 0;

  qse dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic search(logic [QW-1:0] qv, bit expect_found, bit expect_fast);
    int lat = 0;
    @(negedge clk);
    query = qv;
    search_en = 1;
    @(negedge clk);
    search_en = 0;
    lat = 1;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    if (lat > max_seen) max_seen = lat;
    chk(found == expect_found, $sformatf("found=%0b for %h, expected %0b", found, qv, expect_found));
    chk(lat <= (expect_fast ? 1 : MAX_LAT), $sformatf("latency %0d", lat));
  endtask

  initial begin
    for (int i = 0; i < X; i++) sqa.push_back(QW'($urandom));
    sqa.sort();
    repeat (2) @(posedge clk);
    rst <= 0;
    // load the array
    @(negedge clk);
    array_update = 1;
    for (int i = 0; i < X; i++) begin
      array_we = 1;
      array_waddr = AW'(i);
      array_din = sqa[i];
      @(negedge clk);
    end
    array_we = 0;
    array_update = 0;
    // present q-grams, including both ends
    search(sqa[0], 1, 0);
    search(sqa[X-1], 1, 0);
    for (int t = 0; t < 300; t++) search(sqa[$urandom % X], 1, 0);
    // random q-grams and values beyond both ends
    for (int t = 0; t < 300; t++) begin
      logic [QW-1:0] v;
      v = QW'($urandom);
      search(v, v inside {sqa}, 0);
    end
    if (sqa[0] != 0) search('0, 0, 0);
    if (sqa[X-1] != '1) search('1, 0, 0);
    // disabled engine answers "not found" at once
    qse_en = 0;
    search(sqa[5], 0, 1);
    qse_en = 1;
    search(sqa[5], 1, 0);
    // clear drops the flag
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(!found && !done, "clear");
    $display("longest search %0d clocks (limit %0d)", max_seen, MAX_LAT);
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
