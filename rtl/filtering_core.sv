// filtering_core: parallel sorted q-gram filter.
//
// A read of READ_LEN nucleotides has M = READ_LEN-QGRAM_LEN+1 overlapping
// q-grams. The core holds M q-gram search engines (qse), each with its own
// copy of the section's sorted q-gram array, and searches all M q-grams of a
// read at the same time. The engines' found flags are gathered into a
// vector, summed by ones_counter and compared with count_threshold: the read
// is passed to verification (verif_en) when at least that many q-grams occur
// in the section. By the q-gram lemma, a read within edit distance e of the
// section shares at least R-(e+1)q+1 q-grams with it, which is the value the
// controller puts on count_threshold.
//
// Interface and timing:
//  - Array signals (array_update, array_we, array_waddr, array_din) are
//    broadcast to every engine, so one write loads all copies.
//  - search_en starts a search of query_read. filt_done pulses for one clock
//    when every engine has finished (at most floor(log2 X)+3 clocks after
//    search_en); verif_en and match_count are valid from then until the next
//    search or clear_regs.
//  - qse_en_wr with qse_en = {on, index+1} enables (on=1) or disables one
//    engine; 8'hFF enables all and 8'h00 disables all. All are enabled after
//    reset. A disabled engine reports no match.
//
// The engine array, count-ones circuit, comparator and enable vector follow
// the published filter. The >= comparison follows its flow chart; the
// encoding of the enable command is this design's own.
module filtering_core #(
  parameter int unsigned READ_LEN    = rm_pkg::READ_LEN,
  parameter int unsigned QGRAM_LEN   = rm_pkg::QGRAM_LEN,
  parameter int unsigned SECTION_LEN = rm_pkg::SECTION_LEN,
  localparam int unsigned NUM_QSE = READ_LEN - QGRAM_LEN + 1,
  localparam int unsigned NUM_SQA = SECTION_LEN - QGRAM_LEN + 1,
  localparam int unsigned QW = 2 * QGRAM_LEN,
  localparam int unsigned AW = $clog2(NUM_SQA),
  localparam int unsigned CW = $clog2(NUM_QSE + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear_regs,
  input  logic                  qse_en_wr,
  input  logic [7:0]            qse_en,
  input  logic                  array_update,
  input  logic                  array_we,
  input  logic [AW-1:0]         array_waddr,
  input  logic [QW-1:0]         array_din,
  input  logic [2*READ_LEN-1:0] query_read,
  input  logic                  search_en,
  input  logic [CW-1:0]         count_threshold,
  output logic                  filt_done,
  output logic                  verif_en,
  output logic [CW-1:0]         match_count,
  output logic [NUM_QSE-1:0]    qse_enable_vec
);

  logic [NUM_QSE-1:0] found_vec, done_vec;
  logic [CW-1:0]      ones;
  logic               pending;

  // QSE enable vector, driven by the enable command.
  always_ff @(posedge clk) begin
    if (rst) begin
      qse_enable_vec <= '1;
    end else if (qse_en_wr) begin
      if (qse_en == rm_pkg::QSE_CMD_ALL_ON)       qse_enable_vec <= '1;
      else if (qse_en == rm_pkg::QSE_CMD_ALL_OFF) qse_enable_vec <= '0;
      else if (qse_en[6:0] != 7'd0 && 32'(qse_en[6:0]) <= NUM_QSE)
        qse_enable_vec[qse_en[6:0] - 7'd1] <= qse_en[7];
    end
  end

  // One engine per q-gram; q-gram i covers read nucleotides i .. i+q-1,
  // the first of them in the most significant pair.
  for (genvar i = 0; i < NUM_QSE; i++) begin : g_qse
    logic [QW-1:0] qgram;
    always_comb begin
      for (int k = 0; k < QGRAM_LEN; k++) begin
        qgram[2*(QGRAM_LEN-1-k) +: 2] = query_read[2*(i+k) +: 2];
      end
    end

    qse #(
      .QGRAM_LEN  (QGRAM_LEN),
      .NUM_ENTRIES(NUM_SQA)
    ) u_qse (
      .clk         (clk),
      .rst         (rst),
      .qse_en      (qse_enable_vec[i]),
      .clear       (clear_regs),
      .array_update(array_update),
      .array_we    (array_we),
      .array_waddr (array_waddr),
      .array_din   (array_din),
      .search_en   (search_en),
      .query       (qgram),
      .found       (found_vec[i]),
      .done        (done_vec[i])
    );
  end

  ones_counter #(.N(NUM_QSE)) u_count (
    .bits (found_vec),
    .count(ones)
  );

  // Filtering control: wait for every engine, then compare and report.
  always_ff @(posedge clk) begin
    if (rst || clear_regs) begin
      pending     <= 1'b0;
      filt_done   <= 1'b0;
      verif_en    <= 1'b0;
      match_count <= '0;
    end else begin
      filt_done <= 1'b0;
      if (search_en) begin
        pending  <= 1'b1;
        verif_en <= 1'b0;
      end else if (pending && &done_vec) begin
        pending     <= 1'b0;
        filt_done   <= 1'b1;
        match_count <= ones;
        verif_en    <= (ones >= count_threshold);
      end
    end
  end

endmodule
