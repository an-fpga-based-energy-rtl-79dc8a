// read_mapper: complete read-mapping engine (filter + in-situ verification).
//
// The reference genome is cut into overlapping sections. For one section
// the host loads (1) its sorted q-gram array into every q-gram search engine
// of the filter through the Array signals and (2) its two-bit encoded
// nucleotides into the verification core through the Section signals. It
// then raises start_search and pushes two-bit encoded reads into the read
// FIFO, ending the stream with reads_end. The system control logic takes
// one read at a time from the FIFO:
//   - the filter searches all q-grams of the read in parallel and passes the
//     read when at least count_threshold of them occur in the section;
//   - a passed read is verified against the whole section with Myers'
//     bit-vector algorithm, filtering being halted meanwhile; every section
//     position whose edit distance is at most score_threshold is queued in
//     the output FIFO as {read id, score, location}.
// When the read FIFO is empty after reads_end, section_end rises and stays
// high until the next start_search; the host then loads the next section.
//
// Modes: enable_filt_op=0 sends every read straight to verification
// (alignment only); enable_verif_op=0 queues each read that passes the
// filter as a candidate (match_candidate_only=1, score and location 0).
// Backpressure: when the output FIFO has four or fewer free entries the
// verification core pauses, so no mapping is lost; reads wait in their FIFO
// (read_fifo_full tells the host to wait).
//
// Output side: match_found is high while the output FIFO holds an entry,
// whose fields are on match_read_id/score/match_location/
// match_candidate_only; out_rd_en pops it. match_read_id counts reads from 0
// at each start_search. All control inputs are sampled on the rising clock;
// rst is synchronous and active high.
//
// The block structure and signal set follow the published system (filter,
// verification, read FIFO, output FIFOs, system control); the single-read
// sequencing, reads_end/section_end handshake, mode behaviour, FIFO sizes
// and output record are this design's own.
module read_mapper #(
  parameter int unsigned READ_LEN        = rm_pkg::READ_LEN,
  parameter int unsigned QGRAM_LEN       = rm_pkg::QGRAM_LEN,
  parameter int unsigned SECTION_LEN     = rm_pkg::SECTION_LEN,
  parameter int unsigned READ_FIFO_DEPTH = 16,
  parameter int unsigned OUT_FIFO_DEPTH  = 16,
  parameter int unsigned READ_ID_W       = rm_pkg::READ_ID_W,
  localparam int unsigned NUM_QSE = READ_LEN - QGRAM_LEN + 1,
  localparam int unsigned NUM_SQA = SECTION_LEN - QGRAM_LEN + 1,
  localparam int unsigned QW = 2 * QGRAM_LEN,
  localparam int unsigned AW = $clog2(NUM_SQA),
  localparam int unsigned LW = $clog2(SECTION_LEN),
  localparam int unsigned SW = $clog2(READ_LEN + 1),
  localparam int unsigned CW = $clog2(NUM_QSE + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  // global operation enables
  input  logic                  enable_filt_op,
  input  logic                  enable_verif_op,
  input  logic                  qse_en_wr,
  input  logic [7:0]            qse_en,
  // sorted q-gram array load
  input  logic                  array_update,
  input  logic                  array_we,
  input  logic [AW-1:0]         array_waddr,
  input  logic [QW-1:0]         array_din,
  // encoded section load
  input  logic                  section_update,
  input  logic [LW-1:0]         section_addr,
  input  logic [1:0]            section_din,
  // reads
  input  logic                  read_fifo_we,
  input  logic [2*READ_LEN-1:0] read_fifo_din,
  output logic                  read_fifo_full,
  input  logic                  start_search,
  input  logic                  reads_end,
  // thresholds
  input  logic [SW-1:0]         score_threshold,
  input  logic [CW-1:0]         count_threshold,
  // mapping output
  output logic                  match_found,
  output logic [SW-1:0]         score,
  output logic [LW-1:0]         match_location,
  output logic [READ_ID_W-1:0]  match_read_id,
  output logic                  match_candidate_only,
  input  logic                  out_rd_en,
  // handshake
  output logic                  section_end,
  output logic                  busy
);

  typedef struct packed {
    logic                 candidate;
    logic [READ_ID_W-1:0] read_id;
    logic [SW-1:0]        score;
    logic [LW-1:0]        loc;
  } out_rec_t;

  typedef enum logic [3:0] {
    S_IDLE,
    S_NEXT,
    S_FILT_START,
    S_FILT_WAIT,
    S_CAND,
    S_VERIF_RESET,
    S_VERIF_START,
    S_VERIF_WAIT
  } sys_state_t;

  localparam int unsigned OCW = $clog2(OUT_FIFO_DEPTH + 1);

  sys_state_t state;

  // read FIFO
  logic                  rf_rd, rf_empty;
  logic [2*READ_LEN-1:0] rf_dout;
  logic [$clog2(READ_FIFO_DEPTH+1)-1:0] rf_count;
  // output FIFO
  logic                  of_wr, of_full, of_empty;
  out_rec_t              of_din, of_dout;
  logic [OCW-1:0]        of_count;

  logic [2*READ_LEN-1:0] query_read;
  logic [READ_ID_W-1:0]  read_id;
  logic                  reads_end_seen;
  logic                  clear_regs, search_en, verif_reset, verif_start;
  logic                  filt_done, filt_pass;
  logic [CW-1:0]         filt_count;
  logic [NUM_QSE-1:0]    qse_vec;
  logic                  v_match, v_done, v_busy, v_hold;
  logic [SW-1:0]         v_score;
  logic [LW-1:0]         v_loc;
  logic                  cand_push;

  // ---------------------------------------------------------------------
  // System control logic
  // ---------------------------------------------------------------------
  assign busy      = (state != S_IDLE);
  assign rf_rd     = (state == S_NEXT) && !rf_empty;
  assign cand_push = (state == S_CAND) && !of_full;
  assign v_hold    = (of_count >= OCW'(OUT_FIFO_DEPTH - 4));

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      query_read     <= '0;
      read_id        <= '0;
      reads_end_seen <= 1'b0;
      section_end    <= 1'b0;
      clear_regs     <= 1'b0;
      search_en      <= 1'b0;
      verif_reset    <= 1'b0;
      verif_start    <= 1'b0;
    end else begin
      clear_regs  <= 1'b0;
      search_en   <= 1'b0;
      verif_reset <= 1'b0;
      verif_start <= 1'b0;
      if (reads_end) reads_end_seen <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (start_search) begin
            clear_regs     <= 1'b1;
            read_id        <= '0;
            reads_end_seen <= reads_end;
            section_end    <= 1'b0;
            state          <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (!rf_empty) begin
            query_read <= rf_dout;
            if (enable_filt_op) begin
              search_en <= 1'b1;
              state     <= S_FILT_START;
            end else begin
              verif_reset <= 1'b1;
              state       <= S_VERIF_RESET;
            end
          end else if (reads_end_seen || reads_end) begin
            section_end <= 1'b1;
            state       <= S_IDLE;
          end
        end
        S_FILT_START: state <= S_FILT_WAIT;   // search_en is being issued
        S_FILT_WAIT: begin
          if (filt_done) begin
            if (!filt_pass) begin
              read_id <= read_id + 1'b1;
              state   <= S_NEXT;
            end else if (enable_verif_op) begin
              verif_reset <= 1'b1;
              state       <= S_VERIF_RESET;
            end else begin
              state <= S_CAND;
            end
          end
        end
        S_CAND: begin
          if (!of_full) begin
            read_id <= read_id + 1'b1;
            state   <= S_NEXT;
          end
        end
        S_VERIF_RESET: begin
          verif_start <= 1'b1;
          state       <= S_VERIF_START;
        end
        S_VERIF_START: state <= S_VERIF_WAIT;  // verif_en is being issued
        S_VERIF_WAIT: begin
          if (v_done) begin
            read_id <= read_id + 1'b1;
            state   <= S_NEXT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Datapath blocks
  // ---------------------------------------------------------------------
  sync_fifo #(.WIDTH(2 * READ_LEN), .DEPTH(READ_FIFO_DEPTH)) u_read_fifo (
    .clk  (clk),
    .rst  (rst),
    .wr_en(read_fifo_we),
    .din  (read_fifo_din),
    .rd_en(rf_rd),
    .dout (rf_dout),
    .full (read_fifo_full),
    .empty(rf_empty),
    .count(rf_count)
  );

  filtering_core #(
    .READ_LEN   (READ_LEN),
    .QGRAM_LEN  (QGRAM_LEN),
    .SECTION_LEN(SECTION_LEN)
  ) u_filter (
    .clk            (clk),
    .rst            (rst),
    .clear_regs     (clear_regs),
    .qse_en_wr      (qse_en_wr),
    .qse_en         (qse_en),
    .array_update   (array_update),
    .array_we       (array_we),
    .array_waddr    (array_waddr),
    .array_din      (array_din),
    .query_read     (query_read),
    .search_en      (search_en),
    .count_threshold(count_threshold),
    .filt_done      (filt_done),
    .verif_en       (filt_pass),
    .match_count    (filt_count),
    .qse_enable_vec (qse_vec)
  );

  verification_core #(
    .READ_LEN   (READ_LEN),
    .SECTION_LEN(SECTION_LEN)
  ) u_verif (
    .clk            (clk),
    .rst            (rst),
    .verif_reset    (verif_reset),
    .verif_en       (verif_start),
    .query_read     (query_read),
    .section_update (section_update),
    .section_addr   (section_addr),
    .section_din    (section_din),
    .score_threshold(score_threshold),
    .hold           (v_hold),
    .valid_match    (v_match),
    .score          (v_score),
    .match_location (v_loc),
    .verif_done     (v_done),
    .busy           (v_busy)
  );

  always_comb begin
    of_wr  = v_match || cand_push;
    of_din = '{candidate: cand_push, read_id: read_id,
               score: cand_push ? '0 : v_score, loc: cand_push ? '0 : v_loc};
  end

  sync_fifo #(.WIDTH($bits(out_rec_t)), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .clk  (clk),
    .rst  (rst),
    .wr_en(of_wr),
    .din  (of_din),
    .rd_en(out_rd_en),
    .dout (of_dout),
    .full (of_full),
    .empty(of_empty),
    .count(of_count)
  );

  assign match_found          = !of_empty;
  assign match_read_id        = of_dout.read_id;
  assign score                = of_dout.score;
  assign match_location       = of_dout.loc;
  assign match_candidate_only = of_dout.candidate;

  // The hold margin must cover the verification pipeline.
  a_no_lost_match: assert property (@(posedge clk) disable iff (rst) !(v_match && of_full));

endmodule
