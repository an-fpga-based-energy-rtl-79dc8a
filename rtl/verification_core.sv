// verification_core: in-situ verification of a read against a section.
//
// The encoded genome section is kept in a local memory (SECTION_LEN
// two-bit nucleotides, written through section_update/section_addr/
// section_din). When the filter passes a read (verif_en pulse), the core
//  1. precomputes the read's pre-equal bit planes (peq_unit, READ_LEN clocks),
//  2. streams every section nucleotide, one per clock, from the memory
//     through myers_engine, and
//  3. reports every section position whose alignment score is at most
//     score_threshold (the edit distance e) as a valid_match pulse with
//     score and match_location (the position of the last aligned section
//     nucleotide), then pulses verif_done.
// A read therefore takes READ_LEN + SECTION_LEN + 7 clocks from verif_en
// to verif_done when never held.
//
// hold pauses the issue of section nucleotides (used when the output FIFO
// is nearly full); at most three results already in the pipeline still
// appear after hold rises. verif_reset returns the core to idle and clears
// the pre-equal registers. query_read is captured with verif_en.
//
// The memory array, pre-equal circuit, equal-vector multiplexer, Reg Eq,
// section counter and control signals follow the published verification
// core; the sequencing of precomputation and scoring by an internal state
// machine, the hold input and reporting every position within e are this
// design's own choices.
module verification_core #(
  parameter int unsigned READ_LEN    = rm_pkg::READ_LEN,
  parameter int unsigned SECTION_LEN = rm_pkg::SECTION_LEN,
  localparam int unsigned LW = $clog2(SECTION_LEN),
  localparam int unsigned SW = $clog2(READ_LEN + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  verif_reset,
  input  logic                  verif_en,
  input  logic [2*READ_LEN-1:0] query_read,
  input  logic                  section_update,
  input  logic [LW-1:0]         section_addr,
  input  logic [1:0]            section_din,
  input  logic [SW-1:0]         score_threshold,
  input  logic                  hold,
  output logic                  valid_match,
  output logic [SW-1:0]         score,
  output logic [LW-1:0]         match_location,
  output logic                  verif_done,
  output logic                  busy
);

  typedef enum logic [2:0] {
    V_IDLE,
    V_PRECOMP,
    V_SCORE,
    V_DRAIN
  } vstate_t;

  vstate_t state;

  logic [1:0]            smem [SECTION_LEN];
  logic [1:0]            s_data;
  logic                  s_valid;
  logic [LW-1:0]         s_loc;
  logic [LW-1:0]         sec_cnt;           // counter for section
  logic                  issue;
  logic [2*READ_LEN-1:0] read_r;
  logic                  precomp_en, peq_done, peq_clear;
  logic [READ_LEN-1:0]   peq2, peq1;
  logic                  col_valid;
  logic [SW-1:0]         col_score;
  logic [LW-1:0]         col_loc;
  logic                  start;
  logic                  eng_v1_q, eng_busy;

  assign start     = verif_en && (state == V_IDLE);
  assign issue     = (state == V_SCORE) && !hold;
  assign busy      = (state != V_IDLE);
  assign peq_clear = verif_reset || start;

  // Memory array for the genome section: written while loading, read by
  // the section counter while scoring.
  always_ff @(posedge clk) begin
    if (section_update) smem[section_addr] <= section_din;
    s_data <= smem[sec_cnt];
  end

  always_ff @(posedge clk) begin
    if (rst || verif_reset) begin
      state      <= V_IDLE;
      sec_cnt    <= '0;
      s_valid    <= 1'b0;
      s_loc      <= '0;
      read_r     <= '0;
      precomp_en <= 1'b0;
      verif_done <= 1'b0;
    end else begin
      precomp_en <= 1'b0;
      verif_done <= 1'b0;
      s_valid    <= issue;
      s_loc      <= sec_cnt;
      unique case (state)
        V_IDLE: begin
          if (verif_en) begin
            read_r     <= query_read;
            precomp_en <= 1'b1;
            sec_cnt    <= '0;
            state      <= V_PRECOMP;
          end
        end
        V_PRECOMP: begin
          if (peq_done) state <= V_SCORE;   // enable scoring
        end
        V_SCORE: begin
          if (issue) begin
            if (sec_cnt == LW'(SECTION_LEN - 1)) state <= V_DRAIN;
            else                                  sec_cnt <= sec_cnt + 1'b1;
          end
        end
        V_DRAIN: begin
          if (!s_valid && !eng_busy) begin
            verif_done <= 1'b1;
            state      <= V_IDLE;
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  // The engine pipeline is empty once neither of its stages holds a column.
  always_ff @(posedge clk) begin
    if (rst || verif_reset) eng_v1_q <= 1'b0;
    else                    eng_v1_q <= s_valid;
  end
  assign eng_busy = eng_v1_q || col_valid;

  peq_unit #(.READ_LEN(READ_LEN)) u_peq (
    .clk     (clk),
    .rst     (rst),
    .clear   (peq_clear),
    .start   (precomp_en),
    .read_seq(read_r),
    .peq2    (peq2),
    .peq1    (peq1),
    .done    (peq_done)
  );

  myers_engine #(.READ_LEN(READ_LEN), .LOC_W(LW)) u_eng (
    .clk      (clk),
    .rst      (rst),
    .init     (peq_clear),
    .peq2     (peq2),
    .peq1     (peq1),
    .nt_valid (s_valid),
    .nt       (s_data),
    .nt_loc   (s_loc),
    .col_valid(col_valid),
    .col_score(col_score),
    .col_loc  (col_loc)
  );

  assign valid_match    = col_valid && (col_score <= score_threshold);
  assign score          = col_score;
  assign match_location = col_loc;

endmodule
