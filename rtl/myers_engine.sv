// myers_engine: equal-vector select and Myers bit-vector column update.
//
// For each section nucleotide the engine advances one column of the edit
// distance matrix between the read (READ_LEN bits, one per read position)
// and the section, using Myers' bit-vector algorithm in search mode: the
// read may begin anywhere in the section, so col_score is the smallest edit
// distance of the whole read against any section substring ending at the
// current nucleotide.
//
// Stage 1 (Reg Eq): the equal vector of the nucleotide is chosen from the
// read's bit planes: Eq = (Peq2 matches nt[1]) & (Peq1 matches nt[0]).
// Stage 2: the vertical delta vectors Pv/Mv and the score are updated:
//   Xv = Eq | Mv;  Xh = (((Eq & Pv) + Pv) ^ Pv) | Eq
//   Ph = Mv | ~(Xh | Pv);  Mh = Pv & Xh
//   score += Ph[R-1] - Mh[R-1]
//   Ph <<= 1;  Mh <<= 1
//   Pv = Mh | ~(Xv | Ph);  Mv = Ph & Xv
// One nucleotide is accepted per clock; col_valid/col_score/col_loc follow
// two clocks after nt_valid/nt/nt_loc. init restores Pv = all ones, Mv = 0,
// score = READ_LEN and empties the pipeline.
//
// The bit-plane multiplexer and Reg Eq follow the published verification
// datapath, which names the original (unbanded) Myers algorithm; doing one
// column per clock is this design's reading of the published timing.
module myers_engine #(
  parameter int unsigned READ_LEN = rm_pkg::READ_LEN,
  parameter int unsigned LOC_W    = $clog2(rm_pkg::SECTION_LEN),
  localparam int unsigned SW = $clog2(READ_LEN + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                init,
  input  logic [READ_LEN-1:0] peq2,
  input  logic [READ_LEN-1:0] peq1,
  input  logic                nt_valid,
  input  logic [1:0]          nt,
  input  logic [LOC_W-1:0]    nt_loc,
  output logic                col_valid,
  output logic [SW-1:0]       col_score,
  output logic [LOC_W-1:0]    col_loc
);

  typedef logic [READ_LEN-1:0] vec_t;

  vec_t          eq_sel, eq_r;
  logic          v1;
  logic [LOC_W-1:0] loc1;
  vec_t          pv, mv;
  vec_t          xv, xh, ph, mh, ph_s, mh_s, pv_n, mv_n;
  logic [SW-1:0] score_n;

  // Multiplexer over the four nucleotide codes.
  always_comb begin
    unique case (rm_pkg::nt_t'(nt))
      rm_pkg::NT_T: eq_sel =  peq2 &  peq1;
      rm_pkg::NT_G: eq_sel =  peq2 & ~peq1;
      rm_pkg::NT_C: eq_sel = ~peq2 &  peq1;
      rm_pkg::NT_A: eq_sel = ~peq2 & ~peq1;
      default:      eq_sel = '0;
    endcase
  end

  // One column of Myers' algorithm.
  always_comb begin
    xv   = eq_r | mv;
    xh   = (((eq_r & pv) + pv) ^ pv) | eq_r;
    ph   = mv | ~(xh | pv);
    mh   = pv & xh;
    score_n = col_score;
    if (ph[READ_LEN-1])      score_n = col_score + 1'b1;
    else if (mh[READ_LEN-1]) score_n = col_score - 1'b1;
    ph_s = ph << 1;
    mh_s = mh << 1;
    pv_n = mh_s | ~(xv | ph_s);
    mv_n = ph_s & xv;
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      eq_r      <= '0;
      v1        <= 1'b0;
      loc1      <= '0;
      pv        <= '1;
      mv        <= '0;
      col_score <= SW'(READ_LEN);
      col_valid <= 1'b0;
      col_loc   <= '0;
    end else begin
      v1 <= nt_valid;
      if (nt_valid) begin
        eq_r <= eq_sel;
        loc1 <= nt_loc;
      end
      col_valid <= v1;
      if (v1) begin
        pv        <= pv_n;
        mv        <= mv_n;
        col_score <= score_n;
        col_loc   <= loc1;
      end
    end
  end

endmodule
