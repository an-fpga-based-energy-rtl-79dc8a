// peq_unit: pre-equal vector computation for Myers' bit-vector algorithm.
//
// A two-bit encoded read is split into two bit planes: Peq2 holds the high
// bit of every nucleotide and Peq1 the low bit, bit i belonging to read
// position i. From these the equal vector of any section nucleotide follows
// with bitwise logic (see myers_engine).
//
// The planes are built one nucleotide per clock: a counter walks the read,
// a constant 1 shifted left by the count marks the position, and each plane
// register is OR-ed with that mark when the nucleotide's bit is set. start
// begins a pass (the planes must have been cleared with clear first); the
// planes are complete and done pulses READ_LEN+1 clocks after start (one
// clock to start, one per nucleotide). read_seq must stay stable meanwhile.
//
// The counter, shifter and OR registers follow the published pre-equal
// vector circuit; the start/done handshake is this design's own.
module peq_unit #(
  parameter int unsigned READ_LEN = rm_pkg::READ_LEN
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear,
  input  logic                  start,
  input  logic [2*READ_LEN-1:0] read_seq,
  output logic [READ_LEN-1:0]   peq2,
  output logic [READ_LEN-1:0]   peq1,
  output logic                  done
);

  localparam int unsigned CW = $clog2(READ_LEN);

  logic [CW-1:0]       cnt;
  logic                busy;
  logic [READ_LEN-1:0] mark;
  logic [1:0]          nt;

  assign mark = READ_LEN'(1) << cnt;
  assign nt   = read_seq[2*cnt +: 2];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      peq2 <= '0;
      peq1 <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (nt[1]) peq2 <= peq2 | mark;
        if (nt[0]) peq1 <= peq1 | mark;
        if (cnt == CW'(READ_LEN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
