// sync_fifo: single-clock first-in first-out buffer.
//
// Used for the read FIFO that feeds the cores and for the output FIFO that
// collects mappings. The head entry is always visible on dout while the FIFO
// is not empty (first-word fall-through); rd_en pops it, wr_en pushes din.
// A push and a pop in the same cycle are both performed, even when full. A
// push into a full FIFO without a pop, or a pop when empty, is ignored (and
// caught by an assertion in simulation).
// count gives the occupancy so a writer can reserve room ahead of time.
// The storage is a plain array; depth and width are this design's choices,
// the published system only says that FIFOs are used.
module sync_fifo #(
  parameter int unsigned WIDTH = 200,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           din,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && (!full || rd_en);
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Handshake rules: never push into a full FIFO or pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
