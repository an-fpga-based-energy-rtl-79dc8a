// ones_counter: the "count 1s" circuit of the filter.
//
// Adds up the match flags of all q-gram search engines and returns how many
// are set. Purely combinational; the sum is formed as a loop of additions,
// which synthesis turns into an adder tree. Only its function is given by
// the published design; the construction is this design's own.
module ones_counter #(
  parameter int unsigned N = 85
) (
  input  logic [N-1:0]           bits,
  output logic [$clog2(N+1)-1:0] count
);

  localparam int unsigned CW = $clog2(N + 1);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) begin
      count = count + CW'(bits[i]);
    end
  end

endmodule
