// qse: q-gram search engine.
//
// Holds one sorted q-gram array (SQA) of a genome section in a local memory
// and answers whether a query q-gram occurs in it, by binary search.
//
// Loading: while array_update is high the memory address comes from
// array_waddr and array_din is written on every clock with array_we high.
// Searching: a search_en pulse (with qse_en high and array_update low)
// captures the query. The engine keeps a low and a high address limit and
// probes the middle entry. The memory has a registered read port (block
// RAM), so the entry probed in one clock is compared in the next; the next
// middle address is formed from the compare result in the same clock and
// sent straight to the memory, giving one probe per clock. The search ends
// when the entry equals the query (found=1) or the limits limits_crossed (found=0).
//
// Timing: done rises floor(log2(NUM_ENTRIES))+2 clocks after search_en at
// most (11 probes plus one for the registered flag with 2033 entries), and
// found/done hold until the next search or clear. A search_en while qse_en
// is low completes in one clock with found=0, so a disabled engine never
// holds up the filter.
//
// The structure (local memory, comparator, address-limit and address
// generators, write/read address select) follows the published engine; the
// registered read port and the restart rules are this design's own choices.
module qse #(
  parameter int unsigned QGRAM_LEN   = rm_pkg::QGRAM_LEN,
  parameter int unsigned NUM_ENTRIES = rm_pkg::NUM_SQA,
  localparam int unsigned QW = 2 * QGRAM_LEN,
  localparam int unsigned AW = $clog2(NUM_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          qse_en,
  input  logic          clear,
  input  logic          array_update,
  input  logic          array_we,
  input  logic [AW-1:0] array_waddr,
  input  logic [QW-1:0] array_din,
  input  logic          search_en,
  input  logic [QW-1:0] query,
  output logic          found,
  output logic          done
);

  // Signed limits one bit wider than an address so that high can reach -1
  // and low can reach NUM_ENTRIES.
  typedef logic signed [AW+1:0] lim_t;

  logic [QW-1:0] mem [NUM_ENTRIES];
  logic [QW-1:0] rd_data;
  logic [AW-1:0] mem_addr, look_addr;

  logic          busy;
  logic [QW-1:0] query_r;
  lim_t          lo, hi, mid;
  lim_t          lo_n, hi_n, mid_n;
  logic          hit, limits_crossed;
  logic          start;

  assign start = search_en && qse_en && !array_update;

  // Array address limits generator: new limits from the comparator result.
  always_comb begin
    hit  = (rd_data == query_r);
    lo_n = lo;
    hi_n = hi;
    if (rd_data < query_r) lo_n = mid + lim_t'(1);
    else                   hi_n = mid - lim_t'(1);
    limits_crossed = (lo_n > hi_n);
    mid_n = (lo_n + hi_n) >>> 1;
  end

  // Local memory address generator and write/lookup address select.
  always_comb begin
    if (start || !busy) look_addr = AW'((NUM_ENTRIES - 1) / 2);
    else                look_addr = mid_n[AW-1:0];
    mem_addr = array_update ? array_waddr : look_addr;
  end

  always_ff @(posedge clk) begin
    if (array_update && array_we) mem[mem_addr] <= array_din;
    rd_data <= mem[mem_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      found   <= 1'b0;
      done    <= 1'b0;
      lo      <= '0;
      hi      <= '0;
      mid     <= '0;
      query_r <= '0;
    end else if (clear) begin
      busy  <= 1'b0;
      found <= 1'b0;
      done  <= 1'b0;
    end else if (search_en && !start) begin
      // Disabled (or being loaded): answer "not found" at once.
      busy  <= 1'b0;
      found <= 1'b0;
      done  <= 1'b1;
    end else if (start) begin
      busy    <= 1'b1;
      found   <= 1'b0;
      done    <= 1'b0;
      query_r <= query;
      lo      <= '0;
      hi      <= lim_t'(NUM_ENTRIES - 1);
      mid     <= lim_t'((NUM_ENTRIES - 1) / 2);
    end else if (busy) begin
      if (hit) begin
        busy  <= 1'b0;
        found <= 1'b1;
        done  <= 1'b1;
      end else if (limits_crossed) begin
        busy  <= 1'b0;
        found <= 1'b0;
        done  <= 1'b1;
      end else begin
        lo  <= lo_n;
        hi  <= hi_n;
        mid <= mid_n;
      end
    end
  end

  // A search must not be started while the array is being rewritten.
  a_no_update_while_busy: assert property (@(posedge clk) disable iff (rst) !(busy && array_update && array_we));

endmodule
