// trips_icache_bank: one bank of the partitioned level-1 instruction cache.
//
// A TRIPS block is five 128-byte chunks: the header chunk and one chunk per
// array row. The core has ROWS+1 banks: bank 0 holds header chunks, bank r+1
// holds the chunk of row r. All banks are indexed by the same set number,
// which block control broadcasts (it also keeps the tags), so one fetch reads
// one chunk from every bank in parallel.
//
// chunk is the whole 32-word chunk of set `set`, read combinationally (used
// for the header). For a row bank, a `start` pulse streams the chunk of `set`
// into A-frame `af` of its row over the next AF_FRAMES cycles: in cycle k it
// delivers the instructions of frame k to the COLS nodes of the row, word
// k*COLS + c going to column c, as laid out in the TRIPS block format. That
// is 4 instructions per row per cycle, 16 for the array. `abort` stops a
// stream whose A-frame has been squashed.
//
// The array is written through the refill port (we, wset, wword, wdata) by
// whatever stands behind the cache. Bank organisation and broadcast index
// follow the TRIPS description; the set count and the per-frame streaming
// order are this design's choice.
module trips_icache_bank
  import trips_pkg::*;
#(
  parameter int SETS = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                    start,
  input  logic                    abort,
  input  logic [$clog2(SETS)-1:0] set,
  input  logic [AF_W-1:0]         af,
  output logic [31:0]             chunk [32],
  output logic [COLS-1:0]         ld_valid,
  output logic [FR_W-1:0]         ld_frame,
  output logic [31:0]             ld_inst [COLS],
  output logic                    busy,
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] wset,
  input  logic [4:0]              wword,
  input  logic [31:0]             wdata
);

  localparam int SW = $clog2(SETS);

  logic [31:0] mem [SETS][32];

  logic [SW-1:0]   s_set;
  logic [AF_W-1:0] s_af;
  logic [2:0]      s_k;

  always_comb begin
    for (int w = 0; w < 32; w++) chunk[w] = mem[set][w];
    ld_frame = FR_W'(s_af) * FR_W'(AF_FRAMES) + FR_W'(s_k);
    for (int c = 0; c < COLS; c++) begin
      ld_valid[c] = busy;
      ld_inst[c]  = mem[s_set][5'(int'(s_k) * COLS + c)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      s_set <= '0;
      s_af  <= '0;
      s_k   <= '0;
    end else begin
      if (start) begin
        busy  <= 1'b1;
        s_set <= set;
        s_af  <= af;
        s_k   <= '0;
      end else if (abort) begin
        busy <= 1'b0;
      end else if (busy) begin
        s_k <= s_k + 3'd1;
        if (s_k == 3'(AF_FRAMES - 1)) busy <= 1'b0;
      end
      if (we) mem[wset][wword] <= wdata;
    end
  end

endmodule
