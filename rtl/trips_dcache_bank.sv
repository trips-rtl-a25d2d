// trips_dcache_bank: one bank of the partitioned level-1 data memory, with its
// load/store ordering logic and store buffer.
//
// The core has ROWS banks at the right edge of the array, one per row,
// interleaved on 64-byte lines (bank = address bits [7:6]). Loads and stores
// reach the bank as operand-network packets and wait in a request queue.
//
// Ordering: memory operations are performed only for the oldest (non-
// speculative) block of each thread. Within that block the 5-bit load/store
// ID (LSID) gives program order. A store is accepted into the store buffer at
// once and reported to block control as done. A load may proceed once block
// control reports that every store of the block with a smaller LSID is done;
// it then reads the data array and takes, byte by byte, the youngest older
// store of the same block that is still buffered. Buffered stores reach the
// data array only when their block commits (one per cycle), so a squashed
// block never changes memory; loads wait while a commit drains. Loaded data
// is zero-extended and sent to the target named in the load instruction.
//
// Follows the TRIPS description: banked, line-interleaved L1 data banks next
// to the rows, LSIDs giving program order, and a store buffer. This design's
// own: the bank holds its data directly (no tags, miss handling or secondary
// memory behind it), loads wait for all older stores instead of predicting
// dependences, and the external port used to preload and inspect the data
// array. Sizes: the request queue holds every memory operation that can be
// live (8 A-frames x 32 LSIDs) and the store buffer every store of the oldest
// blocks of 8 threads (8 x 32), far more than the 32-entry store buffer of
// the TRIPS streaming study. Because stores leave the buffer only at commit,
// a smaller buffer could fill with stores of a block that cannot complete
// until more of its stores are accepted, and the core would deadlock.
//
// Timing: one request is performed per cycle; a load reply leaves on the
// cycle after it is picked; st_rep_* is registered; one committed store
// drains per cycle, and ext_rdata is a combinational read.
module trips_dcache_bank
  import trips_pkg::*;
#(
  parameter int WORDS = 2048,   // 64-bit words: 64 KB over 4 banks
  parameter int RQ    = NUM_AF * NUM_LSID,   // request queue: every live memory op
  parameter int SB    = NUM_LSID * MAX_THREADS  // store buffer: all oldest blocks' stores
) (
  input  logic clk,
  input  logic rst_n,
  // operand network
  input  logic rx_valid,
  input  pkt_t rx_pkt,
  output logic rx_ready,
  output logic tx_valid,
  output pkt_t tx_pkt,
  input  logic tx_ready,
  // block control
  input  logic [NUM_AF-1:0]   af_oldest,
  input  logic [GEN_W-1:0]    af_gen  [NUM_AF],
  input  logic [NUM_LSID-1:0] st_pend [NUM_AF],
  input  logic [NUM_AF-1:0]   af_commit,
  input  logic [NUM_AF-1:0]   af_clear,
  output logic                st_rep_valid,
  output logic [AF_W-1:0]     st_rep_af,
  output logic [4:0]          st_rep_lsid,
  output logic                drain_busy,
  // external access to the data array (preload / inspection)
  input  logic                     ext_we,
  input  logic [$clog2(WORDS)-1:0] ext_addr,
  input  word_t                    ext_wdata,
  output word_t                    ext_rdata
);

  localparam int WA = $clog2(WORDS);

  word_t mem [WORDS];

  pkt_t         rq   [RQ];
  logic [RQ-1:0] rqv;

  typedef struct packed {
    logic            v;
    logic            drain;
    logic [AF_W-1:0] af;
    logic [4:0]      lsid;
    logic [WA-1:0]   wa;
    logic [7:0]      be;
    word_t           data;
  } sb_t;
  sb_t sb [SB];

  function automatic logic [WA-1:0] widx(addr_t a);
    return WA'({a[AW-1:LINE_SHIFT+2], a[LINE_SHIFT-1:3]});
  endfunction

  assign ext_rdata = mem[ext_addr];

  // ------------------------------------------------------------ request queue
  logic rq_full;
  logic [$clog2(RQ)-1:0] rq_free;
  always_comb begin
    rq_full = &rqv;
    rq_free = '0;
    for (int i = RQ-1; i >= 0; i--) if (!rqv[i]) rq_free = ($clog2(RQ))'(i);
  end
  assign rx_ready = !rq_full;

  // ------------------------------------------------------------ store buffer status
  logic sb_full, any_drain;
  logic [$clog2(SB)-1:0] sb_free, drain_i;
  always_comb begin
    sb_full = 1'b1; sb_free = '0; any_drain = 1'b0; drain_i = '0;
    for (int i = SB-1; i >= 0; i--) begin
      if (!sb[i].v) begin sb_full = 1'b0; sb_free = ($clog2(SB))'(i); end
      if (sb[i].v && sb[i].drain) begin any_drain = 1'b1; drain_i = ($clog2(SB))'(i); end
    end
  end
  assign drain_busy = any_drain;

  // ------------------------------------------------------------ request selection
  logic [RQ-1:0] stale, elig;
  logic          pick_v;
  logic [$clog2(RQ)-1:0] pick;
  always_comb begin
    for (int i = 0; i < RQ; i++) begin
      logic [NUM_LSID-1:0] older;
      older    = (NUM_LSID'(1) << rq[i].idx) - NUM_LSID'(1);
      stale[i] = rqv[i] && rq[i].gen != af_gen[rq[i].af];
      elig[i]  = 1'b0;
      if (rqv[i] && !stale[i] && af_oldest[rq[i].af]) begin
        if (rq[i].kind == PK_STORE) elig[i] = !sb_full;
        else elig[i] = !any_drain && (st_pend[rq[i].af] & older) == '0 &&
                       (!tx_valid || tx_ready);
      end
    end
    pick_v = 1'b0; pick = '0;
    for (int i = RQ-1; i >= 0; i--) if (elig[i]) begin pick_v = 1'b1; pick = ($clog2(RQ))'(i); end
  end

  // ------------------------------------------------------------ load data path
  pkt_t  lr;
  word_t ld_word, ld_val;
  logic [2:0] off;
  always_comb begin
    logic [4:0] best [8];
    logic [7:0] hit;
    lr = rq[pick];
    off = lr.addr[2:0];
    ld_word = mem[widx(lr.addr)];
    hit = '0;
    for (int by = 0; by < 8; by++) best[by] = '0;
    for (int s = 0; s < SB; s++) begin
      if (sb[s].v && !sb[s].drain && sb[s].af == lr.af && sb[s].wa == widx(lr.addr) &&
          sb[s].lsid < lr.idx) begin
        for (int by = 0; by < 8; by++) begin
          if (sb[s].be[by] && (!hit[by] || sb[s].lsid > best[by])) begin
            hit[by] = 1'b1;
            best[by] = sb[s].lsid;
            ld_word[by*8 +: 8] = sb[s].data[by*8 +: 8];
          end
        end
      end
    end
    ld_val = ld_word >> {off, 3'b000};
    unique case (lr.aux[11:10])
      2'd0:    ld_val = {56'd0, ld_val[7:0]};
      2'd1:    ld_val = {48'd0, ld_val[15:0]};
      2'd2:    ld_val = {32'd0, ld_val[31:0]};
      default: ;
    endcase
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rqv <= '0;
      for (int i = 0; i < RQ; i++) rq[i] <= '0;
      for (int s = 0; s < SB; s++) sb[s] <= '0;
      tx_valid <= 1'b0;
      tx_pkt <= '0;
      st_rep_valid <= 1'b0;
      st_rep_af <= '0;
      st_rep_lsid <= '0;
    end else begin
      st_rep_valid <= 1'b0;
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      // drop requests of squashed or retired blocks
      rqv <= rqv & ~stale;
      // perform one request
      if (pick_v) begin
        rqv[pick] <= 1'b0;
        if (lr.kind == PK_STORE) begin
          logic [7:0] be;
          unique case (lr.aux[11:10])
            2'd0: be = 8'h01;
            2'd1: be = 8'h03;
            2'd2: be = 8'h0f;
            default: be = 8'hff;
          endcase
          sb[sb_free] <= '{v: 1'b1, drain: 1'b0, af: lr.af, lsid: lr.idx,
                           wa: widx(lr.addr), be: be << off,
                           data: lr.data << {off, 3'b000}};
          st_rep_valid <= 1'b1;
          st_rep_af    <= lr.af;
          st_rep_lsid  <= lr.idx;
        end else if (lr.aux[8:0] != '0) begin
          tx_pkt   <= target_pkt(lr.aux[8:0], lr.af, lr.gen, ld_val, 1'b0);
          tx_valid <= 1'b1;
        end
      end
      // accept a new request
      if (rx_valid && !rq_full) begin
        rq[rq_free]  <= rx_pkt;
        rqv[rq_free] <= 1'b1;
      end
      // drain one committed store per cycle
      if (any_drain) begin
        for (int by = 0; by < 8; by++)
          if (sb[drain_i].be[by]) mem[sb[drain_i].wa][by*8 +: 8] <= sb[drain_i].data[by*8 +: 8];
        sb[drain_i].v <= 1'b0;
      end else if (ext_we) begin
        mem[ext_addr] <= ext_wdata;
      end
      for (int s = 0; s < SB; s++) begin
        if (sb[s].v && !sb[s].drain && af_commit[sb[s].af]) sb[s].drain <= 1'b1;
        if (sb[s].v && !sb[s].drain && af_clear[sb[s].af] && !af_commit[sb[s].af]) sb[s].v <= 1'b0;
      end
    end
  end

endmodule
