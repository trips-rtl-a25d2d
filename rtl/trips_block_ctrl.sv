// trips_block_ctrl: the block control tile of a TRIPS core.
//
// It sequences blocks through the frame space: it picks the next block to
// fetch, maps it into a free A-frame, tracks when each block is complete,
// commits the oldest block of each thread, squashes blocks after a
// mispredicted exit and, for S-morph loops, revitalizes a block in place.
//
// Frame space. The NUM_AF A-frames are split evenly among 1, 2, 4 or 8
// hardware threads (cfg_lg_threads = 0..3): thread t owns A-frames
// t*P .. t*P+P-1 with P = NUM_AF >> cfg_lg_threads and uses them as a
// circular buffer whose head is its oldest, non-speculative block. With one
// thread this is the D-morph (up to 8 blocks in flight, 7 of them
// speculative); with more it is the T-morph, each thread having its own
// program counter, global exit history, return stack and register copy.
//
// Fetch. A thread with a free A-frame, whose next block address hits in the
// instruction-cache tags, is chosen round-robin. The header chunk is loaded
// into the register banks and the row chunks are streamed into the array over
// AF_FRAMES cycles. At the same time the exit and target predictors give the
// address of the block after it, which becomes the thread's next fetch
// address. A tag miss raises imiss with the block address until the tags are
// refilled through the tag port.
//
// Completion and commit. A block is complete when its branch has reported
// its exit, every register write declared in its header has arrived and
// every store in its header's store mask is done (or nullified). The oldest
// complete block commits: register banks write its outputs, data banks
// drain its stores, the predictors are trained, and its A-frame is cleared
// and freed (its generation tag advances so stale packets are dropped).
//
// Misprediction. When a branch reports a next-block address different from
// the one predicted for it, every younger block of that thread is squashed
// and fetch restarts at the reported address.
//
// Revitalization. A header may give a repeat count N. Such a block is fetched
// once; no later block of the thread is fetched until it has run N times.
// After each iteration except the last the block's outputs commit and the
// A-frame is revitalized instead of freed.
//
// System call. An SCALL exit stops the thread when its block commits (the
// thread's younger blocks are squashed); `halted` reports it.
//
// Follows the TRIPS description: A-frames as a circular buffer with the
// oldest non-speculative, squash of blocks past a misprediction, frame space
// partitioned among threads, per-thread PCs and histories, repeat-N mapping
// reuse with a revitalization signal, I-cache tags in this tile. This
// design's own: generation tags, the header H-bit meaning (store mask in bits
// 31:0, repeat count in bits 47:32), offsets of BRO/CALLO counted in 128-byte
// chunks, stopping a thread on SCALL, one commit per cycle, and predictor
// training at commit.
module trips_block_ctrl
  import trips_pkg::*;
#(
  parameter int NTH     = MAX_THREADS,
  parameter int IC_SETS = 128
) (
  input  logic clk,
  input  logic rst_n,
  // configuration and thread start
  input  logic [1:0]       cfg_lg_threads,
  input  logic             thr_start,
  input  logic [TID_W-1:0] thr_start_tid,
  input  addr_t            thr_start_pc,
  output logic [NTH-1:0]   thr_running,
  output logic [NTH-1:0]   halted,
  // instruction cache
  output logic                       fetch_start,
  output logic                       fetch_abort,
  output logic [$clog2(IC_SETS)-1:0] fetch_set,
  output logic [AF_W-1:0]            fetch_af,
  input  logic [159:0]               hdr_h,
  input  logic                       fetch_busy,
  input  logic                       tag_we,
  input  logic [$clog2(IC_SETS)-1:0] tag_set,
  input  addr_t                      tag_addr,
  output logic                       imiss,
  output addr_t                      imiss_addr,
  // A-frame state broadcast
  output logic [NUM_AF-1:0]   af_valid,
  output logic [TID_W-1:0]    af_tid    [NUM_AF],
  output logic [AF_W-1:0]     af_age    [NUM_AF],
  output logic [GEN_W-1:0]    af_gen    [NUM_AF],
  output logic [NUM_AF-1:0]   af_oldest,
  output logic [NUM_AF-1:0]   af_clear,
  output logic [NUM_AF-1:0]   af_commit,
  output logic [NUM_AF-1:0]   af_revit,
  output logic [NUM_LSID-1:0] st_pend   [NUM_AF],
  // completion inputs
  input  logic [NUM_AF-1:0]   wr_done,
  input  logic [ROWS-1:0]     st_rep_valid,
  input  logic [AF_W-1:0]     st_rep_af   [ROWS],
  input  logic [4:0]          st_rep_lsid [ROWS],
  // operand network (branch and nullified-store reports)
  input  logic rx_valid,
  input  pkt_t rx_pkt,
  output logic rx_ready,
  // event counters
  output logic [31:0] n_fetch,
  output logic [31:0] n_commit,
  output logic [31:0] n_mispred,
  output logic [31:0] n_revit,
  output logic [31:0] n_imiss
);

  localparam int SW = $clog2(IC_SETS);
  localparam int FETCH_CYCLES = AF_FRAMES;

  // ------------------------------------------------------------ state
  logic [NUM_AF-1:0]   v, brd;
  logic                c_v;     // a block commits this cycle
  logic [AF_W-1:0]     c_af;    // ... and its A-frame
  logic [GEN_W-1:0]    gen   [NUM_AF];
  addr_t               baddr [NUM_AF];
  addr_t               pnext [NUM_AF];
  addr_t               anext [NUM_AF];
  logic [2:0]          aexit [NUM_AF];
  btype_e              atype [NUM_AF];
  logic [NUM_LSID-1:0] smask [NUM_AF];
  logic [NUM_LSID-1:0] sdone [NUM_AF];
  logic [15:0]         rep   [NUM_AF];

  logic [NTH-1:0]  run, blocked;
  addr_t           pc    [NTH];
  logic [AF_W-1:0] head  [NTH];   // local index of oldest block
  logic [AF_W:0]   cnt   [NTH];   // blocks in flight

  addr_t           tags    [IC_SETS];
  logic [IC_SETS-1:0] tagv;

  logic [3:0]      fcnt;         // fetch engine busy cycles left
  logic [TID_W-1:0] rr;
  logic [AF_W-1:0] fetch_af_q;   // A-frame being streamed
  logic [NUM_AF-1:0] isrep;      // block was fetched with a repeat count
  logic [NTH-1:0]  hlt;

  assign rx_ready = 1'b1;
  assign halted   = hlt;
  assign thr_running = run;

  // ------------------------------------------------------------ partition helpers
  logic [AF_W:0]   P;
  always_comb P = (AF_W+1)'(NUM_AF) >> cfg_lg_threads;

  function automatic logic [TID_W-1:0] owner(int a, logic [1:0] lg);
    return TID_W'(a >> (AF_W - int'(lg)));
  endfunction

  always_comb begin
    for (int a = 0; a < NUM_AF; a++) begin
      logic [TID_W-1:0] t;
      logic [AF_W-1:0]  li;
      t  = owner(a, cfg_lg_threads);
      li = AF_W'(a) & AF_W'(P - 1);
      af_tid[a]    = t;
      af_age[a]    = (li - head[t]) & AF_W'(P - 1);
      af_gen[a]    = gen[a];
      af_valid[a]  = v[a];
      af_oldest[a] = v[a] && (af_age[a] == '0);
      st_pend[a]   = v[a] ? (smask[a] & ~sdone[a]) : '0;
    end
  end

  // ------------------------------------------------------------ predictors
  logic [TID_W-1:0] f_tid;
  addr_t            f_pc;
  logic [2:0]       p_exit;
  addr_t            p_next;
  btype_e           p_type;
  logic             u_valid;
  addr_t            u_addr;
  logic [TID_W-1:0] u_tid;
  logic [2:0]       u_exit;
  btype_e           u_type;
  addr_t            u_target;

  trips_exit_predictor #(.NTH(NTH)) u_exitp (
    .clk, .rst_n,
    .p_addr(f_pc), .p_tid(f_tid), .p_exit(p_exit),
    .u_valid, .u_addr, .u_tid, .u_exit
  );

  trips_target_predictor #(.NTH(NTH)) u_tgtp (
    .clk, .rst_n,
    .p_valid(fetch_start), .p_addr(f_pc), .p_tid(f_tid), .p_exit(p_exit),
    .p_next(p_next), .p_type(p_type),
    .u_valid, .u_addr, .u_exit, .u_type, .u_target
  );

  // ------------------------------------------------------------ fetch selection
  logic br_in;
  logic f_ok, f_hit;
  logic [AF_W-1:0] f_af;
  always_comb begin
    br_in = rx_valid && (rx_pkt.kind == PK_BRANCH);
    f_tid = rr;
    f_pc  = pc[rr];
    f_ok  = 1'b0;
    for (int k = NTH-1; k >= 0; k--) begin
      logic [TID_W-1:0] t;
      t = TID_W'((int'(rr) + k) % NTH);
      if (int'(t) < (1 << cfg_lg_threads) && run[t] && !blocked[t] && cnt[t] < P) begin
        f_tid = t;
        f_pc  = pc[t];
        f_ok  = 1'b1;
      end
    end
    fetch_set = SW'(f_pc >> 7);
    f_hit = tagv[fetch_set] && tags[fetch_set] == (f_pc >> 7);
    f_af  = AF_W'(int'(f_tid) * int'(P)) + ((head[f_tid] + AF_W'(cnt[f_tid])) & AF_W'(P - 1));
    fetch_start = f_ok && f_hit && fcnt == '0 && !fetch_busy && !br_in &&
                  !(c_v && atype[c_af] == BT_SCALL);
    fetch_af    = f_af;
    imiss       = f_ok && !f_hit && fcnt == '0;
    imiss_addr  = f_pc;
  end

  // ------------------------------------------------------------ completion / commit choice
  logic [NUM_AF-1:0] complete;
  always_comb begin
    for (int a = 0; a < NUM_AF; a++)
      complete[a] = v[a] && brd[a] && wr_done[a] && (smask[a] & ~sdone[a]) == '0;
    c_v = 1'b0; c_af = '0;
    for (int a = NUM_AF-1; a >= 0; a--)
      if (complete[a] && af_oldest[a]) begin c_v = 1'b1; c_af = AF_W'(a); end
    u_valid  = c_v && rep[c_af] <= 16'd1;
    af_commit = '0;
    af_revit  = '0;
    if (c_v) begin
      af_commit[c_af] = 1'b1;
      af_revit[c_af]  = rep[c_af] > 16'd1;
    end
    u_addr   = baddr[c_af];
    u_tid    = af_tid[c_af];
    u_exit   = aexit[c_af];
    u_type   = atype[c_af];
    u_target = anext[c_af];
  end

  // ------------------------------------------------------------ branch resolution
  logic             b_hit;
  logic [AF_W-1:0]  b_af;
  addr_t            b_next;
  always_comb begin
    b_af   = rx_pkt.af;
    b_hit  = br_in && v[b_af] && rx_pkt.gen == gen[b_af];
    b_next = rx_pkt.aux[5] ? baddr[b_af] + (rx_pkt.addr << 7) : rx_pkt.addr;
  end

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; brd <= '0;
      for (int a = 0; a < NUM_AF; a++) begin
        gen[a] <= '0; baddr[a] <= '0; pnext[a] <= '0; anext[a] <= '0;
        aexit[a] <= '0; atype[a] <= BT_BRANCH; smask[a] <= '0; sdone[a] <= '0; rep[a] <= '0;
      end
      run <= '0; blocked <= '0;
      for (int t = 0; t < NTH; t++) begin pc[t] <= '0; head[t] <= '0; cnt[t] <= '0; end
      for (int s = 0; s < IC_SETS; s++) tags[s] <= '0;
      tagv <= '0;
      fcnt <= '0; rr <= '0; fetch_af_q <= '0; isrep <= '0; hlt <= '0;
      af_clear <= '0; fetch_abort <= 1'b0;
      n_fetch <= '0; n_commit <= '0; n_mispred <= '0; n_revit <= '0; n_imiss <= '0;
    end else begin
      logic [NUM_AF-1:0] clr;
      logic [AF_W:0]     ncnt [NTH];
      logic [AF_W-1:0]   nhead [NTH];
      logic              abort;
      clr = '0; abort = 1'b0;
      for (int t = 0; t < NTH; t++) begin ncnt[t] = cnt[t]; nhead[t] = head[t]; end

      if (fcnt != '0) fcnt <= fcnt - 4'd1;
      if (imiss && !tagv[fetch_set]) n_imiss <= n_imiss + 32'd1;

      // thread start
      if (thr_start) begin
        run[thr_start_tid] <= 1'b1;
        hlt[thr_start_tid] <= 1'b0;
        blocked[thr_start_tid] <= 1'b0;
        nhead[thr_start_tid] = '0;
        pc[thr_start_tid]  <= thr_start_pc;
      end

      // tag refill
      if (tag_we) begin
        tags[tag_set] <= tag_addr >> 7;
        tagv[tag_set] <= 1'b1;
      end

      // stores reported done and nullified stores
      for (int r = 0; r < ROWS; r++)
        if (st_rep_valid[r]) sdone[st_rep_af[r]][st_rep_lsid[r]] <= 1'b1;
      if (rx_valid && rx_pkt.kind == PK_NULLST && v[rx_pkt.af] && rx_pkt.gen == gen[rx_pkt.af])
        sdone[rx_pkt.af][rx_pkt.idx] <= 1'b1;

      // commit the oldest complete block
      if (c_v) begin
        logic [TID_W-1:0] t;
        t = af_tid[c_af];
        n_commit <= n_commit + 32'd1;
        if (rep[c_af] > 16'd1) begin
          rep[c_af] <= rep[c_af] - 16'd1;
          brd[c_af] <= 1'b0;
          sdone[c_af] <= '0;
          gen[c_af] <= gen[c_af] + 1'b1;
          n_revit <= n_revit + 32'd1;
        end else begin
          clr[c_af] = 1'b1;
          nhead[t] = (head[t] + 1'b1) & AF_W'(P - 1);
          ncnt[t]  = ncnt[t] - 1'b1;
          if (isrep[c_af]) begin
            blocked[t] <= 1'b0;
            pc[t] <= anext[c_af];
          end
          if (atype[c_af] == BT_SCALL) begin
            run[t] <= 1'b0;
            hlt[t] <= 1'b1;
            for (int a = 0; a < NUM_AF; a++)
              if (v[a] && af_tid[a] == t && AF_W'(a) != c_af) begin
                clr[a] = 1'b1;
                if (fcnt != '0 && AF_W'(a) == fetch_af_q) abort = 1'b1;
              end
            ncnt[t]  = '0;
          end
        end
      end

      // branch report
      if (b_hit) begin
        logic [TID_W-1:0] t;
        t = af_tid[b_af];
        brd[b_af]   <= 1'b1;
        aexit[b_af] <= rx_pkt.aux[2:0];
        atype[b_af] <= btype_e'(rx_pkt.aux[4:3]);
        anext[b_af] <= b_next;
        if (b_next != pnext[b_af]) begin
          int squashed;
          squashed = 0;
          for (int a = 0; a < NUM_AF; a++)
            if (v[a] && af_tid[a] == t && af_age[a] > af_age[b_af]) begin
              clr[a] = 1'b1;
              squashed++;
              if (fcnt != '0 && AF_W'(a) == fetch_af_q) abort = 1'b1;
            end
          ncnt[t] = ncnt[t] - (AF_W+1)'(squashed);
          pnext[b_af] <= b_next;
          // any repeat block younger than the branch is squashed with it
          if (!isrep[b_af]) begin
            pc[t] <= b_next;
            blocked[t] <= 1'b0;
          end
          n_mispred <= n_mispred + 32'd1;
        end
      end

      // fetch a new block
      if (fetch_start) begin
        v[f_af]     <= 1'b1;
        brd[f_af]   <= 1'b0;
        baddr[f_af] <= f_pc;
        pnext[f_af] <= p_next;
        smask[f_af] <= hdr_h[31:0];
        sdone[f_af] <= '0;
        rep[f_af]   <= hdr_h[47:32];
        ncnt[f_tid] = ncnt[f_tid] + 1'b1;
        fcnt        <= 4'(FETCH_CYCLES);
        fetch_af_q  <= f_af;
        n_fetch     <= n_fetch + 32'd1;
        isrep[f_af] <= (hdr_h[47:32] > 16'd1);
        if (hdr_h[47:32] > 16'd1) blocked[f_tid] <= 1'b1;
        else pc[f_tid] <= p_next;
        rr <= (int'(f_tid) + 1 >= (1 << cfg_lg_threads)) ? '0 : f_tid + 1'b1;
      end

      for (int a = 0; a < NUM_AF; a++) begin
        if (clr[a]) begin
          v[a]   <= 1'b0;
          gen[a] <= gen[a] + 1'b1;
        end
      end
      for (int t = 0; t < NTH; t++) begin
        cnt[t]  <= ncnt[t];
        head[t] <= nhead[t];
      end
      af_clear  <= clr;
      fetch_abort <= abort;
    end
  end

endmodule
