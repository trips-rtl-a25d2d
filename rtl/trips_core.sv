// trips_core: one polymorphous TRIPS grid-processor core.
//
// A ROWS x COLS array of execution nodes (4x4, 16-wide issue) with 64
// reservation stations each executes blocks of up to 128 instructions in
// dataflow order. Above the array sit COLS register-file banks (32
// registers each, 128 in all, one copy per hardware thread) and the block
// control tile; to its right sit ROWS data-cache banks, one per row; ROWS+1
// instruction-cache banks (one for block headers, one per row) feed the
// array. All tiles talk over the operand network, a (ROWS+1)x(COLS+1) mesh:
//
//      mesh col:   0        1        2        3        4
//      row 0:    RegB0    RegB1    RegB2    RegB3    BlockCtl
//      row 1:    N(0,0)   N(0,1)   N(0,2)   N(0,3)   DBank0
//      ...
//      row 4:    N(3,0)   N(3,1)   N(3,2)   N(3,3)   DBank3
//
// Operation of a block: block control picks a block address, checks the
// instruction-cache tags, loads the header into the register banks and
// streams the four row chunks into the stations of a free A-frame. Register
// reads named in the header are sent (directly or stitched from an older
// block still in flight) as operands into the array; instructions fire when
// their operands arrive and send results straight to their consumers; loads
// and stores go to the data bank that owns the address; register outputs go
// to the write slots of the register banks; the branch reports the exit to
// block control. The block completes when all declared outputs have arrived
// and commits when it is the oldest of its thread.
//
// Modes: cfg_lg_threads = 0 is the D-morph (one thread, up to eight blocks in
// flight speculatively); 1..3 is the T-morph with 2, 4 or 8 threads sharing
// the array by frames; a header repeat count gives S-morph mapping reuse
// (revitalization). cfg_lg_threads may only change while no thread runs.
//
// External ports stand in for the memory system behind the L1 caches: the
// instruction refill port writes I-cache banks and tags (imiss reports a tag
// miss), the data port preloads and reads the data banks, and the debug port
// reads committed registers.
module trips_core
  import trips_pkg::*;
#(
  parameter int IC_SETS  = 128,    // I-cache sets (one block each)
  parameter int DC_WORDS = 2048    // 64-bit words per data bank (64 KB total)
) (
  input  logic clk,
  input  logic rst_n,
  // configuration and threads
  input  logic [1:0]             cfg_lg_threads,
  input  logic                   thr_start,
  input  logic [TID_W-1:0]       thr_start_tid,
  input  addr_t                  thr_start_pc,
  output logic [MAX_THREADS-1:0] thr_running,
  output logic [MAX_THREADS-1:0] halted,
  // instruction refill
  input  logic                       ic_we,
  input  logic [2:0]                 ic_bank,
  input  logic [$clog2(IC_SETS)-1:0] ic_set,
  input  logic [4:0]                 ic_word,
  input  logic [31:0]                ic_wdata,
  input  logic                       tag_we,
  input  logic [$clog2(IC_SETS)-1:0] tag_set,
  input  addr_t                      tag_addr,
  output logic                       imiss,
  output addr_t                      imiss_addr,
  // data memory preload / inspection
  input  logic                        dm_we,
  input  logic [1:0]                  dm_bank,
  input  logic [$clog2(DC_WORDS)-1:0] dm_addr,
  input  word_t                       dm_wdata,
  output word_t                       dm_rdata,
  // register inspection
  input  logic [TID_W-1:0] dbg_tid,
  input  logic [6:0]       dbg_reg,
  output word_t            dbg_val,
  // status
  output logic        exc,
  output logic [31:0] n_fire,
  output logic [31:0] n_fetch,
  output logic [31:0] n_commit,
  output logic [31:0] n_mispred,
  output logic [31:0] n_revit,
  output logic [31:0] n_imiss
);

  localparam int MR = MESH_R;
  localparam int MC = MESH_C;
  localparam int NT = MR * MC;
  localparam int SW = $clog2(IC_SETS);

  // ------------------------------------------------------------ operand network
  logic [NT-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  pkt_t          inj_pkt [NT];
  pkt_t          ej_pkt  [NT];

  trips_opn #(.MR(MR), .MC(MC)) u_opn (
    .clk, .rst_n,
    .inj_valid, .inj_pkt, .inj_ready,
    .ej_valid, .ej_pkt, .ej_ready
  );

  // ------------------------------------------------------------ block control
  logic                fetch_start, fetch_abort, fetch_busy;
  logic [SW-1:0]       fetch_set;
  logic [AF_W-1:0]     fetch_af;
  logic [159:0]        hdr_h;
  logic [NUM_AF-1:0]   af_valid, af_oldest, af_clear, af_commit, af_revit, wr_done;
  logic [TID_W-1:0]    af_tid  [NUM_AF];
  logic [AF_W-1:0]     af_age  [NUM_AF];
  logic [GEN_W-1:0]    af_gen  [NUM_AF];
  logic [NUM_LSID-1:0] st_pend [NUM_AF];
  logic [ROWS-1:0]     st_rep_valid;
  logic [AF_W-1:0]     st_rep_af   [ROWS];
  logic [4:0]          st_rep_lsid [ROWS];
  logic [NUM_AF-1:0]   bank_wr_done [COLS];

  always_comb begin
    wr_done = '1;
    for (int b = 0; b < COLS; b++) wr_done &= bank_wr_done[b];
  end

  trips_block_ctrl #(.NTH(MAX_THREADS), .IC_SETS(IC_SETS)) u_bc (
    .clk, .rst_n,
    .cfg_lg_threads, .thr_start, .thr_start_tid, .thr_start_pc, .thr_running, .halted,
    .fetch_start, .fetch_abort, .fetch_set, .fetch_af, .hdr_h, .fetch_busy,
    .tag_we, .tag_set, .tag_addr, .imiss, .imiss_addr,
    .af_valid, .af_tid, .af_age, .af_gen, .af_oldest, .af_clear, .af_commit, .af_revit,
    .st_pend, .wr_done, .st_rep_valid, .st_rep_af, .st_rep_lsid,
    .rx_valid(ej_valid[COLS]), .rx_pkt(ej_pkt[COLS]), .rx_ready(ej_ready[COLS]),
    .n_fetch, .n_commit, .n_mispred, .n_revit, .n_imiss
  );
  // block control only receives
  assign inj_valid[COLS] = 1'b0;
  assign inj_pkt[COLS]   = '0;

  // ------------------------------------------------------------ instruction cache banks
  logic [31:0]     hchunk [32];
  logic [31:0]     unused_chunk [ROWS][32];
  logic [COLS-1:0] row_ld_valid [ROWS];
  logic [FR_W-1:0] row_ld_frame [ROWS];
  logic [31:0]     row_ld_inst  [ROWS][COLS];
  logic [ROWS:0]   ic_busy;
  logic [COLS-1:0] hdr_unused_v;
  logic [FR_W-1:0] hdr_unused_f;
  logic [31:0]     hdr_unused_i [COLS];

  trips_icache_bank #(.SETS(IC_SETS)) u_ic_hdr (
    .clk, .rst_n, .start(1'b0), .abort(1'b0), .set(fetch_set), .af(fetch_af),
    .chunk(hchunk), .ld_valid(hdr_unused_v), .ld_frame(hdr_unused_f), .ld_inst(hdr_unused_i),
    .busy(ic_busy[0]),
    .we(ic_we && ic_bank == 3'd0), .wset(ic_set), .wword(ic_word), .wdata(ic_wdata)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_icb
    trips_icache_bank #(.SETS(IC_SETS)) u_ic (
      .clk, .rst_n, .start(fetch_start), .abort(fetch_abort), .set(fetch_set), .af(fetch_af),
      .chunk(unused_chunk[r]), .ld_valid(row_ld_valid[r]), .ld_frame(row_ld_frame[r]),
      .ld_inst(row_ld_inst[r]), .busy(ic_busy[r+1]),
      .we(ic_we && ic_bank == 3'(r + 1)), .wset(ic_set), .wword(ic_word), .wdata(ic_wdata)
    );
  end

  assign fetch_busy = |ic_busy;

  always_comb begin
    for (int i = 0; i < 32; i++) hdr_h[i*5 +: 5] = hchunk[i][31:27];
  end

  // ------------------------------------------------------------ register banks
  word_t bank_dbg [COLS];
  for (genvar b = 0; b < COLS; b++) begin : g_rb
    rd_inst_t hrd [RD_PER_BANK];
    wr_inst_t hwr [WR_PER_BANK];
    always_comb begin
      for (int j = 0; j < RD_PER_BANK; j++) begin
        hrd[j] = hdr_read(hchunk[j*COLS + b]);
        hwr[j] = hdr_write(hchunk[j*COLS + b]);
      end
    end
    trips_reg_bank #(.BANK(b), .NTH(MAX_THREADS)) u_rb (
      .clk, .rst_n,
      .hdr_load(fetch_start), .hdr_af(fetch_af), .hdr_rd(hrd), .hdr_wr(hwr),
      .af_valid, .af_tid, .af_age, .af_gen, .af_clear, .af_commit, .af_revit,
      .wr_done(bank_wr_done[b]),
      .rx_valid(ej_valid[b]), .rx_pkt(ej_pkt[b]), .rx_ready(ej_ready[b]),
      .tx_valid(inj_valid[b]), .tx_pkt(inj_pkt[b]), .tx_ready(inj_ready[b]),
      .dbg_tid, .dbg_reg(dbg_reg[4:0]), .dbg_val(bank_dbg[b])
    );
  end
  assign dbg_val = bank_dbg[dbg_reg[6:5]];

  // ------------------------------------------------------------ execution nodes
  logic [ROWS*COLS-1:0] node_fire, node_exc;
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int T = (r + 1) * MC + c;
      trips_exec_node #(.ROW(r), .COL(c), .NFR(FRAMES)) u_node (
        .clk, .rst_n,
        .ld_valid(row_ld_valid[r][c]), .ld_frame(row_ld_frame[r]), .ld_inst(row_ld_inst[r][c]),
        .af_clear, .af_revit, .af_gen,
        .rx_valid(ej_valid[T]), .rx_pkt(ej_pkt[T]), .rx_ready(ej_ready[T]),
        .tx_valid(inj_valid[T]), .tx_pkt(inj_pkt[T]), .tx_ready(inj_ready[T]),
        .fire(node_fire[r*COLS + c]), .exc(node_exc[r*COLS + c])
      );
    end
  end

  assign exc = |node_exc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_fire <= '0;
    else        n_fire <= n_fire + 32'($countones(node_fire));
  end

  // ------------------------------------------------------------ data cache banks
  logic [ROWS-1:0] drain_busy;
  word_t           dm_rd [ROWS];
  for (genvar r = 0; r < ROWS; r++) begin : g_db
    localparam int T = (r + 1) * MC + COLS;
    trips_dcache_bank #(.WORDS(DC_WORDS)) u_db (
      .clk, .rst_n,
      .rx_valid(ej_valid[T]), .rx_pkt(ej_pkt[T]), .rx_ready(ej_ready[T]),
      .tx_valid(inj_valid[T]), .tx_pkt(inj_pkt[T]), .tx_ready(inj_ready[T]),
      .af_oldest, .af_gen, .st_pend, .af_commit, .af_clear,
      .st_rep_valid(st_rep_valid[r]), .st_rep_af(st_rep_af[r]), .st_rep_lsid(st_rep_lsid[r]),
      .drain_busy(drain_busy[r]),
      .ext_we(dm_we && dm_bank == 2'(r)), .ext_addr(dm_addr), .ext_wdata(dm_wdata),
      .ext_rdata(dm_rd[r])
    );
  end
  assign dm_rdata = dm_rd[dm_bank];

endmodule
