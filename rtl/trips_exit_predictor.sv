// trips_exit_predictor: tournament predictor of a block's exit.
//
// A TRIPS block ends with exactly one taken branch, identified by its 3-bit
// exit number, so the predictor guesses an exit number per block instead of
// one direction per branch. Three components, as in the TRIPS exit predictor:
//   local  - a per-block exit history (last three exits, indexed by block
//            address) selects an entry of the local exit table;
//   global - a per-thread history of the last four exits of that thread,
//            hashed with the block address, selects an entry of the global
//            exit table;
//   choice - a table of 2-bit counters, indexed by the global history, picks
//            which of the two predictions to use.
// Each exit-table entry holds an exit number and a 2-bit confidence: a
// correct outcome raises the confidence, a wrong one lowers it and replaces
// the exit once the confidence is zero. The choice counter moves toward the
// component that was right when exactly one of them was.
//
// Interface: prediction is combinational from (p_addr, p_tid); training
// happens when a block commits (u_valid with its address, thread and actual
// exit), which also shifts the exit into the thread's global history. One
// global history register per thread supports the T-morph. Table sizes are
// this design's choice (about 40 Kbit in all); training at commit rather
// than speculatively is also this design's.
module trips_exit_predictor
  import trips_pkg::*;
#(
  parameter int LH_ENTRIES = 512,  // local history table entries
  parameter int LH_BITS    = 9,    // local history: three 3-bit exits
  parameter int GH_BITS    = 12,   // global history: four 3-bit exits
  parameter int NTH        = MAX_THREADS
) (
  input  logic clk,
  input  logic rst_n,
  input  addr_t            p_addr,
  input  logic [TID_W-1:0] p_tid,
  output logic [2:0]       p_exit,
  input  logic             u_valid,
  input  addr_t            u_addr,
  input  logic [TID_W-1:0] u_tid,
  input  logic [2:0]       u_exit
);

  localparam int LHW = $clog2(LH_ENTRIES);
  localparam int LPT = 1 << LH_BITS;
  localparam int GPT = 1 << GH_BITS;

  typedef struct packed { logic [2:0] ex; logic [1:0] conf; } ent_t;

  logic [LH_BITS-1:0] lht [LH_ENTRIES];
  ent_t               lpt [LPT];
  ent_t               gpt [GPT];
  logic [1:0]         cpt [GPT];
  logic [GH_BITS-1:0] ghr [NTH];

  function automatic logic [LHW-1:0] lidx(addr_t a);
    return LHW'(a >> 7);
  endfunction
  function automatic logic [GH_BITS-1:0] gidx(addr_t a, logic [GH_BITS-1:0] h);
    return GH_BITS'(a >> 7) ^ h;
  endfunction

  // prediction
  ent_t pl, pg;
  always_comb begin
    pl = lpt[lht[lidx(p_addr)]];
    pg = gpt[gidx(p_addr, ghr[p_tid])];
    p_exit = cpt[ghr[p_tid]][1] ? pg.ex : pl.ex;
  end

  // training
  logic [LH_BITS-1:0] u_lh;
  logic [GH_BITS-1:0] u_gi;
  ent_t ul, ug;
  always_comb begin
    u_lh = lht[lidx(u_addr)];
    u_gi = gidx(u_addr, ghr[u_tid]);
    ul   = lpt[u_lh];
    ug   = gpt[u_gi];
  end

  function automatic ent_t train(ent_t e, logic [2:0] ex);
    ent_t n;
    n = e;
    if (e.ex == ex) begin
      if (e.conf != 2'd3) n.conf = e.conf + 2'd1;
    end else if (e.conf == 2'd0) begin
      n.ex = ex;
    end else begin
      n.conf = e.conf - 2'd1;
    end
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LH_ENTRIES; i++) lht[i] <= '0;
      for (int i = 0; i < LPT; i++) lpt[i] <= '0;
      for (int i = 0; i < GPT; i++) begin gpt[i] <= '0; cpt[i] <= 2'd1; end
      for (int t = 0; t < NTH; t++) ghr[t] <= '0;
    end else if (u_valid) begin
      logic lok, gok;
      lok = (ul.ex == u_exit);
      gok = (ug.ex == u_exit);
      lpt[u_lh] <= train(ul, u_exit);
      gpt[u_gi] <= train(ug, u_exit);
      if (gok && !lok && cpt[ghr[u_tid]] != 2'd3) cpt[ghr[u_tid]] <= cpt[ghr[u_tid]] + 2'd1;
      if (lok && !gok && cpt[ghr[u_tid]] != 2'd0) cpt[ghr[u_tid]] <= cpt[ghr[u_tid]] - 2'd1;
      lht[lidx(u_addr)] <= {u_lh[LH_BITS-4:0], u_exit};
      ghr[u_tid] <= {ghr[u_tid][GH_BITS-4:0], u_exit};
    end
  end

endmodule
