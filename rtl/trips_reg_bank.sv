// trips_reg_bank: one register-file bank of a TRIPS core, with its slice of
// the register stitch logic.
//
// The core has COLS banks; bank b holds architectural registers
// 32*b .. 32*b+31 of every hardware thread (a separate copy per thread for the
// T-morph). For each A-frame in flight the bank keeps that block's eight read
// slots (Read b.0..b.7 of the block header) and eight write slots
// (Write b.0..b.7), which act as the block's write queue.
//
// Register stitching: a read of register R by block X is satisfied by the
// youngest block that is older than X in the same thread and declares a write
// to R. If that block's value has already arrived it is forwarded at once; if
// not, the read waits and is sent as soon as it arrives. If no older block in
// flight writes R, the committed value is read. A write that arrives nullified
// is not forwarded; readers then wait until its block commits. Each cycle one
// resolved read leaves as an operand packet to the target its read slot names.
//
// Commit writes the block's arrived, non-null writes into the thread's
// registers. Revitalization (S-morph mapping reuse) commits the iteration's
// writes, re-arms the reads not marked constant and clears the write slots;
// reads marked constant are not resent because their operands stay in the
// reservation stations. wr_done tells block control that every declared write
// of an A-frame has arrived.
//
// Follows the TRIPS description: banked 128-register file above the array,
// header read/write instructions per bank, stitching of outputs of earlier
// blocks to inputs of later ones, per-thread register copies. This design's
// own: the age/tid interface from block control, one read sent per cycle,
// and waiting for commit past a nullified write.
module trips_reg_bank
  import trips_pkg::*;
#(
  parameter int BANK = 0,
  parameter int NTH  = MAX_THREADS
) (
  input  logic clk,
  input  logic rst_n,
  // header delivery when a block is mapped
  input  logic            hdr_load,
  input  logic [AF_W-1:0] hdr_af,
  input  rd_inst_t        hdr_rd [RD_PER_BANK],
  input  wr_inst_t        hdr_wr [WR_PER_BANK],
  // A-frame state from block control
  input  logic [NUM_AF-1:0] af_valid,
  input  logic [TID_W-1:0]  af_tid [NUM_AF],
  input  logic [AF_W-1:0]   af_age [NUM_AF],
  input  logic [GEN_W-1:0]  af_gen [NUM_AF],
  input  logic [NUM_AF-1:0] af_clear,
  input  logic [NUM_AF-1:0] af_commit,
  input  logic [NUM_AF-1:0] af_revit,
  output logic [NUM_AF-1:0] wr_done,
  // operand network
  input  logic rx_valid,
  input  pkt_t rx_pkt,
  output logic rx_ready,
  output logic tx_valid,
  output pkt_t tx_pkt,
  input  logic tx_ready,
  // observation port for committed registers
  input  logic [TID_W-1:0] dbg_tid,
  input  logic [4:0]       dbg_reg,
  output word_t            dbg_val
);

  localparam int NRD = RD_PER_BANK;
  localparam int NWR = WR_PER_BANK;

  word_t    arch [NTH][REGS_PER_BANK];
  rd_inst_t rd   [NUM_AF][NRD];
  logic [NRD-1:0] rpend [NUM_AF];
  wr_inst_t wr   [NUM_AF][NWR];
  logic [NWR-1:0] warr  [NUM_AF];
  logic [NWR-1:0] wnul  [NUM_AF];
  word_t    wval [NUM_AF][NWR];

  assign rx_ready = 1'b1;
  assign dbg_val  = arch[dbg_tid][dbg_reg];

  // ------------------------------------------------------------ stitch resolution
  logic  rrdy [NUM_AF][NRD];
  word_t rvalue [NUM_AF][NRD];

  always_comb begin
    for (int a = 0; a < NUM_AF; a++) begin
      for (int j = 0; j < NRD; j++) begin
        logic found;
        logic [AF_W-1:0] best_age;
        logic best_ok;
        word_t best_val;
        found = 1'b0; best_age = '0; best_ok = 1'b0; best_val = '0;
        for (int b = 0; b < NUM_AF; b++) begin
          for (int k = 0; k < NWR; k++) begin
            if (af_valid[b] && af_tid[b] == af_tid[a] && af_age[b] < af_age[a] &&
                wr[b][k].v && wr[b][k].gr == rd[a][j].gr &&
                (!found || af_age[b] >= best_age)) begin
              found    = 1'b1;
              best_age = af_age[b];
              best_ok  = warr[b][k] && !wnul[b][k];
              best_val = wval[b][k];
            end
          end
        end
        rrdy[a][j]   = af_valid[a] && rpend[a][j] && (!found || best_ok);
        rvalue[a][j] = found ? best_val : arch[af_tid[a]][rd[a][j].gr];
      end
    end
  end

  logic            pick_v;
  logic [AF_W-1:0] pick_a;
  logic [$clog2(NRD)-1:0] pick_j;
  always_comb begin
    pick_v = 1'b0; pick_a = '0; pick_j = '0;
    for (int a = NUM_AF-1; a >= 0; a--) begin
      for (int j = NRD-1; j >= 0; j--) begin
        if (rrdy[a][j]) begin
          pick_v = 1'b1; pick_a = AF_W'(a); pick_j = ($clog2(NRD))'(j);
        end
      end
    end
  end

  logic send;
  assign send = pick_v && (!tx_valid || tx_ready);

  always_comb begin
    for (int a = 0; a < NUM_AF; a++) begin
      wr_done[a] = 1'b1;
      for (int k = 0; k < NWR; k++) if (wr[a][k].v && !warr[a][k]) wr_done[a] = 1'b0;
    end
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid <= 1'b0;
      tx_pkt   <= '0;
      for (int t = 0; t < NTH; t++)
        for (int r = 0; r < REGS_PER_BANK; r++) arch[t][r] <= '0;
      for (int a = 0; a < NUM_AF; a++) begin
        rpend[a] <= '0; warr[a] <= '0; wnul[a] <= '0;
        for (int j = 0; j < NRD; j++) rd[a][j] <= '0;
        for (int k = 0; k < NWR; k++) begin wr[a][k] <= '0; wval[a][k] <= '0; end
      end
    end else begin
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      if (send) begin
        pkt_t p;
        p = target_pkt(rd[pick_a][pick_j].t, pick_a, af_gen[pick_a],
                       rvalue[pick_a][pick_j], 1'b0);
        p.keep = rd[pick_a][pick_j].c;
        tx_pkt   <= p;
        tx_valid <= 1'b1;
        rpend[pick_a][pick_j] <= 1'b0;
      end
      if (rx_valid && rx_pkt.kind == PK_REGWR && rx_pkt.gen == af_gen[rx_pkt.af]) begin
        warr[rx_pkt.af][rx_pkt.idx[2:0]] <= 1'b1;
        wnul[rx_pkt.af][rx_pkt.idx[2:0]] <= rx_pkt.nul;
        wval[rx_pkt.af][rx_pkt.idx[2:0]] <= rx_pkt.data;
      end
      for (int a = 0; a < NUM_AF; a++) begin
        if (af_commit[a]) begin
          for (int k = 0; k < NWR; k++)
            if (wr[a][k].v && warr[a][k] && !wnul[a][k])
              arch[af_tid[a]][wr[a][k].gr] <= wval[a][k];
        end
        if (af_revit[a]) begin
          for (int j = 0; j < NRD; j++) rpend[a][j] <= rd[a][j].v && !rd[a][j].c;
          warr[a] <= '0;
          wnul[a] <= '0;
        end
        if (af_clear[a]) begin
          rpend[a] <= '0; warr[a] <= '0; wnul[a] <= '0;
          for (int k = 0; k < NWR; k++) wr[a][k] <= '0;
          for (int j = 0; j < NRD; j++) rd[a][j] <= '0;
        end
      end
      if (hdr_load) begin
        for (int j = 0; j < NRD; j++) begin
          rd[hdr_af][j]    <= hdr_rd[j];
          rpend[hdr_af][j] <= hdr_rd[j].v;
        end
        for (int k = 0; k < NWR; k++) wr[hdr_af][k] <= hdr_wr[k];
        warr[hdr_af] <= '0;
        wnul[hdr_af] <= '0;
      end
    end
  end

endmodule
