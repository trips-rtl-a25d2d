// trips_exec_node: one execution node of the TRIPS ALU array.
//
// The node holds FRAMES reservation stations. Station f stores one
// instruction, a left and a right operand and a one-bit predicate, each with a
// valid bit. Station f belongs to frame f; frames f/8 form A-frame f/8, which
// is how a block's instruction (row, col, frame) is placed on the array after
// the A-frame number has been prepended to the 3-bit frame field.
//
// Dataflow firing: a station is ready when its instruction is loaded, it has
// not fired since the block was mapped (or revitalized), every operand the
// opcode needs has arrived and, for a predicated instruction, a predicate of
// the matching polarity has arrived. Each cycle the lowest-numbered ready
// station issues to the integer ALU (one instruction per cycle, one-cycle
// latency). Results are turned into operand-network packets, one per target
// (T1, T2), and sent from a two-entry output queue; loads and stores become
// requests to the data-cache bank that owns the address, branches become an
// exit report to the block control tile, and NULL sends nullified tokens.
// Issue waits while the output queue cannot take the new packets.
//
// Incoming operand packets are written into the station they name, provided
// the packet's generation tag matches the current generation of its A-frame;
// stale packets from a squashed or retired block are dropped. Operands that
// carry the keep flag (loop constants read from the register file) survive a
// revitalization; everything else is cleared so the block can run again.
//
// Taken from the TRIPS description: reservation-station contents, frames and
// A-frames, firing on operand arrival, predicate matching, targets naming
// consumer stations, and revitalization keeping constants. This design's own:
// lowest-index select, queue depth, generation tags, single-cycle ALU, and
// zero as the value a NULL sends to an operand slot. ROW and COL only name
// the node's position (targets carry absolute coordinates, so the logic does
// not need them); linters report them as unused.
module trips_exec_node
  import trips_pkg::*;
#(
  parameter int ROW = 0,        // array row (mesh row ROW+1)
  parameter int COL = 0,        // array column
  parameter int NFR = FRAMES    // reservation stations
) (
  input  logic clk,
  input  logic rst_n,
  // instruction load from the row's I-cache bank
  input  logic                   ld_valid,
  input  logic [$clog2(NFR)-1:0] ld_frame,
  input  logic [31:0]            ld_inst,
  // frame-space control from block control
  input  logic [NUM_AF-1:0]      af_clear,
  input  logic [NUM_AF-1:0]      af_revit,
  input  logic [GEN_W-1:0]       af_gen [NUM_AF],
  // operand network local port
  input  logic rx_valid,
  input  pkt_t rx_pkt,
  output logic rx_ready,
  output logic tx_valid,
  output pkt_t tx_pkt,
  input  logic tx_ready,
  // status
  output logic fire,            // an instruction issued this cycle
  output logic exc              // sticky: an unimplemented opcode fired
);

  localparam int FW = $clog2(NFR);
  localparam int AFF = NFR / NUM_AF;   // frames per A-frame

  logic [31:0] inst  [NFR];
  logic [NFR-1:0] iv, fired, lv, rv, pv, lk, rk, pk, pval, nl, nr;
  logic [1:0]  prd   [NFR];
  word_t       lval  [NFR];
  word_t       rval  [NFR];

  // ------------------------------------------------------------ select
  logic [NFR-1:0] ready;
  logic           sel_v;
  logic [FW-1:0]  sel;

  always_comb begin
    for (int f = 0; f < NFR; f++) begin
      logic pok;
      unique case (prd[f])
        PR_T:    pok = pv[f] &&  pval[f];
        PR_F:    pok = pv[f] && !pval[f];
        default: pok = 1'b1;
      endcase
      ready[f] = iv[f] && !fired[f] && (!nl[f] || lv[f]) && (!nr[f] || rv[f]) && pok;
    end
    sel_v = 1'b0;
    sel   = '0;
    for (int f = NFR-1; f >= 0; f--) begin
      if (ready[f]) begin
        sel_v = 1'b1;
        sel   = FW'(f);
      end
    end
  end

  // ------------------------------------------------------------ execute
  dec_t  d;
  word_t a, b, res;
  logic  unimpl;
  logic [AF_W-1:0]  s_af;
  logic [GEN_W-1:0] s_gen;

  always_comb begin
    d = decode(inst[sel]);
    a = lval[sel];
    b = rval[sel];
    s_af  = AF_W'(sel / FW'(AFF));
    s_gen = af_gen[s_af];
  end

  trips_alu u_alu (.op(d.op), .a(a), .b(b), .imm(d.imm), .res(res), .unimpl(unimpl));

  // packets produced by the selected instruction
  pkt_t       np [2];
  logic [1:0] nv;
  always_comb begin
    np[0] = '0;
    np[1] = '0;
    nv    = '0;
    if (d.is_load) begin
      np[0].kind = PK_LOAD;
      np[0].addr = addr_t'(a + d.imm);
      np[0].dr   = dbank_row(np[0].addr);
      np[0].dc   = 3'(COLS);
      np[0].aux  = {d.msize, 1'b0, d.t1};
      np[0].idx  = d.lsid;
      np[0].af   = s_af;
      np[0].gen  = s_gen;
      nv[0]      = 1'b1;
    end else if (d.is_store) begin
      np[0].kind = PK_STORE;
      np[0].addr = addr_t'(a + d.imm);
      np[0].data = b;
      np[0].dr   = dbank_row(np[0].addr);
      np[0].dc   = 3'(COLS);
      np[0].aux  = {d.msize, 10'd0};
      np[0].idx  = d.lsid;
      np[0].af   = s_af;
      np[0].gen  = s_gen;
      nv[0]      = 1'b1;
    end else if (d.is_branch) begin
      np[0].kind = PK_BRANCH;
      np[0].dr   = BC_ROW;
      np[0].dc   = BC_COL;
      np[0].af   = s_af;
      np[0].gen  = s_gen;
      // BRO / CALLO / SCALL carry a chunk offset relative to the block address
      np[0].addr = (d.op inside {OP_BR, OP_CALL, OP_RET}) ? addr_t'(a) : addr_t'(d.imm);
      np[0].aux  = {6'd0, (d.op inside {OP_BRO, OP_CALLO, OP_SCALL}),
                    (d.op inside {OP_CALL, OP_CALLO}) ? BT_CALL :
                    (d.op == OP_RET)   ? BT_RET :
                    (d.op == OP_SCALL) ? BT_SCALL : BT_BRANCH,
                    d.exit_no};
      nv[0]      = 1'b1;
    end else if (d.writes) begin
      np[0] = target_pkt(d.t1, s_af, s_gen, d.is_null ? '0 : res, d.is_null);
      np[1] = target_pkt(d.t2, s_af, s_gen, d.is_null ? '0 : res, d.is_null);
      nv[0] = (d.t1 != '0);
      nv[1] = (d.t2 != '0);
    end
  end

  // ------------------------------------------------------------ output queue
  pkt_t       q [2];
  logic [1:0] qc;
  logic       deq, issue;
  logic [1:0] nnew;

  assign tx_valid = (qc != 2'd0);
  assign tx_pkt   = q[0];
  assign deq      = tx_valid && tx_ready;
  assign nnew     = 2'(nv[0]) + 2'(nv[1]);
  // issue when the queue, after this cycle's dequeue, has room for the packets
  assign issue    = sel_v && ((qc - 2'(deq)) + nnew <= 2'd2) && (nnew <= 2'd2);
  assign fire     = issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qc   <= '0;
      q[0] <= '0;
      q[1] <= '0;
      exc  <= 1'b0;
    end else begin
      pkt_t nq [2];
      logic [1:0] c;
      nq[0] = q[0];
      nq[1] = q[1];
      c = qc;
      if (deq) begin
        nq[0] = nq[1];
        c = c - 2'd1;
      end
      if (issue) begin
        for (int k = 0; k < 2; k++) begin
          if (nv[k]) begin
            nq[c[0]] = np[k];
            c = c + 2'd1;
          end
        end
        if (unimpl) exc <= 1'b1;
      end
      q[0] <= nq[0];
      q[1] <= nq[1];
      qc   <= c;
    end
  end

  // ------------------------------------------------------------ station state
  assign rx_ready = 1'b1;

  logic [FW-1:0] rx_f;
  logic          rx_hit;
  assign rx_f   = FW'(rx_pkt.af) * FW'(AFF) + FW'(rx_pkt.idx[2:0]);
  assign rx_hit = rx_valid && rx_pkt.kind == PK_OPERAND && rx_pkt.gen == af_gen[rx_pkt.af];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv <= '0; fired <= '0; lv <= '0; rv <= '0; pv <= '0;
      lk <= '0; rk <= '0; pk <= '0; pval <= '0; nl <= '0; nr <= '0;
      for (int f = 0; f < NFR; f++) begin
        inst[f] <= '0; lval[f] <= '0; rval[f] <= '0; prd[f] <= '0;
      end
    end else begin
      if (issue) fired[sel] <= 1'b1;
      if (ld_valid) begin
        dec_t ld;
        ld = decode(ld_inst);
        inst[ld_frame]  <= ld_inst;
        iv[ld_frame]    <= 1'b1;
        fired[ld_frame] <= 1'b0;
        nl[ld_frame]    <= ld.need_l;
        nr[ld_frame]    <= ld.need_r;
        prd[ld_frame]   <= ld.pred;
      end
      if (rx_hit) begin
        unique case (rx_pkt.slot)
          SL_PRED:  begin pv[rx_f] <= 1'b1; pval[rx_f] <= rx_pkt.data[0]; pk[rx_f] <= rx_pkt.keep; end
          SL_LEFT:  begin lv[rx_f] <= 1'b1; lval[rx_f] <= rx_pkt.data;    lk[rx_f] <= rx_pkt.keep; end
          SL_RIGHT: begin rv[rx_f] <= 1'b1; rval[rx_f] <= rx_pkt.data;    rk[rx_f] <= rx_pkt.keep; end
          default: ;
        endcase
      end
      for (int f = 0; f < NFR; f++) begin
        if (af_revit[f / AFF]) begin
          fired[f] <= 1'b0;
          lv[f] <= lv[f] & lk[f];
          rv[f] <= rv[f] & rk[f];
          pv[f] <= pv[f] & pk[f];
        end
        if (af_clear[f / AFF]) begin
          iv[f] <= 1'b0; fired[f] <= 1'b0;
          lv[f] <= 1'b0; rv[f] <= 1'b0; pv[f] <= 1'b0;
          lk[f] <= 1'b0; rk[f] <= 1'b0; pk[f] <= 1'b0;
        end
      end
    end
  end

endmodule
