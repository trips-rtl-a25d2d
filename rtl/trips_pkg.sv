// trips_pkg: shared types and constants of the TRIPS grid processor core.
//
// The core is a 4x4 array of execution nodes. Each node holds 64 reservation
// stations; the stations with the same index across the array form a frame,
// and 8 consecutive frames form an A-frame that holds one 128-instruction
// block. The instruction, target and block-header layouts below follow the
// published TRIPS formats (six 32-bit instruction formats, 9-bit targets,
// 128-byte header chunk with 32 read and 32 write register-access slots).
// Numeric opcode values, the read-instruction sub-fields, the meaning of the
// header H bits and the operand-network packet are this design's own choices.
//
// Operand network coordinates: the array is embedded in a (ROWS+1)x(COLS+1)
// mesh. Row 0 holds the register banks (columns 0..COLS-1) and the block
// control tile (column COLS); node (r,c) sits at mesh (r+1,c); the data-cache
// bank of row r sits at mesh (r+1,COLS).
package trips_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int ROWS        = 4;     // ALU array rows
  localparam int COLS        = 4;     // ALU array columns
  localparam int FRAMES      = 64;    // reservation stations per node (prototype)
  localparam int AF_FRAMES   = 8;     // frames per A-frame
  localparam int NUM_AF      = FRAMES / AF_FRAMES;  // 8 A-frames
  localparam int AF_W        = $clog2(NUM_AF);
  localparam int FR_W        = $clog2(FRAMES);
  localparam int MAX_THREADS = NUM_AF;   // T-morph: at most one A-frame per thread
  localparam int TID_W       = $clog2(MAX_THREADS);
  localparam int REGS_PER_BANK = 32;     // 4 banks x 32 = 128 architectural registers
  localparam int RD_PER_BANK = 8;        // header read slots per bank (Read i.0..i.7)
  localparam int WR_PER_BANK = 8;        // header write slots per bank (Write i.0..i.7)
  localparam int NUM_LSID    = 32;       // loads/stores per block
  localparam int GEN_W       = 4;        // A-frame generation tag width
  localparam int XLEN        = 64;       // datapath width
  localparam int AW          = 32;       // block / data address width
  localparam int CHUNK_BYTES = 128;
  localparam int BLOCK_BYTES = 5 * CHUNK_BYTES;  // header chunk + 4 row chunks
  localparam int MESH_R      = ROWS + 1;
  localparam int MESH_C      = COLS + 1;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [AW-1:0]   addr_t;

  // ------------------------------------------------------------ opcodes
  typedef enum logic [6:0] {
    OP_NOP   = 7'd0,
    // loads / stores (L and S formats)
    OP_LB = 7'd1, OP_LH = 7'd2, OP_LW = 7'd3, OP_LD = 7'd4,
    OP_SB = 7'd5, OP_SH = 7'd6, OP_SW = 7'd7, OP_SD = 7'd8,
    // integer arithmetic
    OP_ADD = 7'd9,  OP_ADDI = 7'd10, OP_SUB = 7'd11, OP_SUBI = 7'd12,
    OP_MUL = 7'd13, OP_MULI = 7'd14, OP_DIVS = 7'd15, OP_DIVSI = 7'd16,
    OP_DIVU = 7'd17, OP_DIVUI = 7'd18,
    // logical
    OP_AND = 7'd19, OP_ANDI = 7'd20, OP_OR = 7'd21, OP_ORI = 7'd22,
    OP_XOR = 7'd23, OP_XORI = 7'd24,
    // shifts
    OP_SLL = 7'd25, OP_SLLI = 7'd26, OP_SRL = 7'd27, OP_SRLI = 7'd28,
    OP_SRA = 7'd29, OP_SRAI = 7'd30,
    // extends
    OP_EXTSB = 7'd31, OP_EXTSH = 7'd32, OP_EXTSW = 7'd33,
    OP_EXTUB = 7'd34, OP_EXTUH = 7'd35, OP_EXTUW = 7'd36,
    // tests
    OP_TEQ = 7'd37, OP_TEQI = 7'd38, OP_TLT = 7'd39, OP_TLTI = 7'd40,
    OP_TLE = 7'd41, OP_TLEI = 7'd42, OP_TLTU = 7'd43, OP_TLTUI = 7'd44,
    OP_TLEU = 7'd45, OP_TLEUI = 7'd46,
    // floating point (decoded, not executed by this ALU)
    OP_FADD = 7'd47, OP_FSUB = 7'd48, OP_FMUL = 7'd49, OP_FDIV = 7'd50,
    OP_FEQ = 7'd51, OP_FLT = 7'd52, OP_FLE = 7'd53,
    OP_FITOD = 7'd54, OP_FDTOI = 7'd55, OP_FSTOD = 7'd56, OP_FDTOS = 7'd57,
    // control flow (B format)
    OP_BR = 7'd58, OP_BRO = 7'd59, OP_CALL = 7'd60, OP_CALLO = 7'd61,
    OP_RET = 7'd62, OP_SCALL = 7'd63,
    // miscellaneous
    OP_NULL = 7'd64, OP_MOV = 7'd65, OP_MOVI = 7'd66,
    OP_GENS = 7'd67, OP_GENU = 7'd68, OP_APP = 7'd69
  } opcode_e;

  typedef enum logic [2:0] {FMT_G, FMT_I, FMT_L, FMT_S, FMT_B, FMT_C} fmt_e;

  // Predicate field (bits 24:23): 00 = unpredicated, 10 = fire on false,
  // 11 = fire on true, 01 = reserved (treated as unpredicated).
  localparam logic [1:0] PR_NONE = 2'b00;
  localparam logic [1:0] PR_F    = 2'b10;
  localparam logic [1:0] PR_T    = 2'b11;

  // Branch types kept by the target predictor.
  typedef enum logic [1:0] {BT_BRANCH = 2'd0, BT_CALL = 2'd1, BT_RET = 2'd2, BT_SCALL = 2'd3} btype_e;

  // ------------------------------------------------------------ targets
  // 9-bit target: [8:7] kind, [6:5] row, [4:3] col, [2:0] frame.
  //   00 00 00 000 : no target
  //   00 00 col wid: register output (write slot wid of bank col)
  //   00 01 lsid   : memory output (store LSID, used by NULL)
  //   01 row col fr: predicate operand
  //   10 row col fr: left (1st) operand
  //   11 row col fr: right (2nd) operand
  typedef logic [8:0] target_t;
  localparam logic [1:0] SL_PRED  = 2'b01;
  localparam logic [1:0] SL_LEFT  = 2'b10;
  localparam logic [1:0] SL_RIGHT = 2'b11;

  // ------------------------------------------------------------ decoded instruction
  typedef struct packed {
    opcode_e     op;
    fmt_e        fmt;
    logic [1:0]  pred;
    logic        need_l;     // waits for a left operand
    logic        need_r;     // waits for a right operand
    logic        is_load;
    logic        is_store;
    logic        is_branch;
    logic        is_null;
    logic        writes;     // produces a value for T1/T2
    logic [4:0]  lsid;
    logic [2:0]  exit_no;
    word_t       imm;        // sign-extended immediate / constant / offset
    target_t     t1;
    target_t     t2;
    logic [1:0]  msize;      // 0 byte, 1 half, 2 word, 3 double
    logic        legal;
  } dec_t;

  function automatic fmt_e op_format(opcode_e op);
    case (op)
      OP_LB, OP_LH, OP_LW, OP_LD:                       return FMT_L;
      OP_SB, OP_SH, OP_SW, OP_SD:                       return FMT_S;
      OP_BR, OP_BRO, OP_CALL, OP_CALLO, OP_RET, OP_SCALL: return FMT_B;
      OP_GENS, OP_GENU, OP_APP, OP_NOP:                 return FMT_C;
      OP_ADDI, OP_SUBI, OP_MULI, OP_DIVSI, OP_DIVUI, OP_ANDI, OP_ORI, OP_XORI,
      OP_SLLI, OP_SRLI, OP_SRAI, OP_TEQI, OP_TLTI, OP_TLEI, OP_TLTUI, OP_TLEUI,
      OP_MOVI:                                          return FMT_I;
      default:                                          return FMT_G;
    endcase
  endfunction

  function automatic dec_t decode(logic [31:0] ins);
    dec_t d;
    d = '0;
    d.op   = opcode_e'(ins[31:25]);
    d.fmt  = op_format(d.op);
    d.pred = (d.fmt == FMT_C) ? PR_NONE : ins[24:23];
    d.legal = (ins[31:25] <= 7'd69);
    d.lsid = ins[22:18];
    d.exit_no = ins[22:20];
    d.t1 = ins[8:0];
    d.t2 = (d.fmt == FMT_G) ? ins[17:9] : 9'd0;
    case (d.fmt)
      FMT_I, FMT_L, FMT_S: d.imm = {{(XLEN-9){ins[17]}}, ins[17:9]};
      FMT_B:               d.imm = {{(XLEN-20){ins[19]}}, ins[19:0]};
      FMT_C:               d.imm = (d.op == OP_GENS) ? {{(XLEN-16){ins[24]}}, ins[24:9]}
                                                     : {{(XLEN-16){1'b0}}, ins[24:9]};
      default:             d.imm = '0;
    endcase
    d.is_load   = (d.fmt == FMT_L);
    d.is_store  = (d.fmt == FMT_S);
    d.is_branch = (d.fmt == FMT_B);
    d.is_null   = (d.op == OP_NULL);
    d.msize     = (d.op == OP_LB || d.op == OP_SB) ? 2'd0 :
                  (d.op == OP_LH || d.op == OP_SH) ? 2'd1 :
                  (d.op == OP_LW || d.op == OP_SW) ? 2'd2 : 2'd3;
    // operand needs
    case (d.fmt)
      FMT_G: begin
        d.need_l = (d.op != OP_NOP);
        d.need_r = !(d.op inside {OP_EXTSB, OP_EXTSH, OP_EXTSW, OP_EXTUB, OP_EXTUH,
                                  OP_EXTUW, OP_MOV, OP_NULL, OP_FITOD, OP_FDTOI,
                                  OP_FSTOD, OP_FDTOS});
      end
      FMT_I: begin d.need_l = (d.op != OP_MOVI); d.need_r = 1'b0; end
      FMT_L: begin d.need_l = 1'b1; d.need_r = 1'b0; end
      FMT_S: begin d.need_l = 1'b1; d.need_r = 1'b1; end
      FMT_B: begin d.need_l = (d.op inside {OP_BR, OP_CALL, OP_RET}); d.need_r = 1'b0; end
      FMT_C: begin d.need_l = (d.op == OP_APP); d.need_r = 1'b0; end
      default: begin d.need_l = 1'b0; d.need_r = 1'b0; end
    endcase
    d.writes = !(d.is_store || d.is_branch || d.op == OP_NOP);
    return d;
  endfunction

  // ------------------------------------------------------------ block header
  // Header word i (i = 0..31) = {H[4:0], read[20:0], write[5:0]}.
  // Read slot b.j (bank b, slot j) sits in word j*4+b; so does write slot b.j.
  // Read  = {V, GR[4:0], T[8:0], C, reserved[4:0]}; C marks an operand that
  //         is kept across S-morph revitalizations (a loop constant).
  // Write = {V, GR[4:0]}.
  // The 32 H fields concatenated (H0 in the low bits) form a 160-bit vector:
  //   [31:0]  store LSID mask, [47:32] repeat count N (0 or 1 = run once).
  typedef struct packed {
    logic       v;
    logic [4:0] gr;
    target_t    t;
    logic       c;
  } rd_inst_t;

  typedef struct packed {
    logic       v;
    logic [4:0] gr;
  } wr_inst_t;

  function automatic rd_inst_t hdr_read(logic [31:0] w);
    rd_inst_t r;
    r.v = w[26]; r.gr = w[25:21]; r.t = w[20:12]; r.c = w[11];
    return r;
  endfunction

  function automatic wr_inst_t hdr_write(logic [31:0] w);
    wr_inst_t r;
    r.v = w[5]; r.gr = w[4:0];
    return r;
  endfunction

  // ------------------------------------------------------------ operand network packet
  typedef enum logic [2:0] {
    PK_OPERAND = 3'd0,   // operand for a reservation station
    PK_REGWR   = 3'd1,   // register output for a write slot
    PK_LOAD    = 3'd2,   // load request to a data-cache bank
    PK_STORE   = 3'd3,   // store request to a data-cache bank
    PK_BRANCH  = 3'd4,   // resolved block exit to block control
    PK_NULLST  = 3'd5,   // nullified store (LSID) to block control
    PK_STDONE  = 3'd6    // unused on the network (reserved)
  } pkind_e;

  typedef struct packed {
    logic [2:0]     dr;     // destination mesh row
    logic [2:0]     dc;     // destination mesh column
    pkind_e         kind;
    logic [AF_W-1:0] af;    // A-frame of the producing block
    logic [GEN_W-1:0] gen;  // generation of that A-frame
    logic [1:0]     slot;   // operand slot (pred/left/right)
    logic [4:0]     idx;    // frame within A-frame / write slot / LSID
    logic           keep;   // operand survives revitalization
    logic           nul;    // nullified value
    word_t          data;
    addr_t          addr;   // memory address or branch target
    logic [11:0]    aux;    // load: {size[1:0], pad, target[8:0]}; branch: {exit, type}
  } pkt_t;

  localparam logic [2:0] BC_ROW = 3'd0;
  localparam logic [2:0] BC_COL = 3'(COLS);

  // Data-cache bank interleave: 64-byte lines, bank = line index mod ROWS.
  localparam int LINE_SHIFT = 6;

  function automatic logic [2:0] dbank_row(addr_t a);
    return 3'(a[LINE_SHIFT +: $clog2(ROWS)]) + 3'd1;
  endfunction

  // Builds the packet for a 9-bit target (operand or register output).
  function automatic pkt_t target_pkt(target_t t, logic [AF_W-1:0] af,
                                      logic [GEN_W-1:0] gen, word_t v, logic nul);
    pkt_t p;
    p = '0;
    p.af = af; p.gen = gen; p.data = v; p.nul = nul;
    if (t[8:7] == 2'b00) begin
      if (t[6:5] == 2'b01) begin
        p.kind = PK_NULLST; p.dr = BC_ROW; p.dc = BC_COL; p.idx = t[4:0];
      end else begin
        p.kind = PK_REGWR; p.dr = 3'd0; p.dc = {1'b0, t[4:3]}; p.idx = {2'b00, t[2:0]};
      end
    end else begin
      p.kind = PK_OPERAND; p.slot = t[8:7];
      p.dr = {1'b0, t[6:5]} + 3'd1; p.dc = {1'b0, t[4:3]}; p.idx = {2'b00, t[2:0]};
    end
    return p;
  endfunction

endpackage
