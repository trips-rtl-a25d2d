// trips_target_predictor: next-block address from the predicted exit.
//
// The predicted exit number, together with the block address, indexes three
// tables: a branch target buffer (BTB), a call target buffer (Call BTB) and a
// branch-type table. The predicted branch type selects the next block
// address: a branch takes the BTB entry, a call takes the Call BTB entry and
// pushes the return address on the thread's return address stack (RAS), a
// return pops the RAS, and a system call predicts the sequentially next block.
// An address not yet learnt predicts the sequentially next block
// (address + 640 bytes, the size of a block).
//
// Interface: p_valid/p_addr/p_tid/p_exit ask for a prediction; p_next is
// combinational and the RAS is pushed or popped at the clock edge when
// p_valid is high. At commit, u_valid/u_addr/u_tid/u_exit/u_type/u_target
// train the tables. The BTB / Call BTB / RAS / branch-type organisation
// follows the TRIPS target predictor; sizes, indexing, the return address
// being the next sequential block, and the absence of RAS repair after a
// misprediction are this design's choices.
module trips_target_predictor
  import trips_pkg::*;
#(
  parameter int BTB_ENTRIES  = 1024,
  parameter int CBTB_ENTRIES = 256,
  parameter int RAS_DEPTH    = 8,
  parameter int NTH          = MAX_THREADS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic             p_valid,
  input  addr_t            p_addr,
  input  logic [TID_W-1:0] p_tid,
  input  logic [2:0]       p_exit,
  output addr_t            p_next,
  output btype_e           p_type,
  input  logic             u_valid,
  input  addr_t            u_addr,
  input  logic [2:0]       u_exit,
  input  btype_e           u_type,
  input  addr_t            u_target
);

  localparam int BW = $clog2(BTB_ENTRIES);
  localparam int CW = $clog2(CBTB_ENTRIES);
  localparam int RW = $clog2(RAS_DEPTH);

  typedef struct packed { logic v; addr_t tgt; } btb_t;

  btb_t   btb  [BTB_ENTRIES];
  btb_t   cbtb [CBTB_ENTRIES];
  btype_e bty  [BTB_ENTRIES];
  addr_t  ras  [NTH][RAS_DEPTH];
  logic [RW-1:0] sp [NTH];

  function automatic logic [BW-1:0] bidx(addr_t a, logic [2:0] ex);
    return BW'(a >> 7) ^ (BW'(ex) << (BW - 3));
  endfunction
  function automatic logic [CW-1:0] cidx(addr_t a, logic [2:0] ex);
    return CW'(a >> 7) ^ (CW'(ex) << (CW - 3));
  endfunction

  addr_t seq;
  btb_t  pb, pc;
  always_comb begin
    seq    = p_addr + addr_t'(BLOCK_BYTES);
    pb     = btb[bidx(p_addr, p_exit)];
    pc     = cbtb[cidx(p_addr, p_exit)];
    p_type = bty[bidx(p_addr, p_exit)];
    unique case (p_type)
      BT_CALL:   p_next = pc.v ? pc.tgt : seq;
      BT_RET:    p_next = ras[p_tid][sp[p_tid] - RW'(1)];
      BT_SCALL:  p_next = seq;
      default:   p_next = pb.v ? pb.tgt : seq;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BTB_ENTRIES; i++) begin btb[i] <= '0; bty[i] <= BT_BRANCH; end
      for (int i = 0; i < CBTB_ENTRIES; i++) cbtb[i] <= '0;
      for (int t = 0; t < NTH; t++) begin
        sp[t] <= '0;
        for (int k = 0; k < RAS_DEPTH; k++) ras[t][k] <= '0;
      end
    end else begin
      if (p_valid && p_type == BT_CALL) begin
        ras[p_tid][sp[p_tid]] <= seq;
        sp[p_tid] <= sp[p_tid] + RW'(1);
      end else if (p_valid && p_type == BT_RET) begin
        sp[p_tid] <= sp[p_tid] - RW'(1);
      end
      if (u_valid) begin
        bty[bidx(u_addr, u_exit)] <= u_type;
        if (u_type == BT_CALL) cbtb[cidx(u_addr, u_exit)] <= '{v: 1'b1, tgt: u_target};
        else if (u_type == BT_BRANCH) btb[bidx(u_addr, u_exit)] <= '{v: 1'b1, tgt: u_target};
      end
    end
  end

endmodule
