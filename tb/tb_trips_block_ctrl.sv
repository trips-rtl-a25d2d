// tb_trips_block_ctrl: self-checking test of the block control tile.
//
// The testbench stands in for the rest of the core: it answers every
// instruction-tag miss by writing the tag, models the I-cache banks as busy
// for AF_FRAMES cycles after each fetch, reports all register writes done,
// supplies block headers (a repeat count for one block address), and plays
// the branch unit by sending exit reports over the network port. It records
// the address of every fetched block from the fetch address. Checks:
//  1. D-morph: after a thread starts, blocks are fetched speculatively until
//     all 8 A-frames are full; only the first is marked oldest.
//  2. A correctly predicted exit commits the oldest block (commit pulse,
//     counter) without a misprediction.
//  3. A wrongly predicted exit squashes every younger block (clear pulses),
//     counts a misprediction and redirects fetch to the reported address.
//  4. An SCALL exit halts the thread when its block commits.
//  5. A block with repeat count 3 is revitalized twice and then committed,
//     and no younger block is fetched while it repeats.
//  6. T-morph with two threads: each thread's blocks live only in its half
//     of the A-frames, and both threads have blocks in flight together.
module tb_trips_block_ctrl;
  import trips_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] cfg_lg_threads;
  logic thr_start, fetch_start, fetch_abort, fetch_busy, tag_we, imiss, rx_valid, rx_ready;
  logic [TID_W-1:0] thr_start_tid;
  addr_t thr_start_pc, tag_addr, imiss_addr;
  logic [MAX_THREADS-1:0] thr_running, halted;
  logic [6:0] fetch_set, tag_set;
  logic [AF_W-1:0] fetch_af;
  logic [159:0] hdr_h;
  logic [NUM_AF-1:0] af_valid, af_oldest, af_clear, af_commit, af_revit, wr_done;
  logic [TID_W-1:0] af_tid [NUM_AF];
  logic [AF_W-1:0] af_age [NUM_AF];
  logic [GEN_W-1:0] af_gen [NUM_AF];
  logic [NUM_LSID-1:0] st_pend [NUM_AF];
  logic [ROWS-1:0] st_rep_valid;
  logic [AF_W-1:0] st_rep_af [ROWS];
  logic [4:0] st_rep_lsid [ROWS];
  pkt_t rx_pkt;
  logic [31:0] n_fetch, n_commit, n_mispred, n_revit, n_imiss;
  trips_block_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string w, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got 0x%0h exp 0x%0h", w, g, e); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam addr_t REP_ADDR = 32'h9000;
  // header: repeat count 3 for the block at REP_ADDR (imiss_addr is the fetch
  // address whether or not it misses), nothing otherwise
  always_comb hdr_h = (imiss_addr == REP_ADDR) ? (160'd3 << 32) : '0;

  // I-cache model and tag refill
  int busy_n = 0;
  addr_t fa [NUM_AF];
  int nclear [NUM_AF];
  int ncommit_af [NUM_AF], nrevit_af [NUM_AF], max_inflight = 0, both = 0, part_bad = 0;
  assign fetch_busy = busy_n != 0;
  always @(posedge clk) if (rst_n) begin
    int nv;
    if (busy_n != 0) busy_n <= busy_n - 1;
    if (fetch_start) begin busy_n <= AF_FRAMES; fa[fetch_af] <= imiss_addr; end
    for (int a = 0; a < NUM_AF; a++) begin
      if (af_clear[a]) nclear[a]++;
      if (af_commit[a]) ncommit_af[a]++;
      if (af_revit[a]) nrevit_af[a]++;
      if (af_valid[a] && cfg_lg_threads == 2'd1 && int'(af_tid[a]) != a / 4) part_bad++;
    end
    nv = $countones(af_valid);
    if (nv > max_inflight) max_inflight = nv;
    if (cfg_lg_threads == 2'd1 && af_valid[3:0] != 0 && af_valid[7:4] != 0) both++;
  end
  always @(negedge clk) begin
    tag_we = 0;
    if (rst_n && imiss) begin tag_we = 1; tag_set = 7'(imiss_addr >> 7); tag_addr = imiss_addr; end
  end

  task automatic branch(int af, addr_t next, int ex = 0, btype_e bt = BT_BRANCH);
    @(negedge clk);
    rx_pkt = '0;
    rx_pkt.kind = PK_BRANCH; rx_pkt.dr = BC_ROW; rx_pkt.dc = BC_COL;
    rx_pkt.af = AF_W'(af); rx_pkt.gen = af_gen[af]; rx_pkt.addr = next;
    rx_pkt.aux = {6'd0, 1'b0, 2'(bt), 3'(ex)};
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask
  task automatic start(int tid, addr_t pc);
    @(negedge clk);
    thr_start = 1; thr_start_tid = TID_W'(tid); thr_start_pc = pc;
    @(negedge clk);
    thr_start = 0;
  endtask
  task automatic settle(int n); repeat (n) @(negedge clk); endtask
  function automatic int oldest_of(int tid);
    for (int a = 0; a < NUM_AF; a++) if (af_oldest[a] && af_tid[a] == TID_W'(tid)) return a;
    return -1;
  endfunction

  int c0, o, cl [NUM_AF], nyoung;
  initial begin
    cfg_lg_threads = 0; thr_start = 0; thr_start_tid = 0; thr_start_pc = 0;
    tag_we = 0; tag_set = 0; tag_addr = 0; rx_valid = 0; rx_pkt = '0; wr_done = '1;
    st_rep_valid = '0;
    for (int r = 0; r < ROWS; r++) begin st_rep_af[r] = 0; st_rep_lsid[r] = 0; end
    for (int a = 0; a < NUM_AF; a++) begin nclear[a] = 0; ncommit_af[a] = 0; nrevit_af[a] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. fill the frame space
    start(0, 32'h1000);
    settle(200);
    check("all 8 A-frames in flight", $countones(af_valid), 8);
    check("one oldest block", $countones(af_oldest), 1);
    o = oldest_of(0);
    check("first block address", fa[o], 32'h1000);
    // 2. correct exit: block at 0x1000 falls through to 0x1280 (predicted)
    c0 = n_commit;
    branch(o, 32'h1000 + 640);
    settle(3);
    check("commit after correct exit", n_commit - c0, 1);
    check("no misprediction", n_mispred, 0);
    settle(30);
    // 3. mispredicted exit of the new oldest block
    o = oldest_of(0);
    for (int a = 0; a < NUM_AF; a++) cl[a] = nclear[a];
    nyoung = $countones(af_valid) - 1;
    c0 = n_commit;
    branch(o, 32'h5000);
    settle(3);
    check("misprediction counted", n_mispred, 1);
    begin
      int sq;
      sq = 0;
      for (int a = 0; a < NUM_AF; a++) if (a != o && nclear[a] > cl[a]) sq++;
      check("younger blocks squashed", sq, nyoung);
      check("there were younger blocks", nyoung >= 6, 1);
    end
    check("mispredicting block itself commits", n_commit - c0, 1);
    settle(40);
    // the block after the mispredicted one must come from 0x5000
    begin
      int found;
      found = 0;
      for (int a = 0; a < NUM_AF; a++) if (af_valid[a] && fa[a] == 32'h5000) found = 1;
      check("fetch redirected to reported address", found, 1);
    end
    // 4. drain to 0x5000 and end with a system call there
    while (fa[oldest_of(0)] != 32'h5000) begin
      o = oldest_of(0);
      branch(o, fa[o] + 640);
      settle(2);
    end
    branch(oldest_of(0), 32'h5000 + 640, 1, BT_SCALL);
    settle(5);
    check("SCALL halts the thread", halted[0], 1);
    check("no blocks left after halt", af_valid, 0);
    // 5. repeat-3 block
    start(0, REP_ADDR);
    settle(40);
    check("only the repeating block is in flight", $countones(af_valid), 1);
    o = oldest_of(0);
    for (int it = 0; it < 3; it++) begin
      branch(o, REP_ADDR + 640);
      settle(5);
    end
    check("revitalized twice", n_revit, 2);
    check("revitalize pulses on its A-frame", nrevit_af[o], 2);
    settle(40);
    check("fetch continues after the loop", af_valid != 0, 1);
    branch(oldest_of(0), 32'h0, 0, BT_SCALL);
    settle(10);
    while (af_valid != 0) begin branch(oldest_of(0), 32'h0, 0, BT_SCALL); settle(10); end
    // 6. T-morph
    cfg_lg_threads = 1;
    start(0, 32'h20000);
    start(1, 32'h40000);
    settle(200);
    check("both threads in flight", both > 0, 1);
    check("threads stay in their partitions", part_bad, 0);
    check("thread 0 fills its 4 A-frames", $countones(af_valid[3:0]), 4);
    check("thread 1 fills its 4 A-frames", $countones(af_valid[7:4]), 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
