// tb_trips_core: end-to-end test of one TRIPS core at its default size.
//
// The testbench acts as the memory system behind the L1 caches: it answers
// instruction-cache misses by writing the missing block into the I-cache
// banks and tags, and preloads the data banks. It runs six small blocks:
//   INIT1 -> A (loop, 10 iterations: sum an array) -> B (store the sum,
//   double it, system call)                       [thread 0]
//   INIT2 -> C (repeat-4 block: R5 += R6, store)  -> D (system call)
// Phase 1 runs thread 0 alone in the D-morph (one thread, 8 A-frames).
// Phase 2 switches to the T-morph with two threads and runs both programs at
// once. Results (registers of each thread, memory words) are compared with
// values computed here. Mechanisms counted, each must occur at least once:
// I-cache miss, speculative blocks in flight, mispredicted exit with squash,
// register read served to a speculative block (stitching), store drain on
// commit, revitalization, two threads in flight at once, SCALL halt.
`timescale 1ns/1ps
module tb_trips_core;
  import trips_pkg::*;
  import tb_trips_asm_pkg::*;

  localparam int IC_SETS = 128;
  localparam int DC_WORDS = 2048;
  localparam int NB = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  cfg_lg_threads;
  logic        thr_start;
  logic [TID_W-1:0] thr_start_tid;
  addr_t       thr_start_pc;
  logic [MAX_THREADS-1:0] thr_running, halted;
  logic        ic_we, tag_we, imiss, dm_we, exc;
  logic [2:0]  ic_bank;
  logic [6:0]  ic_set, tag_set;
  logic [4:0]  ic_word;
  logic [31:0] ic_wdata;
  addr_t       tag_addr, imiss_addr;
  logic [1:0]  dm_bank;
  logic [10:0] dm_addr;
  word_t       dm_wdata, dm_rdata, dbg_val;
  logic [TID_W-1:0] dbg_tid;
  logic [6:0]  dbg_reg;
  logic [31:0] n_fire, n_fetch, n_commit, n_mispred, n_revit, n_imiss;

  trips_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d", what, got, got, exp);
    end
  endtask

  // ------------------------------------------------------------ program image
  logic [31:0] img [NB][5][32];
  addr_t       ba  [NB];

  task automatic put(int b, int r, int c, int f, logic [31:0] ins);
    img[b][r+1][f*4 + c] = ins;
  endtask
  task automatic put_rd(int b, int bank, int slot, logic [20:0] fld);
    img[b][0][slot*4 + bank][26:6] = fld;
  endtask
  task automatic put_wr(int b, int bank, int slot, logic [5:0] fld);
    img[b][0][slot*4 + bank][5:0] = fld;
  endtask
  task automatic put_h(int b, logic [159:0] h);
    for (int i = 0; i < 32; i++) img[b][0][i][31:27] = h[i*5 +: 5];
  endtask

  localparam int B_INIT1 = 0, B_A = 1, B_B = 2, B_INIT2 = 3, B_C = 4, B_D = 5;
  localparam int NLOOP = 10;
  localparam int REP = 4;

  task automatic build();
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < 5; k++)
        for (int w = 0; w < 32; w++) img[b][k][w] = '0;
    ba[B_INIT1] = 32'h3000; ba[B_A] = 32'h0; ba[B_B] = 32'd640;
    ba[B_INIT2] = 32'h3800; ba[B_C] = 32'd1280; ba[B_D] = 32'd1920;
    // INIT1: R1 = NLOOP, R2 = 0, R3 = 0x1000; go to A
    put_wr(B_INIT1, 0, 1, h_wr(1)); put_wr(B_INIT1, 0, 2, h_wr(2)); put_wr(B_INIT1, 0, 3, h_wr(3));
    put(B_INIT1, 0, 0, 0, i_c(OP_GENU, NLOOP, t_wr(0, 1)));
    put(B_INIT1, 0, 1, 0, i_c(OP_GENU, 0, t_wr(0, 2)));
    put(B_INIT1, 0, 2, 0, i_c(OP_GENU, 'h1000, t_wr(0, 3)));
    put(B_INIT1, 0, 3, 0, i_b(OP_BRO, PR_NONE, 0, -96));
    // A: R2 += mem[R3]; R3 += 8; R1 -= 1; loop while R1 != 0, else go to B
    put_rd(B_A, 0, 0, h_rd(3, t_left(0, 0, 0)));
    put_rd(B_A, 0, 1, h_rd(2, t_right(0, 1, 0)));
    put_rd(B_A, 0, 2, h_rd(1, t_left(0, 2, 0)));
    put_wr(B_A, 0, 1, h_wr(1)); put_wr(B_A, 0, 2, h_wr(2)); put_wr(B_A, 0, 3, h_wr(3));
    put(B_A, 0, 0, 0, i_g(OP_MOV, PR_NONE, t_left(1, 0, 0), t_left(1, 1, 0)));
    put(B_A, 1, 0, 0, i_l(OP_LD, PR_NONE, 0, 0, t_left(0, 1, 0)));
    put(B_A, 0, 1, 0, i_g(OP_ADD, PR_NONE, t_wr(0, 2)));
    put(B_A, 1, 1, 0, i_i(OP_ADDI, PR_NONE, 8, t_wr(0, 3)));
    put(B_A, 0, 2, 0, i_i(OP_SUBI, PR_NONE, 1, t_left(0, 3, 0)));
    put(B_A, 0, 3, 0, i_g(OP_MOV, PR_NONE, t_wr(0, 1), t_left(1, 2, 0)));
    put(B_A, 1, 2, 0, i_i(OP_TEQI, PR_NONE, 0, t_left(1, 3, 0)));
    put(B_A, 1, 3, 0, i_g(OP_MOV, PR_NONE, t_pred(2, 0, 0), t_pred(2, 1, 0)));
    put(B_A, 2, 0, 0, i_b(OP_BRO, PR_F, 0, 0));
    put(B_A, 2, 1, 0, i_b(OP_BRO, PR_T, 1, 5));
    // B: mem[0x800] = R2; R4 = R2 * 2; system call
    put_rd(B_B, 0, 0, h_rd(2, t_left(0, 0, 0)));
    put_wr(B_B, 0, 1, h_wr(4));
    put_h(B_B, 160'h1);
    put(B_B, 0, 0, 0, i_g(OP_MOV, PR_NONE, t_right(0, 1, 0), t_left(0, 2, 0)));
    put(B_B, 0, 3, 0, i_c(OP_GENU, 'h800, t_left(0, 1, 0)));
    put(B_B, 0, 1, 0, i_s(OP_SD, PR_NONE, 0, 0));
    put(B_B, 0, 2, 0, i_i(OP_MULI, PR_NONE, 2, t_wr(0, 1)));
    put(B_B, 1, 0, 0, i_b(OP_SCALL, PR_NONE, 0, 0));
    // INIT2: R5 = 100, R6 = 7; go to C
    put_wr(B_INIT2, 0, 1, h_wr(5)); put_wr(B_INIT2, 0, 2, h_wr(6));
    put(B_INIT2, 0, 0, 0, i_c(OP_GENU, 100, t_wr(0, 1)));
    put(B_INIT2, 0, 1, 0, i_c(OP_GENU, 7, t_wr(0, 2)));
    put(B_INIT2, 0, 2, 0, i_b(OP_BRO, PR_NONE, 0, -102));
    // C (repeat REP): R5 = R5 + R6 (R6 kept as a loop constant); mem[0x900] = R5
    put_rd(B_C, 0, 0, h_rd(5, t_left(0, 0, 0)));
    put_rd(B_C, 0, 1, h_rd(6, t_right(0, 0, 0), 1));
    put_wr(B_C, 0, 1, h_wr(5));
    put_h(B_C, (160'(REP) << 32) | 160'h1);
    put(B_C, 0, 0, 0, i_g(OP_ADD, PR_NONE, t_wr(0, 1), t_right(0, 1, 0)));
    put(B_C, 0, 2, 0, i_c(OP_GENU, 'h900, t_left(0, 1, 0)));
    put(B_C, 0, 1, 0, i_s(OP_SD, PR_NONE, 0, 0));
    put(B_C, 0, 3, 0, i_b(OP_BRO, PR_NONE, 0, 5));
    // D: system call
    put(B_D, 0, 0, 0, i_b(OP_SCALL, PR_NONE, 0, 0));
  endtask

  // ------------------------------------------------------------ memory behind the caches
  function automatic logic [1:0] dbank(addr_t a); return a[7:6]; endfunction
  function automatic logic [10:0] dword(addr_t a); return {a[13:8], a[5:3]}; endfunction

  bit refilling = 0;
  initial begin
    ic_we = 0; tag_we = 0; ic_bank = 0; ic_set = 0; ic_word = 0; ic_wdata = 0;
    tag_set = 0; tag_addr = 0;
    forever begin
      @(negedge clk);
      if (rst_n && imiss && !refilling) begin
        int b;
        addr_t m;
        b = -1;
        m = imiss_addr;
        for (int k = 0; k < NB; k++) if (ba[k] == m) b = k;
        if (b < 0) begin
          $display("FAIL: fetch from unknown block address 0x%0h", m);
          failures++;
          refilling = 1;  // stop answering
        end else begin
          refilling = 1;
          for (int k = 0; k < 5; k++)
            for (int w = 0; w < 32; w++) begin
              ic_we = 1; ic_bank = 3'(k); ic_set = 7'(m >> 7); ic_word = 5'(w);
              ic_wdata = img[b][k][w];
              @(negedge clk);
            end
          ic_we = 0;
          tag_we = 1; tag_set = 7'(m >> 7); tag_addr = m;
          @(negedge clk);
          tag_we = 0;
          refilling = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ mechanism monitors
  int max_inflight = 0, stitched_reads = 0, drains = 0, both_threads = 0;
  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = $countones(dut.u_bc.v);
    if (nv > max_inflight) max_inflight = nv;
    if (dut.g_rb[0].u_rb.send && dut.u_bc.af_age[dut.g_rb[0].u_rb.pick_a] != 0) stitched_reads++;
    for (int r = 0; r < ROWS; r++) if (dut.drain_busy[r]) drains++;
    if (cfg_lg_threads == 2'd1 && (dut.u_bc.v[3:0] != 0) && (dut.u_bc.v[7:4] != 0)) both_threads++;
  end

  // ------------------------------------------------------------ helpers
  task automatic reg_check(int tid, int r, longint exp, string what);
    dbg_tid = TID_W'(tid); dbg_reg = 7'(r);
    #1;
    check(what, dbg_val, exp);
  endtask
  task automatic mem_check(addr_t a, longint exp, string what);
    dm_bank = dbank(a); dm_addr = dword(a);
    #1;
    check(what, dm_rdata, exp);
  endtask
  task automatic start(int tid, addr_t pc);
    @(negedge clk);
    thr_start = 1; thr_start_tid = TID_W'(tid); thr_start_pc = pc;
    @(negedge clk);
    thr_start = 0;
  endtask
  task automatic wait_halt(logic [MAX_THREADS-1:0] mask, int limit);
    int n;
    n = 0;
    while ((halted & mask) != mask && n < limit) begin @(posedge clk); n++; end
    if ((halted & mask) != mask) begin
      failures++;
      $display("FAIL: threads %b did not halt", mask);
    end
    repeat (50) @(posedge clk);   // let committed stores drain
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum;
  int c0, c1;
  initial begin
    cfg_lg_threads = 0; thr_start = 0; thr_start_tid = 0; thr_start_pc = 0;
    dm_we = 0; dm_bank = 0; dm_addr = 0; dm_wdata = 0; dbg_tid = 0; dbg_reg = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // data: mem[0x1000 + 8k] = 3k + 1
    sum = 0;
    for (int k = 0; k < NLOOP; k++) begin
      addr_t a;
      a = 32'h1000 + 32'(8 * k);
      @(negedge clk);
      dm_we = 1; dm_bank = dbank(a); dm_addr = dword(a); dm_wdata = word_t'(3 * k + 1);
      sum += 3 * k + 1;
    end
    @(negedge clk); dm_we = 0;

    // ---------------- phase 1: D-morph
    cfg_lg_threads = 0;
    c0 = 0;
    start(0, 32'h3000);
    c0 = int'(n_commit);
    wait_halt(8'b1, 100000);
    reg_check(0, 1, 0, "D-morph R1 loop counter");
    reg_check(0, 2, sum, "D-morph R2 sum");
    reg_check(0, 3, 'h1000 + 8 * NLOOP, "D-morph R3 pointer");
    reg_check(0, 4, 2 * sum, "D-morph R4 doubled sum");
    mem_check(32'h800, sum, "D-morph stored sum");
    // INIT1 + NLOOP x A + B commit
    check("D-morph committed blocks", n_commit - c0, NLOOP + 2);
    check("no unimplemented opcode", exc, 0);

    // ---------------- phase 2: T-morph, two threads
    cfg_lg_threads = 1;
    c1 = int'(n_commit);
    start(0, 32'h3000);
    start(1, 32'h3800);
    wait_halt(8'b11, 100000);
    reg_check(0, 2, sum, "T-morph thread 0 sum");
    reg_check(0, 4, 2 * sum, "T-morph thread 0 doubled sum");
    reg_check(1, 5, 100 + 7 * REP, "T-morph thread 1 R5 after repeat");
    reg_check(1, 6, 7, "T-morph thread 1 R6");
    reg_check(1, 2, 0, "thread 1 has its own R2");
    mem_check(32'h800, sum, "T-morph stored sum");
    mem_check(32'h900, 100 + 7 * REP, "S-morph stored R5");
    // thread 0: NLOOP + 2, thread 1: INIT2 + REP iterations of C + D
    check("T-morph committed blocks", n_commit - c1, (NLOOP + 2) + (1 + REP + 1));
    check("revitalizations", n_revit, REP - 1);

    // ---------------- mechanisms
    $display("mechanisms: imiss=%0d maxinflight=%0d mispred=%0d stitched=%0d drains=%0d revit=%0d both=%0d fired=%0d fetched=%0d",
             n_imiss, max_inflight, n_mispred, stitched_reads, drains, n_revit, both_threads, n_fire, n_fetch);
    check("I-cache miss happened", n_imiss > 0, 1);
    check("speculative blocks in flight", max_inflight >= 2, 1);
    check("exit misprediction happened", n_mispred > 0, 1);
    check("read served to a speculative block", stitched_reads > 0, 1);
    check("store drain on commit happened", drains > 0, 1);
    check("revitalization happened", n_revit > 0, 1);
    check("two threads in flight together", both_threads > 0, 1);
    check("SCALL halted both threads", halted[1:0], 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
