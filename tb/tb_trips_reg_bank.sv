// tb_trips_reg_bank: self-checking test of one register bank (bank 1).
//
// The testbench plays block control (A-frame valid/thread/age/generation,
// commit, clear, revitalize), the header path and the operand network.
// Scenario, each step checked:
//  1. Block X (thread 0) writes R3 and R4; wr_done rises only after both
//     writes arrived; commit makes them architectural (debug port).
//  2. Block Y (oldest) reads R3 and writes R4; block Z (younger) reads R4
//     and R3. Y's read of R3 and Z's read of R3 get X's committed value at
//     once; Z's read of R4 must wait for Y's write and is then forwarded
//     from it (register stitching) before Y commits.
//  3. Thread 1 reading R3 sees its own register copy (zero).
//  4. A squashed block's arrived write never reaches the register file.
//  5. Revitalization: block W reads R5 (re-read each iteration) and R6
//     (marked constant) and writes R5; after revitalize only R5 is resent,
//     with the value written by the previous iteration.
//  6. A random stream of 100 commits of random values to random registers
//     is checked against a model of the register file.
module tb_trips_reg_bank;
  import trips_pkg::*;
  import tb_trips_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hdr_load;
  logic [AF_W-1:0] hdr_af;
  rd_inst_t hdr_rd [RD_PER_BANK];
  wr_inst_t hdr_wr [WR_PER_BANK];
  logic [NUM_AF-1:0] af_valid, af_clear, af_commit, af_revit, wr_done;
  logic [TID_W-1:0] af_tid [NUM_AF];
  logic [AF_W-1:0] af_age [NUM_AF];
  logic [GEN_W-1:0] af_gen [NUM_AF];
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  pkt_t rx_pkt, tx_pkt;
  logic [TID_W-1:0] dbg_tid;
  logic [4:0] dbg_reg;
  word_t dbg_val;
  trips_reg_bank #(.BANK(1)) dut (.*);

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

  pkt_t got [$];
  always @(negedge clk) if (rst_n) begin
    #2;
    if (tx_valid && tx_ready) got.push_back(tx_pkt);
  end

  // map a block: reads rg[i] -> target tg[i] (keep kp[i]), writes wg[j]
  task automatic map(int af, int tid, int age, int nr, int rg [4], logic [8:0] tg [4], bit kp [4],
                     int nw, int wg [4]);
    @(negedge clk);
    for (int j = 0; j < RD_PER_BANK; j++) begin hdr_rd[j] = '0; hdr_wr[j] = '0; end
    for (int j = 0; j < nr; j++) hdr_rd[j] = hdr_read({5'd0, h_rd(rg[j], tg[j], kp[j]), 6'd0});
    for (int j = 0; j < nw; j++) hdr_wr[j] = hdr_write({26'd0, h_wr(wg[j])});
    hdr_load = 1; hdr_af = AF_W'(af);
    af_valid[af] = 1; af_tid[af] = TID_W'(tid); af_age[af] = AF_W'(age);
    @(negedge clk);
    hdr_load = 0;
  endtask
  task automatic write(int af, int slot, word_t v, bit nul = 0);
    @(negedge clk);
    rx_pkt = target_pkt(t_wr(1, slot), AF_W'(af), af_gen[af], v, nul);
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask
  task automatic pulse_commit(int af, bit revit = 0);
    @(negedge clk);
    af_commit[af] = 1; af_revit[af] = revit;
    @(negedge clk);
    af_commit = '0; af_revit = '0;
    if (!revit) begin af_valid[af] = 0; af_gen[af] = af_gen[af] + 1'b1; end
  endtask
  task automatic expect_read(string w, logic [8:0] t, int af, word_t v);
    pkt_t e;
    int n, hit;
    n = 0;
    while (got.size() == 0 && n < 20) begin @(negedge clk); n++; end
    hit = -1;
    e = target_pkt(t, AF_W'(af), af_gen[af], v, 1'b0);
    for (int i = 0; i < got.size(); i++) if (got[i].data == e.data && got[i].dr == e.dr &&
        got[i].dc == e.dc && got[i].idx == e.idx && got[i].slot == e.slot && got[i].af == e.af) hit = i;
    checks++;
    if (hit < 0) begin
      failures++; $display("FAIL %s: expected read value %0d not seen (%0d packets)", w, v, got.size());
    end else got.delete(hit);
  endtask
  task automatic reg_is(int tid, int r, word_t v, string w);
    dbg_tid = TID_W'(tid); dbg_reg = 5'(r);
    #1;
    check(w, dbg_val, v);
  endtask

  int rg [4], wg [4];
  logic [8:0] tg [4];
  bit kp [4];
  word_t model [32];
  initial begin
    hdr_load = 0; hdr_af = 0; af_valid = 0; af_clear = 0; af_commit = 0; af_revit = 0;
    rx_valid = 0; rx_pkt = '0; tx_ready = 1; dbg_tid = 0; dbg_reg = 0;
    for (int a = 0; a < NUM_AF; a++) begin af_tid[a] = 0; af_age[a] = 0; af_gen[a] = 0; end
    for (int j = 0; j < RD_PER_BANK; j++) begin hdr_rd[j] = '0; hdr_wr[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. X writes R3, R4
    wg[0] = 3; wg[1] = 4;
    map(0, 0, 0, 0, rg, tg, kp, 2, wg);
    write(0, 0, 64'd333);
    @(negedge clk);
    check("wr_done waits for all writes", wr_done[0], 0);
    write(0, 1, 64'd444);
    @(negedge clk);
    check("wr_done after all writes", wr_done[0], 1);
    pulse_commit(0);
    reg_is(0, 3, 333, "R3 committed"); reg_is(0, 4, 444, "R4 committed");
    // 2. Y (AF1, age 0) reads R3, writes R4; Z (AF2, age 1) reads R4, R3
    rg[0] = 3; tg[0] = t_left(0, 0, 1); kp[0] = 0; wg[0] = 4;
    map(1, 0, 0, 1, rg, tg, kp, 1, wg);
    expect_read("Y reads committed R3", t_left(0, 0, 1), 1, 333);
    rg[0] = 4; tg[0] = t_left(1, 1, 2); rg[1] = 3; tg[1] = t_right(1, 1, 2); kp[1] = 0;
    map(2, 0, 1, 2, rg, tg, kp, 0, wg);
    expect_read("Z reads committed R3", t_right(1, 1, 2), 2, 333);
    got.delete();
    repeat (5) @(negedge clk);
    check("Z's R4 read waits for Y's write", got.size(), 0);
    write(1, 0, 64'd4040);
    expect_read("Z's R4 read stitched from Y", t_left(1, 1, 2), 2, 4040);
    reg_is(0, 4, 444, "R4 not yet committed");
    pulse_commit(1);
    reg_is(0, 4, 4040, "R4 after Y commits");
    // 3. thread 1
    rg[0] = 3; tg[0] = t_left(2, 2, 2);
    map(4, 1, 0, 1, rg, tg, kp, 0, wg);
    expect_read("thread 1 has its own R3", t_left(2, 2, 2), 4, 0);
    // 4. squash Z after it receives a write to R3 it does not declare: declare one
    af_valid[2] = 0; af_valid[4] = 0;
    @(negedge clk); af_clear[2] = 1; af_clear[4] = 1; @(negedge clk); af_clear = '0;
    af_gen[2]++; af_gen[4]++;
    wg[0] = 3;
    map(3, 0, 0, 0, rg, tg, kp, 1, wg);
    write(3, 0, 64'd999);
    @(negedge clk); af_clear[3] = 1; af_valid[3] = 0; @(negedge clk); af_clear = '0; af_gen[3]++;
    repeat (2) @(negedge clk);
    reg_is(0, 3, 333, "squashed write discarded");
    // 5. revitalization
    got.delete();
    rg[0] = 5; tg[0] = t_left(3, 3, 0); kp[0] = 0;
    rg[1] = 6; tg[1] = t_right(3, 3, 0); kp[1] = 1;
    wg[0] = 5;
    map(5, 0, 0, 2, rg, tg, kp, 1, wg);
    expect_read("W reads R5 (0)", t_left(3, 3, 0), 5, 0);
    expect_read("W reads R6 (0)", t_right(3, 3, 0), 5, 0);
    write(5, 0, 64'd55);
    pulse_commit(5, 1);
    expect_read("R5 re-read after revitalize gets new value", t_left(3, 3, 0), 5, 55);
    repeat (5) @(negedge clk);
    check("constant R6 not resent", got.size(), 0);
    check("write slots cleared by revitalize", wr_done[5], 0);
    write(5, 0, 64'd66);
    pulse_commit(5, 0);
    reg_is(0, 5, 66, "R5 after last iteration");
    // 6. random commits
    for (int r = 0; r < 32; r++) begin dbg_reg = 5'(r); dbg_tid = 0; #1; model[r] = dbg_val; end
    got.delete();
    for (int i = 0; i < 100; i++) begin
      int a;
      word_t v;
      a = $urandom_range(NUM_AF - 1, 0);
      wg[0] = $urandom_range(31, 0);
      v = {$urandom, $urandom};
      map(a, 0, 0, 0, rg, tg, kp, 1, wg);
      write(a, 0, v);
      pulse_commit(a);
      model[wg[0]] = v;
    end
    for (int r = 0; r < 32; r++) reg_is(0, r, model[r], "random commit model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
