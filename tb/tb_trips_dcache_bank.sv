// tb_trips_dcache_bank: self-checking test of one L1 data bank.
//
// The testbench plays block control (oldest-block flags, generation tags,
// the per-A-frame mask of stores not yet done, commit and clear) and the
// operand network. It keeps its own byte-level model of memory. Checks:
//  1. A load of the oldest block reads preloaded data with the requested
//     size (byte, half, word, double) and zero extension, and the reply
//     goes to the target named in the request.
//  2. A load waits while an older store of its block has not arrived, then
//     takes that store's bytes from the store buffer (byte-wise merge of a
//     byte store into a double-word load).
//  3. A load of a block that is not the oldest waits until it becomes the
//     oldest.
//  4. Stores change memory only when their block commits; stores of a
//     cleared (squashed) block are thrown away.
//  5. A random mix of 300 stores and loads in program order, one block at a
//     time, against the byte model.
module tb_trips_dcache_bank;
  import trips_pkg::*;
  import tb_trips_asm_pkg::*;
  localparam int WORDS = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  pkt_t rx_pkt, tx_pkt;
  logic [NUM_AF-1:0] af_oldest, af_commit, af_clear;
  logic [GEN_W-1:0] af_gen [NUM_AF];
  logic [NUM_LSID-1:0] st_pend [NUM_AF];
  logic st_rep_valid, drain_busy, ext_we;
  logic [AF_W-1:0] st_rep_af;
  logic [4:0] st_rep_lsid;
  logic [10:0] ext_addr;
  word_t ext_wdata, ext_rdata;
  trips_dcache_bank #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string w, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got 0x%0h exp 0x%0h", w, g, e); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // the bank owns lines with address bits [7:6] == 0 in this test
  function automatic logic [10:0] widx(addr_t a); return {a[13:8], a[5:3]}; endfunction
  byte unsigned mem [addr_t];
  function automatic byte unsigned rd8(addr_t a); return mem.exists(a) ? mem[a] : 8'd0; endfunction

  pkt_t got [$];
  always @(negedge clk) if (rst_n) begin
    #2;
    if (tx_valid && tx_ready) got.push_back(tx_pkt);
  end
  // block control model: a reported store clears its pending bit
  always @(posedge clk) if (st_rep_valid) st_pend[st_rep_af][st_rep_lsid] <= 1'b0;

  task automatic req(pkind_e k, int af, int lsid, addr_t a, int size, word_t d = 0, logic [8:0] t = 0);
    @(negedge clk);
    rx_pkt = '0;
    rx_pkt.kind = k; rx_pkt.af = AF_W'(af); rx_pkt.gen = af_gen[af]; rx_pkt.idx = 7'(lsid);
    rx_pkt.addr = a; rx_pkt.data = d; rx_pkt.aux = {2'(size), 1'b0, t};
    rx_valid = 1;
    while (!rx_ready) @(negedge clk);
    @(negedge clk);
    rx_valid = 0;
  endtask
  function automatic word_t model_ld(addr_t a, int size);
    word_t v;
    v = 0;
    for (int i = 0; i < (1 << size); i++) v[i*8 +: 8] = rd8(a + i);
    return v;
  endfunction
  task automatic expect_ld(string w, logic [8:0] t, int af, word_t v, int wait_max = 30);
    int n;
    pkt_t e;
    n = 0;
    while (got.size() == 0 && n < wait_max) begin @(negedge clk); n++; end
    checks++;
    if (got.size() == 0) begin failures++; $display("FAIL %s: no reply", w); return; end
    e = target_pkt(t, AF_W'(af), af_gen[af], v, 1'b0);
    if (got[0] !== e) begin
      failures++;
      $display("FAIL %s: data %h kind %0d idx %0d, exp data %h kind %0d idx %0d", w, got[0].data,
               got[0].kind, got[0].idx, e.data, e.kind, e.idx);
    end
    void'(got.pop_front());
  endtask
  task automatic commit(int af);
    @(negedge clk); af_commit[af] = 1; @(negedge clk); af_commit = '0;
    af_gen[af]++;
    repeat (40) @(negedge clk);
  endtask
  task automatic mem_is(addr_t a, string w);
    ext_addr = widx(a);
    #1;
    check(w, ext_rdata, model_ld({a[31:3], 3'b0}, 3));
  endtask

  addr_t A;
  initial begin
    rx_valid = 0; rx_pkt = '0; tx_ready = 1; af_oldest = 0; af_commit = 0; af_clear = 0;
    ext_we = 0; ext_addr = 0; ext_wdata = 0;
    for (int a = 0; a < NUM_AF; a++) begin af_gen[a] = 0; st_pend[a] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // preload 64 words in lines owned by this bank
    for (int i = 0; i < 64; i++) begin
      addr_t a;
      word_t v;
      a = addr_t'((i / 8) * 256 + (i % 8) * 8);
      v = {$urandom, $urandom};
      @(negedge clk);
      ext_we = 1; ext_addr = widx(a); ext_wdata = v;
      for (int b = 0; b < 8; b++) mem[a + b] = v[b*8 +: 8];
    end
    @(negedge clk); ext_we = 0;
    fork forever begin @(negedge clk); tx_ready = ($urandom_range(3, 0) != 0); end join_none
    // 1. loads of every size
    af_oldest[0] = 1;
    for (int s = 0; s < 4; s++) begin
      A = 32'h208 + addr_t'(s);
      req(PK_LOAD, 0, s, A & ~addr_t'((1 << s) - 1), s, 0, t_left(1, 2, s));
      expect_ld("sized load", t_left(1, 2, s), 0, model_ld(A & ~addr_t'((1 << s) - 1), s));
    end
    commit(0);
    // 2. load waits for older store, then forwards byte-wise
    st_pend[1] = 32'h0000_0010;          // store LSID 4 declared
    af_oldest = 8'b0000_0010;
    req(PK_LOAD, 1, 5, 32'h100, 3, 0, t_right(0, 0, 0));
    repeat (10) @(negedge clk);
    check("load waits for older store", got.size(), 0);
    req(PK_STORE, 1, 4, 32'h103, 0, 64'hab);
    mem[32'h103] = 8'hab;
    expect_ld("load forwarded from store buffer", t_right(0, 0, 0), 1, model_ld(32'h100, 3));
    ext_addr = widx(32'h100);
    #1;
    check("store not in memory before commit", ext_rdata[31:24] == 8'hab, 0);
    commit(1);
    mem_is(32'h100, "store in memory after commit");
    // 3. speculative block waits
    af_oldest = '0;
    req(PK_LOAD, 2, 0, 32'h300, 3, 0, t_left(3, 3, 7));
    repeat (10) @(negedge clk);
    check("speculative load waits", got.size(), 0);
    af_oldest[2] = 1;
    expect_ld("load after becoming oldest", t_left(3, 3, 7), 2, model_ld(32'h300, 3));
    commit(2);
    // 4. squashed stores are discarded
    af_oldest = 8'b0000_1000;
    st_pend[3] = 32'h1;
    req(PK_STORE, 3, 0, 32'h400, 3, 64'hdead_beef_dead_beef);
    repeat (3) @(negedge clk);
    @(negedge clk); af_clear[3] = 1; @(negedge clk); af_clear = '0; af_gen[3]++;
    repeat (5) @(negedge clk);
    mem_is(32'h400, "squashed store discarded");
    // 5. random program-order mix, blocks of up to 8 ops in A-frame 4
    for (int blk = 0; blk < 40; blk++) begin
      int nops;
      bit is_st [8];
      nops = $urandom_range(8, 2);
      af_oldest = 8'b0001_0000;
      st_pend[4] = 0;
      for (int i = 0; i < nops; i++) begin
        is_st[i] = ($urandom_range(1, 0) != 0);
        if (is_st[i]) st_pend[4][i] = 1'b1;
      end
      for (int i = 0; i < nops; i++) begin
        int s;
        addr_t a;
        s = $urandom_range(3, 0);
        a = addr_t'($urandom_range(7, 0) * 256 + $urandom_range(63, 0)) & ~addr_t'((1 << s) - 1);
        if (is_st[i]) begin
          word_t d;
          d = {$urandom, $urandom};
          req(PK_STORE, 4, i, a, s, d);
          for (int b = 0; b < (1 << s); b++) mem[a + b] = d[b*8 +: 8];
        end else begin
          req(PK_LOAD, 4, i, a, s, 0, t_left(0, 1, i));
          expect_ld("random load", t_left(0, 1, i), 4, model_ld(a, s));
        end
      end
      commit(4);
    end
    for (int i = 0; i < 64; i++) mem_is(addr_t'((i / 8) * 256 + (i % 8) * 8), "final memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
