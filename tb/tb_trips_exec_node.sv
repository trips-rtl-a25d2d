// tb_trips_exec_node: self-checking test of one execution node.
//
// The testbench plays the instruction-cache bank (loading stations), block
// control (generation tags, revitalize) and the operand network (sending
// operand packets into the node, taking result packets out with random
// back-pressure). Checks:
//  1. 200 random two-operand integer instructions placed in random stations
//     of random A-frames; operands arrive in random order with random gaps.
//     Each must fire once and send one packet per target, with the right
//     destination tile, slot, frame, A-frame, generation and ALU result.
//  2. Predication: an instruction waiting for a true predicate does not fire
//     on a false one, and one waiting for a false predicate does.
//  3. A packet whose generation tag is stale is dropped.
//  4. Revitalization re-fires an instruction whose operand carries the keep
//     flag without a new operand, and clears operands without it.
//  5. A floating-point opcode sets the sticky exc output.
module tb_trips_exec_node;
  import trips_pkg::*;
  import tb_trips_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_valid, rx_valid, rx_ready, tx_valid, tx_ready, fire, exc;
  logic [5:0] ld_frame;
  logic [31:0] ld_inst;
  logic [NUM_AF-1:0] af_clear, af_revit;
  logic [GEN_W-1:0] af_gen [NUM_AF];
  pkt_t rx_pkt, tx_pkt;
  trips_exec_node #(.ROW(1), .COL(2)) dut (.*);

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

  // collect result packets (sampled after the negedge drive, see opn tests)
  pkt_t got [$];
  always @(negedge clk) if (rst_n) begin
    #2;
    if (tx_valid && tx_ready) got.push_back(tx_pkt);
  end

  task automatic load(int f, logic [31:0] ins);
    @(negedge clk);
    ld_valid = 1; ld_frame = 6'(f); ld_inst = ins;
    @(negedge clk);
    ld_valid = 0;
  endtask
  task automatic send(int f, logic [1:0] slot, word_t v, bit keep = 0, int gen = -1);
    @(negedge clk);
    rx_pkt = '0;
    rx_pkt.kind = PK_OPERAND; rx_pkt.dr = 3'd2; rx_pkt.dc = 3'd2;
    rx_pkt.af = AF_W'(f / 8); rx_pkt.idx = 7'(f % 8); rx_pkt.slot = slot;
    rx_pkt.gen = (gen < 0) ? af_gen[f / 8] : GEN_W'(gen);
    rx_pkt.data = v; rx_pkt.keep = keep;
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask
  task automatic gap(int n); repeat (n) @(negedge clk); endtask
  task automatic expect_pkt(string w, logic [8:0] t, int f, word_t v);
    pkt_t e;
    int n;
    n = 0;
    while (got.size() == 0 && n < 40) begin @(negedge clk); n++; end
    checks++;
    if (got.size() == 0) begin failures++; $display("FAIL %s: no packet", w); return; end
    e = target_pkt(t, AF_W'(f / 8), af_gen[f / 8], v, 1'b0);
    if (got[0] !== e) begin
      failures++;
      $display("FAIL %s: pkt kind %0d (%0d,%0d) slot %0d idx %0d af %0d data %h, exp kind %0d (%0d,%0d) slot %0d idx %0d af %0d data %h",
               w, got[0].kind, got[0].dr, got[0].dc, got[0].slot, got[0].idx, got[0].af, got[0].data,
               e.kind, e.dr, e.dc, e.slot, e.idx, e.af, e.data);
    end
    void'(got.pop_front());
  endtask
  task automatic expect_none(string w, int n);
    gap(n);
    check(w, got.size(), 0);
    got.delete();
  endtask

  function automatic logic [8:0] rtgt();
    case ($urandom_range(3, 0))
      0: return t_left($urandom_range(3, 0), $urandom_range(3, 0), $urandom_range(7, 0));
      1: return t_right($urandom_range(3, 0), $urandom_range(3, 0), $urandom_range(7, 0));
      2: return t_pred($urandom_range(3, 0), $urandom_range(3, 0), $urandom_range(7, 0));
      default: return t_wr($urandom_range(3, 0), $urandom_range(7, 1));
    endcase
  endfunction

  opcode_e ops [8] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_TLT, OP_SRL};
  function automatic word_t ref_op(opcode_e o, word_t a, word_t b);
    case (o)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return a * b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_TLT: return word_t'($signed(a) < $signed(b));
      default: return a >> b[5:0];
    endcase
  endfunction

  int nfire = 0;
  always @(posedge clk) if (fire) nfire++;

  initial begin
    ld_valid = 0; ld_frame = 0; ld_inst = 0; af_clear = 0; af_revit = 0;
    rx_valid = 0; rx_pkt = '0; tx_ready = 1;
    for (int a = 0; a < NUM_AF; a++) af_gen[a] = GEN_W'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); tx_ready = ($urandom_range(3, 0) != 0); end
    join_none
    // 1. random instructions
    for (int i = 0; i < 200; i++) begin
      int f;
      opcode_e o;
      word_t a, b;
      logic [8:0] t1, t2;
      f = $urandom_range(63, 0);
      o = ops[$urandom_range(7, 0)];
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      t1 = rtgt(); t2 = ($urandom_range(1, 0) != 0) ? rtgt() : 9'd0;
      af_clear = '0; af_clear[f / 8] = 1'b1;     // free the A-frame first
      @(negedge clk); af_clear = '0;
      load(f, i_g(o, PR_NONE, t1, t2));
      if ($urandom_range(1, 0) != 0) begin
        send(f, SL_LEFT, a); gap($urandom_range(3, 0)); send(f, SL_RIGHT, b);
      end else begin
        send(f, SL_RIGHT, b); gap($urandom_range(3, 0)); send(f, SL_LEFT, a);
      end
      expect_pkt("T1 result", t1, f, ref_op(o, a, b));
      if (t2 != 0) expect_pkt("T2 result", t2, f, ref_op(o, a, b));
      expect_none("fires only once", 6);
    end
    // 2. predication
    af_clear = '1; @(negedge clk); af_clear = '0;
    load(3, i_g(OP_MOV, PR_T, t_left(0, 0, 1)));
    send(3, SL_LEFT, 64'd42);
    send(3, SL_PRED, 64'd0);
    expect_none("true-predicated MOV ignores false predicate", 10);
    load(4, i_g(OP_MOV, PR_F, t_left(0, 0, 2)));
    send(4, SL_LEFT, 64'd43);
    send(4, SL_PRED, 64'd0);
    expect_pkt("false-predicated MOV fires", t_left(0, 0, 2), 4, 64'd43);
    // 3. stale generation
    load(9, i_i(OP_ADDI, PR_NONE, 1, t_left(0, 0, 3)));
    send(9, SL_LEFT, 64'd5, 0, int'(af_gen[1] + 4'd1));
    expect_none("stale packet dropped", 10);
    send(9, SL_LEFT, 64'd5);
    expect_pkt("current packet accepted", t_left(0, 0, 3), 9, 64'd6);
    // 4. revitalization keeps constant operands only
    af_clear = '1; @(negedge clk); af_clear = '0;
    load(17, i_i(OP_ADDI, PR_NONE, 2, t_left(0, 1, 0)));
    load(18, i_i(OP_ADDI, PR_NONE, 3, t_left(0, 1, 1)));
    send(17, SL_LEFT, 64'd10, 1);
    send(18, SL_LEFT, 64'd20, 0);
    expect_pkt("kept operand first run", t_left(0, 1, 0), 17, 64'd12);
    expect_pkt("plain operand first run", t_left(0, 1, 1), 18, 64'd23);
    @(negedge clk); af_revit[2] = 1'b1; @(negedge clk); af_revit = '0;
    expect_pkt("kept operand re-fires after revitalize", t_left(0, 1, 0), 17, 64'd12);
    expect_none("plain operand was cleared", 10);
    send(18, SL_LEFT, 64'd30, 0);
    expect_pkt("plain operand fires with new value", t_left(0, 1, 1), 18, 64'd33);
    // 5. unimplemented opcode
    check("no exception yet", exc, 0);
    load(40, i_g(OP_FADD, PR_NONE, t_left(0, 0, 0)));
    send(40, SL_LEFT, 1); send(40, SL_RIGHT, 2);
    gap(5);
    check("FP opcode flags exc", exc, 1);
    checks++;
    if (nfire < 200) begin failures++; $display("FAIL fire count %0d", nfire); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
