// tb_trips_target_predictor: self-checking test of the next-block predictor.
//
// Checks: untrained blocks predict the sequentially next block (+640 bytes)
// as a branch; trained branches return their BTB target for the right exit
// and not for other exits; calls return the Call BTB target and push the
// return address; returns pop the thread's return address stack in LIFO
// order through two nested calls; the stacks of two threads are separate;
// system calls predict the sequential block. The prediction is
// combinational; the stack moves on the clock edge where p_valid is high.
module tb_trips_target_predictor;
  import trips_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic p_valid, u_valid;
  addr_t p_addr, p_next, u_addr, u_target;
  logic [TID_W-1:0] p_tid;
  logic [2:0] p_exit, u_exit;
  btype_e p_type, u_type;
  trips_target_predictor dut (.*);

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

  task automatic train(addr_t a, int ex, btype_e t, addr_t tgt);
    @(negedge clk);
    u_valid = 1; u_addr = a; u_exit = 3'(ex); u_type = t; u_target = tgt;
    @(negedge clk);
    u_valid = 0;
  endtask
  // look up; if step, also move the RAS at the next edge
  task automatic look(addr_t a, int tid, int ex, bit step, output addr_t nx, output btype_e ty);
    @(negedge clk);
    p_addr = a; p_tid = TID_W'(tid); p_exit = 3'(ex); p_valid = step;
    #1;
    nx = p_next; ty = p_type;
    @(negedge clk);
    p_valid = 0;
  endtask

  addr_t nx, tg [16];
  btype_e ty;
  initial begin
    p_valid = 0; u_valid = 0; p_addr = 0; p_tid = 0; p_exit = 0;
    u_addr = 0; u_exit = 0; u_type = BT_BRANCH; u_target = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(32'h5000, 0, 2, 0, nx, ty);
    check("untrained next", nx, 32'h5000 + 640);
    check("untrained type", ty, BT_BRANCH);
    // branches: 16 blocks, random targets, exit k%8
    for (int k = 0; k < 16; k++) begin
      tg[k] = {$urandom} & 32'hffff_ff80;
      train(32'h8000 + 32'(k) * 128, k % 8, BT_BRANCH, tg[k]);
    end
    for (int k = 0; k < 16; k++) begin
      look(32'h8000 + 32'(k) * 128, 0, k % 8, 0, nx, ty);
      check("BTB target", nx, tg[k]);
      look(32'h8000 + 32'(k) * 128, 0, (k + 1) % 8, 0, nx, ty);
      check("other exit is not the trained target", nx == tg[k], 0);
    end
    // nested calls in thread 3: A calls F, F calls G, G returns, F returns
    train(32'h0a00, 1, BT_CALL, 32'h2000);
    train(32'h2000, 0, BT_CALL, 32'h3000);
    train(32'h3000, 0, BT_RET, 0);
    train(32'h2280, 0, BT_RET, 0);
    look(32'h0a00, 3, 1, 1, nx, ty);
    check("call target", nx, 32'h2000);
    check("call type", ty, BT_CALL);
    look(32'h2000, 3, 0, 1, nx, ty);
    check("nested call target", nx, 32'h3000);
    // thread 4 has its own (empty) stack: a return there must not pop thread 3
    look(32'h3000, 4, 0, 1, nx, ty);
    check("other thread's RAS is separate", nx == 32'h2000 + 640, 0);
    look(32'h3000, 3, 0, 1, nx, ty);
    check("return to caller F", nx, 32'h2000 + 640);
    check("return type", ty, BT_RET);
    look(32'h2280, 3, 0, 1, nx, ty);
    check("return to A", nx, 32'h0a00 + 640);
    // system call
    train(32'h9900, 4, BT_SCALL, 0);
    look(32'h9900, 0, 4, 0, nx, ty);
    check("scall predicts sequential", nx, 32'h9900 + 640);
    check("scall type", ty, BT_SCALL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
