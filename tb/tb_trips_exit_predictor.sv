// tb_trips_exit_predictor: self-checking test of the tournament exit predictor.
//
// Checks: (1) after reset every block predicts exit 0; (2) a block that
// always leaves by the same exit is predicted correctly after training;
// (3) a block whose exit follows a repeating pattern of period three (as a
// loop that runs three times) is learnt by the history-based components:
// after warm-up the predictor must reach at least 90% accuracy on it, while
// one that only remembers the last exit would reach 33%; (4) global
// history is kept per thread, so training thread 1 does not change thread
// 0's prediction; (5) 400 random training updates on other blocks do not
// stop a strongly trained block from predicting right. Prediction is
// combinational; training happens on the clock edge where u_valid is high.
module tb_trips_exit_predictor;
  import trips_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  addr_t p_addr, u_addr;
  logic [TID_W-1:0] p_tid, u_tid;
  logic [2:0] p_exit, u_exit;
  logic u_valid;
  trips_exit_predictor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string w, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", w, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic train(addr_t a, int tid, int ex);
    @(negedge clk);
    u_valid = 1; u_addr = a; u_tid = TID_W'(tid); u_exit = 3'(ex);
    @(negedge clk);
    u_valid = 0;
  endtask
  // prediction is combinational: drive the lookup, read p_exit
  int pe;
  task automatic predict(addr_t a, int tid);
    p_addr = a; p_tid = TID_W'(tid);
    #1;
    pe = int'(p_exit);
  endtask

  int ok, pat [3];
  initial begin
    u_valid = 0; u_addr = 0; u_tid = 0; u_exit = 0; p_addr = 0; p_tid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    predict(32'h1000, 0); check("reset prediction", pe, 0);
    // constant exit
    for (int i = 0; i < 6; i++) train(32'h2000, 0, 5);
    predict(32'h2000, 0); check("constant exit learnt", pe, 5);
    // period-3 pattern 1,1,2 on block 0x4000 in thread 2
    pat[0] = 1; pat[1] = 1; pat[2] = 2;
    for (int i = 0; i < 60; i++) train(32'h4000, 2, pat[i % 3]);
    ok = 0;
    for (int i = 60; i < 120; i++) begin
      predict(32'h4000, 2);
      if (pe == pat[i % 3]) ok++;
      train(32'h4000, 2, pat[i % 3]);
    end
    checks++;
    if (ok < 54) begin failures++; $display("FAIL pattern accuracy %0d/60", ok); end
    // per-thread global history
    for (int i = 0; i < 6; i++) train(32'h6000, 0, 3);
    for (int i = 0; i < 6; i++) train(32'h7000, 1, 6);
    predict(32'h6000, 0); check("thread 0 unaffected by thread 1", pe, 3);
    // random noise on other blocks
    for (int i = 0; i < 400; i++) train(32'h10000 + 32'($urandom_range(63, 0)) * 128, $urandom_range(7, 0), $urandom_range(7, 0));
    for (int i = 0; i < 4; i++) train(32'h2000, 0, 5);
    predict(32'h2000, 0); check("trained block survives noise", pe, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
