// tb_trips_icache_bank: self-checking test of one instruction-cache bank.
//
// Fills 8 random sets with random words through the refill port, then checks
// (1) the combinational 32-word chunk view of each set, and (2) that a fetch
// started on a set for a random A-frame streams the chunk into the array in
// AF_FRAMES consecutive cycles: in cycle k every column c receives word
// k*COLS+c with frame number af*AF_FRAMES+k, after which busy drops.
// (3) An abort stops the stream early.
module tb_trips_icache_bank;
  import trips_pkg::*;
  localparam int SETS = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, abort, busy, we;
  logic [6:0] set, wset;
  logic [AF_W-1:0] af;
  logic [31:0] chunk [32];
  logic [COLS-1:0] ld_valid;
  logic [FR_W-1:0] ld_frame;
  logic [31:0] ld_inst [COLS];
  logic [4:0] wword;
  logic [31:0] wdata;
  trips_icache_bank #(.SETS(SETS)) dut (.*);

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

  logic [31:0] img [8][32];
  int sets [8];
  initial begin
    start = 0; abort = 0; we = 0; set = 0; wset = 0; af = 0; wword = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      sets[s] = s * 16 + $urandom_range(15, 0);
      for (int w = 0; w < 32; w++) begin
        img[s][w] = $urandom;
        @(negedge clk);
        we = 1; wset = 7'(sets[s]); wword = 5'(w); wdata = img[s][w];
      end
    end
    @(negedge clk); we = 0;
    for (int s = 0; s < 8; s++) begin
      int a;
      set = 7'(sets[s]);
      #1;
      for (int w = 0; w < 32; w++) check("chunk word", chunk[w], img[s][w]);
      a = $urandom_range(NUM_AF - 1, 0);
      @(negedge clk);
      start = 1; af = AF_W'(a);
      @(negedge clk);
      start = 0; set = '0;
      for (int k = 0; k < AF_FRAMES; k++) begin
        check("busy while streaming", busy, 1);
        check("frame number", ld_frame, a * AF_FRAMES + k);
        for (int c = 0; c < COLS; c++) begin
          check("valid", ld_valid[c], 1);
          check("streamed word", ld_inst[c], img[s][k * COLS + c]);
        end
        @(negedge clk);
      end
      check("done", busy, 0);
    end
    // abort
    @(negedge clk); start = 1; set = 7'(sets[0]);
    @(negedge clk); start = 0;
    @(negedge clk); abort = 1;
    @(negedge clk); abort = 0;
    check("abort stops streaming", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
