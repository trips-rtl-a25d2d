// tb_trips_opn_router: self-checking test of one operand-network router.
//
// The router under test sits at mesh position (2,2). Random packets with
// random destinations in a 5x5 mesh are offered on all five inputs while the
// five outputs are randomly stalled. A scoreboard checks that every packet
// leaves on the output that dimension-order routing requires (column first,
// then row, local when it has arrived), that packets from one input leave in
// the order they entered, that none is lost or duplicated, and that the
// input FIFO never accepts more than two packets. Packet identity is carried
// in the data field: [31:16] input port, [15:0] sequence number.
module tb_trips_opn_router;
  import trips_pkg::*;
  localparam int MY_R = 2, MY_C = 2, N = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt [5];
  pkt_t out_pkt [5];
  trips_opn_router #(.MY_R(MY_R), .MY_C(MY_C)) dut (.*);

  int checks = 0, failures = 0;
  int sent [5], next_seq [5], got = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int want(pkt_t p);
    if (int'(p.dc) > MY_C) return 1;
    if (int'(p.dc) < MY_C) return 3;
    if (int'(p.dr) > MY_R) return 2;
    if (int'(p.dr) < MY_R) return 0;
    return 4;
  endfunction

  function automatic pkt_t mk(int i, int s);
    pkt_t p;
    p = '0;
    p.dr = 3'($urandom_range(4, 0));
    p.dc = 3'($urandom_range(4, 0));
    p.data = word_t'((i << 16) | s);
    return p;
  endfunction

  // drivers and checkers
  // handshakes are sampled just after the negedge drive, when valid/ready are
  // stable until the next rising edge
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      int src, sq;
      src = int'(out_pkt[o].data[31:16]);
      sq  = int'(out_pkt[o].data[15:0]);
      checks++;
      if (want(out_pkt[o]) != o || src > 4 || sq != next_seq[src]) begin
        failures++;
        $display("FAIL out %0d: pkt src %0d seq %0d (exp seq %0d) to (%0d,%0d)",
                 o, src, sq, next_seq[src], out_pkt[o].dr, out_pkt[o].dc);
      end
      if (src <= 4) next_seq[src] = sq + 1;
      got++;
    end
    for (int i = 0; i < 5; i++) if (in_valid[i] && in_ready[i]) sent[i]++;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin sent[i] = 0; next_seq[i] = 0; end
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < 5; i++) in_pkt[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < 5 * N) begin
      @(negedge clk);
      // keep a packet valid until accepted (accepted ones were counted at posedge)
      for (int i = 0; i < 5; i++) begin
        if (!in_valid[i] || int'(in_pkt[i].data[15:0]) < sent[i]) begin
          if (sent[i] < N && ($urandom % 3) != 0) begin
            in_pkt[i] = mk(i, sent[i]);
            in_valid[i] = 1'b1;
          end else in_valid[i] = 1'b0;
        end
      end
      out_ready = 5'($urandom);
    end
    @(negedge clk);
    in_valid = '0;
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid != '0) begin failures++; $display("FAIL: router not empty"); end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (sent[i] != N || next_seq[i] != N) begin
        failures++; $display("FAIL input %0d sent %0d delivered %0d", i, sent[i], next_seq[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
