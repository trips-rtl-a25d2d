// tb_trips_opn: self-checking test of the full operand-network mesh.
//
// Uses the core's 5x5 mesh (4x4 nodes plus register-bank row and data-bank
// column). Every tile injects a stream of packets to random destinations,
// including itself, while every ejection port is randomly stalled. Each
// packet carries its source tile and a per-source sequence number in the
// data field ([31:16] source, [15:0] sequence). The scoreboard checks that a
// packet ejects only at its destination tile, that packets between one
// source and one destination arrive in order (dimension-order routing keeps
// one path), and that all packets are delivered exactly once. It also
// measures the one-hop latency on an idle network: a packet to the east
// neighbour must eject three cycles after injection (injection router,
// neighbour router, ejection).
module tb_trips_opn;
  import trips_pkg::*;
  localparam int MR = MESH_R, MC = MESH_C, NT = MR * MC, N = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NT-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  pkt_t inj_pkt [NT];
  pkt_t ej_pkt  [NT];
  trips_opn #(.MR(MR), .MC(MC)) dut (.*);

  int checks = 0, failures = 0;
  int sent [NT];
  int last [NT][NT];     // last sequence seen from src at dst
  int got = 0;

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    for (int t = 0; t < NT; t++) $display("tile %0d sent %0d ejv=%b", t, sent[t], ej_valid[t]);
    $display("got %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // handshakes are sampled just after the negedge drive, when valid/ready are
  // stable until the next rising edge
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int t = 0; t < NT; t++) begin
      if (inj_valid[t] && inj_ready[t]) sent[t]++;
      if (ej_valid[t] && ej_ready[t]) begin
        int src, sq;
        src = int'(ej_pkt[t].data[31:16]);
        sq  = int'(ej_pkt[t].data[15:0]);
        checks++;
        if (int'(ej_pkt[t].dr) * MC + int'(ej_pkt[t].dc) != t || src >= NT || sq <= last[src][t]) begin
          failures++;
          $display("FAIL: tile %0d got pkt for (%0d,%0d) src %0d seq %0d", t,
                   ej_pkt[t].dr, ej_pkt[t].dc, src, sq);
        end else last[src][t] = sq;
        got++;
      end
    end
  end

  int t0, lat;
  initial begin
    for (int i = 0; i < NT; i++) begin
      sent[i] = 0; inj_pkt[i] = '0;
      for (int j = 0; j < NT; j++) last[i][j] = -1;
    end
    inj_valid = '0; ej_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency on an idle network: tile (1,1) -> (1,2)
    @(negedge clk);
    inj_pkt[MC + 1] = '0;
    inj_pkt[MC + 1].dr = 3'd1; inj_pkt[MC + 1].dc = 3'd2;
    inj_pkt[MC + 1].data = word_t'(((MC + 1) << 16) | 0);
    inj_valid[MC + 1] = 1'b1;
    @(negedge clk);
    inj_valid = '0;
    lat = 1;
    while (!ej_valid[MC + 2] && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL: one-hop latency %0d cycles after acceptance", lat); end
    @(negedge clk);
    for (int i = 0; i < NT; i++) sent[i] = (i == MC + 1) ? 1 : 0;
    got = 1;
    // random traffic
    while (got < NT * N + 1) begin
      for (int t = 0; t < NT; t++) begin
        if (!inj_valid[t] || int'(inj_pkt[t].data[15:0]) < sent[t]) begin
          if (sent[t] < N + (t == MC + 1) && ($urandom % 2) == 0) begin
            inj_pkt[t] = '0;
            inj_pkt[t].dr = 3'($urandom_range(MR - 1, 0));
            inj_pkt[t].dc = 3'($urandom_range(MC - 1, 0));
            inj_pkt[t].data = word_t'((t << 16) | sent[t]);
            inj_valid[t] = 1'b1;
          end else inj_valid[t] = 1'b0;
        end
      end
      ej_ready = NT'({$urandom, $urandom});
      @(negedge clk);
    end
    inj_valid = '0; ej_ready = '1;
    repeat (20) @(posedge clk);
    checks++;
    if (ej_valid != '0) begin failures++; $display("FAIL: extra packets"); end
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (sent[t] != N + (t == MC + 1)) begin failures++; $display("FAIL: tile %0d sent %0d", t, sent[t]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
