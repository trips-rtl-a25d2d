// trips_opn_router: one router of the operand network (OPN) mesh.
//
// Every tile of the core (execution node, register bank, data-cache bank,
// block control) owns one router; routers are wired to their four nearest
// neighbours, so a value can reach any tile in the array hop by hop. Routing
// is dimension ordered: a packet first travels along its row to the
// destination column, then along the column to the destination row, which
// keeps the mesh free of deadlock. Each input port has a two-entry FIFO;
// every output has a round-robin arbiter over the five inputs, and one packet
// per output leaves per cycle. A hop costs one cycle. Nearest-neighbour links
// and delivery to any node follow the TRIPS description; the router
// organisation (dimension-order routing, buffer depth, arbitration) is this
// design's own.
//
// Ports are indexed 0 = north (row-1), 1 = east (col+1), 2 = south (row+1),
// 3 = west (col-1), 4 = local tile. Handshake on every port: a packet moves
// when valid and ready are both high on a rising clock edge.
module trips_opn_router
  import trips_pkg::*;
#(
  parameter int MY_R = 0,
  parameter int MY_C = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] in_valid,
  input  pkt_t       in_pkt   [5],
  output logic [4:0] in_ready,
  output logic [4:0] out_valid,
  output pkt_t       out_pkt  [5],
  input  logic [4:0] out_ready
);

  localparam int P_N = 0, P_E = 1, P_S = 2, P_W = 3, P_L = 4;

  pkt_t       fifo   [5][2];
  logic [1:0] cnt    [5];
  logic [2:0] route  [5];     // requested output of each input head
  logic [4:0] grant_in [5];   // grant_in[o][i]: output o takes input i
  logic [4:0] pop;
  logic [2:0] rr     [5];     // round-robin pointer per output

  // route computation for the head of each input FIFO
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      pkt_t h;
      h = fifo[i][0];
      if (int'(h.dc) > MY_C)      route[i] = 3'(P_E);
      else if (int'(h.dc) < MY_C) route[i] = 3'(P_W);
      else if (int'(h.dr) > MY_R) route[i] = 3'(P_S);
      else if (int'(h.dr) < MY_R) route[i] = 3'(P_N);
      else                        route[i] = 3'(P_L);
    end
  end

  // per-output round-robin arbitration
  always_comb begin
    pop = '0;
    for (int o = 0; o < 5; o++) begin
      grant_in[o] = '0;
      out_valid[o] = 1'b0;
      out_pkt[o] = '0;
      for (int k = 0; k < 5; k++) begin
        int i;
        i = (int'(rr[o]) + k) % 5;
        if (out_valid[o] == 1'b0 && cnt[i] != 2'd0 && route[i] == 3'(o)) begin
          out_valid[o] = 1'b1;
          out_pkt[o]   = fifo[i][0];
          grant_in[o][i] = 1'b1;
        end
      end
      if (out_valid[o] && out_ready[o]) pop = pop | grant_in[o];
    end
  end

  always_comb begin
    for (int i = 0; i < 5; i++) in_ready[i] = (cnt[i] != 2'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        cnt[i] <= '0;
        rr[i]  <= '0;
        fifo[i][0] <= '0;
        fifo[i][1] <= '0;
      end
    end else begin
      for (int i = 0; i < 5; i++) begin
        logic push;
        push = in_valid[i] && in_ready[i];
        case ({push, pop[i]})
          2'b10: begin
            fifo[i][cnt[i][0]] <= in_pkt[i];
            cnt[i] <= cnt[i] + 2'd1;
          end
          2'b01: begin
            fifo[i][0] <= fifo[i][1];
            cnt[i] <= cnt[i] - 2'd1;
          end
          2'b11: begin
            if (cnt[i] == 2'd1) fifo[i][0] <= in_pkt[i];
            else begin
              fifo[i][0] <= fifo[i][1];
              fifo[i][1] <= in_pkt[i];
            end
          end
          default: ;
        endcase
      end
      for (int o = 0; o < 5; o++) begin
        if (out_valid[o] && out_ready[o]) rr[o] <= (rr[o] == 3'd4) ? 3'd0 : rr[o] + 3'd1;
      end
    end
  end

endmodule
