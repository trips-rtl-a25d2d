// trips_opn: the operand network, a 2-D mesh of trips_opn_router.
//
// The mesh has (ROWS+1) x (COLS+1) routers, numbered t = r*(COLS+1) + c. Row 0
// holds the register banks and, in its last column, the block control tile;
// rows 1..ROWS hold the execution nodes and, in the last column, the data
// cache banks. Each tile injects and ejects packets through its router's local
// port with a valid/ready handshake. Mesh edge ports are tied off (no valid,
// always ready); dimension-ordered routing never sends a packet off the edge
// when its destination lies inside the mesh.
module trips_opn
  import trips_pkg::*;
#(
  parameter int MR = MESH_R,
  parameter int MC = MESH_C
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [MR*MC-1:0] inj_valid,
  input  pkt_t             inj_pkt   [MR*MC],
  output logic [MR*MC-1:0] inj_ready,
  output logic [MR*MC-1:0] ej_valid,
  output pkt_t             ej_pkt    [MR*MC],
  input  logic [MR*MC-1:0] ej_ready
);

  localparam int N = MR * MC;

  logic [4:0] iv [N];
  pkt_t       ip [N][5];
  logic [4:0] ir [N];
  logic [4:0] ov [N];
  pkt_t       op [N][5];
  logic [4:0] orr [N];

  for (genvar r = 0; r < MR; r++) begin : g_r
    for (genvar c = 0; c < MC; c++) begin : g_c
      localparam int T = r * MC + c;
      // north input comes from the south output of the router above, etc.
      // 0 = north
      if (r > 0) begin : g_n
        assign iv[T][0] = ov[T-MC][2];
        assign ip[T][0] = op[T-MC][2];
        assign orr[T][0] = ir[T-MC][2];
      end else begin : g_nb
        assign iv[T][0] = 1'b0;
        assign ip[T][0] = '0;
        assign orr[T][0] = 1'b1;
      end
      // 1 = east
      if (c < MC-1) begin : g_e
        assign iv[T][1] = ov[T+1][3];
        assign ip[T][1] = op[T+1][3];
        assign orr[T][1] = ir[T+1][3];
      end else begin : g_eb
        assign iv[T][1] = 1'b0;
        assign ip[T][1] = '0;
        assign orr[T][1] = 1'b1;
      end
      // 2 = south
      if (r < MR-1) begin : g_s
        assign iv[T][2] = ov[T+MC][0];
        assign ip[T][2] = op[T+MC][0];
        assign orr[T][2] = ir[T+MC][0];
      end else begin : g_sb
        assign iv[T][2] = 1'b0;
        assign ip[T][2] = '0;
        assign orr[T][2] = 1'b1;
      end
      // 3 = west
      if (c > 0) begin : g_w
        assign iv[T][3] = ov[T-1][1];
        assign ip[T][3] = op[T-1][1];
        assign orr[T][3] = ir[T-1][1];
      end else begin : g_wb
        assign iv[T][3] = 1'b0;
        assign ip[T][3] = '0;
        assign orr[T][3] = 1'b1;
      end
      // 4 = local
      assign iv[T][4]     = inj_valid[T];
      assign ip[T][4]     = inj_pkt[T];
      assign orr[T][4]    = ej_ready[T];
      assign inj_ready[T] = ir[T][4];
      assign ej_valid[T]  = ov[T][4];
      assign ej_pkt[T]    = op[T][4];

      trips_opn_router #(.MY_R(r), .MY_C(c)) u_rt (
        .clk, .rst_n,
        .in_valid (iv[T]), .in_pkt (ip[T]), .in_ready (ir[T]),
        .out_valid(ov[T]), .out_pkt(op[T]), .out_ready(orr[T])
      );
    end
  end

endmodule
