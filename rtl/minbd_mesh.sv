// minbd_mesh: the on-chip network. MESH_X x MESH_Y minbd_router instances are joined in
// a 2D mesh by point-to-point links with one register each (1-cycle link latency), so a
// hop costs 3 cycles: 2 in the router pipeline and 1 on the link. Each node also has a
// reassembly buffer on its two ejection ports.
//
// Node (x, y) has index n = y * MESH_X + x; x grows to the East, y to the North. At the
// edge of the mesh a router port has no neighbour; its output is looped back through a
// link register into the same port's input, so a flit deflected off the edge returns one
// hop later. This keeps every router a full 4-port deflection router, which a deflection
// network needs (every flit must leave on some port each cycle); it is this design's
// choice for the mesh boundary.
//
// Per node the network offers:
//   inj[n] / inj_taken[n]   injection of one flit; hold inj[n] until inj_taken[n];
//   ej[n][k]                the flits ejected this cycle (k = 0..1), for observation;
//   done_* [n]              a reassembled packet, one per cycle;
//   drop_*[n][k]            a flit refused by a full reassembly buffer (Retransmit-Once
//                           hook: the flit whose packet must be requested again);
//   events[n]               one-cycle router event pulses for statistics.
module minbd_mesh
  import minbd_pkg::*;
#(
  parameter int MESH_X      = 4,
  parameter int MESH_Y      = 4,
  parameter int NUM_TXN     = 16,
  parameter int EPOCH       = 64,
  parameter int BUF_DEPTH   = 4,
  parameter int C_THRESHOLD = 2,
  parameter int RA_SLOTS    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             inj        [MESH_X*MESH_Y],
  output logic              inj_taken  [MESH_X*MESH_Y],
  output flit_t             ej         [MESH_X*MESH_Y][2],
  output logic              done_valid [MESH_X*MESH_Y],
  output pkt_id_t           done_id    [MESH_X*MESH_Y],
  output logic [SEQ_W-1:0]  done_last  [MESH_X*MESH_Y],
  output logic [DATA_W-1:0] done_data  [MESH_X*MESH_Y][2**SEQ_W],
  output logic [1:0]        drop_valid [MESH_X*MESH_Y],
  output flit_t             drop_flit  [MESH_X*MESH_Y][2],
  output router_events_t    events     [MESH_X*MESH_Y]
);
  localparam int N = MESH_X * MESH_Y;

  flit_t rin  [N][NPORTS];
  flit_t rout [N][NPORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int n = y * MESH_X + x;
      // Input of each port comes from the neighbour's opposite port, or from this
      // router's own port at the mesh edge.
      localparam int NB_N = (y < MESH_Y - 1) ? n + MESH_X : n;
      localparam int NB_S = (y > 0)          ? n - MESH_X : n;
      localparam int NB_E = (x < MESH_X - 1) ? n + 1      : n;
      localparam int NB_W = (x > 0)          ? n - 1      : n;
      localparam int PT_N = (y < MESH_Y - 1) ? int'(PORT_S) : int'(PORT_N);
      localparam int PT_S = (y > 0)          ? int'(PORT_N) : int'(PORT_S);
      localparam int PT_E = (x < MESH_X - 1) ? int'(PORT_W) : int'(PORT_E);
      localparam int PT_W = (x > 0)          ? int'(PORT_E) : int'(PORT_W);

      flit_t link_in [NPORTS];
      flit_t rej     [2];

      // Link registers (1-cycle link latency).
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int p = 0; p < NPORTS; p++) link_in[p] <= FLIT_NONE;
        end else begin
          link_in[PORT_N] <= rout[NB_N][PT_N];
          link_in[PORT_S] <= rout[NB_S][PT_S];
          link_in[PORT_E] <= rout[NB_E][PT_E];
          link_in[PORT_W] <= rout[NB_W][PT_W];
        end
      end
      assign rin[n] = link_in;

      minbd_router #(
        .MY_X(x), .MY_Y(y), .NUM_NODES(N), .NUM_TXN(NUM_TXN), .EPOCH(EPOCH),
        .BUF_DEPTH(BUF_DEPTH), .C_THRESHOLD(C_THRESHOLD), .EJECT_W(2),
        .SEED(16'hACE1 ^ 16'(n * 40503 + 1))
      ) u_router (
        .clk, .rst_n, .in_link(rin[n]), .out_link(rout[n]), .inj(inj[n]),
        .inj_taken(inj_taken[n]), .ej(rej), .events(events[n])
      );

      assign ej[n] = rej;

      reassembly_buffer #(.SLOTS(RA_SLOTS), .EJECT_W(2)) u_reasm (
        .clk, .rst_n, .ej(rej), .done_valid(done_valid[n]), .done_id(done_id[n]),
        .done_last(done_last[n]), .done_data(done_data[n]), .drop_valid(drop_valid[n]),
        .drop_flit(drop_flit[n])
      );
    end
  end
endmodule
