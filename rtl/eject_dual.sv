// eject_dual: ejection stage at the front of the router, of width EJECT_W (2 in the
// evaluated design: "dual-width ejection"). With a single ejection port, two flits that
// reach their destination router in the same cycle cannot both leave the network and one
// of them must be deflected and come back later; a second port removes that bottleneck.
//
// The stage is combinational and is built as EJECT_W ejection units in series, each
// removing at most one flit addressed to this router (dst == MY_X/MY_Y) from the four
// incoming slots. A unit prefers a golden flit; otherwise it takes the lowest-numbered
// slot. Removed slots leave the stage empty. Ejected flits go to the node on ej[k]; the
// node must accept them in the same cycle (the reassembly side never back-pressures the
// network). The preference order inside a unit is this design's choice.
module eject_dual
  import minbd_pkg::*;
#(
  parameter int EJECT_W = 2
) (
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  pkt_id_t            golden_id,
  input  flit_t              in  [NPORTS],
  output flit_t              out [NPORTS],
  output flit_t              ej  [EJECT_W]
);
  flit_t cur [EJECT_W+1][NPORTS];

  always_comb begin
    logic [NPORTS-1:0] local_v, gold_v;
    logic              fnd_l, fnd_g;
    logic [1:0]        idx_l, idx_g, idx;
    for (int p = 0; p < NPORTS; p++) cur[0][p] = in[p];
    for (int k = 0; k < EJECT_W; k++) begin
      for (int p = 0; p < NPORTS; p++) begin
        local_v[p] = cur[k][p].valid && cur[k][p].dst_x == my_x && cur[k][p].dst_y == my_y;
        gold_v[p]  = local_v[p] && pkt_id(cur[k][p]) == golden_id;
      end
      idx_g = first_from(gold_v, 2'd0, fnd_g);
      idx_l = first_from(local_v, 2'd0, fnd_l);
      idx   = fnd_g ? idx_g : idx_l;
      for (int p = 0; p < NPORTS; p++) cur[k+1][p] = cur[k][p];
      ej[k] = FLIT_NONE;
      if (fnd_l) begin
        ej[k]          = cur[k][idx];
        cur[k+1][idx]  = FLIT_NONE;
      end
    end
    for (int p = 0; p < NPORTS; p++) out[p] = cur[EJECT_W][p];
  end
endmodule
