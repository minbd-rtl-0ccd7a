// minbd_pkg: types, sizes and small helper functions shared by every block of the
// minimally-buffered deflection router and its mesh.
//
// A flit carries its destination coordinates, the packet identity (source node and
// transaction number), its sequence number inside the packet and the sequence number of
// the packet's last flit, plus a data word. The packet identity is what the Golden Packet
// schedule rotates through; the sequence number gives the total order used between flits
// of the golden packet. Field widths are this design's choice and are sized so the same
// package serves the 4x4 and the 8x8 mesh.
//
// Port numbering used everywhere: 0 = North, 1 = East, 2 = South, 3 = West. The mesh has
// x growing to the East and y growing to the North.
package minbd_pkg;

  localparam int COORD_W = 3;   // up to 8 nodes per mesh dimension
  localparam int NODE_W  = 6;   // up to 64 nodes
  localparam int TXN_W   = 4;   // 16 outstanding transactions per sender
  localparam int SEQ_W   = 3;   // up to 8 flits per packet
  localparam int DATA_W  = 32;  // payload bits per flit
  localparam int NPORTS  = 4;   // network ports of a mesh router
  localparam int PKTID_W = NODE_W + TXN_W;

  typedef enum logic [1:0] {
    PORT_N = 2'd0,
    PORT_E = 2'd1,
    PORT_S = 2'd2,
    PORT_W = 2'd3
  } port_e;

  typedef struct packed {
    logic               valid;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [NODE_W-1:0]  src;
    logic [TXN_W-1:0]   txn;
    logic [SEQ_W-1:0]   seq;
    logic [SEQ_W-1:0]   last_seq;
    logic [DATA_W-1:0]  data;
  } flit_t;

  typedef logic [PKTID_W-1:0] pkt_id_t;

  // Arbitration tags that travel with a flit through the permutation network.
  typedef struct packed {
    logic golden;
    logic silver;
  } tag_t;

  // One-cycle event pulses of a router, used for statistics.
  typedef struct packed {
    logic [2:0] deflected;    // flits leaving on a non-productive port this cycle
    logic [1:0] ejected;      // flits ejected this cycle (0..2)
    logic       injected;     // a local flit entered the router
    logic       buffered;     // a deflected flit was taken into the side buffer
    logic       reinjected;   // the side buffer head re-entered an empty slot
    logic       redirected;   // buffer redirection forced a swap
    logic       silver_used;  // a silver flit existed at the permutation network
    logic       golden_seen;  // a golden flit was in the permutation network
  } router_events_t;

  localparam flit_t FLIT_NONE = '0;

  function automatic pkt_id_t pkt_id(input flit_t f);
    return {f.src, f.txn};
  endfunction

  // Ports that bring flit f closer to its destination, seen from router (x, y).
  function automatic logic [NPORTS-1:0] productive(input flit_t f,
                                                   input logic [COORD_W-1:0] x,
                                                   input logic [COORD_W-1:0] y);
    logic [NPORTS-1:0] p;
    p = '0;
    if (f.valid) begin
      p[PORT_N] = f.dst_y > y;
      p[PORT_S] = f.dst_y < y;
      p[PORT_E] = f.dst_x > x;
      p[PORT_W] = f.dst_x < x;
    end
    return p;
  endfunction

  // Index of the first set bit of v, searching upward from 'start' and wrapping around.
  // found is 0 when v is all zero.
  function automatic logic [1:0] first_from(input logic [NPORTS-1:0] v,
                                            input logic [1:0] start,
                                            output logic found);
    logic [1:0] idx;
    logic [1:0] k;
    found = 1'b0;
    idx   = '0;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      k = start + 2'(i);
      if (v[k]) begin
        idx   = k;
        found = 1'b1;
      end
    end
    return idx;
  endfunction

endpackage
