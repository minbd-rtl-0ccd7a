// perm_net: the two-stage permutation network that performs deflection routing over the
// four network ports. Four arb_block instances are arranged as a 2x2 butterfly:
//
//   stage 1:  A takes slots N,E   B takes slots S,W
//             out0 of A and B -> block C, out1 of A and B -> block D
//   stage 2:  C drives ports N (out0) and S (out1)
//             D drives ports E (out0) and W (out1)
//
// In stage 1 a flit wants the half (C or D) that holds a productive port for it; in
// stage 2 it wants the productive port itself. Each block decides independently, which is
// what keeps the critical path short; the golden and silver tags make the blocks agree on
// which flit to favour. Every flit always leaves on some port: a flit that loses is
// deflected, never dropped. Combinational.
module perm_net
  import minbd_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  flit_t              in    [NPORTS],
  input  tag_t               tag   [NPORTS],
  input  logic [3:0]         rnd,
  output flit_t              out   [NPORTS],
  output tag_t               otag  [NPORTS]
);
  flit_t a0, a1, b0, b1;
  tag_t  ta0, ta1, tb0, tb1;
  logic [NPORTS-1:0] pr [NPORTS];
  logic [NPORTS-1:0] pa0, pa1, pb0, pb1;

  // Stage-1 wish: bit 0 = towards N/S half (block C), bit 1 = towards E/W half (block D).
  function automatic logic [1:0] half_want(input logic [NPORTS-1:0] p);
    return {p[PORT_E] | p[PORT_W], p[PORT_N] | p[PORT_S]};
  endfunction

  always_comb begin
    for (int p = 0; p < NPORTS; p++) pr[p] = productive(in[p], my_x, my_y);
  end

  arb_block u_a (
    .in0(in[PORT_N]), .in1(in[PORT_E]), .tag0(tag[PORT_N]), .tag1(tag[PORT_E]),
    .want0(half_want(pr[PORT_N])), .want1(half_want(pr[PORT_E])), .rnd(rnd[0]),
    .out0(a0), .out1(a1), .otag0(ta0), .otag1(ta1)
  );
  arb_block u_b (
    .in0(in[PORT_S]), .in1(in[PORT_W]), .tag0(tag[PORT_S]), .tag1(tag[PORT_W]),
    .want0(half_want(pr[PORT_S])), .want1(half_want(pr[PORT_W])), .rnd(rnd[1]),
    .out0(b0), .out1(b1), .otag0(tb0), .otag1(tb1)
  );

  assign pa0 = productive(a0, my_x, my_y);
  assign pa1 = productive(a1, my_x, my_y);
  assign pb0 = productive(b0, my_x, my_y);
  assign pb1 = productive(b1, my_x, my_y);

  arb_block u_c (
    .in0(a0), .in1(b0), .tag0(ta0), .tag1(tb0),
    .want0({pa0[PORT_S], pa0[PORT_N]}), .want1({pb0[PORT_S], pb0[PORT_N]}), .rnd(rnd[2]),
    .out0(out[PORT_N]), .out1(out[PORT_S]), .otag0(otag[PORT_N]), .otag1(otag[PORT_S])
  );
  arb_block u_d (
    .in0(a1), .in1(b1), .tag0(ta1), .tag1(tb1),
    .want0({pa1[PORT_W], pa1[PORT_E]}), .want1({pb1[PORT_W], pb1[PORT_E]}), .rnd(rnd[3]),
    .out0(out[PORT_E]), .out1(out[PORT_W]), .otag0(otag[PORT_E]), .otag1(otag[PORT_W])
  );
endmodule
