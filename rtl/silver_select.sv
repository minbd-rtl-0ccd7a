// silver_select: picks the silver flit of a router for one cycle. Below the single golden
// packet of the network, each router promotes one of its own flits per cycle to "silver",
// the second priority level. Because every arbiter block of the permutation network then
// agrees on which flit to favour, that flit is never deflected by an uncoordinated random
// decision, so at least one flit per router per cycle reaches a productive port.
//
// The choice is pseudo-random and local: starting at slot 'rnd', the first valid slot is
// the silver one. Output is one-hot (or zero when no flit is present). Combinational.
module silver_select
  import minbd_pkg::*;
(
  input  logic [NPORTS-1:0] valid,
  input  logic [1:0]        rnd,
  output logic [NPORTS-1:0] silver
);
  always_comb begin
    logic       fnd;
    logic [1:0] idx;
    idx    = first_from(valid, rnd, fnd);
    silver = '0;
    if (fnd) silver[idx] = 1'b1;
  end
endmodule
