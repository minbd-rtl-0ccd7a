// inject_stage: local injection. A flit offered by the node enters the router when one
// of the four pipeline slots is empty after ejection and side-buffer re-injection; it
// takes the lowest-numbered empty slot. The side buffer therefore has priority over new
// traffic, which keeps buffered flits moving. Handshake: the node holds inj with
// inj.valid set until 'taken' is high in the same cycle; there is no other flow control.
// Purely combinational.
module inject_stage
  import minbd_pkg::*;
(
  input  flit_t in  [NPORTS],
  input  flit_t inj,
  output flit_t out [NPORTS],
  output logic  taken
);
  always_comb begin
    logic [NPORTS-1:0] empty_v;
    logic              fnd;
    logic [1:0]        idx;
    for (int p = 0; p < NPORTS; p++) begin
      out[p]     = in[p];
      empty_v[p] = !in[p].valid;
    end
    idx   = first_from(empty_v, 2'd0, fnd);
    taken = inj.valid && fnd;
    if (taken) out[idx] = inj;
  end
endmodule
