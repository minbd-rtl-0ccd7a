// buf_eject: the buffer-eject stage behind the permutation network. A flit is deflected
// when it leaves on a port that is not productive for it (this includes a flit addressed
// to this router that could not be ejected). Instead of letting it travel the wrong way,
// up to one deflected flit per cycle is removed from the outputs and written into the
// side buffer, if the buffer can take a write this cycle. Golden flits are never taken,
// and neither is a flit addressed to this router: the buffer re-injects behind the
// ejection point, so such a flit would circle between buffer and outputs forever; sent
// out instead, it returns on a later cycle and is ejected then.
// Among several candidates the choice starts at a pseudo-random port ('rnd'); that choice
// is this design's own. Combinational.
module buf_eject
  import minbd_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  flit_t              in   [NPORTS],
  input  tag_t               tag  [NPORTS],
  input  logic               can_push,
  input  logic [1:0]         rnd,
  output flit_t              out  [NPORTS],
  output logic               push,
  output flit_t              push_flit,
  output logic [NPORTS-1:0]  deflected   // per port, after buffering
);
  always_comb begin
    logic [NPORTS-1:0] defl, cand, here;
    logic [NPORTS-1:0] pr;
    logic              fnd;
    logic [1:0]        idx;
    for (int p = 0; p < NPORTS; p++) begin
      pr      = productive(in[p], my_x, my_y);
      defl[p] = in[p].valid && !pr[p];
      here[p] = in[p].dst_x == my_x && in[p].dst_y == my_y;
      cand[p] = defl[p] && !tag[p].golden && !here[p];
      out[p]  = in[p];
    end
    idx       = first_from(cand, rnd, fnd);
    push      = can_push && fnd;
    push_flit = FLIT_NONE;
    deflected = defl;
    if (push) begin
      push_flit      = in[idx];
      out[idx]       = FLIT_NONE;
      deflected[idx] = 1'b0;
    end
  end
endmodule
