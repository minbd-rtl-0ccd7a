// arb_block: one 2-input, 2-output arbiter block of the permutation network.
//
// Step 1 picks a winning flit: a golden flit beats everything (between two golden flits,
// which belong to the same packet, the lower sequence number wins); next a silver flit;
// between two ordinary flits a pseudo-random bit decides; an empty input always loses.
// Step 2 steers the winner to the output it wants and sends the other flit to the other
// output, where it may be deflected. 'want0'/'want1' give, per input, the set of outputs
// that are productive for it (bit 0 = out0, bit 1 = out1). A winner that is content with
// either output, or with none, leaves the choice to the other flit. With no wish at all
// the block passes its inputs straight through.
//
// Combinational; the tags travel with their flits.
module arb_block
  import minbd_pkg::*;
(
  input  flit_t      in0,
  input  flit_t      in1,
  input  tag_t       tag0,
  input  tag_t       tag1,
  input  logic [1:0] want0,
  input  logic [1:0] want1,
  input  logic       rnd,
  output flit_t      out0,
  output flit_t      out1,
  output tag_t       otag0,
  output tag_t       otag1
);
  logic [1:0] rank0, rank1;
  logic       win1;       // input 1 wins
  logic [1:0] w_win, w_lose;
  logic       win_out;    // output index taken by the winner
  logic       swap;

  function automatic logic [1:0] rank(input flit_t f, input tag_t t);
    if (!f.valid)    return 2'd0;
    else if (t.golden) return 2'd3;
    else if (t.silver) return 2'd2;
    else             return 2'd1;
  endfunction

  always_comb begin
    rank0 = rank(in0, tag0);
    rank1 = rank(in1, tag1);
    if (rank0 != rank1)      win1 = rank1 > rank0;
    else if (rank0 == 2'd3)  win1 = in1.seq < in0.seq;
    else                     win1 = rnd;
    w_win  = win1 ? want1 : want0;
    w_lose = win1 ? want0 : want1;
    if      (w_win  == 2'b01) win_out = 1'b0;
    else if (w_win  == 2'b10) win_out = 1'b1;
    else if (w_lose == 2'b01) win_out = 1'b1;
    else if (w_lose == 2'b10) win_out = 1'b0;
    else                      win_out = win1;
    swap  = win1 ^ win_out;
    out0  = swap ? in1  : in0;
    out1  = swap ? in0  : in1;
    otag0 = swap ? tag1 : tag0;
    otag1 = swap ? tag0 : tag1;
  end
endmodule
