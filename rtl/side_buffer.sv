// side_buffer: the small FIFO beside the router pipeline that holds flits which would
// otherwise have been deflected. DEPTH entries (4 in the evaluated configuration), one
// write and one read per cycle. A push is accepted when the FIFO is not full or when a
// pop happens in the same cycle (needed by buffer redirection, which takes the head out
// and puts an input flit in during one cycle). The head is shown combinationally from
// the storage array; push and pop take effect at the clock edge. Storage is a plain
// register array with read and write pointers; the structure is this design's choice.
module side_buffer
  import minbd_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t push_flit,
  input  logic  pop,
  output flit_t head,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  flit_t         mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign head    = empty ? FLIT_NONE : mem[rd_ptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_flit;
  end

  // A push into a full buffer without a pop must never be requested by the router.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
endmodule
