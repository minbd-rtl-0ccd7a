// reinject_stage: where a flit waiting in the side buffer re-enters the router pipeline,
// including buffer redirection.
//
// Normal case: if one of the four slots is empty after ejection, the side-buffer head is
// placed into the lowest-numbered empty slot and popped. If no slot is free, the head
// waits; a counter tracks how many cycles it has been waiting. Under heavy load the head
// could wait forever, and a golden flit trapped behind it would then never be delivered.
// Buffer redirection bounds that wait: when the head has been unable to leave for
// C_THRESHOLD cycles (it leaves in its C_THRESHOLD-th cycle at the head), one incoming
// non-golden flit, picked pseudo-randomly, is forced into the side buffer and the head
// takes its slot. A flit that has become golden while buffered is therefore out after at
// most C_THRESHOLD * DEPTH cycles. Golden flits are never forced into the buffer.
//
// Combinational except for the wait counter. 'pop' removes the head; 'redir_push' with
// 'redir_flit' asks the side buffer for a write in the same cycle (the buffer accepts a
// write together with a pop even when full). 'rnd' picks the slot to redirect.
module reinject_stage
  import minbd_pkg::*;
#(
  parameter int C_THRESHOLD = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pkt_id_t golden_id,
  input  flit_t   in  [NPORTS],
  input  flit_t   buf_head,        // valid bit set when the side buffer is not empty
  input  logic [1:0] rnd,
  output flit_t   out [NPORTS],
  output logic    pop,
  output logic    redir_push,
  output flit_t   redir_flit,
  output logic    reinjected,
  output logic    redirected
);
  localparam int CW = (C_THRESHOLD > 1) ? $clog2(C_THRESHOLD + 1) : 1;

  logic [CW-1:0] wait_cnt;
  logic          blocked;

  always_comb begin
    logic [NPORTS-1:0] empty_v, cand_v;
    logic              fnd_e, fnd_c;
    logic [1:0]        idx_e, idx_c;
    for (int p = 0; p < NPORTS; p++) begin
      out[p]     = in[p];
      empty_v[p] = !in[p].valid;
      cand_v[p]  = in[p].valid && pkt_id(in[p]) != golden_id;
    end
    idx_e      = first_from(empty_v, 2'd0, fnd_e);
    idx_c      = first_from(cand_v, rnd, fnd_c);
    pop        = 1'b0;
    redir_push = 1'b0;
    redir_flit = FLIT_NONE;
    reinjected = 1'b0;
    redirected = 1'b0;
    blocked    = 1'b0;
    if (buf_head.valid) begin
      if (fnd_e) begin
        out[idx_e] = buf_head;
        pop        = 1'b1;
        reinjected = 1'b1;
      end else if (32'(wait_cnt) >= C_THRESHOLD - 1 && fnd_c) begin
        redir_flit = in[idx_c];
        redir_push = 1'b1;
        out[idx_c] = buf_head;
        pop        = 1'b1;
        redirected = 1'b1;
      end else begin
        blocked = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                        wait_cnt <= '0;
    else if (!blocked)                                 wait_cnt <= '0;
    else if (32'(wait_cnt) < C_THRESHOLD)              wait_cnt <= wait_cnt + 1'b1;
  end
endmodule
