// reassembly_buffer: collects the flits of each packet at the destination node and hands
// a packet to the node once all its flits are in. Flits of one packet can arrive in any
// order and over any number of cycles because each is routed (and deflected) on its own.
//
// The buffer has SLOTS packet entries. Each entry holds the packet identity, the sequence
// number of the packet's last flit, a bit per received flit and the data words. Up to
// EJECT_W flits arrive per cycle from the router's ejection ports; each one joins the entry
// of its packet or opens the first free entry. When no entry is free the flit is dropped
// and reported on drop_valid/drop_flit: this is the point where the
// end-to-end Retransmit-Once protocol would note the packet and later ask for it again
// with space reserved (that protocol lies outside this block). Nothing is ever pushed back
// into the network.
//
// One completed packet per cycle is offered on done_*, taken from the lowest-numbered
// complete entry; it is shown combinationally and the entry is freed at the next clock
// edge. An entry opened or completed in cycle t is visible from cycle t+1.
// The number of entries and the slot organisation are this design's choices.
module reassembly_buffer
  import minbd_pkg::*;
#(
  parameter int SLOTS   = 8,
  parameter int EJECT_W = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  flit_t               ej        [EJECT_W],
  output logic                done_valid,
  output pkt_id_t             done_id,
  output logic [SEQ_W-1:0]    done_last,
  output logic [DATA_W-1:0]   done_data [2**SEQ_W],
  output logic [EJECT_W-1:0]  drop_valid,
  output flit_t               drop_flit [EJECT_W]
);
  localparam int MAXF = 2 ** SEQ_W;
  localparam int SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  logic                slot_v    [SLOTS];
  pkt_id_t             slot_id   [SLOTS];
  logic [SEQ_W-1:0]    slot_last [SLOTS];
  logic [MAXF-1:0]     slot_mask [SLOTS];
  logic [DATA_W-1:0]   slot_data [SLOTS][MAXF];

  logic [SLOTS-1:0]    complete;
  logic [SW-1:0]       done_slot;
  logic [EJECT_W-1:0]  wr_en;
  logic [SW-1:0]       wr_slot   [EJECT_W];
  logic [EJECT_W-1:0]  wr_new;

  function automatic logic [MAXF-1:0] need_mask(input logic [SEQ_W-1:0] last);
    logic [MAXF-1:0] m;
    for (int i = 0; i < MAXF; i++) m[i] = (i <= int'(last));
    return m;
  endfunction

  // Completion search.
  always_comb begin
    done_valid = 1'b0;
    done_slot  = '0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      complete[s] = slot_v[s] && ((slot_mask[s] & need_mask(slot_last[s])) == need_mask(slot_last[s]));
      if (complete[s]) begin
        done_valid = 1'b1;
        done_slot  = SW'(s);
      end
    end
    done_id   = slot_id[done_slot];
    done_last = slot_last[done_slot];
    for (int i = 0; i < MAXF; i++) done_data[i] = slot_data[done_slot][i];
  end

  // Slot lookup and allocation for the arriving flits.
  always_comb begin
    logic [SLOTS-1:0] taken;
    logic             hit, got;
    for (int s = 0; s < SLOTS; s++) taken[s] = slot_v[s];
    for (int k = 0; k < EJECT_W; k++) begin
      hit           = 1'b0;
      got           = 1'b0;
      wr_en[k]      = 1'b0;
      wr_new[k]     = 1'b0;
      wr_slot[k]    = '0;
      drop_valid[k] = 1'b0;
      drop_flit[k]  = ej[k];
      if (ej[k].valid) begin
        for (int s = SLOTS - 1; s >= 0; s--) begin
          if (slot_v[s] && slot_id[s] == pkt_id(ej[k])) begin
            hit        = 1'b1;
            wr_slot[k] = SW'(s);
          end
        end
        // A packet opened by an earlier port in this same cycle.
        for (int j = 0; j < k; j++) begin
          if (!hit && wr_new[j] && pkt_id(ej[j]) == pkt_id(ej[k])) begin
            hit        = 1'b1;
            wr_slot[k] = wr_slot[j];
          end
        end
        if (hit) begin
          wr_en[k] = 1'b1;
        end else begin
          for (int s = SLOTS - 1; s >= 0; s--) begin
            if (!taken[s]) begin
              got        = 1'b1;
              wr_slot[k] = SW'(s);
            end
          end
          if (got) begin
            wr_en[k]            = 1'b1;
            wr_new[k]           = 1'b1;
            taken[wr_slot[k]]   = 1'b1;
          end else begin
            drop_valid[k] = 1'b1;
          end
        end
      end
    end
  end

  // Next received-flit masks: a freed entry always has an all-zero mask, so a new packet
  // just sets bits like a known one.
  logic [MAXF-1:0] mask_next [SLOTS];
  always_comb begin
    for (int s = 0; s < SLOTS; s++) mask_next[s] = slot_mask[s];
    if (done_valid) mask_next[done_slot] = '0;
    for (int k = 0; k < EJECT_W; k++)
      if (wr_en[k]) mask_next[wr_slot[k]] = mask_next[wr_slot[k]] | (MAXF'(1) << ej[k].seq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) begin
        slot_v[s]    <= 1'b0;
        slot_id[s]   <= '0;
        slot_last[s] <= '0;
        slot_mask[s] <= '0;
      end
    end else begin
      for (int s = 0; s < SLOTS; s++) slot_mask[s] <= mask_next[s];
      if (done_valid) slot_v[done_slot] <= 1'b0;
      for (int k = 0; k < EJECT_W; k++) begin
        if (wr_en[k]) begin
          slot_v[wr_slot[k]]    <= 1'b1;
          slot_id[wr_slot[k]]   <= pkt_id(ej[k]);
          slot_last[wr_slot[k]] <= ej[k].last_seq;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < EJECT_W; k++) begin
      if (wr_en[k]) slot_data[wr_slot[k]][ej[k].seq] <= ej[k].data;
    end
  end
endmodule
