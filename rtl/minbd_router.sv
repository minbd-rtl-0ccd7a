// minbd_router: minimally-buffered deflection router for one mesh node.
//
// A bufferless deflection router never stores a flit: every flit that enters leaves on
// some port in the next pipeline pass, and contention is resolved by sending the loser the
// wrong way ("deflection"). This router keeps that cheap structure and removes most of
// its deflections with three additions:
//   * a 4-flit side buffer that takes up to one flit per cycle that would have been
//     deflected, and re-injects it later into an empty slot (with buffer redirection so
//     a buffered flit cannot wait forever);
//   * dual-width ejection, so two flits arriving for this node in one cycle both leave;
//   * a two-level priority: the network-wide golden packet first, then one silver flit
//     picked per router per cycle, then pseudo-random arbitration.
//
// Pipeline (2 cycles, as in the evaluated design):
//   stage 1 (inputs -> reg s1): eject up to 2 local flits, re-inject or redirect the
//            side-buffer head, inject one local flit into a free slot;
//   stage 2 (reg s1 -> output reg): pick the silver flit, tag golden flits, route through
//            the two-stage permutation network, move up to one deflected flit to the
//            side buffer.
// Outputs are registered: a flit present on in_link[p] in cycle t appears on an output
// port in cycle t+2. Ejected flits (ej) and the injection handshake (inj / inj_taken) are
// combinational in stage 1. in_link/out_link are indexed N, E, S, W (minbd_pkg::port_e).
//
// MY_X / MY_Y give the router's mesh position. Golden schedule, buffer depth, threshold
// and ejection width are parameters with the evaluated values as defaults.
module minbd_router
  import minbd_pkg::*;
#(
  parameter int          MY_X        = 0,
  parameter int          MY_Y        = 0,
  parameter int          NUM_NODES   = 16,
  parameter int          NUM_TXN     = 16,
  parameter int          EPOCH       = 64,
  parameter int          BUF_DEPTH   = 4,
  parameter int          C_THRESHOLD = 2,
  parameter int          EJECT_W     = 2,
  parameter logic [15:0] SEED        = 16'hACE1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  flit_t          in_link  [NPORTS],
  output flit_t          out_link [NPORTS],
  input  flit_t          inj,
  output logic           inj_taken,
  output flit_t          ej       [EJECT_W],
  output router_events_t events
);
  localparam logic [COORD_W-1:0] X = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] Y = COORD_W'(MY_Y);

  logic [15:0] rnd;
  pkt_id_t     golden_id;
  logic        epoch_start;

  lfsr16 #(.SEED(SEED)) u_lfsr (.clk, .rst_n, .rnd);

  golden_ctrl #(.NUM_NODES(NUM_NODES), .NUM_TXN(NUM_TXN), .EPOCH(EPOCH)) u_golden (
    .clk, .rst_n, .golden_id, .epoch_start
  );

  // ---------------- stage 1: eject, re-inject / redirect, inject ----------------
  flit_t after_ej  [NPORTS];
  flit_t after_re  [NPORTS];
  flit_t after_inj [NPORTS];
  flit_t s1        [NPORTS];

  flit_t buf_head;
  logic  buf_empty, buf_full;
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count;
  logic  buf_pop, redir_push, reinjected, redirected;
  flit_t redir_flit;

  eject_dual #(.EJECT_W(EJECT_W)) u_eject (
    .my_x(X), .my_y(Y), .golden_id, .in(in_link), .out(after_ej), .ej
  );

  reinject_stage #(.C_THRESHOLD(C_THRESHOLD)) u_reinject (
    .clk, .rst_n, .golden_id, .in(after_ej), .buf_head, .rnd(rnd[7:6]),
    .out(after_re), .pop(buf_pop), .redir_push, .redir_flit, .reinjected, .redirected
  );

  inject_stage u_inject (.in(after_re), .inj, .out(after_inj), .taken(inj_taken));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int p = 0; p < NPORTS; p++) s1[p] <= FLIT_NONE;
    else        for (int p = 0; p < NPORTS; p++) s1[p] <= after_inj[p];
  end

  // ---------------- stage 2: priorities, permutation network, buffer eject ----------------
  logic [NPORTS-1:0] s1_valid, silver;
  tag_t              tags   [NPORTS];
  flit_t             routed [NPORTS];
  tag_t              rtags  [NPORTS];
  flit_t             s2     [NPORTS];
  logic              be_push;
  flit_t             be_flit;
  logic [NPORTS-1:0] deflected;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) s1_valid[p] = s1[p].valid;
  end

  silver_select u_silver (.valid(s1_valid), .rnd(rnd[1:0]), .silver);

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      tags[p].golden = s1[p].valid && pkt_id(s1[p]) == golden_id;
      tags[p].silver = silver[p];
    end
  end

  perm_net u_perm (
    .my_x(X), .my_y(Y), .in(s1), .tag(tags), .rnd(rnd[5:2]), .out(routed), .otag(rtags)
  );

  // The redirection write of stage 1 has the buffer's single write port first.
  buf_eject u_bufej (
    .my_x(X), .my_y(Y), .in(routed), .tag(rtags), .can_push(!buf_full && !redir_push),
    .rnd(rnd[9:8]), .out(s2), .push(be_push), .push_flit(be_flit), .deflected
  );

  side_buffer #(.DEPTH(BUF_DEPTH)) u_sidebuf (
    .clk, .rst_n,
    .push(redir_push || be_push), .push_flit(redir_push ? redir_flit : be_flit),
    .pop(buf_pop), .head(buf_head), .empty(buf_empty), .full(buf_full), .count(buf_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int p = 0; p < NPORTS; p++) out_link[p] <= FLIT_NONE;
    else        for (int p = 0; p < NPORTS; p++) out_link[p] <= s2[p];
  end

  // ---------------- event pulses ----------------
  always_comb begin
    events             = '0;
    events.deflected   = 3'(deflected[0]) + 3'(deflected[1]) + 3'(deflected[2]) + 3'(deflected[3]);
    for (int k = 0; k < EJECT_W; k++) events.ejected = events.ejected + 2'(ej[k].valid);
    events.injected    = inj_taken;
    events.buffered    = be_push;
    events.reinjected  = reinjected;
    events.redirected  = redirected;
    events.silver_used = |silver;
    events.golden_seen = tags[0].golden | tags[1].golden | tags[2].golden | tags[3].golden;
  end

  // A flit is never lost inside the router: flits in = flits out + buffered change.
  assert property (@(posedge clk) disable iff (!rst_n) !(buf_pop && buf_empty));
endmodule
