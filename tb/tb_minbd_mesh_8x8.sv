// tb_minbd_mesh_8x8: the same end-to-end test as tb_minbd_mesh, on the larger evaluated
// configuration: an 8x8 mesh of 64 routers. The golden epoch is raised to 128 cycles
// because the 64-cycle epoch of the 4x4 network is shorter than the worst-case 8x8
// delivery time (3 cycles x (14 hops + 7) + 8 cycles of side-buffer rescue = 71).
// Injection rates are lower than in the 4x4 test so that the hot-spot phase, with 63
// senders aimed at one node, drains in a reasonable time. Phases, checks, the stand-in
// for Retransmit-Once and the mechanism counts are those of tb_minbd_mesh: latency of one
// packet over 3 hops, uniform traffic, hot spot on node 5, drain, every packet checked
// word by word at its destination.
module tb_minbd_mesh_8x8;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int P1_CYCLES = 3000, P2_CYCLES = 1500, DRAIN_MAX = 60000;
  localparam int P1_PCT = 3, P2_PCT = 1;

  logic              clk = 0, rst_n = 0;
  flit_t             inj        [N];
  logic              inj_taken  [N];
  flit_t             ej         [N][2];
  logic              done_valid [N];
  pkt_id_t           done_id    [N];
  logic [SEQ_W-1:0]  done_last  [N];
  logic [DATA_W-1:0] done_data  [N][8];
  logic [1:0]        drop_valid [N];
  flit_t             drop_flit  [N][2];
  router_events_t    events     [N];

  minbd_mesh #(.MESH_X(MX), .MESH_Y(MY), .EPOCH(128)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_defl = 0, n_buf = 0, n_reinj = 0, n_redir = 0, n_dual = 0, n_silver = 0, n_golden = 0;
  int n_drop = 0, n_inj = 0, n_done = 0, n_sent = 0;
  longint cycle = 0;

  typedef struct { int dst; int last; int base; } pkt_t;
  pkt_t  sent [pkt_id_t];          // outstanding packets
  flit_t q    [N][$];              // injection queues
  bit    busy [N][16];             // transaction numbers in use
  int    gen_pct = 0;              // per-node packet generation probability (%)
  int    hot = -1;                 // hot-spot destination, -1 for uniform
  longint inj_cycle = -1, ej_cycle = -1;
  localparam int RA_SLOTS = 8;
  bit    open_pk [N][pkt_id_t];     // packets holding a reassembly entry at node n
  flit_t pend    [N][$];            // dropped flits waiting for space at node n

  function automatic int word(int base, int s);
    return base * 8 + s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_packet(int src, int dst, int txn, int last);
    pkt_id_t id;
    int base;
    id = {NODE_W'(src), TXN_W'(txn)};
    base = n_sent * 16 + 3;
    n_sent++;
    busy[src][txn] = 1;
    sent[id] = '{dst: dst, last: last, base: base};
    for (int s = 0; s <= last; s++)
      q[src].push_back(mk_flit(dst % MX, dst / MX, src, txn, s, last, word(base, s)));
  endtask

  // Monitor and traffic generator, sampling settled values just before each edge.
  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int n = 0; n < N; n++) begin
      // events
      n_defl += int'(events[n].deflected);
      if (events[n].buffered)    n_buf++;
      if (events[n].reinjected)  n_reinj++;
      if (events[n].redirected)  n_redir++;
      if (events[n].ejected == 2) n_dual++;
      if (events[n].silver_used) n_silver++;
      if (events[n].golden_seen) n_golden++;
      // injection handshake
      if (inj[n].valid && inj_taken[n]) begin
        n_inj++;
        void'(q[n].pop_front());
      end
      // ejected flits must be addressed here
      for (int k = 0; k < 2; k++) if (ej[n][k].valid) begin
        checks++;
        if (int'(ej[n][k].dst_x) != n % MX || int'(ej[n][k].dst_y) != n / MX) begin
          failures++; $display("node %0d ejected a flit for (%0d,%0d)", n, ej[n][k].dst_x, ej[n][k].dst_y);
        end
        if (ej_cycle < 0 && inj_cycle >= 0) ej_cycle = cycle;
      end
      // reassembly entries opened this cycle
      for (int k = 0; k < 2; k++) if (ej[n][k].valid && !drop_valid[n][k]) open_pk[n][pkt_id(ej[n][k])] = 1;
      // drops: resend at once if the packet holds an entry, else park at the destination
      for (int k = 0; k < 2; k++) if (drop_valid[n][k]) begin
        n_drop++;
        if (open_pk[n].exists(pkt_id(drop_flit[n][k]))) q[int'(drop_flit[n][k].src)].push_back(drop_flit[n][k]);
        else pend[n].push_back(drop_flit[n][k]);
      end
      // release parked flits of packets that now hold an entry, plus one more packet
      // when the destination has room
      if (pend[n].size()) begin
        pkt_id_t rid;
        bit      room;
        flit_t   keep [$];
        room = open_pk[n].size() < RA_SLOTS;
        rid  = pkt_id(pend[n][0]);
        keep.delete();
        foreach (pend[n][i]) begin
          if (open_pk[n].exists(pkt_id(pend[n][i])) || (room && pkt_id(pend[n][i]) == rid))
            q[int'(pend[n][i].src)].push_back(pend[n][i]);
          else keep.push_back(pend[n][i]);
        end
        pend[n] = keep;
      end
      // completed packets
      if (done_valid[n]) begin
        checks++;
        n_done++;
        if (!sent.exists(done_id[n])) begin
          failures++; $display("node %0d completed unknown packet %h", n, done_id[n]);
        end else begin
          pkt_t p;
          p = sent[done_id[n]];
          if (p.dst != n || p.last != int'(done_last[n])) begin
            failures++; $display("packet %h: wrong node %0d or length", done_id[n], n);
          end
          for (int s = 0; s <= p.last; s++) begin
            checks++;
            if (done_data[n][s] != DATA_W'(word(p.base, s))) begin
              failures++; $display("packet %h word %0d wrong", done_id[n], s);
            end
          end
          sent.delete(done_id[n]);
          open_pk[n].delete(done_id[n]);
          busy[int'(done_id[n][PKTID_W-1:TXN_W])][int'(done_id[n][TXN_W-1:0])] = 0;
        end
      end
      // new packets
      if (gen_pct > 0 && int'($urandom_range(99)) < gen_pct) begin
        int txn, dst;
        txn = -1;
        for (int t = 15; t >= 0; t--) if (!busy[n][t]) txn = t;
        dst = (hot >= 0) ? hot : int'($urandom_range(N - 1));
        if (txn >= 0 && dst != n) make_packet(n, dst, txn, $urandom_range(7));
      end
    end
    for (int n = 0; n < N; n++) inj[n] <= q[n].size() ? q[n][0] : FLIT_NONE;
  end

  initial begin
    for (int n = 0; n < N; n++) inj[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // Phase 0: hop latency, node 0 -> node 3 (3 hops East) in an empty network.
    make_packet(0, 3, 0, 0);
    wait (n_inj == 1);
    inj_cycle = cycle;
    wait (ej_cycle >= 0);
    checks++;
    if (ej_cycle - inj_cycle != 9) begin
      failures++; $display("3-hop latency %0d cycles, expected 9", ej_cycle - inj_cycle);
    end
    wait (sent.size() == 0);

    // Phase 1: uniform random traffic.
    gen_pct = P1_PCT;
    repeat (P1_CYCLES) @(posedge clk);
    // Phase 2: hot spot.
    hot = 5;
    gen_pct = P2_PCT;
    repeat (P2_CYCLES) @(posedge clk);
    // Phase 3: drain.
    gen_pct = 0;
    for (int c = 0; c < DRAIN_MAX && sent.size() != 0; c++) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++; $display("%0d packets never completed", sent.size());
      foreach (sent[id]) begin
        $display("  packet %h to node %0d, %0d flits", id, sent[id].dst, sent[id].last + 1);
        break;
      end
      for (int n = 0; n < N; n++) $display("  queue %0d: %0d flits", n, q[n].size());
    end
    checks++;
    if (n_defl == 0 || n_buf == 0 || n_reinj == 0 || n_redir == 0 || n_dual == 0 ||
        n_silver == 0 || n_golden == 0 || n_drop == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("cycles %0d: packets %0d sent %0d completed, flits injected %0d", cycle, n_sent, n_done, n_inj);
    $display("deflections %0d side-buffer writes %0d re-injections %0d redirections %0d", n_defl, n_buf, n_reinj, n_redir);
    $display("dual ejections %0d silver cycles %0d golden cycles %0d reassembly drops %0d", n_dual, n_silver, n_golden, n_drop);
    $display("3-hop latency %0d cycles", ej_cycle - inj_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
