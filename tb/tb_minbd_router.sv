// tb_minbd_router: one router at (1,1) of a 4x4 mesh, driven directly on its links.
//   1. Latency: a lone flit leaves on its productive port exactly 2 cycles after it
//      arrives; a lone injected flit likewise 2 cycles after inj_taken.
//   2. Dual ejection: two flits for this node arriving together both eject that cycle.
//   3. Random traffic at high load: every flit (tagged by a unique data word) leaves
//      exactly once, on a link or through ejection, and flits addressed here are ejected
//      in the arrival cycle whenever at most two arrive. After the inputs stop, the side
//      buffer must drain and nothing may remain.
// Side-buffer writes, re-injections, redirections, deflections and silver picks are
// counted; each must have happened.
module tb_minbd_router;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int MX = 1, MY = 1;
  logic           clk = 0, rst_n = 0;
  flit_t          in_link [NPORTS], out_link [NPORTS], inj, ej [2];
  logic           inj_taken;
  router_events_t events;
  int             checks = 0, failures = 0;
  int             n_buf = 0, n_reinj = 0, n_redir = 0, n_defl = 0, n_dual = 0, n_silver = 0;
  int             outstanding [int];
  int             uid = 1000;
  bit             drive_random = 0;

  minbd_router #(.MY_X(MX), .MY_Y(MY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sink: checks every flit that leaves (sampled just before each clock edge).
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) if (out_link[p].valid) begin
      checks++;
      if (!outstanding.exists(int'(out_link[p].data))) begin failures++; $display("unknown/duplicate flit on port %0d", p); end
      else outstanding.delete(int'(out_link[p].data));
    end
    for (int k = 0; k < 2; k++) if (ej[k].valid) begin
      checks++;
      if (!outstanding.exists(int'(ej[k].data)) || ej[k].dst_x != MX || ej[k].dst_y != MY) begin
        failures++; $display("bad ejection");
      end else outstanding.delete(int'(ej[k].data));
    end
    if (events.buffered)   n_buf++;
    if (events.reinjected) n_reinj++;
    if (events.redirected) n_redir++;
    if (events.silver_used) n_silver++;
    n_defl += int'(events.deflected);
    if (events.ejected == 2) n_dual++;
  end

  function automatic flit_t with_uid(input flit_t f);
    if (f.valid) begin
      uid++;
      f.data = DATA_W'(uid);
    end
    return f;
  endfunction

  task automatic idle();
    for (int p = 0; p < NPORTS; p++) in_link[p] = '0;
    inj = '0;
  endtask

  initial begin
    int nloc;
    bit taken_now;
    idle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(negedge clk);

    // 1. latency of a lone flit from the West link heading East (3,1)
    in_link[PORT_W] = with_uid(mk_flit(3, 1, 4, 1, 0, 0, 0));
    outstanding[int'(in_link[PORT_W].data)] = 1;
    @(negedge clk); idle();
    @(negedge clk);
    checks++;
    if (!(out_link[PORT_E].valid && out_link[PORT_E].dst_x == 3)) begin failures++; $display("lone flit not on East after 2 cycles"); end
    repeat (2) @(negedge clk);
    // lone injected flit heading North (1,3)
    inj = with_uid(mk_flit(1, 3, 5, 2, 0, 0, 0));
    outstanding[int'(inj.data)] = 1;
    #1;
    checks++;
    if (!inj_taken) begin failures++; $display("injection refused on an idle router"); end
    @(negedge clk); idle();
    @(negedge clk);
    checks++;
    if (!(out_link[PORT_N].valid && out_link[PORT_N].dst_y == 3)) begin failures++; $display("injected flit not on North after 2 cycles"); end
    repeat (2) @(negedge clk);

    // 2. dual ejection
    in_link[PORT_N] = with_uid(mk_flit(MX, MY, 3, 3, 0, 1, 0));
    in_link[PORT_S] = with_uid(mk_flit(MX, MY, 3, 3, 1, 1, 0));
    outstanding[int'(in_link[PORT_N].data)] = 1;
    outstanding[int'(in_link[PORT_S].data)] = 1;
    #1;
    checks++;
    if (!(ej[0].valid && ej[1].valid)) begin failures++; $display("dual ejection failed"); end
    @(negedge clk); idle();
    repeat (3) @(negedge clk);

    // 3. random traffic
    for (int t = 0; t < 6000; t++) begin
      nloc = 0;
      for (int p = 0; p < NPORTS; p++) begin
        in_link[p] = with_uid(rand_flit((t / 500) % 2 ? 95 : 60, 0));
        if (in_link[p].valid) begin
          outstanding[int'(in_link[p].data)] = 1;
          if (in_link[p].dst_x == MX && in_link[p].dst_y == MY) nloc++;
        end
      end
      if (!inj.valid) begin
        inj = with_uid(rand_flit(50, 0));
        if (inj.valid) outstanding[int'(inj.data)] = 1;
      end
      #1;
      checks++;
      if (nloc <= 2 && (int'(ej[0].valid) + int'(ej[1].valid)) != nloc) begin
        failures++; $display("t%0d: %0d local flits, not all ejected", t, nloc);
      end
      taken_now = inj_taken;
      @(negedge clk);
      // keep an offered injection flit until taken
      if (taken_now) inj = '0;
    end
    if (inj.valid) outstanding.delete(int'(inj.data));   // withdrawn, never offered again
    idle();
    repeat (60) @(negedge clk);
    checks++;
    if (outstanding.size() != 0) begin failures++; $display("%0d flits never left the router", outstanding.size()); end
    checks++;
    if (n_buf == 0 || n_reinj == 0 || n_redir == 0 || n_defl == 0 || n_dual == 0 || n_silver == 0) failures++;
    $display("buffered %0d reinjected %0d redirected %0d deflected %0d dual-ejections %0d silver %0d",
             n_buf, n_reinj, n_redir, n_defl, n_dual, n_silver);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
