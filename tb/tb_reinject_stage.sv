// tb_reinject_stage: drives slot contents and a side-buffer head every cycle and compares
// with a model of re-injection and buffer redirection (C_THRESHOLD = 2): the head takes the
// lowest empty slot; if none is free it waits, and in its second blocked cycle it swaps
// with the first non-golden flit from the random start. Golden flits are never swapped out.
// Also checks the directed case: four busy slots, the head leaves after exactly 2 cycles.
module tb_reinject_stage;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int C = 2;
  logic       clk = 0, rst_n = 0;
  pkt_id_t    golden_id;
  flit_t      in [NPORTS], out [NPORTS], buf_head, redir_flit;
  logic [1:0] rnd;
  logic       pop, redir_push, reinjected, redirected;
  int         checks = 0, failures = 0, n_redir = 0, n_reinj = 0, n_block = 0;
  int         wc = 0;

  reinject_stage #(.C_THRESHOLD(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle(input int t);
    flit_t e [NPORTS];
    int    es, cs;
    bit    e_pop, e_redir, e_reinj;
    flit_t e_rf;
    es = -1; cs = -1;
    for (int p = NPORTS - 1; p >= 0; p--) if (!in[p].valid) es = p;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      int p;
      p = (int'(rnd) + i) % NPORTS;
      if (in[p].valid && pkt_id(in[p]) != golden_id) cs = p;
    end
    for (int p = 0; p < NPORTS; p++) e[p] = in[p];
    e_pop = 0; e_redir = 0; e_reinj = 0; e_rf = '0;
    if (buf_head.valid) begin
      if (es >= 0) begin
        e[es] = buf_head; e_pop = 1; e_reinj = 1;
      end else if (wc >= C - 1 && cs >= 0) begin
        e_rf = in[cs]; e[cs] = buf_head; e_pop = 1; e_redir = 1;
      end
    end
    checks++;
    if (pop !== e_pop || redir_push !== e_redir || redirected !== e_redir || reinjected !== e_reinj ||
        (e_redir && redir_flit !== e_rf)) begin
      failures++; $display("t%0d control wrong (wc %0d)", t, wc);
    end
    for (int p = 0; p < NPORTS; p++) begin
      checks++;
      if (out[p] !== e[p]) begin failures++; $display("t%0d slot %0d wrong", t, p); end
    end
    if (e_redir) n_redir++;
    if (e_reinj) n_reinj++;
    if (buf_head.valid && !e_pop) begin n_block++; wc = (wc < C) ? wc + 1 : wc; end
    else wc = 0;
  endtask

  initial begin
    int start;
    golden_id = 8'h35;
    buf_head  = '0;
    rnd       = '0;
    for (int p = 0; p < NPORTS; p++) in[p] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Directed: all slots busy, head must leave in its C-th cycle.
    start = 0;
    for (int p = 0; p < NPORTS; p++) in[p] = mk_flit(0, 0, 1, p, 0, 0, 100 + p);
    buf_head = mk_flit(3, 3, 2, 2, 0, 0, 77);
    for (int c = 0; c < C; c++) begin
      #1;
      checks++;
      if (pop !== (c == C - 1)) begin failures++; $display("directed: pop in cycle %0d = %0d", c, pop); end
      check_cycle(-1 - c);
      @(negedge clk);
    end
    // Random.
    for (int t = 0; t < 5000; t++) begin
      for (int p = 0; p < NPORTS; p++) begin
        in[p] = rand_flit(90, t * 4 + p);
        if (in[p].valid && $urandom_range(4) == 0) {in[p].src, in[p].txn} = golden_id;
      end
      buf_head = rand_flit(85, 50000 + t);
      rnd      = 2'($urandom_range(3));
      #1;
      check_cycle(t);
      @(negedge clk);
    end
    checks++;
    if (n_redir == 0 || n_reinj == 0 || n_block == 0) failures++;
    $display("reinjected %0d redirected %0d blocked %0d", n_reinj, n_redir, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
