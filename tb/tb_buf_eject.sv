// tb_buf_eject: random routed flits at router (2,1). When the buffer can take a write,
// the first deflected flit from the random start port that is neither golden nor addressed
// to this router must be removed and written; all other flits must stay; the per-port deflected flags must
// describe what is left.
module tb_buf_eject;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int MX = 2, MY = 1;
  flit_t       in [NPORTS], out [NPORTS], push_flit;
  tag_t        tag [NPORTS];
  logic        can_push, push;
  logic [1:0]  rnd;
  logic [3:0]  deflected;
  int          checks = 0, failures = 0, n_push = 0, n_gold_kept = 0, n_here_kept = 0;

  buf_eject dut (.my_x(3'(MX)), .my_y(3'(MY)), .*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t e [NPORTS];
    int    pick;
    bit    defl [NPORTS];
    for (int t = 0; t < 4000; t++) begin
      for (int p = 0; p < NPORTS; p++) begin
        in[p]  = rand_flit(80, t * 4 + p);
        tag[p] = '0;
        tag[p].golden = in[p].valid && ($urandom_range(4) == 0);
      end
      can_push = ($urandom_range(3) != 0);
      rnd      = 2'($urandom_range(3));
      #1;
      pick = -1;
      for (int i = 0; i < NPORTS; i++) begin
        int p;
        p = (int'(rnd) + i) % NPORTS;
        defl[p] = in[p].valid && !ref_productive(in[p], MX, MY, p);
        if (pick < 0 && defl[p] && !tag[p].golden && !(in[p].dst_x == MX && in[p].dst_y == MY)) pick = p;
        if (defl[p] && in[p].dst_x == MX && in[p].dst_y == MY) n_here_kept++;
        if (defl[p] && tag[p].golden) n_gold_kept++;
      end
      if (!can_push) pick = -1;
      for (int p = 0; p < NPORTS; p++) e[p] = (p == pick) ? FLIT_NONE : in[p];
      checks++;
      if (push !== (pick >= 0) || (pick >= 0 && push_flit !== in[pick])) begin
        failures++; $display("t%0d push wrong (pick %0d)", t, pick);
      end
      if (pick >= 0) n_push++;
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (out[p] !== e[p] || deflected[p] !== (defl[p] && p != pick)) begin
          failures++; $display("t%0d port %0d wrong", t, p);
        end
      end
    end
    checks++;
    if (n_push == 0 || n_gold_kept == 0 || n_here_kept == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
