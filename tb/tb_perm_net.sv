// tb_perm_net: random sets of up to four flits at router (1,1) of a 4x4 mesh. Checks:
//   * no flit is lost or duplicated (the outputs are a permutation of the inputs);
//   * a golden flit that has a productive port always leaves on one;
//   * with no golden flit, the silver flit always leaves on a productive port;
//   * a lone flit always leaves on a productive port;
//   * the exact output matches a butterfly model built here from the wiring
//     N,E -> A; S,W -> B; A/B out0 -> C (N,S); A/B out1 -> D (E,W).
module tb_perm_net;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int MX = 1, MY = 1;
  flit_t      in [NPORTS], out [NPORTS];
  tag_t       tag [NPORTS], otag [NPORTS];
  logic [3:0] rnd;
  int         checks = 0, failures = 0, n_golden = 0, n_silver = 0, n_defl = 0;

  perm_net dut (.my_x(3'(MX)), .my_y(3'(MY)), .*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent model of one block.
  function automatic void blk(input flit_t a, input flit_t b, input tag_t ta, input tag_t tb,
                              input int pa0, input int pa1, input int pb0, input int pb1,
                              input bit r, output flit_t o0, output flit_t o1,
                              output tag_t to0, output tag_t to1);
    int la, lb, w, d;
    int wa0, wa1, wb0, wb1;
    la = !a.valid ? 0 : ta.golden ? 3 : ta.silver ? 2 : 1;
    lb = !b.valid ? 0 : tb.golden ? 3 : tb.silver ? 2 : 1;
    w  = (la != lb) ? (lb > la) : (la == 3) ? (b.seq < a.seq) : r;
    // (wish for out0, wish for out1) of winner and loser
    wa0 = w ? pb0 : pa0;  wa1 = w ? pb1 : pa1;
    wb0 = w ? pa0 : pb0;  wb1 = w ? pa1 : pb1;
    if (wa0 && !wa1)      d = 0;
    else if (wa1 && !wa0) d = 1;
    else if (wb0 && !wb1) d = 1;
    else if (wb1 && !wb0) d = 0;
    else                  d = w;
    if (d == w) begin o0 = a; o1 = b; to0 = ta; to1 = tb; end
    else        begin o0 = b; o1 = a; to0 = tb; to1 = ta; end
  endfunction

  initial begin
    flit_t a0, a1, b0, b1;
    tag_t  ta0, ta1, tb0, tb1;
    flit_t e [NPORTS];
    tag_t  et [NPORTS];
    int    gold, silv, nvalid;
    for (int t = 0; t < 5000; t++) begin
      gold = -1; silv = -1; nvalid = 0;
      for (int p = 0; p < NPORTS; p++) begin
        in[p]  = rand_flit(t % 3 == 0 ? 30 : 80, t * 4 + p);
        tag[p] = '0;
        if (in[p].valid) nvalid++;
      end
      if ($urandom_range(3) == 0) begin
        gold = $urandom_range(3);
        if (in[gold].valid) tag[gold].golden = 1; else gold = -1;
      end
      silv = $urandom_range(3);
      if (in[silv].valid && silv != gold) tag[silv].silver = 1; else silv = -1;
      rnd = 4'($urandom_range(15));
      #1;
      // exact model
      blk(in[0], in[1], tag[0], tag[1],
          ref_productive(in[0], MX, MY, 0) || ref_productive(in[0], MX, MY, 2),
          ref_productive(in[0], MX, MY, 1) || ref_productive(in[0], MX, MY, 3),
          ref_productive(in[1], MX, MY, 0) || ref_productive(in[1], MX, MY, 2),
          ref_productive(in[1], MX, MY, 1) || ref_productive(in[1], MX, MY, 3),
          rnd[0], a0, a1, ta0, ta1);
      blk(in[2], in[3], tag[2], tag[3],
          ref_productive(in[2], MX, MY, 0) || ref_productive(in[2], MX, MY, 2),
          ref_productive(in[2], MX, MY, 1) || ref_productive(in[2], MX, MY, 3),
          ref_productive(in[3], MX, MY, 0) || ref_productive(in[3], MX, MY, 2),
          ref_productive(in[3], MX, MY, 1) || ref_productive(in[3], MX, MY, 3),
          rnd[1], b0, b1, tb0, tb1);
      blk(a0, b0, ta0, tb0, ref_productive(a0, MX, MY, 0), ref_productive(a0, MX, MY, 2),
          ref_productive(b0, MX, MY, 0), ref_productive(b0, MX, MY, 2), rnd[2], e[0], e[2], et[0], et[2]);
      blk(a1, b1, ta1, tb1, ref_productive(a1, MX, MY, 1), ref_productive(a1, MX, MY, 3),
          ref_productive(b1, MX, MY, 1), ref_productive(b1, MX, MY, 3), rnd[3], e[1], e[3], et[1], et[3]);
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (out[p] !== e[p] || otag[p] !== et[p]) begin failures++; $display("t%0d port %0d differs from model", t, p); end
      end
      // properties
      for (int p = 0; p < NPORTS; p++) begin
        int cnt_in, cnt_out;
        cnt_in = 0; cnt_out = 0;
        if (!in[p].valid) continue;
        for (int q = 0; q < NPORTS; q++) if (out[q] === in[p]) cnt_out++;
        for (int q = 0; q < NPORTS; q++) if (in[q] === in[p]) cnt_in++;
        checks++;
        if (cnt_out != cnt_in) begin failures++; $display("t%0d flit from %0d lost/duplicated", t, p); end
      end
      for (int q = 0; q < NPORTS; q++) begin
        if (!out[q].valid) continue;
        if (!ref_productive(out[q], MX, MY, q)) n_defl++;
        if (otag[q].golden && ref_has_productive(out[q], MX, MY)) begin
          n_golden++; checks++;
          if (!ref_productive(out[q], MX, MY, q)) begin failures++; $display("t%0d golden deflected", t); end
        end
        if (gold < 0 && otag[q].silver && ref_has_productive(out[q], MX, MY)) begin
          n_silver++; checks++;
          if (!ref_productive(out[q], MX, MY, q)) begin failures++; $display("t%0d silver deflected", t); end
        end
        if (nvalid == 1 && ref_has_productive(out[q], MX, MY)) begin
          checks++;
          if (!ref_productive(out[q], MX, MY, q)) begin failures++; $display("t%0d lone flit deflected", t); end
        end
      end
    end
    checks++;
    if (n_golden == 0 || n_silver == 0 || n_defl == 0) failures++;
    $display("deflections seen %0d, golden %0d, silver %0d", n_defl, n_golden, n_silver);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
