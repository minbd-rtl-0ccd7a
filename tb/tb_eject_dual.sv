// tb_eject_dual: random slot contents at router (1,2). Up to two flits addressed to this
// router must leave per cycle, a golden one first, otherwise in slot order; all other
// flits must stay in place. Includes cycles with three and four local flits.
module tb_eject_dual;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int MX = 1, MY = 2;
  pkt_id_t golden_id;
  flit_t   in [NPORTS], out [NPORTS], ej [2];
  int      checks = 0, failures = 0;
  int      n_dual = 0;

  eject_dual #(.EJECT_W(2)) dut (.my_x(3'(MX)), .my_y(3'(MY)), .golden_id, .in, .out, .ej);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t exp_out [NPORTS];
    flit_t exp_ej  [2];
    int    order [$];
    for (int t = 0; t < 4000; t++) begin
      golden_id = pkt_id_t'($urandom_range(255));
      for (int p = 0; p < NPORTS; p++) begin
        in[p] = rand_flit(80, t * 4 + p);
        if ($urandom_range(1)) begin in[p].dst_x = MX; in[p].dst_y = MY; end
        if (in[p].valid && $urandom_range(5) == 0) {in[p].src, in[p].txn} = golden_id;
      end
      #1;
      order = {};
      for (int p = 0; p < NPORTS; p++)
        if (in[p].valid && in[p].dst_x == MX && in[p].dst_y == MY && pkt_id(in[p]) == golden_id) order.push_back(p);
      for (int p = 0; p < NPORTS; p++)
        if (in[p].valid && in[p].dst_x == MX && in[p].dst_y == MY && pkt_id(in[p]) != golden_id) order.push_back(p);
      for (int p = 0; p < NPORTS; p++) exp_out[p] = in[p];
      for (int k = 0; k < 2; k++) begin
        exp_ej[k] = '0;
        if (order.size() > k) begin
          exp_ej[k] = in[order[k]];
          exp_out[order[k]] = '0;
        end
      end
      if (order.size() >= 2) n_dual++;
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (ej[k] !== exp_ej[k]) begin failures++; $display("t%0d ej%0d wrong", t, k); end
      end
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (out[p] !== exp_out[p]) begin failures++; $display("t%0d out%0d wrong", t, p); end
      end
    end
    checks++;
    if (n_dual == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
