// tb_inject_stage: a local flit must enter the lowest empty slot when there is one, and
// must be refused (taken low, slots unchanged) when all four slots are busy.
module tb_inject_stage;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  flit_t in [NPORTS], out [NPORTS], inj;
  logic  taken;
  int    checks = 0, failures = 0, n_full = 0, n_taken = 0;

  inject_stage dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t exp [NPORTS];
    int    slot;
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < NPORTS; p++) in[p] = rand_flit(75, t * 8 + p);
      inj = rand_flit(70, 99999 + t);
      #1;
      slot = -1;
      for (int p = NPORTS - 1; p >= 0; p--) if (!in[p].valid) slot = p;
      for (int p = 0; p < NPORTS; p++) exp[p] = in[p];
      if (inj.valid && slot >= 0) exp[slot] = inj;
      if (slot < 0) n_full++;
      if (inj.valid && slot >= 0) n_taken++;
      checks++;
      if (taken !== (inj.valid && slot >= 0)) begin failures++; $display("t%0d taken wrong", t); end
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (out[p] !== exp[p]) begin failures++; $display("t%0d slot %0d wrong", t, p); end
      end
    end
    checks++;
    if (n_full == 0 || n_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
