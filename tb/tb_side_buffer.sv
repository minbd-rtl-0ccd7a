// tb_side_buffer: random push/pop traffic against a queue model of the 4-entry FIFO.
// Checks head, empty, full and count every cycle, including push+pop while full.
module tb_side_buffer;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  push, pop;
  flit_t push_flit, head;
  logic  empty, full;
  logic [2:0] count;
  int    checks = 0, failures = 0;
  flit_t q[$];

  side_buffer #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (head !== (q.size() ? q[0] : FLIT_NONE) || empty !== (q.size() == 0) ||
          full !== (q.size() == 4) || int'(count) != q.size()) begin
        failures++;
        $display("mismatch at %0d: count %0d model %0d", i, count, q.size());
      end
      pop       = ($urandom_range(2) == 0);
      push      = ($urandom_range(1) == 0);
      if (q.size() == 4 && !pop) push = 0;
      push_flit = mk_flit(1, 2, 3, 4, 5, 7, i);
      @(posedge clk);
      #1;
      if (pop && q.size()) void'(q.pop_front());
      if (push) q.push_back(push_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
