// tb_arb_block: random flits, tags and wishes into one 2x2 arbiter block. The expected
// routing is worked out here from the priority rules (golden > silver > ordinary > empty,
// golden ties by sequence number, other ties by the random bit) and the steering rule
// (the winner gets its single wanted output; otherwise the loser gets its wish).
module tb_arb_block;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  flit_t      in0, in1, out0, out1;
  tag_t       tag0, tag1, otag0, otag1;
  logic [1:0] want0, want1;
  logic       rnd;
  int         checks = 0, failures = 0;
  int         n_golden_win = 0, n_silver_win = 0;

  arb_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(flit_t f, tag_t t);
    if (!f.valid) return 0;
    if (t.golden) return 3;
    if (t.silver) return 2;
    return 1;
  endfunction

  initial begin
    int   l0, l1, winner, dest;
    bit   swapped;
    for (int t = 0; t < 5000; t++) begin
      in0   = rand_flit(85, 2 * t);
      in1   = rand_flit(85, 2 * t + 1);
      tag0  = in0.valid ? tag_t'($urandom_range(3)) : '0;
      tag1  = in1.valid ? tag_t'($urandom_range(3)) : '0;
      if (tag0.golden) tag0.silver = 0;
      if (tag1.golden) tag1.silver = 0;
      want0 = in0.valid ? 2'($urandom_range(3)) : 2'b00;
      want1 = in1.valid ? 2'($urandom_range(3)) : 2'b00;
      rnd   = 1'($urandom_range(1));
      #1;
      l0 = level(in0, tag0);
      l1 = level(in1, tag1);
      if (l0 > l1)                 winner = 0;
      else if (l1 > l0)            winner = 1;
      else if (l0 == 3)            winner = (in1.seq < in0.seq) ? 1 : 0;
      else                         winner = rnd ? 1 : 0;
      if (winner == 0 && l0 == 3 && l1 < 3) n_golden_win++;
      if (l0 == 2 && l1 == 1 || l1 == 2 && l0 == 1) n_silver_win++;
      // Output the winner ends up on.
      case (winner ? want1 : want0)
        2'b01:   dest = 0;
        2'b10:   dest = 1;
        default:
          case (winner ? want0 : want1)
            2'b01:   dest = 1;
            2'b10:   dest = 0;
            default: dest = winner;
          endcase
      endcase
      swapped = (dest != winner);
      checks++;
      if (out0 !== (swapped ? in1 : in0) || out1 !== (swapped ? in0 : in1) ||
          otag0 !== (swapped ? tag1 : tag0) || otag1 !== (swapped ? tag0 : tag1)) begin
        failures++;
        $display("t%0d: l0 %0d l1 %0d want %b/%b rnd %0d winner %0d dest %0d", t, l0, l1, want0, want1, rnd, winner, dest);
      end
    end
    checks++;
    if (n_golden_win == 0 || n_silver_win == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
