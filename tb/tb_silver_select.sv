// tb_silver_select: exhaustive over occupancy and random start. Exactly one occupied slot
// must be silver whenever any slot is occupied: the first one at or after the start.
module tb_silver_select;
  import minbd_pkg::*;

  logic [3:0] valid, silver;
  logic [1:0] rnd;
  int         checks = 0, failures = 0;

  silver_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int v = 0; v < 16; v++) begin
      for (int r = 0; r < 4; r++) begin
        valid = 4'(v);
        rnd   = 2'(r);
        #1;
        exp = '0;
        for (int i = 0; i < 4; i++) begin
          if (exp == 0 && valid[(r + i) % 4]) exp[(r + i) % 4] = 1'b1;
        end
        checks++;
        if (silver !== exp) begin
          failures++;
          $display("valid %b rnd %0d silver %b expected %b", valid, r, silver, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
