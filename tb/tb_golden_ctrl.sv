// tb_golden_ctrl: the golden identity must step through every {source, transaction}
// pair in order, one step per EPOCH cycles, wrapping after NUM_NODES*NUM_TXN epochs.
// Runs a small (EPOCH=4, 3 nodes x 2 transactions) and checks every cycle.
module tb_golden_ctrl;
  import minbd_pkg::*;

  localparam int EP = 4, NN = 3, NT = 2;
  logic    clk = 0, rst_n = 0;
  pkt_id_t golden_id;
  logic    epoch_start;
  int      checks = 0, failures = 0;

  golden_ctrl #(.NUM_NODES(NN), .NUM_TXN(NT), .EPOCH(EP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, src, txn;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3 * EP * NN * NT; c++) begin
      e   = (c / EP) % (NN * NT);
      src = e / NT;
      txn = e % NT;
      checks++;
      if (golden_id !== {NODE_W'(src), TXN_W'(txn)} || epoch_start !== (c % EP == 0)) begin
        failures++;
        $display("cycle %0d: golden %h expected src %0d txn %0d", c, golden_id, src, txn);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
