// tb_reassembly_buffer: packets of random length are delivered with their flits shuffled
// and interleaved with other packets, up to two flits per cycle (sometimes two of the
// same new packet in one cycle). Every completed packet must come out once with all its
// data words in place. A final phase opens more packets than there are entries and
// checks that the overflowing flits are reported as dropped, not stored.
module tb_reassembly_buffer;
  import minbd_pkg::*;
  import minbd_tb_pkg::*;

  localparam int SL = 4;
  logic               clk = 0, rst_n = 0;
  flit_t              ej [2];
  logic               done_valid;
  pkt_id_t            done_id;
  logic [SEQ_W-1:0]   done_last;
  logic [DATA_W-1:0]  done_data [8];
  logic [1:0]         drop_valid;
  flit_t              drop_flit [2];
  int                 checks = 0, failures = 0, n_done = 0, n_drop = 0, n_exp_done = 0;
  int                 pending [pkt_id_t];   // packets expected to complete: last seq

  reassembly_buffer #(.SLOTS(SL), .EJECT_W(2)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] word(pkt_id_t id, int s);
    return DATA_W'(id) * 32'h10001 + DATA_W'(s) * 32'h0101_0000 + 32'h5;
  endfunction

  // Checker: runs at every negedge.
  always @(negedge clk) if (rst_n) begin
    if (done_valid) begin
      n_done++;
      checks++;
      if (!pending.exists(done_id) || int'(done_last) != pending[done_id]) begin
        failures++; $display("unexpected completion of %h", done_id);
      end else begin
        for (int s = 0; s <= int'(done_last); s++) begin
          checks++;
          if (done_data[s] !== word(done_id, s)) begin failures++; $display("data %h[%0d] wrong", done_id, s); end
        end
        pending.delete(done_id);
      end
    end
    for (int k = 0; k < 2; k++) if (drop_valid[k]) n_drop++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t stream [$];
    ej[0] = '0; ej[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Phase 1: at most 3 packets in flight at a time, flits shuffled.
    for (int round = 0; round < 300; round++) begin
      stream = {};
      for (int k = 0; k < 3; k++) begin
        pkt_id_t id;
        int      last;
        id   = pkt_id_t'(round * 3 + k);
        last = $urandom_range(7);
        pending[id] = last;
        n_exp_done++;
        for (int s = 0; s <= last; s++)
          stream.push_back(mk_flit(0, 0, int'(id[PKTID_W-1:TXN_W]), int'(id[TXN_W-1:0]), s, last, int'(word(id, s))));
      end
      stream.shuffle();
      while (stream.size()) begin
        for (int k = 0; k < 2; k++) ej[k] = (stream.size() && $urandom_range(3) != 0) ? stream.pop_front() : FLIT_NONE;
        @(negedge clk);
      end
      ej[0] = '0; ej[1] = '0;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (pending.size() != 0 || n_drop != 0) begin failures++; $display("%0d packets never completed, %0d drops", pending.size(), n_drop); end
    // Phase 2: open SL+2 packets with their first flit only; two must be dropped.
    for (int k = 0; k < SL + 2; k++) begin
      ej[0] = mk_flit(0, 0, 60, k % 16, 0, 3, k);
      ej[1] = '0;
      #1;
      checks++;
      if (drop_valid[0] !== (k >= SL) || (k >= SL && drop_flit[0] !== ej[0])) begin
        failures++; $display("phase 2: flit %0d drop=%0d", k, drop_valid[0]);
      end
      @(negedge clk);
    end
    ej[0] = '0;
    @(negedge clk);
    checks++;
    if (n_done != n_exp_done) failures++;
    $display("completed %0d dropped %0d", n_done, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
