// golden_ctrl: Golden Packet schedule. One packet identity in the whole network is
// "golden" at any time; it is the highest arbitration priority everywhere, so it is
// always delivered and the network cannot livelock. The golden identity steps through all
// packet identities {source node, transaction} in a fixed round-robin order, moving on
// every EPOCH cycles.
//
// Every router holds its own copy of this counter. All copies leave reset together and
// count the same clock, so they always agree without any global wire.
//
// The epoch of 64 cycles and the 16 transactions per sender follow the 4x4 example of the
// source design (a 42-cycle worst-case delivery rounded up, plus the side-buffer rescue
// time). The golden identity is a registered output and changes on the clock edge that
// ends an epoch.
module golden_ctrl
  import minbd_pkg::*;
#(
  parameter int NUM_NODES = 16,
  parameter int NUM_TXN   = 16,
  parameter int EPOCH     = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  output pkt_id_t golden_id,
  output logic    epoch_start   // first cycle of an epoch
);
  localparam int EW = (EPOCH > 1) ? $clog2(EPOCH) : 1;

  logic [EW-1:0]     ecnt;
  logic [NODE_W-1:0] gsrc;
  logic [TXN_W-1:0]  gtxn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ecnt <= '0;
      gsrc <= '0;
      gtxn <= '0;
    end else if (ecnt == EW'(EPOCH - 1)) begin
      ecnt <= '0;
      if (gtxn == TXN_W'(NUM_TXN - 1)) begin
        gtxn <= '0;
        gsrc <= (gsrc == NODE_W'(NUM_NODES - 1)) ? '0 : gsrc + 1'b1;
      end else begin
        gtxn <= gtxn + 1'b1;
      end
    end else begin
      ecnt <= ecnt + 1'b1;
    end
  end

  assign golden_id   = {gsrc, gtxn};
  assign epoch_start = (ecnt == '0);
endmodule
