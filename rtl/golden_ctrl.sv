// golden_ctrl: golden-source rotation for livelock freedom.
//
// The PDN arbiters always favour a golden flit, so a golden flit is never
// deflected by a lower-priority one and reaches its destination. Golden status
// rotates: for GOLDEN_EPOCH cycles all flits from one source node are golden,
// then the next source id takes over, so every source is golden in turn.
// Tying golden status to the source node (the 12-bit header carries no packet
// sequence number) and the epoch length are this design's choices. Every
// router keeps its own copy; the copies agree because they leave reset
// together.
// Interface: golden_id is registered and changes one cycle after the last
// cycle of an epoch; it is 0 after reset.
module golden_ctrl
  import redc_pkg::*;
#(
  parameter int unsigned GOLDEN_EPOCH = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [ID_W-1:0] golden_id
);

  localparam int unsigned EW = (GOLDEN_EPOCH > 1) ? $clog2(GOLDEN_EPOCH) : 1;

  logic [EW-1:0] epoch_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      epoch_cnt <= '0;
      golden_id <= '0;
    end else if (epoch_cnt == EW'(GOLDEN_EPOCH - 1)) begin
      epoch_cnt <= '0;
      golden_id <= golden_id + 1'b1;
    end else begin
      epoch_cnt <= epoch_cnt + 1'b1;
    end
  end

endmodule
