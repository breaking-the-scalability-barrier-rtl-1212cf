// pcam_value_store: value store memory V of the P-CAM key-value mode.
//
// N words of VAL_W bits, indexed by the address the sketch holds for a key.
// The update datapath writes through the write port; the query datapath
// reads through the read port, with the data registered (available the cycle
// after the address). A read of the word written in the same cycle returns
// the old word. The store itself is the design's; the port split, the value
// width and having no reset (only addresses handed out by the address
// generator are ever read for a stored key) are this implementation's
// choices.
//
// Interface: we_i/waddr_i/wdata_i; re_i/raddr_i -> rdata_o.
module pcam_value_store #(
  parameter int unsigned N     = 524288,
  parameter int unsigned VAL_W = 32
) (
  input  logic                 clk,
  input  logic                 we_i,
  input  logic [$clog2(N)-1:0] waddr_i,
  input  logic [VAL_W-1:0]     wdata_i,
  input  logic                 re_i,
  input  logic [$clog2(N)-1:0] raddr_i,
  output logic [VAL_W-1:0]     rdata_o
);

  logic [VAL_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk) begin
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
