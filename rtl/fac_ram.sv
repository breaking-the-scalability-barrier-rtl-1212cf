// fac_ram: one row of the P-CAM sketch, M fingerprint-address cells (FACs)
// held in a simple dual-port block RAM.
//
// Port A is read-only and serves the query datapath; port B reads and writes
// and serves the update datapath, so a query and an update proceed in the
// same cycle. Both ports are synchronous: read data appears the cycle after
// the address. Port B is read-first (a write returns the old word), and a port
// A read of the word port B writes in the same cycle also returns the old
// word. The row itself is the design's; the port roles, read-first behaviour
// and the absence of a reset (the update controller clears the row after
// reset) are this implementation's choices.
//
// Interface: a_en/a_addr -> a_rdata; b_en/b_we/b_addr/b_wdata -> b_rdata.
module fac_ram #(
  parameter int unsigned M = 524288,   // FACs in the row
  parameter int unsigned W = 28        // bits per FAC: valid + fingerprint + address
) (
  input  logic                 clk,
  // port A: query read
  input  logic                 a_en,
  input  logic [$clog2(M)-1:0] a_addr,
  output logic [W-1:0]         a_rdata,
  // port B: update read / write
  input  logic                 b_en,
  input  logic                 b_we,
  input  logic [$clog2(M)-1:0] b_addr,
  input  logic [W-1:0]         b_wdata,
  output logic [W-1:0]         b_rdata
);

  logic [W-1:0] mem [M];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
