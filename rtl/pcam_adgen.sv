// pcam_adgen: address generator (AdGen) of the P-CAM.
//
// An up-counter that holds the address the next new key receives. The
// address doubles as a logical timestamp: a larger address is a younger
// entry. Each alloc_i pulse consumes the current address; once all N
// addresses 0..N-1 are handed out, full_o is raised and further allocations
// are ignored. The counter never wraps, so an address is never reused. This
// follows the design description; the counter register is also the
// "Register" that presents the address to the sketch write path.
//
// Interface: alloc_i in; addr_o (current address, registered), full_o out.
// Synchronous active-low reset to address 0.
module pcam_adgen #(
  parameter int unsigned N = 524288    // value store entries (max. count)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alloc_i,
  output logic [$clog2(N)-1:0] addr_o,
  output logic                 full_o
);

  localparam int unsigned CW = $clog2(N) + 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n)                         count <= '0;
    else if (alloc_i && count != CW'(N)) count <= count + 1'b1;
  end

  assign addr_o = count[CW-2:0];
  assign full_o = (count == CW'(N));

  // An allocation while full is a controller error: it must deny instead.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(alloc_i && full_o))
      else $error("pcam_adgen: allocation requested while full");
  end

endmodule
