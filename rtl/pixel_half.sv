// pixel_half -- one half of a 1024-pixel readout matrix.
//
// NPIX = 2**LEVELS pixel_cell instances share one parallel data bus and one
// sbpe_tree. Each readOutControl pulse (roc) from the data controller reaches
// only the pixel the tree currently selects: the periphery latches bus_data
// and bus_addr at that clock edge, the pixel drops its request, and the tree
// selects the next pixel, whose data must settle on the bus before the next
// pulse. The bus is a wired OR of all pixel outputs (a tristate bus in
// silicon); bus_addr comes straight from the tree and is only needed for
// zero-suppressed readout.
//
// Splitting the matrix into two such halves, each with its own bus and tree,
// is what lets the controller interleave them (ping-pong), giving every bus
// two packet times to settle.
module pixel_half
#(
  parameter int unsigned LEVELS = sbpe_pkg::LEVELS,
  parameter int unsigned DW     = sbpe_pkg::DATA_W,
  parameter int unsigned NPIX   = 2**LEVELS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              full_frame,
  input  logic              frame_swap,
  input  logic [NPIX-1:0]   fe_we,
  input  logic [DW-1:0]     fe_data [NPIX],
  input  logic              roc,        // readOutControl of this half
  output logic [DW-1:0]     bus_data,
  output logic [LEVELS-1:0] bus_addr,
  output logic              any_req
);

  logic [NPIX-1:0] req, sel, roc_pix;
  logic [DW-1:0]   pix_bus [NPIX];

  for (genvar i = 0; i < NPIX; i++) begin : g_pix
    pixel_cell #(.DATA_W(DW)) u_pix (
      .clk, .rst_n, .full_frame, .frame_swap,
      .fe_we        (fe_we[i]),
      .fe_data      (fe_data[i]),
      .sel          (sel[i]),
      .roc          (roc_pix[i]),
      .read_request (req[i]),
      .bus_data     (pix_bus[i])
    );
  end

  sbpe_tree #(.LEVELS(LEVELS)) u_tree (
    .req, .roc, .sel, .roc_pix, .any_req,
    .addr (bus_addr)
  );

  // Shared bus: only the selected pixel drives non-zero data.
  always_comb begin
    bus_data = '0;
    for (int i = 0; i < NPIX; i++) bus_data |= pix_bus[i];
  end

endmodule
