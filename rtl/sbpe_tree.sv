// sbpe_tree -- synchronized binary-tree priority encoder (SB-PE).
//
// A complete binary tree of sbpe_node cells over NPIX = 2**LEVELS pixels.
// Pixel requests are ORed toward the root; the root's request (any_req) tells
// the periphery that some pixel still waits. The selection path and the
// readOutControl pulse (roc) enter at the root and are steered at every node
// toward the higher-address child that requests, so exactly one pixel is
// selected at any time: the requesting pixel with the highest address, or
// pixel 0 when nothing requests. Only that pixel receives the roc pulse, so
// the pulse itself both latches the pixel's data at the periphery and makes
// the pixel drop its request; the tree then moves to the next pixel in
// priority order by itself, like a commuter switch, with no separate strobe.
//
// addr is the binary address of the selected pixel, built one bit per level.
// Everything here is combinational; the worst path from roc to a pixel crosses
// LEVELS nodes, and a change of selection can cross 2*LEVELS nodes.
module sbpe_tree #(
  parameter int unsigned LEVELS = 9,
  parameter int unsigned NPIX   = 2**LEVELS
) (
  input  logic [NPIX-1:0]   req,      // readRequest of every pixel
  input  logic              roc,      // readOutControl from the data controller
  output logic [NPIX-1:0]   sel,      // one-hot selection of the pixel on the bus
  output logic [NPIX-1:0]   roc_pix,  // roc routed to the selected pixel only
  output logic              any_req,
  output logic [LEVELS-1:0] addr
);

  // One generate block per level; level 0 are the pixels, level LEVELS the
  // root. Each level owns the requests and addresses it sends up and the
  // selection and readOutControl signals it sends down to the level below.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lv
    localparam int unsigned NN = NPIX >> l;   // nodes on this level
    logic [NN-1:0]     req_up;
    logic [LEVELS-1:0] addr_up [NN];

    if (l == 0) begin : g_leaf
      assign req_up  = req;
      for (genvar i = 0; i < NN; i++) begin : g_pix
        assign addr_up[i] = '0;
      end
      assign sel     = g_lv[1].g_nodes.sel_dn;
      assign roc_pix = g_lv[1].g_nodes.roc_dn;
    end else begin : g_nodes
      logic [NN-1:0]   sel_in, roc_in;
      logic [2*NN-1:0] sel_dn, roc_dn;
      if (l == LEVELS) begin : g_root
        assign sel_in = 1'b1;
        assign roc_in = roc;
      end else begin : g_inner
        assign sel_in = g_lv[l+1].g_nodes.sel_dn;
        assign roc_in = g_lv[l+1].g_nodes.roc_dn;
      end
      for (genvar k = 0; k < NN; k++) begin : g_node
        sbpe_node #(.AW(LEVELS), .LEVEL(l)) u_node (
          .req_lo  (g_lv[l-1].req_up[2*k]),
          .req_hi  (g_lv[l-1].req_up[2*k+1]),
          .req_up  (req_up[k]),
          .sel_in  (sel_in[k]),
          .sel_lo  (sel_dn[2*k]),
          .sel_hi  (sel_dn[2*k+1]),
          .roc_in  (roc_in[k]),
          .roc_lo  (roc_dn[2*k]),
          .roc_hi  (roc_dn[2*k+1]),
          .addr_lo (g_lv[l-1].addr_up[2*k]),
          .addr_hi (g_lv[l-1].addr_up[2*k+1]),
          .addr_up (addr_up[k])
        );
      end
    end
  end

  assign any_req = g_lv[LEVELS].req_up[0];
  assign addr    = g_lv[LEVELS].addr_up[0];

endmodule
