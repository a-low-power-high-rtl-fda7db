// quadrant_readout -- readout of 2 x 2**LEVELS pixels onto one serial output.
//
// The pixel matrix of one output (32 x 32 = 1024 pixels by default) is split
// into a left and a right half of 512 pixels, each with its own data bus and
// its own SB-PE tree (pixel_half). A central data control and transmitter
// block (readout_controller plus output_serializer) sends, at every frame
// change, a header and then one packet per pixel, alternating left and right.
// While one half's packet leaves the chip the other half's bus is being
// latched, so each bus gets two packet times to settle.
//
// Full-frame mode (full_frame = 1) sends every pixel, in descending address
// order within each half: 22 + 1024 * 11 = 11286 bits per frame with the
// default sizes. In zero-suppressed mode only pixels written during the frame
// request readout. With ADDR_OUT = 1 each packet also carries the 9-bit pixel
// address generated by the tree, {addr, data}, which zero-suppressed readout
// needs to place the data; by default the address logic is left unused and a
// packet is the 11 data bits alone, as on the described full-frame chip. The
// packet layout with an address is this design's choice. Once a half has no
// requesting pixel left, its tree selects pixel 0 and its packets read zero
// until the next frame change.
module quadrant_readout
#(
  parameter int unsigned LEVELS   = sbpe_pkg::LEVELS,
  parameter bit          ADDR_OUT = 1'b0,
  parameter int unsigned DW       = sbpe_pkg::DATA_W,
  parameter int unsigned NPIX     = 2**LEVELS,
  parameter int unsigned PKT_W    = DW + (ADDR_OUT ? LEVELS : 0)
) (
  input  logic            clk,        // serializerClk
  input  logic            rst_n,
  input  logic            frame_clk,  // user frame clock, asynchronous
  input  logic            full_frame,
  input  logic [NPIX-1:0] fe_we   [2],        // [0] left half, [1] right half
  input  logic [DW-1:0]   fe_data [2][NPIX],
  output logic            ser_out
);

  logic              frame_swap, roc_l, roc_r, hdr_bit;
  sbpe_pkg::out_src_e          out_src;
  logic [DW-1:0]     bus_data [2];
  logic [LEVELS-1:0] bus_addr [2];
  logic [1:0]        any_req;
  logic [PKT_W-1:0]  pkt [2];

  for (genvar h = 0; h < 2; h++) begin : g_half
    pixel_half #(.LEVELS(LEVELS), .DW(DW)) u_half (
      .clk, .rst_n, .full_frame, .frame_swap,
      .fe_we    (fe_we[h]),
      .fe_data  (fe_data[h]),
      .roc      (h == 0 ? roc_l : roc_r),
      .bus_data (bus_data[h]),
      .bus_addr (bus_addr[h]),
      .any_req  (any_req[h])
    );
    if (ADDR_OUT) begin : g_addr
      assign pkt[h] = {bus_addr[h], bus_data[h]};
    end else begin : g_noaddr
      assign pkt[h] = bus_data[h];
    end
  end

  readout_controller #(.PKT_W(PKT_W)) u_ctrl (
    .clk, .rst_n, .frame_clk, .frame_swap, .roc_l, .roc_r, .out_src, .hdr_bit
  );

  output_serializer #(.PKT_W(PKT_W)) u_ser (
    .clk, .rst_n,
    .bus_l   (pkt[0]),
    .bus_r   (pkt[1]),
    .latch_l (roc_l),
    .latch_r (roc_r),
    .out_src, .hdr_bit, .ser_out
  );

endmodule
