// pixel_readout_top -- readout of a 64 x 64 pixel detector chip.
//
// The matrix is divided into N_QUAD = 4 quadrants of 32 x 32 = 1024 pixels,
// each with its own serial output pin (ser_out[q]) and its own readout:
// two 512-pixel halves, each arbitrated by a synchronized binary-tree priority
// encoder, interleaved onto one serializer (quadrant_readout). All quadrants
// share the serializer clock, the user's frame clock and the mode input, so
// their frames start together.
//
// Interface: fe_we / fe_data are the per-pixel write ports of the front ends
// (in-pixel ADCs, outside this design), indexed [quadrant][half][pixel], where
// half 0 is the left half and the pixel index is the arbitration address
// (higher addresses are read first). With full_frame = 1 every pixel is sent
// each frame; with 0 only pixels written during the previous frame are sent.
// ADDR_OUT adds the pixel address to every packet (off by default, as on the
// described full-frame chip). At 400 MHz a full frame of 11286 bits per
// output takes 28.2 us.
module pixel_readout_top
#(
  parameter int unsigned NQ       = sbpe_pkg::N_QUAD,
  parameter int unsigned LEVELS   = sbpe_pkg::LEVELS,
  parameter bit          ADDR_OUT = 1'b0,
  parameter int unsigned DW       = sbpe_pkg::DATA_W,
  parameter int unsigned NPIX     = 2**LEVELS
) (
  input  logic            ser_clk,
  input  logic            rst_n,
  input  logic            frame_clk,
  input  logic            full_frame,
  input  logic [NPIX-1:0] fe_we   [NQ][2],
  input  logic [DW-1:0]   fe_data [NQ][2][NPIX],
  output logic [NQ-1:0]   ser_out
);

  for (genvar q = 0; q < NQ; q++) begin : g_quad
    quadrant_readout #(.LEVELS(LEVELS), .ADDR_OUT(ADDR_OUT), .DW(DW)) u_quad (
      .clk        (ser_clk),
      .rst_n,
      .frame_clk,
      .full_frame,
      .fe_we      (fe_we[q]),
      .fe_data    (fe_data[q]),
      .ser_out    (ser_out[q])
    );
  end

endmodule
