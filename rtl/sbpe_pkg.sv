// sbpe_pkg -- constants shared by the arbitration-tree pixel readout.
//
// One serial output carries the data of 1024 pixels, split into two halves of
// 512 pixels, each half with its own synchronized binary-tree priority encoder
// (SB-PE). A pixel packet is 11 bits (one range bit and ten ADC bits) and
// every frame on the output starts with a 22-bit header; both numbers and the
// 512-pixel half size follow the described 64x64-pixel chip. The exact header
// bit pattern is a choice of this design: five "10" pairs followed by twelve
// zeros, sent most significant bit first.
package sbpe_pkg;

  // Bits per pixel packet: 1 range bit + 10 ADC bits.
  localparam int unsigned DATA_W = 11;

  // Tree depth of one SB-PE: 2**9 = 512 pixels per half matrix.
  localparam int unsigned LEVELS = 9;

  // Frame header, sent MSB first at every frame change.
  localparam int unsigned HDR_W = 22;
  localparam logic [HDR_W-1:0] HEADER = 22'b1010101010_000000000000;

  // What the serial output carries in the current clock cycle.
  typedef enum logic [1:0] {
    SRC_IDLE = 2'd0,  // no frame started since reset
    SRC_HDR  = 2'd1,  // frame header
    SRC_L    = 2'd2,  // packet of the left half
    SRC_R    = 2'd3   // packet of the right half
  } out_src_e;

  // Number of 1024-pixel readout quadrants on the 64x64 chip.
  localparam int unsigned N_QUAD = 4;

endpackage
