// output_serializer -- two-part serializer of one serial output.
//
// The serializer has one PKT_W-bit part per half matrix. A part latches its
// half's bus on that half's readOutControl pulse (the same clock edge at which
// the pixel on the bus releases it) and holds the packet while the other part
// shifts out; in its own slot it shifts left by one bit per clock, MSB first.
// Thus one part is always being loaded while the other is being sent, which
// works as a one-stage pipeline between the pixel buses and the pin.
//
// The output bit is chosen by out_src from the readout_controller: the header
// bit, the MSB of the left or right part, or zero before the first frame.
// ser_out is a multiplexer of flip-flop outputs, valid in the same cycle that
// out_src describes.
module output_serializer
#(
  parameter int unsigned PKT_W = sbpe_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PKT_W-1:0] bus_l,    // packet on the left half's bus
  input  logic [PKT_W-1:0] bus_r,    // packet on the right half's bus
  input  logic             latch_l,  // readOutControl of the left half
  input  logic             latch_r,  // readOutControl of the right half
  input  sbpe_pkg::out_src_e         out_src,
  input  logic             hdr_bit,
  output logic             ser_out
);

  logic [PKT_W-1:0] part_l_q, part_r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_l_q <= '0;
      part_r_q <= '0;
    end else begin
      if (latch_l)                part_l_q <= bus_l;
      else if (out_src == sbpe_pkg::SRC_L)  part_l_q <= part_l_q << 1;
      if (latch_r)                part_r_q <= bus_r;
      else if (out_src == sbpe_pkg::SRC_R)  part_r_q <= part_r_q << 1;
    end
  end

  always_comb begin
    unique case (out_src)
      sbpe_pkg::SRC_HDR: ser_out = hdr_bit;
      sbpe_pkg::SRC_L:   ser_out = part_l_q[PKT_W-1];
      sbpe_pkg::SRC_R:   ser_out = part_r_q[PKT_W-1];
      default: ser_out = 1'b0;
    endcase
  end

endmodule
