// pixel_cell -- readout interface of one pixel.
//
// The pixel keeps two data registers so that it can record the current time
// frame while the previous one is read out. The front end (the in-pixel ADC,
// not part of this design) writes the "write" register through fe_we/fe_data.
// At a frame change (frame_swap, one clock wide) the two registers trade
// roles: the one just written becomes the read register, and the other one is
// cleared to receive the new frame. At the same edge readRequest is set if the
// frame has data, or unconditionally in full-frame mode.
//
// While the arbitration tree selects this pixel (sel) and the request is still
// set, the read register drives the shared bus of its half matrix. The bus is
// modelled as a wired OR, so an unselected pixel drives zeros; in silicon this
// is a tristate buffer. When the readOutControl pulse routed to this pixel
// (roc) is high at a clock edge, the periphery latches the bus at that same
// edge and the pixel clears its readRequest, which makes the tree move on to
// the next pixel. After its request is cleared the pixel drives zeros even if
// the tree keeps selecting it, so the last pixel in priority order reads as
// zero once a frame is exhausted.
//
// Choices of this design: the registers are clocked by the serializer clock
// with the frame change as a synchronous enable; the write register is cleared
// at the swap; a frame change takes priority over a readout pulse.
module pixel_cell #(
  parameter int unsigned DATA_W = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              full_frame,   // 1: every pixel requests at frame start
  input  logic              frame_swap,   // one-cycle frame change
  input  logic              fe_we,        // front end writes the current frame
  input  logic [DATA_W-1:0] fe_data,
  input  logic              sel,          // selectPixel path from the tree
  input  logic              roc,          // readOutControl routed to this pixel
  output logic              read_request,
  output logic [DATA_W-1:0] bus_data      // contribution to the shared bus
);

  logic [DATA_W-1:0] data_q [2];
  logic [1:0]        valid_q;
  logic              wr_ptr_q;   // index of the register being written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q[0]    <= '0;
      data_q[1]    <= '0;
      valid_q      <= '0;
      wr_ptr_q     <= 1'b0;
      read_request <= 1'b0;
    end else if (frame_swap) begin
      wr_ptr_q               <= ~wr_ptr_q;
      read_request           <= full_frame | valid_q[wr_ptr_q];
      data_q[~wr_ptr_q]      <= '0;
      valid_q[~wr_ptr_q]     <= 1'b0;
    end else begin
      if (fe_we) begin
        data_q[wr_ptr_q]  <= fe_data;
        valid_q[wr_ptr_q] <= 1'b1;
      end
      if (roc) read_request <= 1'b0;
    end
  end

  always_comb begin
    bus_data = (sel && read_request) ? data_q[~wr_ptr_q] : '0;
  end

endmodule
