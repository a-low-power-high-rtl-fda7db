// readout_controller -- frame and packet timing of one serial output.
//
// Everything runs on the serializer clock, one output bit per cycle. A rising
// edge of the user's frame clock (frame_clk, asynchronous, synchronised here
// with two flip-flops) starts a new frame at once: frame_swap is high for one
// cycle, which makes every pixel swap its two data registers and raise its
// request, and the output then carries the HDR_W-bit header followed by an
// endless run of PKT_W-bit packet slots, alternating left half (even slots)
// and right half (odd slots), until the next frame change. A frame change
// abandons whatever has not been sent yet.
//
// readOutControl is derived from this bit timing: roc_l is high for one cycle
// at the end of every even slot, so the left half's bus is latched into its
// serializer part exactly when that part has shifted out its previous packet;
// roc_r does the same at the end of every odd slot. Each half therefore gets
// one pulse per two packet times (ping-pong), and the header provides the
// first pulse of each half: roc_l PKT_W cycles before the header ends (so the
// left packet is ready for slot 0) and roc_r in the header's last cycle.
// Each pulse is one clock wide and comes from a flip-flop.
//
// The header length, packet length, the ping-pong order and the
// derivation of readOutControl from the serializer clock follow the described
// chip; the exact cycle at which each pulse falls, the two-flop synchroniser
// and the behaviour before the first frame (output idle at zero) are choices
// of this design. Requires HDR_W >= PKT_W + 2, so that the first left pixel
// has at least one cycle after the swap to reach the bus.
module readout_controller
#(
  parameter int unsigned PKT_W = sbpe_pkg::DATA_W,
  parameter int unsigned HDR_W = sbpe_pkg::HDR_W,
  parameter logic [HDR_W-1:0] HEADER = sbpe_pkg::HEADER
) (
  input  logic     clk,         // serializerClk
  input  logic     rst_n,
  input  logic     frame_clk,   // user frame clock, asynchronous
  output logic     frame_swap,  // one cycle per frame change, to all pixels
  output logic     roc_l,       // readOutControl of the left half
  output logic     roc_r,       // readOutControl of the right half
  output sbpe_pkg::out_src_e out_src,     // what the serial output carries this cycle
  output logic     hdr_bit      // header bit of this cycle
);

  localparam int unsigned CW = $clog2(HDR_W > PKT_W ? HDR_W : PKT_W);

  logic [1:0]    fclk_sync_q;
  logic          fclk_prev_q;
  logic          frame_rise;
  logic          running_q, hdr_q, odd_q;
  logic [CW-1:0] cnt_q;
  logic          running_d, hdr_d, odd_d;
  logic [CW-1:0] cnt_d;
  logic          roc_l_d, roc_r_d;

  assign frame_rise = fclk_sync_q[1] & ~fclk_prev_q;

  always_comb begin
    running_d = running_q;
    hdr_d     = hdr_q;
    odd_d     = odd_q;
    cnt_d     = cnt_q;
    if (frame_rise) begin
      running_d = 1'b1;
      hdr_d     = 1'b1;
      odd_d     = 1'b0;
      cnt_d     = '0;
    end else if (running_q) begin
      if (hdr_q) begin
        if (cnt_q == CW'(HDR_W - 1)) begin
          hdr_d = 1'b0;
          cnt_d = '0;
        end else begin
          cnt_d = cnt_q + 1'b1;
        end
      end else if (cnt_q == CW'(PKT_W - 1)) begin
        cnt_d = '0;
        odd_d = ~odd_q;
      end else begin
        cnt_d = cnt_q + 1'b1;
      end
    end
    // Pulses for the cycle that the next state describes.
    roc_l_d = running_d && (hdr_d ? (cnt_d == CW'(HDR_W - PKT_W - 1))
                                  : (!odd_d && cnt_d == CW'(PKT_W - 1)));
    roc_r_d = running_d && (hdr_d ? (cnt_d == CW'(HDR_W - 1))
                                  : ( odd_d && cnt_d == CW'(PKT_W - 1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fclk_sync_q <= '0;
      fclk_prev_q <= 1'b0;
      running_q   <= 1'b0;
      hdr_q       <= 1'b0;
      odd_q       <= 1'b0;
      cnt_q       <= '0;
      frame_swap  <= 1'b0;
      roc_l       <= 1'b0;
      roc_r       <= 1'b0;
    end else begin
      fclk_sync_q <= {fclk_sync_q[0], frame_clk};
      fclk_prev_q <= fclk_sync_q[1];
      running_q   <= running_d;
      hdr_q       <= hdr_d;
      odd_q       <= odd_d;
      cnt_q       <= cnt_d;
      frame_swap  <= frame_rise;
      roc_l       <= roc_l_d;
      roc_r       <= roc_r_d;
    end
  end

  always_comb begin
    if (!running_q)  out_src = sbpe_pkg::SRC_IDLE;
    else if (hdr_q)  out_src = sbpe_pkg::SRC_HDR;
    else if (odd_q)  out_src = sbpe_pkg::SRC_R;
    else             out_src = sbpe_pkg::SRC_L;
    hdr_bit = hdr_q && HEADER[CW'(HDR_W - 1) - cnt_q];
  end

  // A pulse never reaches both halves at once, and never coincides with a swap.
  a_roc_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(roc_l && roc_r) && !(frame_swap && (roc_l || roc_r)));

  initial begin
    assert (HDR_W >= PKT_W + 2)
      else $error("readout_controller: HDR_W must be at least PKT_W + 2");
  end

endmodule
