// tb_readout_controller -- cycle-exact test of the frame and packet timing.
//
// After a rising edge of the frame clock the controller must, three clock
// edges later, give one frame_swap cycle together with the first header bit,
// send the 22 header bits, and then alternate 11-cycle left and right packet
// slots. roc_l must be high exactly in header cycle 10 and in the last cycle
// of every left slot; roc_r in the last header cycle and the last cycle of
// every right slot, so each half gets one pulse every 22 cycles. A second
// frame change in the middle of a slot must restart the sequence.
`timescale 1ns/1ps
module tb_readout_controller;
  localparam int unsigned PKT_W = 11, HDR_W = 22;
  logic clk = 1'b0, rst_n = 1'b0, frame_clk = 1'b0;
  logic frame_swap, roc_l, roc_r, hdr_bit;
  sbpe_pkg::out_src_e out_src;
  int checks = 0, failures = 0;
  int last_roc_l, last_roc_r, n_roc_l, n_roc_r;

  readout_controller #(.PKT_W(PKT_W), .HDR_W(HDR_W)) u_dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Check ncyc cycles of one frame, starting with the swap cycle.
  task automatic frame(input int ncyc);
    sbpe_pkg::out_src_e e_src;
    bit e_l, e_r;
    @(negedge clk);
    frame_clk = 1'b1;
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      check(frame_swap == 1'b0, "no swap before synchronisation");
    end
    last_roc_l = -1; last_roc_r = -1;
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      if (c == 5) frame_clk = 1'b0;
      if (c < HDR_W) begin
        e_src = sbpe_pkg::SRC_HDR;
        e_l = (c == HDR_W - PKT_W - 1);
        e_r = (c == HDR_W - 1);
        check(hdr_bit == sbpe_pkg::HEADER[HDR_W-1-c], $sformatf("header bit %0d", c));
      end else begin
        int s = (c - HDR_W) / PKT_W, k = (c - HDR_W) % PKT_W;
        e_src = (s % 2) ? sbpe_pkg::SRC_R : sbpe_pkg::SRC_L;
        e_l = (s % 2 == 0) && (k == PKT_W - 1);
        e_r = (s % 2 == 1) && (k == PKT_W - 1);
      end
      check(frame_swap == (c == 0), $sformatf("frame_swap cycle %0d", c));
      check(out_src == e_src, $sformatf("out_src cycle %0d", c));
      check(roc_l == e_l && roc_r == e_r, $sformatf("roc cycle %0d", c));
      if (roc_l) begin
        if (last_roc_l >= int'(HDR_W)) check(c - last_roc_l == 2*PKT_W, $sformatf("roc_l period c=%0d last=%0d", c, last_roc_l));
        last_roc_l = c; n_roc_l++;
      end
      if (roc_r) begin
        if (last_roc_r >= 0) check(c - last_roc_r == 2*PKT_W, "roc_r period");
        last_roc_r = c; n_roc_r++;
      end
    end
  endtask

  initial begin
    n_roc_l = 0; n_roc_r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (30) begin
      @(negedge clk);
      check(out_src == sbpe_pkg::SRC_IDLE && !roc_l && !roc_r && !frame_swap, "idle before first frame");
    end
    frame(HDR_W + 20*PKT_W + 5);   // ends in the middle of a slot
    frame(HDR_W + 8*PKT_W);
    frame(HDR_W + 2);              // restart inside the header
    frame(HDR_W + 40*PKT_W);
    check(n_roc_l > 30 && n_roc_r > 30, "pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
