// tb_output_serializer -- test of the two-part serializer.
//
// The control inputs are driven as the readout controller drives them: a
// header, then alternating left and right slots, each part latched by its
// pulse in the last cycle of its own slot while the other part shifts. Random
// packets are placed on the two buses only in the cycle of their latch pulse,
// and the serial output must reproduce the header and every packet MSB first.
`timescale 1ns/1ps
module tb_output_serializer;
  localparam int unsigned PKT_W = 11, HDR_W = 22, NS = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PKT_W-1:0] bus_l = '0, bus_r = '0;
  logic latch_l = 1'b0, latch_r = 1'b0, hdr_bit = 1'b0, ser_out;
  sbpe_pkg::out_src_e out_src = sbpe_pkg::SRC_IDLE;
  logic [PKT_W-1:0] pkts [NS];
  int checks = 0, failures = 0;

  output_serializer #(.PKT_W(PKT_W)) u_dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) pkts[s] = PKT_W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1 check(ser_out == 1'b0, "idle output");
    // Header; left packet 0 latched in header cycle HDR_W-PKT_W-1, right
    // packet 1 in the last header cycle.
    for (int c = 0; c < HDR_W; c++) begin
      out_src = sbpe_pkg::SRC_HDR;
      hdr_bit = sbpe_pkg::HEADER[HDR_W-1-c];
      latch_l = (c == HDR_W - PKT_W - 1);
      latch_r = (c == HDR_W - 1);
      bus_l = latch_l ? pkts[0] : PKT_W'($urandom);
      bus_r = latch_r ? pkts[1] : PKT_W'($urandom);
      #1 check(ser_out == hdr_bit, "header bit");
      @(negedge clk);
    end
    for (int s = 0; s < NS; s++) begin
      for (int k = 0; k < PKT_W; k++) begin
        out_src = (s % 2) ? sbpe_pkg::SRC_R : sbpe_pkg::SRC_L;
        // The part that just finished latches the packet two slots ahead.
        latch_l = (s % 2 == 0) && (k == PKT_W - 1) && (s + 2 < NS);
        latch_r = (s % 2 == 1) && (k == PKT_W - 1) && (s + 2 < NS);
        bus_l = latch_l ? pkts[s+2] : PKT_W'($urandom);
        bus_r = latch_r ? pkts[s+2] : PKT_W'($urandom);
        #1 check(ser_out == pkts[s][PKT_W-1-k], $sformatf("slot %0d bit %0d", s, k));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
