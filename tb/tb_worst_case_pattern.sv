// tb_worst_case_pattern -- bus-toggling stress pattern on one full-size
// quadrant (2 x 512 pixels, 11-bit packets, default parameters).
//
// Every pixel carries the range bit (11'b100_0000_0000) and one pixel in
// eight, in readout order, carries all ones (11'b111_1111_1111), so that each
// half's bus swings between the two codes for a quarter of its transfers. The
// test sends NFRAMES back-to-back full frames, each one frame clock period of
// FRAME_CYC cycles, and compares every output bit with the expected stream:
// header, 1024 packets alternating left and right, zeros until the next
// frame. It reports the bit errors and the number of bus swings observed, and
// checks that every frame holds exactly 22 + 1024 * 11 = 11286 bits of header
// and data before the idle packets.
`timescale 1ns/1ps
module tb_worst_case_pattern;
  localparam int unsigned LV = sbpe_pkg::LEVELS, NPIX = 2**LV, DW = sbpe_pkg::DATA_W;
  localparam int unsigned HDR_W = sbpe_pkg::HDR_W;
  localparam int unsigned FBITS = HDR_W + 2*NPIX*DW;           // 11286
  localparam int unsigned FRAME_CYC = FBITS + 2*DW + 8;        // frame clock period
  localparam int unsigned NFRAMES = 8;
  localparam logic [DW-1:0] ONES = '1, RANGE = DW'(1) << (DW-1);

  logic clk = 1'b0, rst_n = 1'b0, frame_clk = 1'b0, full_frame = 1'b1;
  logic [NPIX-1:0] fe_we [2];
  logic [DW-1:0]   fe_data [2][NPIX];
  logic            ser_out;
  int checks = 0, failures = 0, bit_errors = 0, swings = 0;

  quadrant_readout u_dut (.clk, .rst_n, .frame_clk, .full_frame, .fe_we, .fe_data, .ser_out);
  always #5 clk = ~clk;

  // Pattern value of a pixel: readout order is descending address, and the
  // first of every eight pixels read carries all ones.
  function automatic logic [DW-1:0] pattern(input int i);
    return ((NPIX - 1 - i) % 8 == 0) ? ONES : RANGE;
  endfunction

  initial begin
    logic [DW-1:0] prev [2];
    for (int h = 0; h < 2; h++) begin
      fe_we[h] = '0;
      for (int i = 0; i < NPIX; i++) fe_data[h][i] = pattern(i);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      // The front end writes the pattern during the previous frame.
      fe_we[0] = '1; fe_we[1] = '1;
      @(negedge clk);
      fe_we[0] = '0; fe_we[1] = '0;
      frame_clk = 1'b1;
      repeat (3) @(posedge clk);
      prev[0] = RANGE; prev[1] = RANGE;
      for (int b = 0; b < int'(FRAME_CYC) - 5; b++) begin
        bit e;
        int s, k, h, i;
        @(negedge clk);
        if (b == FRAME_CYC / 2) frame_clk = 1'b0;
        if (b < int'(HDR_W)) e = sbpe_pkg::HEADER[HDR_W-1-b];
        else if (b < int'(FBITS)) begin
          s = (b - int'(HDR_W)) / int'(DW);
          k = (b - int'(HDR_W)) % int'(DW);
          h = s % 2;
          i = int'(NPIX) - 1 - s / 2;
          e = pattern(i)[DW-1-k];
          if (k == 0) begin
            if (pattern(i) != prev[h]) swings++;
            prev[h] = pattern(i);
          end
        end else e = 1'b0;
        checks++;
        if (ser_out !== e) begin
          bit_errors++; failures++;
          if (failures < 10) $display("FAIL frame %0d bit %0d", f, b);
        end
      end
    end
    $display("frames=%0d bits=%0d bit_errors=%0d bus_swings=%0d (%0d per half per frame)",
             NFRAMES, checks, bit_errors, swings, swings / NFRAMES / 2);
    checks++;
    // Each group of eight reads gives two swings: into and out of all ones.
    if (swings != int'(NFRAMES * 2 * (NPIX / 4))) begin
      failures++;
      $display("FAIL swing count %0d", swings);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NFRAMES + 1) * FRAME_CYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
