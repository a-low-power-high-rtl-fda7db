// tb_pixel_readout_full -- end-to-end test of pixel_readout_top with every parameter at its
// default: four outputs of 2 x 512 pixels, 11-bit packets, 11286-bit frames.
//
// A behavioural reference keeps, for every pixel, the value the front end
// wrote during the current frame and the value being read out. The test runs
// a sequence of frames and, for every quadrant output, compares the serial
// stream bit by bit with the stream the reference predicts: the header, then
// packets alternating left and right half, each half in descending pixel
// address order (only pixels written in the previous frame in zero-suppressed
// mode), then zero packets once a half has nothing left. New data are written
// while the previous frame is being read out, which exercises the double
// buffer in every pixel. One frame is cut short by an early frame change.
// The frame length in clock cycles is checked against 22 + packets * PKT_W.
// Counts of each mechanism seen are printed; a mechanism that never occurred
// counts as a failure.
`timescale 1ns/1ps
module tb_pixel_readout_full;
  localparam int unsigned NQ     = sbpe_pkg::N_QUAD;
  localparam int unsigned LV     = sbpe_pkg::LEVELS;
  localparam bit          AO     = 1'b0;
  localparam int unsigned DW     = sbpe_pkg::DATA_W;
  localparam int unsigned NPIX   = 2**LV;
  localparam int unsigned PKT_W  = DW + (AO ? LV : 0);
  localparam int unsigned HDR_W  = sbpe_pkg::HDR_W;
  localparam int unsigned EXTRA  = 4;   // zero packets checked after the data
  localparam int unsigned NSLOT  = 2*NPIX + EXTRA;
  localparam int unsigned FBITS  = HDR_W + NSLOT*PKT_W;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            frame_clk = 1'b0;
  logic            full_frame = 1'b1;
  logic [NPIX-1:0] fe_we   [NQ][2];
  logic [DW-1:0]   fe_data [NQ][2][NPIX];
  logic [NQ-1:0]   ser_out;

  pixel_readout_top u_dut (
    .ser_clk (clk), .rst_n, .frame_clk, .full_frame, .fe_we, .fe_data, .ser_out
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_full = 0, n_zs = 0, n_zero_slot = 0, n_pingpong = 0, n_dbuf = 0,
      n_abort = 0, n_empty_half = 0, n_addr = 0;

  // Reference state.
  logic [DW-1:0] wr_val [NQ][2][NPIX];
  bit            wr_vld [NQ][2][NPIX];
  logic [DW-1:0] rd_val [NQ][2][NPIX];
  bit            rd_req [NQ][2][NPIX];
  logic [PKT_W-1:0] exp_pkt [NQ][NSLOT];
  int               n_data  [NQ][2];   // data packets of each half this frame

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Frame change as the pixels see it, and the packets it will produce.
  task automatic ref_swap(input bit ff);
    for (int q = 0; q < NQ; q++) begin
      int pos [2] = '{0, 0};
      for (int s = 0; s < NSLOT; s++) exp_pkt[q][s] = '0;
      for (int h = 0; h < 2; h++) begin
        for (int i = 0; i < NPIX; i++) begin
          rd_val[q][h][i] = wr_val[q][h][i];
          rd_req[q][h][i] = ff | wr_vld[q][h][i];
          wr_val[q][h][i] = '0;
          wr_vld[q][h][i] = 1'b0;
        end
        for (int i = NPIX-1; i >= 0; i--) begin
          if (rd_req[q][h][i]) begin
            logic [PKT_W-1:0] p;
            if (AO) p = PKT_W'({LV'(i), rd_val[q][h][i]});
            else    p = PKT_W'(rd_val[q][h][i]);
            exp_pkt[q][2*pos[h] + h] = p;
            pos[h]++;
          end
        end
        if (pos[h] == 0) n_empty_half++;
        n_data[q][h] = pos[h];
      end
    end
  endtask

  // Random front-end writes spread over the frame being read out.
  task automatic writer(input int nwr, input int gap);
    for (int n = 0; n < nwr; n++) begin
      int q = $urandom_range(NQ-1), h = $urandom_range(1), i = $urandom_range(NPIX-1);
      logic [DW-1:0] v = DW'($urandom);
      repeat (gap) @(negedge clk);
      fe_we[q][h][i]   = 1'b1;
      fe_data[q][h][i] = v;
      wr_val[q][h][i]  = v;
      wr_vld[q][h][i]  = 1'b1;
      n_dbuf++;
      @(negedge clk);
      fe_we[q][h][i] = 1'b0;
    end
  endtask

  // Full-frame mode: every pixel gets a value.
  task automatic write_all();
    for (int q = 0; q < NQ; q++)
      for (int h = 0; h < 2; h++) begin
        for (int i = 0; i < NPIX; i++) begin
          fe_we[q][h][i]   = 1'b1;
          fe_data[q][h][i] = DW'($urandom);
          wr_val[q][h][i]  = fe_data[q][h][i];
          wr_vld[q][h][i]  = 1'b1;
        end
      end
    @(negedge clk);
    for (int q = 0; q < NQ; q++) begin
      fe_we[q][0] = '0;
      fe_we[q][1] = '0;
    end
    n_dbuf++;
  endtask

  // Start a frame and check nbits of every output; writes may run meanwhile.
  task automatic run_frame(input bit ff, input int nbits, input int nwr);
    int start_cyc, first_one;
    full_frame = ff;
    ref_swap(ff);
    @(negedge clk);
    frame_clk = 1'b1;
    // Two synchroniser stages and the edge detector: the header starts after
    // the third rising clock edge.
    repeat (3) @(posedge clk);
    fork
      begin
        for (int b = 0; b < nbits; b++) begin
          @(negedge clk);
          if (b == 4) frame_clk = 1'b0;
          for (int q = 0; q < NQ; q++) begin
            bit e;
            if (b < HDR_W) e = sbpe_pkg::HEADER[HDR_W-1-b];
            else begin
              int s = (b - HDR_W) / PKT_W, k = (b - HDR_W) % PKT_W;
              e = exp_pkt[q][s][PKT_W-1-k];
            end
            check(ser_out[q] === e, $sformatf("q%0d bit %0d", q, b));
          end
        end
      end
      begin
        // Writes start after the swap edge and end well before the frame does.
        repeat (4) @(negedge clk);
        writer(nwr, (nbits - 40) / (nwr + 1) / 2 + 1);
      end
    join
    for (int q = 0; q < NQ; q++)
      for (int s = 0; s < (nbits - HDR_W) / PKT_W; s++) begin
        if (s/2 >= n_data[q][s%2]) n_zero_slot++;
        else if (s%2 == 1 && s/2 < n_data[q][0]) n_pingpong++;
      end
    if (ff) n_full++; else n_zs++;
    if (nbits < FBITS) n_abort++;
    if (AO) n_addr++;
  endtask

  initial begin
    for (int q = 0; q < NQ; q++)
      for (int h = 0; h < 2; h++) begin
        fe_we[q][h] = '0;
        for (int i = 0; i < NPIX; i++) begin
          fe_data[q][h][i] = '0;
          wr_val[q][h][i]  = '0;
          wr_vld[q][h][i]  = 1'b0;
        end
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // Before the first frame the outputs are idle at zero.
    for (int q = 0; q < NQ; q++) check(ser_out[q] == 1'b0, "idle");

    write_all();
    run_frame(1'b1, FBITS, 3);            // full frame, random data
    run_frame(1'b0, FBITS, 40);       // zero-suppressed: the 3 + writes above
    run_frame(1'b0, FBITS, 0);            // zero-suppressed, only the writes above
    run_frame(1'b0, HDR_W + 5*PKT_W, 40); // cut short by the next frame change
    write_all();
    run_frame(1'b1, FBITS, 40);       // full frame again
    run_frame(1'b0, FBITS, 0);

    $display("mechanisms: full_frame=%0d zero_suppressed=%0d double_buffer_writes=%0d early_frame_change=%0d empty_half=%0d idle_zero_packets=%0d interleaved_pairs=%0d address_frames=%0d",
             n_full, n_zs, n_dbuf, n_abort, n_empty_half, n_zero_slot, n_pingpong, n_addr);
    check(n_full > 0 && n_zs > 0 && n_dbuf > 0 && n_abort > 0 && n_empty_half > 0 &&
          n_zero_slot > 0 && n_pingpong > 0,
          "every mechanism exercised");
    if (AO) check(n_addr > 0, "address frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (95640) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
