// tb_pixel_half -- test of one half matrix (16 pixels, tree and shared bus).
//
// Each frame, random pixels are written, a frame change is given, and then
// readOutControl pulses are applied every PER cycles. Just before each pulse
// the bus must carry the data and address of the highest-address pixel still
// requesting; after the last one the bus must read zero with address 0 and
// any_req low. Frames alternate between zero-suppressed and full-frame mode.
`timescale 1ns/1ps
module tb_pixel_half;
  localparam int unsigned LV = 4, N = 2**LV, DW = 11, PER = 3;
  logic clk = 1'b0, rst_n = 1'b0, full_frame = 1'b0, frame_swap = 1'b0, roc = 1'b0;
  logic [N-1:0]  fe_we = '0;
  logic [DW-1:0] fe_data [N];
  logic [DW-1:0] bus_data;
  logic [LV-1:0] bus_addr;
  logic          any_req;
  logic [DW-1:0] wr_val [N];
  bit            wr_vld [N];
  int checks = 0, failures = 0, n_pkts = 0;

  pixel_half #(.LEVELS(LV), .DW(DW)) u_dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic frame(input bit ff, input int nwr);
    logic [DW-1:0] rd_val [N];
    bit            rd_req [N];
    for (int n = 0; n < nwr; n++) begin
      int i;
      i = $urandom_range(N-1);
      fe_we[i] = 1'b1; fe_data[i] = DW'($urandom);
      wr_val[i] = fe_data[i]; wr_vld[i] = 1'b1;
      @(negedge clk);
      fe_we[i] = 1'b0;
    end
    for (int i = 0; i < N; i++) begin
      rd_val[i] = wr_val[i]; rd_req[i] = ff | wr_vld[i];
      wr_val[i] = '0; wr_vld[i] = 1'b0;
    end
    full_frame = ff; frame_swap = 1'b1;
    @(negedge clk);
    frame_swap = 1'b0;
    for (int i = N-1; i >= 0; i--) begin
      if (rd_req[i]) begin
        repeat (PER - 1) @(negedge clk);
        check(any_req, "any_req while pixels wait");
        check(bus_data == rd_val[i] && bus_addr == LV'(i),
              $sformatf("pixel %0d: data %h addr %0d", i, bus_data, bus_addr));
        n_pkts++;
        roc = 1'b1; @(negedge clk); roc = 1'b0;
      end
    end
    @(negedge clk);
    check(!any_req && bus_data == '0 && bus_addr == '0, "exhausted: pixel 0 reads zero");
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin fe_data[i] = '0; wr_val[i] = '0; wr_vld[i] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 40; f++) frame(f % 3 == 2, $urandom_range(0, 12));
    check(n_pkts > 100, "packets seen");
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
