// tb_pixel_cell -- test of the in-pixel readout interface.
//
// Checks the double buffer (data written in one frame is read in the next,
// while new writes go to the other register), the request set at a frame
// change in zero-suppressed and in full-frame mode, the bus driven only while
// selected and requesting, and the request cleared by the routed
// readOutControl pulse.
`timescale 1ns/1ps
module tb_pixel_cell;
  localparam int unsigned DW = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  logic full_frame = 1'b0, frame_swap = 1'b0, fe_we = 1'b0, sel = 1'b0, roc = 1'b0;
  logic [DW-1:0] fe_data = '0, bus_data;
  logic read_request;
  int checks = 0, failures = 0;

  pixel_cell #(.DATA_W(DW)) u_dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write(input logic [DW-1:0] v);
    fe_we = 1'b1; fe_data = v; @(negedge clk); fe_we = 1'b0;
  endtask
  task automatic swap(input bit ff);
    full_frame = ff; frame_swap = 1'b1; @(negedge clk); frame_swap = 1'b0;
  endtask
  task automatic pulse();
    roc = 1'b1; @(negedge clk); roc = 1'b0;
  endtask

  initial begin
    logic [DW-1:0] a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(read_request == 1'b0, "no request after reset");
    sel = 1'b1;
    #1 check(bus_data == '0, "bus idle after reset");

    for (int it = 0; it < 20; it++) begin
      a = DW'($urandom); b = DW'($urandom);
      sel = 1'b0;
      write(a);
      swap(1'b0);
      check(read_request == 1'b1, "request with data (zero-suppressed)");
      #1 check(bus_data == '0, "not selected: bus stays zero");
      sel = 1'b1;
      #1 check(bus_data == a, "selected: drives previous frame data");
      write(b);                                  // next frame written meanwhile
      #1 check(bus_data == a, "read register unaffected by writes");
      pulse();
      check(read_request == 1'b0, "request cleared by pulse");
      #1 check(bus_data == '0, "released bus after pulse");
      swap(1'b0);
      check(read_request == 1'b1, "second frame requests");
      #1 check(bus_data == b, "second frame data");
      pulse();
      swap(1'b0);
      check(read_request == 1'b0, "no data: no request in zero-suppressed mode");
      swap(1'b1);
      check(read_request == 1'b1, "full-frame: request without data");
      #1 check(bus_data == '0, "full-frame empty pixel reads zero");
      pulse();
      check(read_request == 1'b0, "full-frame request cleared");
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
