// tb_sbpe_tree -- test of the synchronized binary-tree priority encoder.
//
// Random request patterns (sparse, dense, single, empty) are applied to a
// 512-pixel tree. The selected pixel must be the requesting pixel with the
// highest address, or pixel 0 when none requests; the address output must
// name it; the readOutControl pulse must reach that pixel only. A second
// part clears requests one at a time, as pixels do after their pulse, and
// checks that the tree walks through them in descending address order.
`timescale 1ns/1ps
module tb_sbpe_tree;
  localparam int unsigned LV = 9, N = 2**LV;
  logic [N-1:0]  req, sel, roc_pix;
  logic          roc, any_req;
  logic [LV-1:0] addr;
  int checks = 0, failures = 0;

  sbpe_tree #(.LEVELS(LV)) u_dut (.req, .roc, .sel, .roc_pix, .any_req, .addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int highest(input logic [N-1:0] r);
    for (int i = N-1; i >= 0; i--) if (r[i]) return i;
    return -1;
  endfunction

  task automatic apply_and_check();
    int w;
    logic [N-1:0] exp_sel;
    w = highest(req);
    exp_sel = '0;
    exp_sel[w < 0 ? 0 : w] = 1'b1;
    for (int r = 0; r < 2; r++) begin
      roc = r[0];
      #1;
      check(any_req == (w >= 0), "any_req");
      check(sel == exp_sel, $sformatf("sel for winner %0d", w));
      check(roc_pix == (roc ? exp_sel : '0), "roc routing");
      check(addr == LV'(w < 0 ? 0 : w), $sformatf("addr %0d vs %0d", addr, w));
    end
  endtask

  initial begin
    int dens, w;
    req = '0; roc = 1'b0;
    apply_and_check();                       // nothing requests: pixel 0
    for (int i = 0; i < N; i += 37) begin    // single requests
      req = '0; req[i] = 1'b1;
      apply_and_check();
    end
    for (int t = 0; t < 300; t++) begin      // random densities
      dens = $urandom_range(1, 64);
      for (int i = 0; i < N; i++) req[i] = ($urandom_range(63) < dens);
      apply_and_check();
    end
    // Walk: every pulse clears the selected pixel's request.
    for (int i = 0; i < N; i++) req[i] = ($urandom_range(3) == 0);
    while (req != '0) begin
      w = highest(req);
      apply_and_check();
      req[w] = 1'b0;
    end
    apply_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
