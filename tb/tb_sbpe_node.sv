// tb_sbpe_node -- exhaustive test of one arbitration-tree node.
//
// For every combination of the two child requests and the selection and
// readOutControl inputs, with random child addresses, the outputs are compared
// with the rule: request = OR of the children, selection and pulse go to the
// hi child when it requests and to the lo child otherwise, and the node's
// address bit is set when the hi child wins.
`timescale 1ns/1ps
module tb_sbpe_node;
  localparam int unsigned AW = 5, LEVEL = 3;
  logic req_lo, req_hi, req_up, sel_in, sel_lo, sel_hi, roc_in, roc_lo, roc_hi;
  logic [AW-1:0] addr_lo, addr_hi, addr_up, exp_addr;
  int checks = 0, failures = 0;

  sbpe_node #(.AW(AW), .LEVEL(LEVEL)) u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int v = 0; v < 16; v++) begin
        {req_lo, req_hi, sel_in, roc_in} = 4'(v);
        // Children addresses only carry bits below this node's level.
        addr_lo = AW'($urandom) & AW'((1 << (LEVEL-1)) - 1);
        addr_hi = AW'($urandom) & AW'((1 << (LEVEL-1)) - 1);
        #1;
        exp_addr = req_hi ? (addr_hi | AW'(1 << (LEVEL-1))) : addr_lo;
        check(req_up == (req_lo | req_hi), "req_up");
        check(sel_hi == (sel_in & req_hi) && sel_lo == (sel_in & !req_hi), "sel");
        check(roc_hi == (roc_in & req_hi) && roc_lo == (roc_in & !req_hi), "roc");
        check(addr_up == exp_addr, $sformatf("addr %b", addr_up));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
